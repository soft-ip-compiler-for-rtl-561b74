// tb_rs_corrector -- self-checking test of rs_corrector on the (204,188) code.
//
// Plays the part of an ascending Chien search: for each block it reports
// every position 0..N-1 in order, one per cycle with random gaps, flagging
// 0..T random error positions with their values, and raises cf_last (with a
// random fail flag) at position N-1. The FIFO is modelled by an array read
// through fifo_rd. The corrected stream must equal received symbol XOR error
// for every position, in stream order (position N-1 first), starting one
// cycle after the hand-over, with out_last/out_fail on the last symbol.
// Consecutive blocks are reported back to back, so a new list is filled
// while the previous one is being applied.
module tb_rs_corrector;
  localparam int M = 8, N = 204, K = 188, T = 8, CW = 8, NBLK = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          cf_valid, cf_root, cf_last, cf_fail, fifo_rd;
  logic [CW-1:0] cf_pos;
  logic [M-1:0]  cf_err, fifo_data;
  logic          out_valid, out_last, out_fail;
  logic [M-1:0]  out_sym;

  rs_corrector #(.M(M), .N(N), .K(K)) dut (.*);

  int rx [NBLK * N];       // stream order
  int ev [NBLK * N];       // error value per stream index
  logic failf [NBLK];
  int rd_idx = 0;
  assign fifo_data = M'(rx[rd_idx]);
  always @(posedge clk) if (rst_n && fifo_rd) rd_idx <= rd_idx + 1;

  int checks = 0, failures = 0;

  initial begin
    cf_valid = 0; cf_root = 0; cf_last = 0; cf_fail = 0; cf_pos = '0; cf_err = '0;
    for (int i = 0; i < NBLK * N; i++) begin
      rx[i] = $urandom_range(255);
      ev[i] = 0;
    end
    for (int bk = 0; bk < NBLK; bk++) begin
      int ne;
      ne = (bk == 1) ? T : (bk == 2) ? 1 : (bk == 3) ? T - 2 : $urandom_range(T);
      for (int e = 0; e < ne; e++) begin
        int si;
        do si = $urandom_range(N - 1); while (ev[bk * N + si] != 0);
        ev[bk * N + si] = $urandom_range(255, 1);
      end
      // positions N-1 and 0 in some blocks
      if (bk == 3) begin ev[bk * N] = 7; ev[bk * N + N - 1] = 9; end
      failf[bk] = ($urandom_range(3) == 0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int bk = 0; bk < NBLK; bk++) begin
      for (int p = 0; p < N; p++) begin
        int si;
        si = bk * N + (N - 1 - p);
        @(negedge clk);
        // gaps only where the output side has time to finish
        if (p < N - 3 && $urandom_range(7) == 0) begin cf_valid = 0; @(negedge clk); end
        cf_valid = 1;
        cf_pos   = CW'(p);
        cf_root  = (ev[si] != 0);
        cf_err   = M'(ev[si]);
        cf_last  = (p == N - 1);
        cf_fail  = (p == N - 1) && failf[bk];
      end
      @(negedge clk);
      cf_valid = 0;
      cf_last  = 0;
    end
  end

  // Checker.
  int oidx = 0;
  logic handed = 1'b0;
  int since = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (cf_valid && cf_last) begin handed <= 1'b1; since <= 0; end
      else if (handed) since <= since + 1;
      if (out_valid) begin
        int bk, pos;
        bk  = oidx / N;
        pos = N - 1 - (oidx % N);
        checks++;
        if (int'(out_sym) != (rx[oidx] ^ ev[oidx]) || out_last != (pos == 0) ||
            (pos == 0 && out_fail != failf[bk])) begin
          failures++;
          $display("idx %0d: got %0d exp %0d last %0d fail %0d", oidx, out_sym, rx[oidx] ^ ev[oidx], out_last, out_fail);
        end
        if (oidx % N == 0) begin
          // first output two cycles after the cf_last cycle
          checks++;
          if (since != 1) begin failures++; $display("block %0d starts %0d cycles after hand-over", bk, since + 1); end
        end
        oidx <= oidx + 1;
      end
    end
  end

  initial begin
    fork
      wait (oidx == NBLK * N);
      begin repeat (NBLK * N * 3) @(posedge clk); $display("watchdog expired"); failures++; end
    join_any
    repeat (2) @(posedge clk);
    checks++;
    if (oidx != NBLK * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
