// tb_rs_kes_cells -- self-checking test of rs_kes_cells: three MEA cells on
// the (204,188) code, T = 8.
//
// Syndrome sets of random received words with 0..T errors (from the
// reference model) are offered back to back, as fast as the cells take them,
// while the result side is taken with a random kes_ready. Because the MEA
// solving time depends on the number of errors, cells finish out of order;
// the results must still come out in arrival order. Each result is checked
// algebraically: Lambda vanishes at the inverse locator of every injected
// error, its degree equals the number of errors, and Omega equals
// S(x) Lambda(x) mod x^2T. The test also requires all three cells to have
// been busy at the same time and, as a throughput check, that the busy
// cycles of all cells add up to more than twice the elapsed time, i.e. that
// the blocks took less than half as long as one cell working alone would.
module tb_rs_kes_cells;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int M     = 8;
  localparam int N     = 204;
  localparam int K     = 188;
  localparam int NS    = N - K;
  localparam int T     = NS / 2;
  localparam int NCELL = 3;
  localparam int NBLK  = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         synd_valid, synd_ready, kes_valid, kes_ready;
  logic [M-1:0] synd [NS];
  logic [M-1:0] lambda [T+1];
  logic [M-1:0] omega  [T];

  rs_kes_cells #(.M(M), .POLY('h11D), .N(N), .K(K), .KES(KES_MEA), .NCELL(NCELL)) dut (.*);

  int checks = 0, failures = 0;
  int s_q   [$][$];     // syndromes of each block, in arrival order
  int pos_q [$][$];     // error positions of each block
  int ne_q  [$];
  int nout = 0, max_busy = 0, cyc = 0, t_end = 0;
  int cell_cycles = 0;  // sum over cells of their busy cycles
  bit in_done = 0;

  function automatic int peval(const ref int p[$], int x);
    int acc;
    acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = ref_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // Source: keep synd_valid high with the next block until it is taken.
  initial begin
    int cw[$], msg[$], rx[$], s[$], pos[$];
    int ne;
    synd_valid = 0;
    for (int i = 0; i < NS; i++) synd[i] = '0;
    ref_init(M, 'h11D);
    @(posedge rst_n);
    for (int bk = 0; bk < NBLK; bk++) begin
      msg = {};
      for (int i = 0; i < K; i++) msg.push_back($urandom_range(255));
      ref_encode(N, K, 0, msg, cw);
      rx = cw;
      ne = (bk < 2) ? bk * T : $urandom_range(T, 0);
      ref_corrupt(N, ne, rx);
      s = {};
      pos = {};
      for (int i = 0; i < NS; i++) s.push_back(ref_synd(N, 0, i, rx));
      for (int si = 0; si < N; si++) if (rx[si] != cw[si]) pos.push_back(N - 1 - si);
      s_q.push_back(s);
      pos_q.push_back(pos);
      ne_q.push_back(ne);
      @(negedge clk);
      synd_valid = 1;
      for (int i = 0; i < NS; i++) synd[i] = M'(s[i]);
      @(posedge clk);
      while (!synd_ready) @(posedge clk);
      @(negedge clk);
      synd_valid = 0;
    end
    in_done = 1;
  end

  // Sink and checker.
  always @(negedge clk) kes_ready <= rst_n && ($urandom_range(3) != 0);

  always @(posedge clk) begin
    if (rst_n) begin
      int busy;
      cyc++;
      busy = 0;
      for (int c = 0; c < NCELL; c++) if (!dut.c_sr[c]) busy++;
      if (busy > max_busy) max_busy = busy;
      if (nout < NBLK) cell_cycles += busy;
      if (kes_valid && kes_ready) begin
        int lam[$], om[$], s[$], pos[$];
        int deg;
        lam = {}; om = {};
        for (int i = 0; i <= T; i++) lam.push_back(int'(lambda[i]));
        for (int i = 0; i < T; i++) om.push_back(int'(omega[i]));
        s   = s_q[nout];
        pos = pos_q[nout];
        checks++;
        foreach (pos[e]) if (peval(lam, ref_apow(-pos[e])) != 0) begin
          failures++; $display("blk %0d: Lambda not zero at position %0d", nout, pos[e]); break;
        end
        deg = -1;
        foreach (lam[i]) if (lam[i] != 0) deg = i;
        checks++;
        if (deg != ne_q[nout]) begin
          failures++; $display("blk %0d: deg Lambda %0d, errors %0d", nout, deg, ne_q[nout]);
        end
        for (int i = 0; i < T; i++) begin
          int acc;
          acc = 0;
          for (int j = 0; j <= i; j++) acc ^= ref_mul(lam[j], s[i - j]);
          checks++;
          if (acc != om[i]) begin failures++; $display("blk %0d: Omega_%0d %0d exp %0d", nout, i, om[i], acc); end
        end
        nout++;
        t_end = cyc;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (nout == NBLK);
      begin repeat (200000) @(posedge clk); $display("watchdog expired"); failures++; end
    join_any
    repeat (2) @(posedge clk);
    checks += 2;
    $display("cells busy at once: %0d; %0d blocks in %0d cycles, %0d cell-cycles",
             max_busy, nout, t_end, cell_cycles);
    if (max_busy != NCELL) begin failures++; $display("not all cells were busy at once"); end
    if (nout == NBLK && 2 * t_end >= cell_cycles) begin
      failures++; $display("no speed-up from %0d cells", NCELL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
