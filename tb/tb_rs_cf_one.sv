// tb_rs_cf_one -- checks one rs_chien_forney instance (used by
// tb_rs_chien_forney for each scan order and code).
//
// For each block the testbench injects 0..T errors into a random codeword,
// builds Lambda(x) = c * prod(1 - X_l x) and Omega(x) = S(x) Lambda(x) mod
// x^2T with the reference model (c a random nonzero scale) and checks every
// output position: position order, root flag, error value and, in the
// descending (direct) mode, the corrected symbol read through fifo_rd.
// Blocks with a random Lambda must raise out_fail exactly when its number of
// roots among the N positions differs from its degree. Timing: the first
// output comes 3 cycles after the load cycle, N outputs follow back to back,
// and kes_ready is low during the scan.
module tb_rs_cf_one
  import rs_ref_pkg::*;
#(
  parameter int N    = 204,
  parameter int K    = 188,
  parameter int B    = 0,
  parameter bit DESC = 1'b1,
  parameter int NBLK = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fail
);
  localparam int M  = 8;
  localparam int NS = N - K;
  localparam int T  = NS / 2;
  localparam int CW = $clog2(N);

  logic          kes_valid, kes_ready, fifo_rd;
  logic [M-1:0]  lambda [T+1];
  logic [M-1:0]  omega  [T];
  logic [M-1:0]  fifo_data;
  logic          out_valid, out_root, out_last, out_fail;
  logic [CW-1:0] out_pos;
  logic [M-1:0]  out_err, out_sym;

  rs_chien_forney #(.M(M), .POLY('h11D), .N(N), .K(K), .B(B), .DESCENDING(DESC)) dut (.*);

  int rx[$];
  int rd_idx;
  assign fifo_data = M'(rx[rd_idx]);
  always @(posedge clk) if (rst_n && fifo_rd) rd_idx <= rd_idx + 1;

  function automatic int peval(const ref int p[$], int x);
    int acc;
    acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = ref_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  initial begin
    int msg[$], cw[$], lam[$], om[$], s[$], err[$];
    int ne, c, nroot, deg, cyc, pos, expfail;
    logic random_lambda;
    done = 0; checks = 0; failures = 0; n_fail = 0;
    kes_valid = 0;
    foreach (lambda[i]) lambda[i] = '0;
    foreach (omega[i]) omega[i] = '0;
    rx = {};
    for (int i = 0; i < N * (NBLK + 1); i++) rx.push_back(0);
    rd_idx = 0;
    ref_init(M, 'h11D);
    @(posedge rst_n);
    for (int bk = 0; bk < NBLK; bk++) begin
      msg = {};
      for (int i = 0; i < K; i++) msg.push_back($urandom_range(255));
      ref_encode(N, K, B, msg, cw);
      err = {};
      for (int i = 0; i < N; i++) err.push_back(0);
      random_lambda = (bk % 5 == 4);
      ne = (bk == 0) ? 0 : (bk == 1) ? T : $urandom_range(T, 1);
      c = $urandom_range(255, 1);
      lam = {c};
      for (int e = 0; e < ne && !random_lambda; e++) begin
        int si, xl;
        do si = $urandom_range(N - 1); while (err[si] != 0);
        err[si] = $urandom_range(255, 1);
        xl = ref_apow(N - 1 - si);
        lam.push_back(0);
        for (int i = lam.size() - 1; i >= 1; i--) lam[i] ^= ref_mul(lam[i - 1], xl);
      end
      if (random_lambda) begin
        lam = {};
        for (int i = 0; i <= T; i++) lam.push_back($urandom_range(255));
        lam[0] = $urandom_range(255, 1);
      end
      while (lam.size() < T + 1) lam.push_back(0);
      for (int i = 0; i < N; i++) rx[bk * N + i] = cw[i] ^ err[i];
      s = {};
      begin
        int r[$];
        r = {};
        for (int i = 0; i < N; i++) r.push_back(cw[i] ^ err[i]);
        for (int i = 0; i < NS; i++) s.push_back(ref_synd(N, B, i, r));
      end
      om = {};
      for (int i = 0; i < T; i++) begin
        int acc;
        acc = 0;
        for (int j = 0; j <= i && j <= T; j++) acc ^= ref_mul(lam[j], s[i - j]);
        om.push_back(acc);
      end
      nroot = 0;
      for (int p = 0; p < N; p++) if (peval(lam, ref_apow(-p)) == 0) nroot++;
      deg = 0;
      foreach (lam[i]) if (lam[i] != 0) deg = i;
      expfail = (nroot != deg);
      for (int i = 0; i <= T; i++) lambda[i] = M'(lam[i]);
      for (int i = 0; i < T; i++) omega[i] = M'(om[i]);
      @(negedge clk);
      kes_valid = 1;
      do @(posedge clk); while (!kes_ready);
      @(negedge clk);
      kes_valid = 0;
      cyc = 1;
      while (!out_valid) begin
        checks++;
        if (kes_ready) failures++;
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 3) begin failures++; $display("first output after %0d cycles", cyc); end
      for (int o = 0; o < N; o++) begin
        int si;
        pos = DESC ? N - 1 - o : o;
        si  = N - 1 - pos;
        checks++;
        if (!out_valid || int'(out_pos) != pos || out_last != (o == N - 1)) begin
          failures++; $display("blk %0d o %0d: valid %0d pos %0d last %0d", bk, o, out_valid, out_pos, out_last);
        end
        if (!random_lambda) begin
          checks++;
          if (out_root != (err[si] != 0) || (err[si] != 0 && int'(out_err) != err[si])) begin
            failures++; $display("blk %0d pos %0d: root %0d err %0d exp %0d", bk, pos, out_root, out_err, err[si]);
          end
          if (DESC) begin
            checks++;
            if (int'(out_sym) != cw[si]) begin failures++; $display("blk %0d pos %0d: sym %0d exp %0d", bk, pos, out_sym, cw[si]); end
          end
        end
        if (o == N - 1) begin
          checks++;
          if (int'(out_fail) != expfail) begin failures++; $display("blk %0d: fail %0d exp %0d (roots %0d deg %0d)", bk, out_fail, expfail, nroot, deg); end
          if (out_fail) n_fail++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (DESC && rd_idx != N * NBLK) failures++;
    if (!DESC && rd_idx != 0) failures++;
    done = 1;
  end

endmodule
