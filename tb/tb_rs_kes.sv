// tb_rs_kes -- shared checks for the key equation solvers.
//
// Drives one solver (MEA, iBMA or RiBMA, chosen by KES) with the syndromes of
// random received words carrying 0..T errors, computed by the reference
// model, and checks the result mathematically: Lambda must vanish at the
// inverse locator of every injected error, have degree equal to the number
// of errors, and Omega must equal S(x) Lambda(x) mod x^2T (for RiBMA, whose
// Omega is the high-order evaluator, the error values obtained from it with
// Forney's formula must equal the injected ones). It also records
// the number of cycles from accepting the syndromes to kes_valid, holds
// kes_ready low for a while on some blocks to check that the result is held,
// and exposes checks/failures/max_cycles to the testbench that wraps it.
module tb_rs_kes
  import rs_pkg::*;
  import rs_ref_pkg::*;
#(
  parameter kes_arch_e KES  = KES_MEA,
  parameter int        N    = 204,
  parameter int        K    = 188,
  parameter int        NBLK = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   max_cycles,
  output int   min_cycles
);
  localparam int M  = 8;
  localparam int NS = N - K;
  localparam int T  = NS / 2;

  logic         synd_valid, synd_ready, kes_valid, kes_ready;
  logic [M-1:0] synd [NS];
  logic [M-1:0] lambda [T+1];
  logic [M-1:0] omega  [T];

  if (KES == KES_MEA) begin : g_mea
    rs_kes_mea #(.M(M), .POLY('h11D), .N(N), .K(K)) dut (.*);
  end else if (KES == KES_IBMA) begin : g_ibma
    rs_kes_ibma #(.M(M), .POLY('h11D), .N(N), .K(K)) dut (.*);
  end else begin : g_ribma
    rs_kes_ribma #(.M(M), .POLY('h11D), .N(N), .K(K)) dut (.*);
  end

  function automatic int peval(const ref int p[$], int x);
    int acc;
    acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = ref_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  initial begin
    int cw[$], msg[$], rx[$], s[$], lam[$], om[$];
    int pos[$];
    int ne, cyc, deg;
    done = 0; checks = 0; failures = 0; max_cycles = 0; min_cycles = 1 << 30;
    synd_valid = 0; kes_ready = 0;
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
      for (int i = 0; i < NS; i++) begin
        s.push_back(ref_synd(N, 0, i, rx));
        synd[i] = M'(s[i]);
      end
      @(negedge clk);
      synd_valid = 1;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!synd_ready);
      @(negedge clk);
      synd_valid = 0;
      for (int i = 0; i < NS; i++) synd[i] = '0;
      cyc = 1;   // the accepting cycle loads the solver
      while (!kes_valid) begin @(negedge clk); cyc++; end
      if (cyc > max_cycles) max_cycles = cyc;
      if (cyc < min_cycles) min_cycles = cyc;
      if (bk % 3 == 0) repeat (7) @(negedge clk);
      lam = {}; om = {};
      for (int i = 0; i <= T; i++) lam.push_back(int'(lambda[i]));
      for (int i = 0; i < T; i++) om.push_back(int'(omega[i]));
      // Error locations.
      pos = {};
      for (int si = 0; si < N; si++) if (rx[si] != cw[si]) pos.push_back(N - 1 - si);
      checks++;
      foreach (pos[e]) if (peval(lam, ref_apow(-pos[e])) != 0) begin
        failures++; $display("blk %0d: Lambda not zero at position %0d", bk, pos[e]); break;
      end
      deg = -1;
      foreach (lam[i]) if (lam[i] != 0) deg = i;
      checks++;
      if (deg != ne) begin failures++; $display("blk %0d: deg Lambda %0d, errors %0d", bk, deg, ne); end
      if (KES != KES_RIBMA) begin
        for (int i = 0; i < T; i++) begin
          int acc;
          acc = 0;
          for (int j = 0; j <= i; j++) acc ^= ref_mul(lam[j], s[i - j]);
          checks++;
          if (acc != om[i]) begin failures++; $display("blk %0d: Omega_%0d %0d exp %0d", bk, i, om[i], acc); end
        end
      end else begin
        // High-order evaluator: error value = X^-2T Omega^h(X^-1) / Lambda_odd(X^-1).
        foreach (pos[e]) begin
          int xi, lo, y;
          xi = ref_apow(-pos[e]);
          lo = 0;
          for (int i = 1; i <= T; i += 2) lo ^= ref_mul(lam[i], ref_apow(-pos[e] * i));
          y = ref_mul(ref_mul(ref_apow(-NS * pos[e]), peval(om, xi)), (lo == 0) ? 0 : ref_apow(-log_t[lo]));
          checks++;
          if (y != (rx[N - 1 - pos[e]] ^ cw[N - 1 - pos[e]])) begin
            failures++; $display("blk %0d: value at %0d is %0d exp %0d", bk, pos[e], y, rx[N - 1 - pos[e]] ^ cw[N - 1 - pos[e]]);
          end
        end
      end
      checks++;
      if (!kes_valid) failures++;   // result held while not taken
      kes_ready = 1;
      @(negedge clk);
      kes_ready = 0;
    end
    done = 1;
  end

endmodule
