// rs_chien_forney -- Chien search and Forney error evaluation.
//
// Takes Lambda(x) and Omega(x) from the key equation solver and scans the N
// symbol positions of the block, one per clock. For position j (X = alpha^j)
// it evaluates Lambda(X^-1) split into even and odd parts and Omega(X^-1):
// coefficient registers Lambda_l * X^-l and Omega_l * X^-l are stepped by the
// constant multipliers alpha^(+-l). A position is an error location when
// Lambda(X^-1) = 0, and the error value there is (Forney, for syndromes at
// alpha^B .. alpha^(B+N-K-1))
//     Y = X^-FE * Omega(X^-1) / Lambda_odd(X^-1),
// where Lambda_odd(x) = x Lambda'(x) in characteristic two and FE = B for
// Omega = S Lambda mod x^(N-K) (FE = N-K+B for the high-order evaluator of
// the RiBMA solver). The division uses
// an inverse table (ROM) computed at elaboration from the field definition.
//
// DESCENDING = 1: positions are scanned in stream order, N-1 down to 0. The
// module then also reads the received symbol of that position from the FIFO
// (fifo_rd, first-word-fall-through fifo_data) and emits the corrected symbol
// on out_sym: this is the direct-correcting variant used without a corrector.
// DESCENDING = 0: positions are scanned 0 up to N-1 with plain (unscaled)
// start values; out_sym is zero and the (position, value) reports on
// out_root/out_pos/out_err are meant for rs_corrector.
//
// Timing: one load cycle (kes_valid && kes_ready, accepted only when idle),
// N scan cycles, and two pipeline stages (evaluation, then
// division) before out_valid. out_last marks the block's last position, with
// out_fail set there when the number of roots found differs from deg Lambda
// (more errors than the code corrects). The split into an evaluation and a
// division stage follows the description's extra Chien-Forney cycle; the
// failure flag and the handshake are this design's choices.
module rs_chien_forney
  import gf_pkg::*;
#(
  parameter int M          = 8,
  parameter int POLY       = 'h11D,
  parameter int N          = 204,
  parameter int K          = 188,
  parameter int B          = 0,
  parameter bit DESCENDING = 1'b1,
  parameter int FE         = B
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 kes_valid,
  output logic                 kes_ready,
  input  logic [M-1:0]         lambda [(N-K)/2+1],
  input  logic [M-1:0]         omega  [(N-K)/2],
  output logic                 fifo_rd,
  input  logic [M-1:0]         fifo_data,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_pos,
  output logic                 out_root,
  output logic [M-1:0]         out_err,
  output logic [M-1:0]         out_sym,
  output logic                 out_last,
  output logic                 out_fail
);
  localparam int T  = (N - K) / 2;
  localparam int CW = $clog2(N);
  localparam int J0 = DESCENDING ? N - 1 : 0;  // first position scanned
  localparam int DIR = DESCENDING ? 1 : -1;    // exponent step per clock
  localparam int TW = $clog2(T + 2);

  typedef logic [M-1:0] inv_t [1 << M];
  function automatic inv_t mk_inv();
    inv_t tab;
    gfw_t x, y;
    gfw_t ainv;
    ainv = gf_alpha_pow(-1, M, POLY);
    for (int i = 0; i < (1 << M); i++) tab[i] = '0;
    x = gfw_t'(1);
    y = gfw_t'(1);
    for (int i = 0; i < (1 << M) - 1; i++) begin
      tab[x[M-1:0]] = y[M-1:0];
      x = gf_mul(x, gfw_t'(2), M, POLY);
      y = gf_mul(y, ainv, M, POLY);
    end
    return tab;
  endfunction
  localparam inv_t INV = mk_inv();

  logic          run;
  logic [CW-1:0] cnt;
  logic [M-1:0]  lr [T+1];
  logic [M-1:0]  orr [T];
  logic [M-1:0]  w;
  logic [TW-1:0] deg_l, roots;

  // Evaluation at the current position.
  logic [M-1:0] ev, od, om, num;
  always_comb begin
    ev = '0;
    od = '0;
    om = '0;
    for (int l = 0; l <= T; l++) begin
      if (l % 2 == 0) ev = ev ^ lr[l];
      else            od = od ^ lr[l];
    end
    for (int l = 0; l < T; l++) om = om ^ orr[l];
    num = M'(gf_mul(gfw_t'(w), gfw_t'(om), M, POLY));
  end

  assign kes_ready = !run;
  assign fifo_rd   = run && DESCENDING;

  // Stage 1 registers.
  logic          s1_valid, s1_root, s1_last;
  logic [M-1:0]  s1_num, s1_den, s1_sym;
  logic [CW-1:0] s1_pos;

  logic [TW-1:0] deg_in;
  always_comb begin
    deg_in = '0;
    for (int l = 0; l <= T; l++) if (lambda[l] != '0) deg_in = TW'(l);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      cnt   <= '0;
      w     <= '0;
      deg_l <= '0;
      for (int l = 0; l <= T; l++) lr[l] <= '0;
      for (int l = 0; l < T; l++) orr[l] <= '0;
      s1_valid <= 1'b0;
      s1_root  <= 1'b0;
      s1_last  <= 1'b0;
      s1_num   <= '0;
      s1_den   <= '0;
      s1_sym   <= '0;
      s1_pos   <= '0;
    end else begin
      s1_valid <= run;
      if (kes_valid && kes_ready) begin
        for (int l = 0; l <= T; l++)
          lr[l] <= M'(gf_mul(gfw_t'(lambda[l]), gf_alpha_pow(-l * J0, M, POLY), M, POLY));
        for (int l = 0; l < T; l++)
          orr[l] <= M'(gf_mul(gfw_t'(omega[l]), gf_alpha_pow(-l * J0, M, POLY), M, POLY));
        w     <= M'(gf_alpha_pow(-FE * J0, M, POLY));
        deg_l <= deg_in;
        cnt   <= '0;
        run   <= 1'b1;
      end else if (run) begin
        for (int l = 0; l <= T; l++)
          lr[l] <= M'(gf_mul(gfw_t'(lr[l]), gf_alpha_pow(DIR * l, M, POLY), M, POLY));
        for (int l = 0; l < T; l++)
          orr[l] <= M'(gf_mul(gfw_t'(orr[l]), gf_alpha_pow(DIR * l, M, POLY), M, POLY));
        w   <= M'(gf_mul(gfw_t'(w), gf_alpha_pow(DIR * FE, M, POLY), M, POLY));
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N - 1)) run <= 1'b0;
      end
      if (run) begin
        s1_root <= ((ev ^ od) == '0);
        s1_num  <= num;
        s1_den  <= od;
        s1_sym  <= DESCENDING ? fifo_data : '0;
        s1_pos  <= DESCENDING ? CW'(N - 1) - cnt : cnt;
        s1_last <= (cnt == CW'(N - 1));
      end
    end
  end

  // Stage 2: Forney division and output register.
  logic [M-1:0]  err;
  logic [TW-1:0] roots_nx;
  assign err      = s1_root ? M'(gf_mul(gfw_t'(s1_num), gfw_t'(INV[s1_den]), M, POLY)) : '0;
  assign roots_nx = roots + TW'(s1_root);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pos   <= '0;
      out_root  <= 1'b0;
      out_err   <= '0;
      out_sym   <= '0;
      out_last  <= 1'b0;
      out_fail  <= 1'b0;
      roots     <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_pos  <= s1_pos;
        out_root <= s1_root;
        out_err  <= err;
        out_sym  <= DESCENDING ? (s1_sym ^ err) : '0;
        out_last <= s1_last;
        out_fail <= s1_last && ((roots_nx != deg_l) || (s1_root && s1_den == '0));
        roots    <= s1_last ? '0 : roots_nx;
      end
    end
  end

endmodule
