// rs_kes_mea -- key equation solver, modified Euclidean algorithm (MEA).
//
// Solves Lambda(x) S(x) = Omega(x) mod x^2T (2T = N-K) with Euclid's
// algorithm on x^2T and S(x), without GF division, on a serial datapath of
// four variable GF multipliers. Two polynomial pairs are kept in register
// files: (Rp, Lp) starting at (x^2T, 0) and (Qp, Up) starting at (S(x), 1);
// every update keeps Rp = Lp*S and Qp = Up*S mod x^2T. One step is
//   if deg Rp < deg Qp: swap the pairs
//   if deg Qp < T:      stop; Lambda = Up, Omega = Qp     (1 check cycle)
//   else:  a = lead(Rp), b = lead(Qp), l = deg Rp - deg Qp
//          Rp <- b*Rp + a*x^l*Qp,  Lp <- b*Lp + a*x^l*Up
// and the cross-multiplication is done one coefficient index j per clock
// (Rp_j and Lp_j together on the four multipliers), and j runs only up to
// the highest index that can change, max(deg Rp, deg Lp, l + deg Up), so a step takes at most 2T+1 cycles and far fewer towards the
// end of the algorithm. Lambda and Omega come out
// scaled by the same constant, which the Forney formula cancels.
//
// Interface as rs_kes_ibma: syndromes taken on synd_valid && synd_ready
// (ready when idle), result held with kes_valid until kes_ready.
//
// What follows the architecture description: an Euclidean solver without
// division, four multipliers, register files instead of shift registers,
// error-only operation. The exact step schedule (and so the cycle count,
// which is of the order of 3T^2) is this design's own.
module rs_kes_mea
  import gf_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D,
  parameter int N    = 204,
  parameter int K    = 188
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         synd_valid,
  output logic         synd_ready,
  input  logic [M-1:0] synd [N-K],
  output logic         kes_valid,
  input  logic         kes_ready,
  output logic [M-1:0] lambda [(N-K)/2+1],
  output logic [M-1:0] omega  [(N-K)/2]
);
  localparam int NS = N - K;
  localparam int T  = NS / 2;
  localparam int JW = $clog2(NS + 1) + 1;

  typedef enum logic [1:0] {S_IDLE, S_CHK, S_RED, S_DONE} state_e;
  state_e state;

  logic [M-1:0] rp [NS+1];
  logic [M-1:0] qp [NS+1];
  logic [M-1:0] lp [T+1];
  logic [M-1:0] up [T+1];
  logic [M-1:0] a_r, b_q;
  logic [JW-1:0] j, jmax, shl;
  int deg_r, deg_q, deg_l, deg_u;
  int e_dr, e_dq, e_dl, e_du, jlim;
  logic swp;
  logic [M-1:0] lead_r, lead_q;

  // Degrees (-1 for the zero polynomial): priority search from the top.
  always_comb begin
    deg_r = -1;
    deg_q = -1;
    deg_l = -1;
    deg_u = -1;
    lead_r = '0;
    lead_q = '0;
    for (int i = 0; i <= NS; i++) begin
      if (rp[i] != '0) begin deg_r = i; lead_r = rp[i]; end
      if (qp[i] != '0) begin deg_q = i; lead_q = qp[i]; end
    end
    for (int i = 0; i <= T; i++) begin
      if (lp[i] != '0) deg_l = i;
      if (up[i] != '0) deg_u = i;
    end
    // Degrees after the swap that this check cycle may perform.
    swp  = (deg_r < deg_q);
    e_dr = swp ? deg_q : deg_r;
    e_dq = swp ? deg_r : deg_q;
    e_dl = swp ? deg_u : deg_l;
    e_du = swp ? deg_l : deg_u;
    // Highest index a reduction step can change: the leading term of Rp
    // (which cancels) and the degree of the new Lp.
    jlim = e_dr;
    if (e_dl > jlim) jlim = e_dl;
    if (e_dr - e_dq + e_du > jlim) jlim = e_dr - e_dq + e_du;
    if (jlim < 0) jlim = 0;
  end

  // Serial cross-multiplication operands for index j.
  logic [M-1:0] q_sh, u_sh, r_j, l_j;
  always_comb begin
    q_sh = '0;
    u_sh = '0;
    r_j  = '0;
    l_j  = '0;
    for (int i = 0; i <= NS; i++) begin
      if (int'(j) == i) r_j = rp[i];
      if (int'(j) - int'(shl) == i) q_sh = qp[i];
    end
    for (int i = 0; i <= T; i++) begin
      if (int'(j) == i) l_j = lp[i];
      if (int'(j) - int'(shl) == i) u_sh = up[i];
    end
  end

  logic [M-1:0] r_new, l_new;
  assign r_new = M'(gf_mul(gfw_t'(b_q), gfw_t'(r_j), M, POLY)) ^ M'(gf_mul(gfw_t'(a_r), gfw_t'(q_sh), M, POLY));
  assign l_new = M'(gf_mul(gfw_t'(b_q), gfw_t'(l_j), M, POLY)) ^ M'(gf_mul(gfw_t'(a_r), gfw_t'(u_sh), M, POLY));

  assign synd_ready = (state == S_IDLE);
  assign kes_valid  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_r   <= '0;
      b_q   <= '0;
      j     <= '0;
      jmax  <= '0;
      shl   <= '0;
      for (int i = 0; i <= NS; i++) begin
        rp[i] <= '0;
        qp[i] <= '0;
      end
      for (int i = 0; i <= T; i++) begin
        lp[i] <= '0;
        up[i] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (synd_valid) begin
          for (int i = 0; i <= NS; i++) begin
            rp[i] <= (i == NS) ? M'(1) : '0;
            qp[i] <= (i == NS) ? '0 : synd[(i == NS) ? 0 : i];
          end
          for (int i = 0; i <= T; i++) begin
            lp[i] <= '0;
            up[i] <= (i == 0) ? M'(1) : '0;
          end
          state <= S_CHK;
        end
        S_CHK: begin
          // Swap the pairs so that Rp has the higher degree, and in the same
          // cycle either stop or start the reduction of Rp by Qp.
          if (swp) begin
            for (int i = 0; i <= NS; i++) begin
              rp[i] <= qp[i];
              qp[i] <= rp[i];
            end
            for (int i = 0; i <= T; i++) begin
              lp[i] <= up[i];
              up[i] <= lp[i];
            end
          end
          if (e_dq < T) begin
            state <= S_DONE;
          end else begin
            a_r   <= swp ? lead_q : lead_r;
            b_q   <= swp ? lead_r : lead_q;
            shl   <= JW'(e_dr - e_dq);
            jmax  <= JW'(jlim);
            j     <= '0;
            state <= S_RED;
          end
        end
        S_RED: begin
          for (int i = 0; i <= NS; i++) if (int'(j) == i) rp[i] <= r_new;
          for (int i = 0; i <= T; i++)  if (int'(j) == i) lp[i] <= l_new;
          if (j == jmax) state <= S_CHK;
          else j <= j + 1'b1;
        end
        S_DONE: if (kes_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i <= T; i++) lambda[i] = up[i];
    for (int i = 0; i < T; i++)  omega[i]  = qp[i];
  end

endmodule
