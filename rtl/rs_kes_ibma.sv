// rs_kes_ibma -- key equation solver, inversionless Berlekamp-Massey (iBMA).
//
// From the 2T = N-K syndromes it finds the error locator Lambda(x) (degree
// <= T) and the error evaluator Omega(x) = S(x) Lambda(x) mod x^2T (degree
// < T), both scaled by the same nonzero constant, without any GF division.
//
// Iteration r = 0..2T-1 (one clock each):
//   delta  = sum_i Lambda_i S_(r-i)                  (T+1 multipliers)
//   Lambda <- gamma*Lambda + delta*x*Bp              (2T+2 multipliers)
//   if delta != 0 and kk >= 0: Bp <- Lambda, kk <- -kk-1, gamma <- delta
//   else                       Bp <- x*Bp,   kk <- kk+1
// so the datapath has 3T+3 variable multipliers. Afterwards Omega_i =
// sum_(j<=i) Lambda_j S_(i-j), i = 0..T-1, is formed one coefficient per
// clock on the same T+1 discrepancy multipliers. With the load cycle the
// solver is busy 3T+1 cycles per block, the figure the architecture
// comparison gives for the iBMA in error-only mode.
//
// Interface: syndromes are taken when synd_valid && synd_ready (ready only
// when idle). The result is held on lambda/omega with kes_valid until
// kes_ready, and a new block is taken only after that. The algorithm is the
// textbook inversionless BM; the schedule of Omega on the discrepancy
// multipliers and the handshake are this design's choices.
module rs_kes_ibma
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
  localparam int RW = $clog2(NS + T + 1);
  localparam int OW = (T > 1) ? $clog2(T) : 1;

  typedef enum logic [1:0] {S_IDLE, S_BM, S_OMEGA, S_DONE} state_e;
  state_e state;

  logic [M-1:0] s   [NS];
  logic [M-1:0] lam [T+1];
  logic [M-1:0] bp  [T+1];
  logic [M-1:0] gamma;
  logic [M-1:0] delta;
  logic signed [RW:0] kk;
  logic [RW-1:0] r;

  // Discrepancy / Omega coefficient: sum_i lam_i * s_(r-i), terms with r-i<0 dropped.
  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++) begin
      if (int'(r) - i >= 0 && int'(r) - i < NS)
        delta = delta ^ M'(gf_mul(gfw_t'(lam[i]), gfw_t'(s[int'(r) - i]), M, POLY));
    end
  end

  assign synd_ready = (state == S_IDLE);
  assign kes_valid  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gamma <= '0;
      kk    <= '0;
      r     <= '0;
      for (int i = 0; i < NS; i++) s[i] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam[i] <= '0;
        bp[i]  <= '0;
      end
      for (int i = 0; i < T; i++) omega[i] <= '0;
    end else begin
      case (state)
        S_IDLE: if (synd_valid) begin
          for (int i = 0; i < NS; i++) s[i] <= synd[i];
          for (int i = 0; i <= T; i++) begin
            lam[i] <= (i == 0) ? M'(1) : '0;
            bp[i]  <= (i == 0) ? M'(1) : '0;
          end
          gamma <= M'(1);
          kk    <= '0;
          r     <= '0;
          state <= S_BM;
        end
        S_BM: begin
          for (int i = 0; i <= T; i++) begin
            lam[i] <= M'(gf_mul(gfw_t'(gamma), gfw_t'(lam[i]), M, POLY)) ^
                      ((i == 0) ? '0 : M'(gf_mul(gfw_t'(delta), gfw_t'(bp[(i == 0) ? 0 : i - 1]), M, POLY)));
          end
          if (delta != '0 && kk >= 0) begin
            for (int i = 0; i <= T; i++) bp[i] <= lam[i];
            kk    <= -kk - 1;
            gamma <= delta;
          end else begin
            for (int i = 0; i <= T; i++) bp[i] <= (i == 0) ? '0 : bp[(i == 0) ? 0 : i - 1];
            kk <= kk + 1;
          end
          if (r == RW'(NS - 1)) begin
            r     <= '0;
            state <= S_OMEGA;
          end else begin
            r <= r + 1'b1;
          end
        end
        S_OMEGA: begin
          omega[OW'(r)] <= delta;
          if (r == RW'(T - 1)) state <= S_DONE;
          else r <= r + 1'b1;
        end
        S_DONE: if (kes_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb for (int i = 0; i <= T; i++) lambda[i] = lam[i];

endmodule
