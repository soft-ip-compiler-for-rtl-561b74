// rs_kes_ribma -- key equation solver, reformulated inversionless
// Berlekamp-Massey algorithm (RiBMA).
//
// A systolic array of 3T+1 identical processing elements. Element i holds
// delta_i and theta_i and needs only its neighbour's delta_(i+1), so the
// critical path is one multiplier and one adder whatever T is. Start:
// delta_i = theta_i = S_i for i < 2T, delta_3T = theta_3T = 1, others 0,
// gamma = 1, kk = 0. Each of the 2T iterations (one clock each) does
//   delta_i <- gamma * delta_(i+1) + delta_0 * theta_i     (2 multipliers/PE)
//   if delta_0 != 0 and kk >= 0: theta_i <- delta_(i+1), gamma <- delta_0,
//                                kk <- -kk-1
//   else                         kk <- kk+1
// Afterwards Lambda_i = delta_(T+i), i = 0..T, and the high-order evaluator
// Omega^h_i = delta_i, i = 0..T-1, are available with no further pass. The
// error value at location X is then X^-(2T+B) Omega^h(X^-1) /
// Lambda_odd(X^-1), i.e. the Chien/Forney block is used with its Forney
// exponent set to 2T+B instead of B. With the load cycle the solver is busy
// 2T+1 cycles and has 6T+2 multipliers.
//
// Interface as rs_kes_ibma (synd_valid/synd_ready in, kes_valid/kes_ready
// out, result held until taken). The array is the published RiBM algorithm;
// the handshake and the Forney exponent bookkeeping are this design's.
module rs_kes_ribma
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
  localparam int NP = 3 * T + 1;
  localparam int RW = $clog2(NS + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [M-1:0] dl [NP];
  logic [M-1:0] th [NP];
  logic [M-1:0] dn [NP];   // neighbour value delta_(i+1), 0 past the last cell

  always_comb begin
    for (int i = 0; i < NP - 1; i++) dn[i] = dl[i + 1];
    dn[NP - 1] = '0;
  end
  logic [M-1:0] gamma;
  logic signed [RW+1:0] kk;
  logic [RW-1:0] r;
  logic upd;

  assign upd        = (dl[0] != '0) && (kk >= 0);
  assign synd_ready = (state == S_IDLE);
  assign kes_valid  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gamma <= '0;
      kk    <= '0;
      r     <= '0;
      for (int i = 0; i < NP; i++) begin
        dl[i] <= '0;
        th[i] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (synd_valid) begin
          for (int i = 0; i < NP; i++) begin
            dl[i] <= (i < NS) ? synd[(i < NS) ? i : 0] : (i == NP - 1) ? M'(1) : '0;
            th[i] <= (i < NS) ? synd[(i < NS) ? i : 0] : (i == NP - 1) ? M'(1) : '0;
          end
          gamma <= M'(1);
          kk    <= '0;
          r     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          for (int i = 0; i < NP; i++) begin
            dl[i] <= M'(gf_mul(gfw_t'(gamma), gfw_t'(dn[i]), M, POLY)) ^
                     M'(gf_mul(gfw_t'(dl[0]), gfw_t'(th[i]), M, POLY));
            if (upd) th[i] <= dn[i];
          end
          if (upd) begin
            gamma <= dl[0];
            kk    <= -kk - 1;
          end else begin
            kk <= kk + 1;
          end
          if (r == RW'(NS - 1)) state <= S_DONE;
          else r <= r + 1'b1;
        end
        S_DONE: if (kes_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i <= T; i++) lambda[i] = dl[T + i];
    for (int i = 0; i < T; i++)  omega[i]  = dl[i];
  end

endmodule
