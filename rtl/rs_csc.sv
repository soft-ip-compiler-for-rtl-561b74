// rs_csc -- constructive syndrome calculator (CSC).
//
// Computes the N-K syndromes S_i = sum_j r_j (alpha^(B+i))^j directly, term
// by term, instead of by Horner's rule. Each syndrome has a power register
// that holds (alpha^(B+i))^j for the symbol now arriving and is stepped by a
// constant multiplier, a variable multiplier forming r_j times that power,
// and an accumulator: 2(N-K) registers, N-K constant and N-K variable
// multipliers. Symbols arrive highest-degree first (r_(N-1) first), so the
// power register starts at alpha^((B+i)(N-1)) and is multiplied by
// alpha^-(B+i) for each symbol.
//
// Interface and timing are identical to rs_rsc: in_valid/in_ready symbol
// stream, N accepted symbols per block, syndromes presented on synd with
// synd_valid from the cycle after the last symbol until synd_ready.
//
// The per-syndrome structure (power register, constant multiplier, variable
// multiplier, accumulator) follows the CSC of the architecture description;
// the arrival order, and therefore the start value and step of the power
// register, are this design's choice so that both syndrome calculators take
// the same stream.
module rs_csc
  import gf_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D,
  parameter int N    = 204,
  parameter int K    = 188,
  parameter int B    = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] in_sym,
  output logic         synd_valid,
  input  logic         synd_ready,
  output logic [M-1:0] synd [N-K]
);
  localparam int NS = N - K;
  localparam int CW = $clog2(N);

  logic [M-1:0] acc [NS];
  logic [M-1:0] pw  [NS];
  logic [M-1:0] pw_cur [NS];
  logic [M-1:0] term [NS];
  logic [CW-1:0] cnt;
  logic last, take;

  assign last     = (cnt == CW'(N - 1));
  assign in_ready = !last || !synd_valid || synd_ready;
  assign take     = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      pw_cur[i] = (cnt == '0) ? M'(gf_alpha_pow((B + i) * (N - 1), M, POLY)) : pw[i];
      term[i]   = M'(gf_mul(gfw_t'(in_sym), gfw_t'(pw_cur[i]), M, POLY));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      synd_valid <= 1'b0;
      for (int i = 0; i < NS; i++) begin
        acc[i]  <= '0;
        pw[i]   <= '0;
        synd[i] <= '0;
      end
    end else begin
      if (synd_valid && synd_ready) synd_valid <= 1'b0;
      if (take) begin
        cnt <= last ? '0 : cnt + 1'b1;
        for (int i = 0; i < NS; i++) begin
          pw[i]  <= M'(gf_mul(gfw_t'(pw_cur[i]), gf_alpha_pow(-(B + i), M, POLY), M, POLY));
          acc[i] <= (cnt == '0) ? term[i] : acc[i] ^ term[i];
          if (last) synd[i] <= acc[i] ^ term[i];
        end
        if (last) synd_valid <= 1'b1;
      end
    end
  end

endmodule
