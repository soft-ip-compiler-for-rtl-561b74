// rs_rsc -- recursive syndrome calculator (RSC).
//
// Computes the N-K syndromes S_i = R(alpha^(B+i)), i = 0..N-K-1, of a received
// block by Horner's rule: one register and one constant multiplier per
// syndrome, S_i <- S_i * alpha^(B+i) + r. Symbols arrive one per accepted
// cycle, highest-degree coefficient r_(N-1) first, so the recursion runs in
// the order the symbols come in.
//
// Interface: in_valid/in_ready stream of symbols; a block is N consecutive
// accepted symbols (gaps between them are allowed). When the last symbol of a
// block is taken, the syndromes are copied to an output register and
// synd_valid rises on the next cycle; they stay until synd_ready. The next
// block accumulates meanwhile; only its last symbol waits (in_ready low) if
// the previous syndromes have still not been taken. Reset is active-low and
// synchronous-to-clock (asynchronous assert).
//
// The Horner structure and the register/multiplier counts follow the RSC
// of the decoder's architecture description; the ready/valid handshake and
// the output holding register are this design's choice.
module rs_rsc
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
  logic [CW-1:0] cnt;
  logic last, take;

  assign last     = (cnt == CW'(N - 1));
  assign in_ready = !last || !synd_valid || synd_ready;
  assign take     = in_valid && in_ready;

  // Horner step for each syndrome; the first symbol of a block restarts it.
  function automatic logic [M-1:0] horner(logic [M-1:0] s, logic [M-1:0] r, int i);
    return M'(gf_mul(gfw_t'(s), gf_alpha_pow(B + i, M, POLY), M, POLY)) ^ r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      synd_valid <= 1'b0;
      for (int i = 0; i < NS; i++) begin
        acc[i]  <= '0;
        synd[i] <= '0;
      end
    end else begin
      if (synd_valid && synd_ready) synd_valid <= 1'b0;
      if (take) begin
        cnt <= last ? '0 : cnt + 1'b1;
        for (int i = 0; i < NS; i++) begin
          acc[i] <= (cnt == '0) ? in_sym : horner(acc[i], in_sym, i);
          if (last) synd[i] <= horner(acc[i], in_sym, i);
        end
        if (last) synd_valid <= 1'b1;
      end
    end
  end

endmodule
