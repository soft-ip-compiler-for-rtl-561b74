// rs_decoder -- pipelined Reed-Solomon decoder, error-only, for an (N, K)
// code over GF(2^M).
//
// A block of N symbols enters one symbol per clock (in_valid/in_ready,
// highest-degree coefficient first, i.e. the order a systematic encoder sends
// data then parity). It passes NSHR input shift registers and then goes both
// into a FIFO and into the syndrome calculator. Four sub-blocks then work on
// four different blocks at once, each handing its result to the next with a
// valid/ready handshake:
//   syndrome calculator   N-K syndromes S_i = R(alpha^(B+i))
//   key equation solver   error locator Lambda(x) and evaluator Omega(x)
//   Chien search + Forney error positions and values
//   corrector / output    received symbols from the FIFO plus error values
// Two characteristic parameters choose the sub-architectures:
//   SYND = SC_RSC: recursive syndrome calculator; the Chien search runs in
//          ascending position order and a corrector applies the stored
//          errors (four blocks in the FIFO).
//   SYND = SC_CSC: constructive syndrome calculator; the Chien search runs in
//          stream order and corrects the FIFO symbols itself (three blocks in
//          the FIFO, no corrector).
//   KES  = KES_MEA (modified Euclidean, 4 multipliers, about 3T^2 cycles),
//          KES_IBMA (inversionless Berlekamp-Massey, 3T+3 multipliers, 3T+1
//          cycles) or KES_RIBMA (reformulated systolic Berlekamp-Massey,
//          6T+2 multipliers, 2T+1 cycles, critical path one multiplier and
//          one adder; its Omega is the high-order form, so the Forney
//          exponent of the Chien block becomes N-K+B).
// Throughput: the Chien search takes N+1 cycles per block, so continuous
// input is slowed to one block per N+1 cycles at best; when the key equation
// solver needs more than that (MEA for large T), the syndrome calculator holds
// its result and in_ready drops at the last symbol of the following block.
// in_ready also drops while the FIFO is full.
//
// Output: out_valid/out_sym carry the corrected block in input order;
// out_last marks its last symbol and out_fail, valid with out_last, flags a
// block with more errors than T = (N-K)/2. Erasure decoding is not part of
// this implementation.
//
// NCELL key equation cells are used round-robin (rs_kes_cells) so that a slow
// solver can keep up: NCELL = ceil(solver cycles / (N+1)). NSHR input shift
// registers delay symbols, valid and erasure flag; the architecture offers
// them as the cheaper alternative to an extra cell when the cycle counts
// differ only a little.
//
// Defaults are the DVB code (204, 188) over GF(2^8) with
// p(x) = x^8+x^4+x^3+x^2+1, B = 0, RSC, MEA, one cell and one input shift
// register, the design point chosen for DVB in both the area-constrained and
// the speed-constrained exploration.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int         M    = 8,
  parameter int         POLY = 'h11D,
  parameter int         N    = 204,
  parameter int         K    = 188,
  parameter int         B    = 0,
  parameter synd_arch_e SYND = SC_RSC,
  parameter kes_arch_e  KES  = KES_MEA,
  parameter int         NCELL = 1,
  parameter int         NSHR = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] in_sym,
  output logic         out_valid,
  output logic [M-1:0] out_sym,
  output logic         out_last,
  output logic         out_fail
);
  localparam int T          = (N - K) / 2;
  localparam int CW         = $clog2(N);
  localparam int FIFO_BLKS  = (SYND == SC_RSC) ? 4 : 3;

  // Code positions are the nonzero field elements: N <= 2^M - 1.
  if (N > (1 << M) - 1 || K >= N || ((N - K) % 2) != 0) begin : g_bad_code
    $error("rs_decoder: need K < N <= 2^M - 1 and N - K even");
  end

  // Input shift registers.
  logic         sr_valid, sr_ready, sr_era;
  logic [M-1:0] sr_sym;
  rs_shift_reg #(.W(M), .NSHR(NSHR)) u_shr (
    .clk, .rst_n,
    .up_valid(in_valid), .up_ready(in_ready), .up_sym(in_sym), .up_era(1'b0),
    .dn_valid(sr_valid), .dn_ready(sr_ready), .dn_sym(sr_sym), .dn_era(sr_era)
  );

  // FIFO and syndrome calculator take each symbol together.
  logic         fifo_full, fifo_empty, fifo_rd;
  logic [M-1:0] fifo_data;
  logic         sc_in_ready, sc_valid;
  logic         take;
  assign sr_ready = sc_in_ready && !fifo_full;
  assign take     = sr_valid && sr_ready;

  rs_fifo #(.W(M), .DEPTH(FIFO_BLKS * N)) u_fifo (
    .clk, .rst_n,
    .wr_en(take), .wr_data(sr_sym),
    .rd_en(fifo_rd), .rd_data(fifo_data),
    .full(fifo_full), .empty(fifo_empty)
  );

  logic         synd_valid, synd_ready;
  logic [M-1:0] synd [N-K];
  assign sc_valid = sr_valid && !fifo_full;

  if (SYND == SC_RSC) begin : g_rsc
    rs_rsc #(.M(M), .POLY(POLY), .N(N), .K(K), .B(B)) u_sc (
      .clk, .rst_n, .in_valid(sc_valid), .in_ready(sc_in_ready), .in_sym(sr_sym),
      .synd_valid, .synd_ready, .synd
    );
  end else begin : g_csc
    rs_csc #(.M(M), .POLY(POLY), .N(N), .K(K), .B(B)) u_sc (
      .clk, .rst_n, .in_valid(sc_valid), .in_ready(sc_in_ready), .in_sym(sr_sym),
      .synd_valid, .synd_ready, .synd
    );
  end

  // Key equation solver: NCELL cells used in turn.
  logic         kes_valid, kes_ready;
  logic [M-1:0] lambda [T+1];
  logic [M-1:0] omega  [T];
  rs_kes_cells #(.M(M), .POLY(POLY), .N(N), .K(K), .KES(KES), .NCELL(NCELL)) u_kes (
    .clk, .rst_n, .synd_valid, .synd_ready, .synd,
    .kes_valid, .kes_ready, .lambda, .omega
  );

  // Chien search and Forney evaluation.
  logic          cf_valid, cf_root, cf_last, cf_fail, cf_rd;
  logic [CW-1:0] cf_pos;
  logic [M-1:0]  cf_err, cf_sym;
  rs_chien_forney #(.M(M), .POLY(POLY), .N(N), .K(K), .B(B),
                    .DESCENDING(SYND == SC_CSC),
                    .FE((KES == KES_RIBMA) ? (N - K + B) : B)) u_cf (
    .clk, .rst_n, .kes_valid, .kes_ready, .lambda, .omega,
    .fifo_rd(cf_rd), .fifo_data,
    .out_valid(cf_valid), .out_pos(cf_pos), .out_root(cf_root), .out_err(cf_err),
    .out_sym(cf_sym), .out_last(cf_last), .out_fail(cf_fail)
  );

  if (SYND == SC_RSC) begin : g_corr
    rs_corrector #(.M(M), .N(N), .K(K)) u_corr (
      .clk, .rst_n,
      .cf_valid, .cf_pos, .cf_root, .cf_err, .cf_last, .cf_fail,
      .fifo_rd, .fifo_data,
      .out_valid, .out_sym, .out_last, .out_fail
    );
  end else begin : g_direct
    assign fifo_rd   = cf_rd;
    assign out_valid = cf_valid;
    assign out_sym   = cf_sym;
    assign out_last  = cf_last;
    assign out_fail  = cf_fail;
  end

endmodule
