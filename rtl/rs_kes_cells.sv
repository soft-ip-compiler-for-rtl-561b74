// rs_kes_cells -- multiplexed key-equation cells: NCELL copies of one key
// equation solver working on consecutive blocks in turn.
//
// When the chosen solver needs more cycles per block than the syndrome
// calculator and the Chien search (about N), a single solver limits the
// throughput of the pipeline. With NCELL cells the syndromes of block k go to
// cell k mod NCELL, so up to NCELL blocks are solved at the same time and each
// cell has NCELL block periods for its work. The number of cells needed is
// ceil(C_key_eq / C_chien), with C the cycles per block of each stage.
//
// Operation: a write pointer names the cell that takes the next syndrome set
// and a read pointer the cell whose result goes out next. Both advance
// round-robin on a completed handshake, so results leave in the order the
// blocks arrived even when cells finish out of order. With NCELL = 1 this is
// the plain solver and adds no logic besides the pointers (which stay 0).
//
// Interface and timing are those of the solvers (rs_kes_mea, rs_kes_ibma,
// rs_kes_ribma): synd_valid/synd_ready in, kes_valid/kes_ready out with
// lambda and omega held until taken; the multiplexers add no cycle.
// The round-robin multiplexing follows the multiplexed-cell architecture of
// the decoder's pipeline strategy; the pointer scheme is this design's own.
module rs_kes_cells
  import rs_pkg::*;
#(
  parameter int        M     = 8,
  parameter int        POLY  = 'h11D,
  parameter int        N     = 204,
  parameter int        K     = 188,
  parameter kes_arch_e KES   = KES_MEA,
  parameter int        NCELL = 1
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
  localparam int T  = (N - K) / 2;
  localparam int PW = (NCELL > 1) ? $clog2(NCELL) : 1;

  logic [PW-1:0] wp, rp;
  logic          c_sv    [NCELL];
  logic          c_sr    [NCELL];
  logic          c_kv    [NCELL];
  logic          c_kr    [NCELL];
  logic [M-1:0]  c_lam   [NCELL][T+1];
  logic [M-1:0]  c_om    [NCELL][T];

  for (genvar c = 0; c < NCELL; c++) begin : g_cell
    assign c_sv[c] = synd_valid && (wp == PW'(c));
    assign c_kr[c] = kes_ready  && (rp == PW'(c));
    if (KES == KES_MEA) begin : g_mea
      rs_kes_mea #(.M(M), .POLY(POLY), .N(N), .K(K)) u_kes (
        .clk, .rst_n, .synd_valid(c_sv[c]), .synd_ready(c_sr[c]), .synd,
        .kes_valid(c_kv[c]), .kes_ready(c_kr[c]), .lambda(c_lam[c]), .omega(c_om[c])
      );
    end else if (KES == KES_IBMA) begin : g_ibma
      rs_kes_ibma #(.M(M), .POLY(POLY), .N(N), .K(K)) u_kes (
        .clk, .rst_n, .synd_valid(c_sv[c]), .synd_ready(c_sr[c]), .synd,
        .kes_valid(c_kv[c]), .kes_ready(c_kr[c]), .lambda(c_lam[c]), .omega(c_om[c])
      );
    end else begin : g_ribma
      rs_kes_ribma #(.M(M), .POLY(POLY), .N(N), .K(K)) u_kes (
        .clk, .rst_n, .synd_valid(c_sv[c]), .synd_ready(c_sr[c]), .synd,
        .kes_valid(c_kv[c]), .kes_ready(c_kr[c]), .lambda(c_lam[c]), .omega(c_om[c])
      );
    end
  end

  always_comb begin
    synd_ready = 1'b0;
    kes_valid  = 1'b0;
    lambda     = c_lam[0];
    omega      = c_om[0];
    for (int c = 0; c < NCELL; c++) begin
      if (wp == PW'(c)) synd_ready = c_sr[c];
      if (rp == PW'(c)) begin
        kes_valid = c_kv[c];
        lambda    = c_lam[c];
        omega     = c_om[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (synd_valid && synd_ready) wp <= (int'(wp) == NCELL - 1) ? '0 : wp + 1'b1;
      if (kes_valid && kes_ready)   rp <= (int'(rp) == NCELL - 1) ? '0 : rp + 1'b1;
    end
  end

endmodule
