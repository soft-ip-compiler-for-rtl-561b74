// rs_shift_reg -- input shift registers in front of the syndrome calculator.
//
// NSHR register stages that delay the incoming symbol, its valid bit and its
// erasure flag. They add pipeline delay at the decoder input, the cheap
// alternative to an extra key-equation cell for balancing the pipeline when
// the sub-blocks' cycle counts differ only a little. The stages shift
// together whenever the consumer is ready (dn_ready), and hold otherwise, so
// the backpressure reaches the source unchanged (up_ready = dn_ready).
// Latency is NSHR accepted cycles.
//
// That the symbols, valid signal and erasure flag pass through NSHR shift
// registers follows the decoder's pipelining description; the lock-step
// stall is this design's choice.
module rs_shift_reg #(
  parameter int W    = 8,
  parameter int NSHR = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up_valid,
  output logic         up_ready,
  input  logic [W-1:0] up_sym,
  input  logic         up_era,
  output logic         dn_valid,
  input  logic         dn_ready,
  output logic [W-1:0] dn_sym,
  output logic         dn_era
);
  logic [W-1:0] sym [NSHR];
  logic         vld [NSHR];
  logic         era [NSHR];

  assign up_ready = dn_ready;
  assign dn_valid = vld[NSHR-1];
  assign dn_sym   = sym[NSHR-1];
  assign dn_era   = era[NSHR-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSHR; i++) begin
        sym[i] <= '0;
        vld[i] <= 1'b0;
        era[i] <= 1'b0;
      end
    end else if (dn_ready) begin
      for (int i = 0; i < NSHR; i++) begin
        sym[i] <= (i == 0) ? up_sym   : sym[(i == 0) ? 0 : i - 1];
        vld[i] <= (i == 0) ? up_valid : vld[(i == 0) ? 0 : i - 1];
        era[i] <= (i == 0) ? up_era   : era[(i == 0) ? 0 : i - 1];
      end
    end
  end

endmodule
