// rs_fifo -- symbol FIFO that holds received blocks while their errors are
// being located.
//
// A circular buffer of DEPTH symbols (DEPTH = number of blocks in flight
// times N; not necessarily a power of two). Writes on wr_en; the oldest
// symbol is always visible on rd_data (first-word fall-through) and is
// removed by rd_en. full/empty are exact, from an occupancy counter. Writing
// when full or reading when empty is a protocol error, caught by assertions.
// The memory is a plain array with asynchronous read, which maps to
// distributed RAM or registers.
//
// Its place in the decoder, and the depth in blocks (four with the recursive
// syndrome calculator, three with the constructive one), follow the decoder
// architecture; the fall-through read and counters are this design's choice.
module rs_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 816
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) if (wr_en) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd_en) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
