// rs_corrector -- applies stored error locations and values to the symbols
// leaving the FIFO.
//
// Needed when the Chien search scans the positions in the opposite order to
// the stream (ascending positions, while the stream carries position N-1
// first): the errors of a block are found before its first symbol is sent,
// but in reverse order. The corrector therefore stores them:
//   fill side   - every reported root (position, value) of the block being
//                 searched is appended to a list of at most T entries;
//   output side - when the search reports the block's last position, the list
//                 is handed to the output side, which reads the block's N
//                 symbols from the FIFO (positions N-1 down to 0) and adds the
//                 value of the list entry whose position matches. The list is
//                 walked from its last entry, so one comparator suffices.
// Output: out_valid/out_sym one cycle after each FIFO read, out_last with the
// block's last symbol and out_fail the search's failure flag for that block.
// The output side is busy N cycles, and the next list arrives no sooner than
// N+1 cycles later, so a single list on each side is enough (asserted).
//
// Storing locations and values and correcting at the FIFO output follows the
// decoder's description of the corrector; the list organisation is this
// design's own.
module rs_corrector #(
  parameter int M = 8,
  parameter int N = 204,
  parameter int K = 188
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cf_valid,
  input  logic [$clog2(N)-1:0] cf_pos,
  input  logic                 cf_root,
  input  logic [M-1:0]         cf_err,
  input  logic                 cf_last,
  input  logic                 cf_fail,
  output logic                 fifo_rd,
  input  logic [M-1:0]         fifo_data,
  output logic                 out_valid,
  output logic [M-1:0]         out_sym,
  output logic                 out_last,
  output logic                 out_fail
);
  localparam int T  = (N - K) / 2;
  localparam int CW = $clog2(N);
  localparam int LW = $clog2(T + 1);

  // Fill side.
  logic [CW-1:0] f_pos [T];
  logic [M-1:0]  f_val [T];
  logic [LW-1:0] f_cnt;
  logic          app;
  assign app = cf_valid && cf_root && (f_cnt != LW'(T));

  // Output side.
  logic [CW-1:0] a_pos [T];
  logic [M-1:0]  a_val [T];
  logic [LW-1:0] a_ptr;      // entries not yet used; next is a_ptr-1
  logic          busy, a_fail;
  logic [CW-1:0] opos;
  logic [CW-1:0] top_pos;
  logic [M-1:0]  top_val;
  logic          hit;

  always_comb begin
    top_pos = '0;
    top_val = '0;
    for (int i = 0; i < T; i++)
      if (int'(a_ptr) == i + 1) begin
        top_pos = a_pos[i];
        top_val = a_val[i];
      end
  end
  assign hit     = busy && (a_ptr != '0) && (top_pos == opos);
  assign fifo_rd = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_cnt     <= '0;
      a_ptr     <= '0;
      busy      <= 1'b0;
      a_fail    <= 1'b0;
      opos      <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_last  <= 1'b0;
      out_fail  <= 1'b0;
      for (int i = 0; i < T; i++) begin
        f_pos[i] <= '0;
        f_val[i] <= '0;
        a_pos[i] <= '0;
        a_val[i] <= '0;
      end
    end else begin
      // Fill side.
      if (app) begin
        for (int i = 0; i < T; i++)
          if (int'(f_cnt) == i) begin
            f_pos[i] <= cf_pos;
            f_val[i] <= cf_err;
          end
        f_cnt <= f_cnt + 1'b1;
      end
      // Output side.
      out_valid <= busy;
      if (busy) begin
        out_sym  <= fifo_data ^ (hit ? top_val : '0);
        out_last <= (opos == '0);
        out_fail <= (opos == '0) && a_fail;
        if (hit) a_ptr <= a_ptr - 1'b1;
        if (opos == '0) busy <= 1'b0;
        else opos <= opos - 1'b1;
      end
      // Hand-over at the end of a search.
      if (cf_valid && cf_last) begin
        for (int i = 0; i < T; i++) begin
          a_pos[i] <= (app && int'(f_cnt) == i) ? cf_pos : f_pos[i];
          a_val[i] <= (app && int'(f_cnt) == i) ? cf_err : f_val[i];
        end
        a_ptr  <= f_cnt + LW'(app);
        a_fail <= cf_fail;
        opos   <= CW'(N - 1);
        busy   <= 1'b1;
        f_cnt  <= '0;
      end
    end
  end

  a_handover_free: assert property (@(posedge clk) disable iff (!rst_n)
                                    (cf_valid && cf_last) |-> (!busy || opos == '0));

endmodule
