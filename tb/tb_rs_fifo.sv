// tb_rs_fifo -- self-checking test of rs_fifo with a depth that is not a
// power of two (DEPTH = 3 blocks of 15 = 45).
//
// Random writes and reads against a queue model: every read value, the full
// and empty flags, and the first-word fall-through (rd_data valid without a
// read strobe) are checked. The writer fills the FIFO to full and the reader
// drains it to empty several times, so both pointers wrap.
module tb_rs_fifo;
  localparam int W = 8, DEPTH = 45;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  rs_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int phase;
      @(negedge clk);
      // check state against the model
      checks++;
      if (full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin
        failures++; $display("flags: full %0d empty %0d size %0d", full, empty, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (int'(rd_data) != q[0]) begin failures++; $display("head %0d exp %0d", rd_data, q[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      phase = (cyc / 500) % 2;   // alternate filling and draining bias
      wr_en   = !full && ($urandom_range(9) < (phase ? 8 : 2));
      rd_en   = !empty && ($urandom_range(9) < (phase ? 2 : 8));
      wr_data = W'($urandom_range(255));
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(int'(wr_data));
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
