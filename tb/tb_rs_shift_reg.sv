// tb_rs_shift_reg -- self-checking test of rs_shift_reg with NSHR = 3.
//
// Random valid/symbol/erasure inputs and a random dn_ready. The output after
// a given number of advancing cycles must be the input NSHR advancing cycles
// earlier; nothing moves while dn_ready is low, and up_ready follows
// dn_ready.
module tb_rs_shift_reg;
  localparam int W = 8, NSHR = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         up_valid, up_ready, up_era, dn_valid, dn_ready, dn_era;
  logic [W-1:0] up_sym, dn_sym;
  rs_shift_reg #(.W(W), .NSHR(NSHR)) dut (.*);

  // History of what entered on each advancing cycle (reset value first).
  int hist [$];
  int checks = 0, failures = 0;

  initial begin
    up_valid = 0; up_era = 0; up_sym = '0; dn_ready = 0;
    for (int i = 0; i < NSHR; i++) hist.push_back(0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int e;
      @(negedge clk);
      e = hist[hist.size() - NSHR];
      checks++;
      if ({dn_valid, dn_era, dn_sym} != e[W+1:0] || up_ready != dn_ready) begin
        failures++; $display("cyc %0d: got %0h exp %0h", cyc, {dn_valid, dn_era, dn_sym}, e[W+1:0]);
      end
      up_valid = $urandom_range(1);
      up_era   = $urandom_range(1);
      up_sym   = W'($urandom_range(255));
      dn_ready = ($urandom_range(3) != 0);
      if (dn_ready) hist.push_back(int'({up_valid, up_era, up_sym}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
