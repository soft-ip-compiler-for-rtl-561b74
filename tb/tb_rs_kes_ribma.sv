// tb_rs_kes_ribma -- self-checking test of rs_kes_ribma on the (204,188) code, T = 8.
//
// Uses tb_rs_kes to feed syndromes of received words with 0..T errors and to
// check Lambda, and the error values obtained from Omega, against the
// reference model, including a block with
// no errors and one with exactly T errors.
// The solver must take exactly 2T+1 = 17 cycles from accepting the syndromes
// to presenting the result (load cycle and 2T iterations).
module tb_rs_kes_ribma;
  import rs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic done;
  int c, f, mx, mn;
  tb_rs_kes #(.KES(KES_RIBMA), .NBLK(200)) u (.clk, .rst_n, .done, .checks(c), .failures(f),
                                             .max_cycles(mx), .min_cycles(mn));
  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (done);
      begin repeat (100000) @(posedge clk); $display("watchdog expired"); end
    join_any
    checks = c + 2;
    failures = f + (done ? 0 : 1);
    $display("RiBMA cycles: min %0d max %0d", mn, mx);
    if (mx != 17 || mn != 17) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
