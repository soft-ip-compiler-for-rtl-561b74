// tb_rs_kes_mea -- self-checking test of rs_kes_mea on the (204,188) code, T = 8.
//
// Uses tb_rs_kes to feed syndromes of received words with 0..T errors and to
// check Lambda and Omega against the reference model, including a block with
// no errors and one with exactly T errors.
// It checks the solving time: 2 cycles (load, check) for an error-free block,
// and at most 2T steps of at most 2T+2 cycles plus the load cycle otherwise.
module tb_rs_kes_mea;
  import rs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic done;
  int c, f, mx, mn;
  tb_rs_kes #(.KES(KES_MEA), .NBLK(200)) u (.clk, .rst_n, .done, .checks(c), .failures(f),
                                            .max_cycles(mx), .min_cycles(mn));
  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (done);
      begin repeat (200000) @(posedge clk); $display("watchdog expired"); end
    join_any
    checks = c + 2;
    failures = f + (done ? 0 : 1);
    $display("MEA cycles: min %0d max %0d", mn, mx);
    if (mx > 2 * 8 * (2 * 8 + 2) + 1) failures++;
    if (mn != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
