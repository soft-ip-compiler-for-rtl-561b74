// tb_rs_rsc -- self-checking test of rs_rsc on the (204,188) code with B = 0,
// plus a (15,9) instance with B = 1 to exercise a nonzero generator start.
// All checks are in tb_rs_synd: syndromes against direct evaluation, the
// one-cycle result timing and the input stall while a result is untaken.
module tb_rs_rsc;
  import rs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic d0, d1;
  int c0, f0, n0, c1, f1, n1;
  tb_rs_synd #(.SYND(SC_RSC), .NBLK(40)) u0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .n_block(n0));
  tb_rs_synd #(.SYND(SC_RSC), .N(15), .K(9), .B(1), .NBLK(200)) u1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .n_block(n1));
  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (d0 && d1);
      begin repeat (100000) @(posedge clk); $display("watchdog expired"); end
    join_any
    checks = c0 + c1 + 2;
    failures = f0 + f1 + ((d0 && d1) ? 0 : 1) + (n0 == 40 ? 0 : 1) + (n1 == 200 ? 0 : 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
