// tb_rs_chien_forney -- self-checking test of rs_chien_forney in both scan
// orders on the (204,188) code, B = 0, and on (15,9) with B = 2. Each
// instance is checked by tb_rs_cf_one: root flags, error values, corrected
// symbols (descending order), the failure flag and the 3-cycle latency.
module tb_rs_chien_forney;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic d [4];
  int c [4], f [4], nf [4];
  tb_rs_cf_one #(.DESC(1'b1))                          u0 (.clk, .rst_n, .done(d[0]), .checks(c[0]), .failures(f[0]), .n_fail(nf[0]));
  tb_rs_cf_one #(.DESC(1'b0))                          u1 (.clk, .rst_n, .done(d[1]), .checks(c[1]), .failures(f[1]), .n_fail(nf[1]));
  tb_rs_cf_one #(.N(15), .K(9), .B(2), .DESC(1'b1), .NBLK(100)) u2 (.clk, .rst_n, .done(d[2]), .checks(c[2]), .failures(f[2]), .n_fail(nf[2]));
  tb_rs_cf_one #(.N(15), .K(9), .B(2), .DESC(1'b0), .NBLK(100)) u3 (.clk, .rst_n, .done(d[3]), .checks(c[3]), .failures(f[3]), .n_fail(nf[3]));
  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (d[0] && d[1] && d[2] && d[3]);
      begin repeat (100000) @(posedge clk); $display("watchdog expired"); end
    join_any
    checks = 1; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i] + (d[i] ? 0 : 1);
    end
    $display("detected failures per instance: %0d %0d %0d %0d", nf[0], nf[1], nf[2], nf[3]);
    if (nf[0] + nf[1] + nf[2] + nf[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
