// tb_rs_decoder_gf128 -- the decoder over GF(2^7) with T = 3, the field and
// correction power of the cable-modem design example, in its chosen
// configuration: RSC, MEA, one cell, one shift register. That example's
// length-128 code is an extended code (one symbol more than the 127 nonzero
// field elements can address); the decoder handles codes with N <= 2^M - 1
// only, so this test uses the full-length (127,121) code instead. The field
// polynomial p(x) = x^7+x^3+1 and first root alpha^0 are this test's choice;
// any primitive polynomial of degree 7 exercises the same hardware.
//
// It decodes 300 blocks (no errors, T errors, random errors, T+1 errors),
// the first five with idle input cycles and the rest back to back, and
// compares every symbol of a correctable block with the transmitted
// codeword. A correction and a detected uncorrectable block must occur.
// With T = 3 the MEA solver is faster than the Chien search, so back-to-back
// blocks must leave exactly N+1 = 128 cycles apart. Runs on its own because
// the reference model holds one field at a time.
module tb_rs_decoder_gf128;
  import rs_pkg::*;

  localparam int NBLK = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done;
  int   chk, fl, st, fu, co, fa, mp, ov;

  rs_dec_harness #(.M(7), .POLY('h89), .N(127), .K(121), .SYND(SC_RSC), .KES(KES_MEA),
                   .NSHR(1), .NBLK(NBLK)) h0 (
    .clk, .rst_n, .done, .checks(chk), .failures(fl), .n_stall(st),
    .n_full(fu), .n_corr(co), .n_fail(fa), .min_period(mp), .n_overlap(ov));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (done);
        repeat (5) @(posedge clk);
      end
      begin
        repeat (100000) @(posedge clk);
        $display("watchdog expired");
        failures++;
      end
    join_any
    $display("checks=%0d failures=%0d stalls=%0d fifo_full=%0d corrected=%0d detected=%0d min_period=%0d",
             chk, fl, st, fu, co, fa, mp);
    checks = chk + 4;
    failures += fl;
    if (!done) failures++;
    if (co == 0) begin failures++; $display("no correction"); end
    if (fa == 0) begin failures++; $display("no detected failure"); end
    if (mp != 128) begin failures++; $display("period %0d, expected 128", mp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
