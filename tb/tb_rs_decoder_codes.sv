// tb_rs_decoder_codes -- the decoder on the other GF(2^8) codes of the
// architecture's design examples, each in the configurations chosen for it
// under an area bound and under a speed bound:
//   0  DVD   (208,192), T = 8:  RSC, MEA, one cell, one shift register
//   1  VSBS  (208,188), T = 10: RSC, MEA, one cell, 73 shift registers
//   2  VSBS  (208,188), T = 10: RSC, iBMA, one cell, one shift register
//   3  CCSDS (255,223), T = 16: RSC, RiBMA, one cell, one shift register
//   4  CCSDS (255,223), T = 16: RSC, iBMA, one cell, one shift register
// All use p(x) = x^8+x^4+x^3+x^2+1 and first root alpha^0 in the polynomial
// basis; the CCSDS standard itself uses another field polynomial, another
// first root and a dual-basis symbol mapping, which are not modelled here, so
// configurations 3 and 4 exercise the CCSDS code size and solver choice only.
//
// Each configuration decodes 120 blocks (no errors, T errors, random errors,
// T+1 errors), the first five with idle input cycles and the rest back to
// back, and compares every symbol of a correctable block with the
// transmitted codeword. Each must show a correction and a detected
// uncorrectable block; the MEA configurations, whose solver is slower than a
// block time, must also show a pipeline stall and a FIFO-full stall. With
// the iBMA and RiBMA solvers the Chien search is the bottleneck, so
// back-to-back blocks must leave exactly N+1 cycles apart.
module tb_rs_decoder_codes;
  import rs_pkg::*;

  localparam int NC   = 5;
  localparam int NBLK = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NC];
  int   chk [NC], fl [NC], st [NC], fu [NC], co [NC], fa [NC], mp [NC], ov [NC];
  int   nn [NC] = '{208, 208, 208, 255, 255};

  rs_dec_harness #(.N(208), .K(192), .SYND(SC_RSC), .KES(KES_MEA), .NSHR(1), .NBLK(NBLK)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_stall(st[0]),
    .n_full(fu[0]), .n_corr(co[0]), .n_fail(fa[0]), .min_period(mp[0]), .n_overlap(ov[0]));
  rs_dec_harness #(.N(208), .K(188), .SYND(SC_RSC), .KES(KES_MEA), .NSHR(73), .NBLK(NBLK)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_stall(st[1]),
    .n_full(fu[1]), .n_corr(co[1]), .n_fail(fa[1]), .min_period(mp[1]), .n_overlap(ov[1]));
  rs_dec_harness #(.N(208), .K(188), .SYND(SC_RSC), .KES(KES_IBMA), .NSHR(1), .NBLK(NBLK)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_stall(st[2]),
    .n_full(fu[2]), .n_corr(co[2]), .n_fail(fa[2]), .min_period(mp[2]), .n_overlap(ov[2]));
  rs_dec_harness #(.N(255), .K(223), .SYND(SC_RSC), .KES(KES_RIBMA), .NSHR(1), .NBLK(NBLK)) h3 (
    .clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_stall(st[3]),
    .n_full(fu[3]), .n_corr(co[3]), .n_fail(fa[3]), .min_period(mp[3]), .n_overlap(ov[3]));
  rs_dec_harness #(.N(255), .K(223), .SYND(SC_RSC), .KES(KES_IBMA), .NSHR(1), .NBLK(NBLK)) h4 (
    .clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .n_stall(st[4]),
    .n_full(fu[4]), .n_corr(co[4]), .n_fail(fa[4]), .min_period(mp[4]), .n_overlap(ov[4]));

  int checks = 0, failures = 0;

  task automatic report();
    for (int c = 0; c < NC; c++) begin
      $display("config %0d: checks=%0d failures=%0d stalls=%0d fifo_full=%0d corrected=%0d detected=%0d min_period=%0d",
               c, chk[c], fl[c], st[c], fu[c], co[c], fa[c], mp[c]);
      checks += chk[c] + 5;
      failures += fl[c];
      if (!done[c]) failures++;
      if (c < 2 && st[c] == 0) begin failures++; $display("config %0d: no pipeline stall", c); end
      if (c < 2 && fu[c] == 0) begin failures++; $display("config %0d: FIFO never full", c); end
      if (co[c] == 0) begin failures++; $display("config %0d: no correction", c); end
      if (fa[c] == 0) begin failures++; $display("config %0d: no detected failure", c); end
    end
    for (int c = 2; c < NC; c++) begin
      checks++;
      if (mp[c] != nn[c] + 1) begin
        failures++; $display("config %0d: period %0d, expected %0d", c, mp[c], nn[c] + 1);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (done[0] && done[1] && done[2] && done[3] && done[4]);
        repeat (5) @(posedge clk);
      end
      begin
        repeat (200000) @(posedge clk);
        $display("watchdog expired");
        failures++;
      end
    join_any
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
