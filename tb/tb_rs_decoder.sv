// tb_rs_decoder -- end-to-end test of the decoder in all six combinations of
// syndrome calculator (RSC, CSC) and key equation solver (MEA, iBMA, RiBMA)
// on the DVB (204,188) code, the short (15,9) code of the design-space
// example, and MEA with two multiplexed key equation cells and three input
// shift registers.
//
// Each configuration decodes blocks with no errors, with the full T errors,
// with random numbers of errors and with T+1 errors, first with idle cycles
// in the input, then back to back. Every mechanism must occur at least once
// per configuration: input stall by a busy pipeline, input stall by a full
// FIFO (with the recursive syndrome calculator), a correction, and a
// detected uncorrectable block. With the iBMA solver the Chien search is the
// bottleneck and blocks must come out every N+1 cycles when back to back;
// the same holds for RiBMA and for two MEA cells, which must be seen busy at
// the same time.
module tb_rs_decoder;
  import rs_pkg::*;

  localparam int NC = 8;
  localparam int NBLK = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NC];
  int   chk [NC], fl [NC], st [NC], fu [NC], co [NC], fa [NC], mp [NC], ov [NC];

  rs_dec_harness #(.N(204), .K(188), .SYND(SC_RSC), .KES(KES_MEA),  .NBLK(NBLK)) h0 (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .n_stall(st[0]),
    .n_full(fu[0]), .n_corr(co[0]), .n_fail(fa[0]), .min_period(mp[0]), .n_overlap(ov[0]));
  rs_dec_harness #(.N(204), .K(188), .SYND(SC_RSC), .KES(KES_IBMA), .NBLK(NBLK)) h1 (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .n_stall(st[1]),
    .n_full(fu[1]), .n_corr(co[1]), .n_fail(fa[1]), .min_period(mp[1]), .n_overlap(ov[1]));
  rs_dec_harness #(.N(204), .K(188), .SYND(SC_CSC), .KES(KES_MEA),  .NBLK(NBLK)) h2 (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .n_stall(st[2]),
    .n_full(fu[2]), .n_corr(co[2]), .n_fail(fa[2]), .min_period(mp[2]), .n_overlap(ov[2]));
  rs_dec_harness #(.N(204), .K(188), .SYND(SC_CSC), .KES(KES_IBMA), .NBLK(NBLK)) h3 (
    .clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .n_stall(st[3]),
    .n_full(fu[3]), .n_corr(co[3]), .n_fail(fa[3]), .min_period(mp[3]), .n_overlap(ov[3]));
  rs_dec_harness #(.N(15),  .K(9),   .SYND(SC_CSC), .KES(KES_MEA),  .NBLK(NBLK)) h4 (
    .clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .n_stall(st[4]),
    .n_full(fu[4]), .n_corr(co[4]), .n_fail(fa[4]), .min_period(mp[4]), .n_overlap(ov[4]));

  rs_dec_harness #(.N(204), .K(188), .SYND(SC_RSC), .KES(KES_RIBMA), .NBLK(NBLK)) h5 (
    .clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]), .n_stall(st[5]),
    .n_full(fu[5]), .n_corr(co[5]), .n_fail(fa[5]), .min_period(mp[5]), .n_overlap(ov[5]));
  rs_dec_harness #(.N(204), .K(188), .SYND(SC_CSC), .KES(KES_RIBMA), .NBLK(NBLK)) h6 (
    .clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fl[6]), .n_stall(st[6]),
    .n_full(fu[6]), .n_corr(co[6]), .n_fail(fa[6]), .min_period(mp[6]), .n_overlap(ov[6]));

  // MEA with two multiplexed cells and three input shift registers.
  rs_dec_harness #(.N(204), .K(188), .SYND(SC_RSC), .KES(KES_MEA), .NCELL(2), .NSHR(3),
                   .NBLK(NBLK)) h7 (
    .clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fl[7]), .n_stall(st[7]),
    .n_full(fu[7]), .n_corr(co[7]), .n_fail(fa[7]), .min_period(mp[7]), .n_overlap(ov[7]));

  int checks = 0, failures = 0;

  task automatic report();
    for (int c = 0; c < NC; c++) begin
      $display("config %0d: checks=%0d failures=%0d stalls=%0d fifo_full=%0d corrected=%0d detected=%0d min_period=%0d cells_overlap=%0d",
               c, chk[c], fl[c], st[c], fu[c], co[c], fa[c], mp[c], ov[c]);
      checks += chk[c] + 4;
      failures += fl[c];
      if (!done[c]) failures++;
      if (st[c] == 0) begin failures++; $display("config %0d: no pipeline stall", c); end
      if (co[c] == 0) begin failures++; $display("config %0d: no correction", c); end
      if (fa[c] == 0) begin failures++; $display("config %0d: no detected failure", c); end
      if ((c < 2 || c == 5 || c == 7) && fu[c] == 0) begin failures++; $display("config %0d: FIFO never full", c); end
    end
    // Chien search bound with the iBMA solver: one block per N+1 cycles.
    checks += 2;
    if (mp[1] != 205) begin failures++; $display("iBMA/RSC period %0d, expected 205", mp[1]); end
    if (mp[3] != 205) begin failures++; $display("iBMA/CSC period %0d, expected 205", mp[3]); end
    checks += 2;
    if (mp[5] != 205) begin failures++; $display("RiBMA/RSC period %0d, expected 205", mp[5]); end
    if (mp[6] != 205) begin failures++; $display("RiBMA/CSC period %0d, expected 205", mp[6]); end
    // Two MEA cells: both must have been busy at once, and the pipeline must
    // reach the Chien-search bound.
    checks += 2;
    if (ov[7] == 0) begin failures++; $display("MEA x2: cells never overlapped"); end
    if (mp[7] != 205) begin failures++; $display("MEA x2 period %0d, expected 205", mp[7]); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
        repeat (5) @(posedge clk);
      end
      begin
        repeat (500000) @(posedge clk);
        $display("watchdog expired");
        failures++;
      end
    join_any
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
