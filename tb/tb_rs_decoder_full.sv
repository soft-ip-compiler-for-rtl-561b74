// tb_rs_decoder_full -- the decoder at its default parameters: DVB
// (204,188) code over GF(2^8), recursive syndrome calculator, modified
// Euclidean solver, one input shift register.
//
// Decodes 60 random codewords back to back, with no errors, with T = 8
// errors, with random 1..8 errors and, every fifth block, with 9 errors.
// Every symbol of a correctable block is compared with the transmitted
// codeword and out_fail must be low for it; at least one block with 9
// errors must be flagged. Also checks that the pipeline stalled the input at
// least once (the solver then takes longer than a block time).
module tb_rs_decoder_full;
  import rs_ref_pkg::*;
  localparam int N = 204, K = 188, T = 8, NBLK = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_last, out_fail;
  logic [7:0] in_sym, out_sym;

  rs_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_sym, .out_last, .out_fail);

  int tx [$][$];
  int rx [$][$];
  int ne [$];
  int checks = 0, failures = 0, n_stall = 0, n_det = 0;

  initial begin
    int msg[$], cw[$];
    ref_init(8, 'h11D);
    for (int bk = 0; bk < NBLK; bk++) begin
      int e;
      msg = {};
      for (int s = 0; s < K; s++) msg.push_back($urandom_range(255));
      ref_encode(N, K, 0, msg, cw);
      tx.push_back(cw);
      e = (bk % 5 == 0) ? 0 : (bk % 5 == 1) ? T : (bk % 5 == 4) ? T + 1 : $urandom_range(T, 1);
      ne.push_back(e);
      ref_corrupt(N, e, cw);
      rx.push_back(cw);
    end
    in_valid = 0; in_sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int bk = 0; bk < NBLK; bk++)
      for (int s = 0; s < N; s++) begin
        @(negedge clk);
        in_valid = 1;
        in_sym   = 8'(rx[bk][s]);
        @(posedge clk);
        while (!in_ready) begin n_stall++; @(posedge clk); end
      end
    @(negedge clk);
    in_valid = 0;
  end

  int oblk = 0, osym = 0;
  always @(posedge clk) begin
    if (out_valid && oblk < NBLK) begin
      if (ne[oblk] <= T) begin
        checks++;
        if (int'(out_sym) != tx[oblk][osym] || out_last != (osym == N - 1) || (out_last && out_fail)) begin
          failures++;
          $display("blk %0d sym %0d: got %0d exp %0d", oblk, osym, out_sym, tx[oblk][osym]);
        end
      end else if (out_last && out_fail) n_det++;
      if (osym == N - 1) begin osym <= 0; oblk <= oblk + 1; end
      else osym <= osym + 1;
    end
  end

  initial begin
    fork
      wait (oblk == NBLK);
      begin repeat (NBLK * 300 + 1000) @(posedge clk); $display("watchdog expired"); failures++; end
    join_any
    checks += 2;
    if (n_det == 0) begin failures++; $display("no uncorrectable block flagged"); end
    if (n_stall == 0) begin failures++; $display("input never stalled"); end
    $display("stalled cycles %0d, uncorrectable blocks flagged %0d of %0d", n_stall, n_det, NBLK / 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
