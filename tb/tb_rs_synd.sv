// tb_rs_synd -- shared checks for the two syndrome calculators.
//
// Sends NBLK received words (codewords with 0..T+1 random errors) into the
// calculator chosen by SYND, with random idle cycles, and compares the
// syndromes with direct evaluation by the reference model. It checks the
// timing: synd_valid rises on the cycle after the block's last symbol is
// accepted, and while a result is left untaken the next block's last symbol
// is refused (in_ready low) and the earlier result stays unchanged.
module tb_rs_synd
  import rs_pkg::*;
  import rs_ref_pkg::*;
#(
  parameter synd_arch_e SYND = SC_RSC,
  parameter int         N    = 204,
  parameter int         K    = 188,
  parameter int         B    = 0,
  parameter int         NBLK = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_block
);
  localparam int M  = 8;
  localparam int NS = N - K;

  logic         in_valid, in_ready, synd_valid, synd_ready;
  logic [M-1:0] in_sym;
  logic [M-1:0] synd [NS];

  if (SYND == SC_RSC) begin : g_rsc
    rs_rsc #(.M(M), .POLY('h11D), .N(N), .K(K), .B(B)) dut (.*);
  end else begin : g_csc
    rs_csc #(.M(M), .POLY('h11D), .N(N), .K(K), .B(B)) dut (.*);
  end

  int exp_q [$][$];

  initial begin
    int msg[$], cw[$], ex[$];
    done = 0; checks = 0; failures = 0; n_block = 0;
    in_valid = 0; in_sym = '0; synd_ready = 0;
    ref_init(M, 'h11D);
    @(posedge rst_n);
    for (int bk = 0; bk < NBLK; bk++) begin
      msg = {};
      for (int i = 0; i < K; i++) msg.push_back($urandom_range(255));
      ref_encode(N, K, B, msg, cw);
      ref_corrupt(N, (bk == 0) ? 0 : $urandom_range(NS / 2 + 1), cw);
      ex = {};
      for (int i = 0; i < NS; i++) ex.push_back(ref_synd(N, B, i, cw));
      exp_q.push_back(ex);
      for (int s = 0; s < N; s++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_sym   = M'(cw[s]);
        @(posedge clk);
        while (!in_ready) begin
          // Refused: must be the last symbol with an untaken result.
          checks++;
          if (!(s == N - 1 && synd_valid && !synd_ready)) failures++;
          @(posedge clk);
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (3 * N) @(negedge clk);
    done = 1;
  end

  // Result side: take results after a random delay, sometimes a long one.
  int prev_cnt, wait_cyc, held_cyc;
  int nacc = 0;
  logic acc_last = 1'b0;
  logic [M-1:0] held [NS];
  always @(posedge clk) begin
    acc_last <= 1'b0;
    if (in_valid && in_ready) begin
      acc_last <= (nacc == N - 1);
      nacc <= (nacc == N - 1) ? 0 : nacc + 1;
    end
    if (rst_n) begin
      // valid the cycle after the last accepted symbol
      if (acc_last) begin
        checks++;
        if (!synd_valid) begin failures++; $display("synd_valid late"); end
      end
      if (synd_valid && held_cyc > 0) begin
        checks++;
        foreach (held[i]) if (held[i] != synd[i]) begin failures++; $display("result changed while held"); break; end
      end
      if (synd_valid) begin
        foreach (held[i]) held[i] <= synd[i];
        held_cyc <= held_cyc + 1;
      end
      if (synd_valid && synd_ready) begin
        checks++;
        foreach (synd[i]) if (int'(synd[i]) != exp_q[n_block][i]) begin
          failures++; $display("block %0d S_%0d = %0d exp %0d", n_block, i, synd[i], exp_q[n_block][i]); break;
        end
        n_block  <= n_block + 1;
        held_cyc <= 0;
      end
    end else begin
      held_cyc <= 0;
    end
  end
  always @(negedge clk) begin
    if (synd_valid && !synd_ready) begin
      if (wait_cyc == 0) wait_cyc = ($urandom_range(3) == 0) ? N + 20 : $urandom_range(3);
      else wait_cyc--;
      synd_ready = (wait_cyc == 1);
    end else begin
      synd_ready = 0;
      wait_cyc = 0;
    end
  end

endmodule
