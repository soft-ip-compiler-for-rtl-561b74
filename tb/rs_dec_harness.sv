// rs_dec_harness -- drives and checks one rs_decoder configuration (field,
// code, sub-architectures, number of key equation cells and shift registers).
//
// Sends NBLK random codewords, built by the reference encoder of rs_ref_pkg,
// through the decoder with a repeating error pattern per block: none, T
// errors, 1..T errors, T+1 errors (beyond the code), 0..T errors. The first
// GAPBLK blocks are sent with random idle cycles, the rest back-to-back. Every output symbol of a correctable block is compared with
// the transmitted codeword, out_last must fall on the block's last symbol and
// out_fail must be low; for a block with T+1 errors only the flag is counted.
// It also counts how often each decoder mechanism occurred (input stall from
// a busy pipeline, input stall from a full FIFO, corrections, detected
// failures, cycles with two or more key equation cells busy at once) and the shortest spacing between block ends in the back-to-back
// part. done rises when all blocks have come out.
module rs_dec_harness
  import rs_pkg::*;
  import rs_ref_pkg::*;
#(
  parameter int         M    = 8,
  parameter int         POLY = 'h11D,
  parameter int         N    = 204,
  parameter int         K    = 188,
  parameter synd_arch_e SYND = SC_RSC,
  parameter kes_arch_e  KES  = KES_MEA,
  parameter int         NCELL = 1,
  parameter int         NSHR = 1,
  parameter int         NBLK = 10,
  parameter int         GAPBLK = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_full,
  output int   n_corr,
  output int   n_fail,
  output int   min_period,
  output int   n_overlap
);
  localparam int T = (N - K) / 2;

  logic         in_valid, in_ready, out_valid, out_last, out_fail;
  logic [M-1:0] in_sym, out_sym;

  rs_decoder #(.M(M), .POLY(POLY), .N(N), .K(K), .B(0), .SYND(SYND), .KES(KES),
               .NCELL(NCELL), .NSHR(NSHR)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_sym, .out_last, .out_fail
  );

  int tx_blk [$][$];      // codewords as sent (expected output)
  int rx_blk [$][$];      // received words (with errors)
  int nerr_q [$];

  initial begin
    int msg[$];
    int cw[$];
    int ne;
    ref_init(M, POLY);
    for (int bk = 0; bk < NBLK; bk++) begin
      msg = {};
      for (int s = 0; s < K; s++) msg.push_back($urandom_range((1 << M) - 1));
      ref_encode(N, K, 0, msg, cw);
      tx_blk.push_back(cw);
      case (bk % 5)
        0: ne = 0;
        1: ne = T;
        2: ne = $urandom_range(T, 1);
        3: ne = T + 1;
        default: ne = $urandom_range(T, 0);
      endcase
      nerr_q.push_back(ne);
      ref_corrupt(N, ne, cw);
      rx_blk.push_back(cw);
    end
  end

  // Driver.
  int dblk, dsym;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dblk     <= 0;
      dsym     <= 0;
      in_valid <= 1'b0;
      in_sym   <= '0;
    end else begin
      int nb, ns;
      nb = dblk;
      ns = dsym;
      if (in_valid && in_ready) begin
        ns = ns + 1;
        if (ns == N) begin
          ns = 0;
          nb = nb + 1;
        end
      end
      dblk <= nb;
      dsym <= ns;
      if (nb < NBLK && (nb >= GAPBLK || ($urandom_range(9) < 8) || (in_valid && !in_ready))) begin
        in_valid <= 1'b1;
        in_sym   <= M'(rx_blk[nb][ns]);
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  // Monitor.
  int oblk, osym, cyc, last_end;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oblk <= 0;
      osym <= 0;
      cyc  <= 0;
      last_end   <= -1;
      checks     <= 0;
      failures   <= 0;
      n_stall    <= 0;
      n_full     <= 0;
      n_corr     <= 0;
      n_fail     <= 0;
      min_period <= 1 << 30;
      n_overlap  <= 0;
      done       <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (in_valid && !in_ready) n_stall <= n_stall + 1;
      if (dut.sr_valid && dut.fifo_full) n_full <= n_full + 1;
      begin
        int busy;
        busy = 0;
        for (int c = 0; c < NCELL; c++) if (!dut.u_kes.c_sr[c]) busy++;
        if (busy >= 2) n_overlap <= n_overlap + 1;
      end
      if (out_valid && oblk < NBLK) begin
        if (nerr_q[oblk] <= T) begin
          checks <= checks + 1;
          if (int'(out_sym) != tx_blk[oblk][osym] || out_last != (osym == N - 1)) begin
            failures <= failures + 1;
            $display("MISMATCH N=%0d SYND=%0d KES=%0d blk %0d sym %0d: got %0d exp %0d last %0d",
                     N, SYND, KES, oblk, osym, out_sym, tx_blk[oblk][osym], out_last);
          end
        end
        if (osym == N - 1) begin
          if (nerr_q[oblk] <= T) begin
            checks <= checks + 2;
            if (out_fail) begin
              failures <= failures + 2;
              $display("FALSE FAIL blk %0d", oblk);
            end
            if (nerr_q[oblk] > 0) n_corr <= n_corr + 1;
          end else if (out_fail) begin
            n_fail <= n_fail + 1;
          end
          if (oblk >= GAPBLK + 1 && last_end >= 0 && cyc - last_end < min_period)
            min_period <= cyc - last_end;
          last_end <= cyc;
          osym <= 0;
          oblk <= oblk + 1;
          if (oblk == NBLK - 1) done <= 1'b1;
        end else begin
          osym <= osym + 1;
        end
      end
    end
  end

endmodule
