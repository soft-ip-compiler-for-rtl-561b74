// tb_gf_pkg -- self-checking test of the gf_pkg functions.
//
// gf_mul is compared with log/antilog-table multiplication from the
// reference model for every pair of elements of GF(2^8) with
// p(x) = x^8+x^4+x^3+x^2+1, and for random pairs of GF(2^4) with
// p(x) = x^4+x+1. gf_alpha_pow is compared with repeated multiplication by
// alpha for exponents -300..300.
module tb_gf_pkg;
  import gf_pkg::*;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    int pw;
    ref_init(8, 'h11D);
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        checks++;
        if (int'(gf_mul(gfw_t'(a), gfw_t'(b), 8, 'h11D)) != ref_mul(a, b)) failures++;
      end
    pw = 1;
    for (int e = 0; e <= 300; e++) begin
      checks += 2;
      if (int'(gf_alpha_pow(e, 8, 'h11D)) != pw) failures++;
      if (int'(gf_alpha_pow(-e, 8, 'h11D)) != ref_apow(-e)) failures++;
      pw = ref_mul(pw, 2);
    end
    ref_init(4, 'h13);
    for (int i = 0; i < 200; i++) begin
      int a, b;
      a = $urandom_range(15);
      b = $urandom_range(15);
      checks++;
      if (int'(gf_mul(gfw_t'(a), gfw_t'(b), 4, 'h13)) != ref_mul(a, b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
