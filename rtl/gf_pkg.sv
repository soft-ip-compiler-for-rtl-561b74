// gf_pkg -- Galois-field GF(2^m) arithmetic shared by every block of the
// Reed-Solomon decoder.
//
// Field elements are carried in a word of MMAX bits; only the low m bits are
// used. The field is fixed by the symbol size m and the primitive polynomial p
// (both are functional parameters of the decoder). p is given with its x^m
// term included, e.g. x^8+x^4+x^3+x^2+1 = 'h11D.
//
// gf_mul is a plain shift-and-add multiplier: when one operand is a constant
// (the alpha powers of the syndrome calculators and the Chien search) synthesis
// folds it into an XOR network, i.e. a constant multiplier; with two variable
// operands it is a variable multiplier. gf_alpha_pow computes alpha^e for
// constants at elaboration time. The inverse used by the Forney division is a
// table (ROM) built by gf_inv_table-style loops inside the module that needs it.
package gf_pkg;

  // Widest symbol supported by the package functions.
  localparam int MMAX = 16;
  typedef logic [MMAX-1:0] gfw_t;

  // Product of a and b in GF(2^m) defined by primitive polynomial poly.
  function automatic gfw_t gf_mul(gfw_t a, gfw_t b, int m, int poly);
    gfw_t acc;
    gfw_t aa;
    gfw_t mask;
    acc  = '0;
    aa   = a;
    mask = gfw_t'((1 << m) - 1);
    for (int i = 0; i < MMAX; i++) begin
      if (i < m && b[i]) acc = acc ^ aa;
      // aa <- aa * x mod p
      if (aa[m-1]) aa = ((aa << 1) ^ gfw_t'(poly)) & mask;
      else         aa = (aa << 1) & mask;
    end
    return acc & mask;
  endfunction

  // alpha^e, with e taken modulo 2^m - 1 (negative exponents allowed).
  function automatic gfw_t gf_alpha_pow(int e, int m, int poly);
    int   ord;
    int   ee;
    gfw_t r;
    gfw_t sq;
    ord = (1 << m) - 1;
    ee  = e % ord;
    if (ee < 0) ee = ee + ord;
    // Square and multiply over the bits of the exponent.
    r  = gfw_t'(1);
    sq = gfw_t'(2);
    for (int i = 0; i < MMAX; i++) begin
      if (ee[i]) r = gf_mul(r, sq, m, poly);
      sq = gf_mul(sq, sq, m, poly);
    end
    return r;
  endfunction

endpackage
