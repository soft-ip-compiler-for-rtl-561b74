// rs_pkg -- architecture choices of the Reed-Solomon decoder.
//
// The decoder is one design with characteristic parameters: the kind of
// syndrome calculator and the kind of key equation solver. They change area
// and speed but not the function. These enums name the choices; rs_decoder
// takes them as typed parameters and instantiates the matching sub-blocks.
package rs_pkg;

  // Syndrome calculator: recursive (Horner, constant multipliers only) or
  // constructive (power registers plus variable multipliers).
  typedef enum logic [0:0] {SC_RSC = 1'b0, SC_CSC = 1'b1} synd_arch_e;

  // Key equation solver: modified Euclidean, inversionless Berlekamp-Massey,
  // or its reformulated systolic form.
  typedef enum logic [1:0] {KES_MEA = 2'd0, KES_IBMA = 2'd1, KES_RIBMA = 2'd2} kes_arch_e;

endpackage
