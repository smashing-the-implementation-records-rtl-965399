// sbox_cfinv: GF((2^4)^2) inversion of A = a*Y + b*Y^16.
//
// A^-1 = A^16 * (A^17)^-1 and A^16 = a*Y^16 + b*Y, so the inverse needs the
// subfield norm d = A^17 (sbox_exp17), its subfield inverse E = d^-1
// (sbox_subinv) and two products with E (sbox_outmul):
//   A^-1 = (B x E)*Y + (A x E)*Y^16 = W*Y + Z*Y^16.
// W and Z leave in the 5-bit redundant form and go straight to the output
// matrix. The pairwise sums of a and b come in from the input matrix.
//
// FAST = 0 builds the lightweight stage pair, FAST = 1 the fast one (the
// exponent stage hands over the complemented norm). Both compute the same
// function. Purely combinational, no clock.
module sbox_cfinv
  import sbox_pkg::*;
#(
  parameter bit FAST = 1'b0
) (
  input  gf16_t   a,
  input  gf16_t   b,
  input  shared_t sh,
  output gf16r_t  w,
  output gf16r_t  z
);

  gf16_t d, e;

  sbox_exp17  #(.INV_OUT(FAST)) u_exp  (.a(a), .b(b), .sh(sh), .d(d));
  sbox_subinv #(.INV_IN(FAST))  u_inv  (.d(d), .e(e));
  sbox_outmul                   u_mul  (.a(a), .b(b), .sh(sh), .e(e), .w(w), .z(z));

endmodule
