// aes_sbox: combinational AES forward S-box in a GF((2^4)^2) normal basis.
//
// s = M * g^-1 + h. The byte g is mapped by a linear matrix (sbox_tin) into
// the composite field, where it is two 4-bit normal-basis coordinates plus
// twelve shared pairwise sums. The inversion (sbox_cfinv) forms the subfield
// norm A^17 in one closed-form stage, inverts it in GF(2^4), and multiplies
// the inverse by both coordinates with two multipliers that share their common
// operand and return 5-bit redundant results. A second matrix (sbox_tout)
// reduces those ten bits, returns to the AES basis, applies the affine matrix
// and adds 0x63.
//
// Interface: g in, s out, no clock and no state; s is valid one
// combinational delay after g. FAST selects the lightweight (0, default) or
// fast (1) formulation of the inner stages; both give identical results. The
// matrices are the published ones; the inner equations were derived for this
// design from the published structure and are checked exhaustively by the
// testbenches.
module aes_sbox
  import sbox_pkg::*;
#(
  parameter bit FAST = 1'b0
) (
  input  logic [7:0] g,
  output logic [7:0] s
);

  gf16_t   a, b;
  shared_t sh;
  gf16r_t  w, z;

  sbox_tin                 u_tin  (.g(g), .a(a), .b(b), .sh(sh));
  sbox_cfinv #(.FAST(FAST)) u_inv (.a(a), .b(b), .sh(sh), .w(w), .z(z));
  sbox_tout                u_tout (.w(w), .z(z), .s(s));

endmodule
