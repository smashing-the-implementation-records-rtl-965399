// sbox_subinv: GF(2^4) inversion in the normal basis {beta, beta^2, beta^4, beta^8}.
//
// Computes e = d^-1 (and 0 for d = 0). Squaring in a normal basis is a
// rotation of the coordinates, so every output bit is the same function of the
// inputs, rotated: with indices taken modulo 4,
//   e_i = d_{i+1} & ~d_{i+2} & (d_i ^ d_{i+3})  |  d_{i+2} & ~(d_i & ~d_{i+3}).
// The rotated form and its inputs follow the published circuit; the equation
// itself was derived for this design and checked against all 16 inverses.
//
// INV_IN = 1 is the fast variant: the input is the complement d' delivered by
// sbox_exp17 with INV_OUT = 1, and it is undone here, where synthesis can fold
// it into the gates.
//
// Purely combinational, no clock.
module sbox_subinv
  import sbox_pkg::*;
#(
  parameter bit INV_IN = 1'b0
) (
  input  gf16_t d,
  output gf16_t e
);

  gf16_t x;

  always_comb begin
    x = d ^ {4{INV_IN}};
    for (int i = 0; i < 4; i++) begin
      logic x0, x1, x2, x3;
      x0 = x[i];
      x1 = x[(i + 1) % 4];
      x2 = x[(i + 2) % 4];
      x3 = x[(i + 3) % 4];
      e[i] = (x1 & ~x2 & (x0 ^ x3)) | (x2 & ~(x0 & ~x3));
    end
  end

endmodule
