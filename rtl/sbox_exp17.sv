// sbox_exp17: exponentiation stage, d = A^17, of the composite-field S-box.
//
// For A = a*Y + b*Y^16 the norm A^17 = A*A^16 lies in GF(2^4) and equals
// nu*(a+b)^2 + a*b. Instead of a squarer, a constant multiplier, a general
// multiplier and adders, the whole expression is written as one set of closed
// equations over the coordinates and the shared sums from sbox_tin:
//   c4 = a13*b13 + a02*b02          (common to all four outputs)
//   d0 = c4 + (a1+b1) + a0*b0  + a12*b12
//   d1 = c4 + (a1|b1) + (a3+b3) + a23*b23
//   d2 = c4 + (a1+b1) + (a2|b2) + a03*b03
//   d3 = c4 + a3*b3   + (a01|b01)
// ('+' is XOR, '*' AND, '|' OR). Which operand pairs feed which output follows
// the published gate diagrams; the equations were derived for this design and
// checked against the field arithmetic for all 256 inputs.
//
// INV_OUT = 0 is the lightweight form. INV_OUT = 1 is the fast form, which
// delivers the complement d' = ~d; the fast subfield inverter is built to take
// d' directly, so no extra inverters sit on the critical path.
//
// Purely combinational, no clock.
module sbox_exp17
  import sbox_pkg::*;
#(
  parameter bit INV_OUT = 1'b0
) (
  input  gf16_t   a,
  input  gf16_t   b,
  input  shared_t sh,
  output gf16_t   d
);

  logic  c4;
  gf16_t dt;  // the four partial results before c4 is added

  always_comb begin
    c4    = (sh.a[P13] & sh.b[P13]) ^ (sh.a[P02] & sh.b[P02]);
    dt[0] = (a[1] ^ b[1]) ^ (a[0] & b[0]) ^ (sh.a[P12] & sh.b[P12]);
    dt[1] = (a[1] | b[1]) ^ (a[3] ^ b[3]) ^ (sh.a[P23] & sh.b[P23]);
    dt[2] = (a[1] ^ b[1]) ^ (a[2] | b[2]) ^ (sh.a[P03] & sh.b[P03]);
    dt[3] = (a[3] & b[3]) ^ (sh.a[P01] | sh.b[P01]);
    d     = (dt ^ {4{c4}}) ^ {4{INV_OUT}};
  end

endmodule
