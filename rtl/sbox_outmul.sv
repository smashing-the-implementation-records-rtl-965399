// sbox_outmul: the two output multipliers W = B x E and Z = A x E.
//
// Both products share the operand E, the subfield inverse. Each multiplier
// takes two 4-bit normal-basis operands and returns 5 bits in the redundant
// form (coefficients of beta, beta^2, beta^4, beta^8 and 1); the reduction
// back to 4 bits is folded into the output matrix. Writing
// x_i*y_j + x_j*y_i = (x_i+x_j)(y_i+y_j) + x_i*y_i + x_j*y_j and using the
// redundancy of the 5-bit form, each output bit is the XOR of two products:
//   r0 = x12*y12 + x0*y0    r1 = x23*y23 + x1*y1    r2 = x03*y03 + x2*y2
//   r3 = x01*y01 + x3*y3    r4 = x02*y02 + x13*y13
// with x_ij = x_i + x_j. That is 10 products and 5 XORs per multiplier plus
// the six sums of each operand, 17 XORs in all, as published. The six sums
// of A and B come from the input matrix; the six sums of E are formed once
// here and used by both multipliers. Complementing every product (NAND gates)
// leaves the value unchanged, since all five redundant basis elements add up
// to zero.
//
// Purely combinational, no clock.
module sbox_outmul
  import sbox_pkg::*;
(
  input  gf16_t   a,
  input  gf16_t   b,
  input  shared_t sh,
  input  gf16_t   e,
  output gf16r_t  w,
  output gf16r_t  z
);

  logic [5:0] es;  // e_i ^ e_j, indexed by pair_e

  // One 4 x 4 -> 5 multiplier given an operand, its pair sums and E.
  function automatic gf16r_t mul5(gf16_t x, logic [5:0] xs, gf16_t y, logic [5:0] ys);
    gf16r_t r;
    r[0] = (xs[P12] & ys[P12]) ^ (x[0] & y[0]);
    r[1] = (xs[P23] & ys[P23]) ^ (x[1] & y[1]);
    r[2] = (xs[P03] & ys[P03]) ^ (x[2] & y[2]);
    r[3] = (xs[P01] & ys[P01]) ^ (x[3] & y[3]);
    r[4] = (xs[P02] & ys[P02]) ^ (xs[P13] & ys[P13]);
    return r;
  endfunction

  always_comb begin
    es[P01] = e[0] ^ e[1];
    es[P02] = e[0] ^ e[2];
    es[P03] = e[0] ^ e[3];
    es[P12] = e[1] ^ e[2];
    es[P13] = e[1] ^ e[3];
    es[P23] = e[2] ^ e[3];
    w = mul5(b, sh.b, e, es);
    z = mul5(a, sh.a, e, es);
  end

endmodule
