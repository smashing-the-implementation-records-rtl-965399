// sbox_pkg: types and constants shared by the composite-field AES S-box.
//
// The S-box works in GF((2^4)^2). A byte of GF(2^8) is held as two 4-bit
// subfield coordinates: A = a*Y + b*Y^16, where {Y, Y^16} is a normal basis of
// GF(2^8) over GF(2^4) with Y + Y^16 = 1 and Y*Y^16 = nu. Each subfield value
// a = a0*beta + a1*beta^2 + a2*beta^4 + a3*beta^8 is in the normal basis of
// GF(2^4) built on a fifth root of unity beta (beta^5 = 1), and nu = beta.
// Because 1 + beta + beta^2 + beta^4 + beta^8 = 0, a subfield value can also be
// carried in 5 redundant bits (bit 4 is the coefficient of 1); the output
// multipliers deliver that form and the output matrix removes the redundancy.
//
// The two transformation matrices below are the published ones: T_IN maps the
// AES polynomial-basis byte g (column order g7..g0, i.e. the natural bit order
// of a logic [7:0]) to the 8 coordinates plus the 12 pairwise sums that later
// stages share; T_OUT maps (w0..w4, z0..z4) to s7..s0 and already contains the
// AES affine matrix. The constant H is added after T_OUT.
package sbox_pkg;

  typedef logic [3:0] gf16_t;   // subfield value, normal basis, bit i = coeff of beta^(2^i)
  typedef logic [4:0] gf16r_t;  // redundant subfield value, bits 0..3 as gf16_t, bit 4 = coeff of 1

  // Pairwise sums x_i ^ x_j of the four coordinates, in the order 01,02,03,12,13,23.
  typedef enum int unsigned { P01 = 0, P02 = 1, P03 = 2, P12 = 3, P13 = 4, P23 = 5 } pair_e;

  typedef struct packed {
    logic [5:0] a;  // a_ij, indexed by pair_e
    logic [5:0] b;  // b_ij, indexed by pair_e
  } shared_t;

  // T_IN: rows a0..a3, b0..b3, then a01,a02,a03,a12,a13,a23, b01,b02,b03,b12,b13,b23.
  localparam int unsigned TIN_ROWS = 20;
  localparam logic [7:0] T_IN [TIN_ROWS] = '{
    8'b0000_1101, 8'b0000_0101, 8'b1110_0011, 8'b0010_0001,   // a0..a3
    8'b0111_1101, 8'b1010_0111, 8'b0100_1101, 8'b1111_1101,   // b0..b3
    8'b0000_1000, 8'b1110_1110, 8'b0010_1100,                 // a01 a02 a03
    8'b1110_0110, 8'b0010_0100, 8'b1100_0010,                 // a12 a13 a23
    8'b1101_1010, 8'b0011_0000, 8'b1000_0000,                 // b01 b02 b03
    8'b1110_1010, 8'b0101_1010, 8'b1011_0000                  // b12 b13 b23
  };

  // T_OUT: element [k] produces s_k; bit 9..5 multiply w0..w4, bit 4..0 multiply z0..z4.
  localparam logic [9:0] T_OUT [8] = '{
    10'b01_1000_1111,   // s0
    10'b00_1010_0000,   // s1
    10'b01_1110_0000,   // s2
    10'b00_1100_0101,   // s3
    10'b11_0000_1111,   // s4
    10'b11_0110_1111,   // s5
    10'b11_1011_1101,   // s6
    10'b01_0010_0011    // s7
  };

  localparam logic [7:0] H = 8'h63;  // AES affine constant

  // Parity of the selected bits: one row of a GF(2) matrix-vector product.
  function automatic logic parity8(logic [7:0] row, logic [7:0] v);
    return ^(row & v);
  endfunction

  function automatic logic parity10(logic [9:0] row, logic [9:0] v);
    return ^(row & v);
  endfunction

endpackage
