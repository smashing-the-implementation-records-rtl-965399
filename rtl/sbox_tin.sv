// sbox_tin: input transformation of the composite-field AES S-box.
//
// Maps the input byte g (AES polynomial basis, g[7] = g7) to the normal-basis
// coordinates a and b of A = a*Y + b*Y^16, and also produces the twelve
// pairwise sums a_i^a_j and b_i^b_j. Those sums are what the x^17 stage and the
// two output multipliers consume, so forming them here from g lets the same
// gates serve both stages. Every output is one row of the published 20 x 8
// matrix T_IN (see sbox_pkg), written as a parity equation; the small XOR
// netlist a logic minimiser would find for it is left to synthesis.
//
// Purely combinational, no clock.
module sbox_tin
  import sbox_pkg::*;
(
  input  logic [7:0] g,
  output gf16_t      a,
  output gf16_t      b,
  output shared_t    sh
);

  logic [TIN_ROWS-1:0] y;

  always_comb begin
    for (int r = 0; r < TIN_ROWS; r++) y[r] = parity8(T_IN[r], g);
  end

  assign a    = y[3:0];
  assign b    = y[7:4];
  assign sh.a = y[13:8];
  assign sh.b = y[19:14];

endmodule
