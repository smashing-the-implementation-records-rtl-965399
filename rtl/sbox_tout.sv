// sbox_tout: output transformation of the composite-field AES S-box.
//
// Takes the inverse as the two 5-bit redundant halves W (coefficient of Y)
// and Z (coefficient of Y^16) and returns the S-box byte. One published 8 x 10
// matrix T_OUT (see sbox_pkg) does three jobs at once: it drops the redundant
// fifth bit of each half, changes back to the AES polynomial basis and applies
// the AES affine matrix. The affine constant H = 0x63 is added last. Each output
// bit is a parity equation; gate sharing is left to synthesis.
//
// Purely combinational, no clock.
module sbox_tout
  import sbox_pkg::*;
(
  input  gf16r_t     w,
  input  gf16r_t     z,
  output logic [7:0] s
);

  logic [9:0] v;  // {w0..w4, z0..z4}, w0 in the MSB, matching the column order of T_OUT

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      v[9 - i] = w[i];
      v[4 - i] = z[i];
    end
    for (int k = 0; k < 8; k++) s[k] = parity10(T_OUT[k], v) ^ H[k];
  end

endmodule
