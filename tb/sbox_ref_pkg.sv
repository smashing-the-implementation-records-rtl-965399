// sbox_ref_pkg: reference arithmetic for the S-box testbenches.
//
// Everything here is computed from first principles, independently of the
// matrices and equations in the design: GF(2^8) multiplication modulo the AES
// polynomial x^8+x^4+x^3+x+1, inversion by exponentiation to 254, the AES
// affine map, and the field elements that define the composite basis
// (beta = 0xED, a fifth root of unity, and Y = 0x43 with Y + Y^16 = 1 and
// Y * Y^16 = beta, all as bytes of the AES field).
package sbox_ref_pkg;

  localparam logic [7:0] BETA = 8'hED;
  localparam logic [7:0] Y1   = 8'h43;

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] y);
    logic [7:0] r = '0;
    logic [7:0] p = x;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) r ^= p;
      p = p[7] ? ((p << 1) ^ 8'h1B) : (p << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] gpow(logic [7:0] x, int n);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < n; i++) r = gmul(r, x);
    return r;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] x);
    return gpow(x, 254);  // 0 maps to 0
  endfunction

  // AES affine transform: b_i ^ b_{i+4} ^ b_{i+5} ^ b_{i+6} ^ b_{i+7} ^ 0x63_i
  function automatic logic [7:0] affine(logic [7:0] x);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] g);
    return affine(ginv(g));
  endfunction

  function automatic logic [7:0] y16();
    return gpow(Y1, 16);
  endfunction

  // Normal-basis subfield value -> byte of GF(2^8).
  function automatic logic [7:0] nb(logic [3:0] x);
    logic [7:0] r = '0;
    for (int i = 0; i < 4; i++) if (x[i]) r ^= gpow(BETA, 1 << i);
    return r;
  endfunction

  // 5-bit redundant subfield value -> byte of GF(2^8).
  function automatic logic [7:0] red(logic [4:0] x);
    return nb(x[3:0]) ^ (x[4] ? 8'h01 : 8'h00);
  endfunction

  // Composite coordinates -> byte of GF(2^8).
  function automatic logic [7:0] compose(logic [7:0] ca, logic [7:0] cb);
    return gmul(ca, Y1) ^ gmul(cb, y16());
  endfunction

  // Pairwise sums x_i ^ x_j in the order 01,02,03,12,13,23 (bit 0 = 01).
  function automatic logic [5:0] pairs(logic [3:0] x);
    return {x[2] ^ x[3], x[1] ^ x[3], x[1] ^ x[2], x[0] ^ x[3], x[0] ^ x[2], x[0] ^ x[1]};
  endfunction

endpackage
