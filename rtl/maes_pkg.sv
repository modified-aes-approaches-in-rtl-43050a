// maes_pkg: types and arithmetic shared by the modified AES-128 datapath.
//
// The cipher keeps the AES-128 round structure but replaces the 8-bit
// Rijndael S-box by a 4-bit S-box over GF(2^4) that is applied to each half
// of a byte. This package holds the field arithmetic behind both fields:
//   * GF(2^4) with the irreducible polynomial x^4 + x + 1 (one of the three
//     degree-4 polynomials the design may choose; this one is our choice),
//     its multiplicative inverse and the 4x4 affine map of the nibble S-box;
//   * GF(2^8) with x^8 + x^4 + x^3 + x + 1 for MixColumns (xtime with the
//     conditional XOR of 0x1B), as in standard AES.
// All functions are pure combinational logic. Byte 0 of a 128-bit block is
// bits [127:120]; state byte (row r, column c) is byte r + 4c.
package maes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nibble_t;

  // Affine constant added after the 4x4 matrix product (design choice).
  localparam nibble_t SBOX_AFFINE_C = 4'b1001;

  // Multiply in GF(2^4) modulo x^4 + x + 1: carry-less product of degree
  // up to 6, then reduction with x^4 = x + 1, x^5 = x^2 + x, x^6 = x^3 + x^2.
  function automatic nibble_t gf16_mul(nibble_t a, nibble_t b);
    logic [6:0] p;
    p = {3'b000, a & {4{b[0]}}}
      ^ {2'b00,  a & {4{b[1]}}, 1'b0}
      ^ {1'b0,   a & {4{b[2]}}, 2'b00}
      ^ {        a & {4{b[3]}}, 3'b000};
    return {p[3] ^ p[6],
            p[2] ^ p[5] ^ p[6],
            p[1] ^ p[4] ^ p[5],
            p[0] ^ p[4]};
  endfunction

  // Multiplicative inverse in GF(2^4): a^14 = a^-1 (0 maps to 0).
  function automatic nibble_t gf16_inv(nibble_t a);
    nibble_t a2, a4, a8, r;
    a2 = gf16_mul(a, a);
    a4 = gf16_mul(a2, a2);
    a8 = gf16_mul(a4, a4);
    r  = gf16_mul(gf16_mul(a8, a4), a2);
    return r;
  endfunction

  // Forward affine map: 4x4 bit-matrix product, then add SBOX_AFFINE_C.
  function automatic nibble_t sbox4_affine(nibble_t x);
    nibble_t y;
    y[3] = x[3] ^ x[1] ^ x[0];
    y[2] = x[3] ^ x[2] ^ x[0];
    y[1] = x[3] ^ x[2] ^ x[1];
    y[0] = x[2] ^ x[1] ^ x[0];
    return y ^ SBOX_AFFINE_C;
  endfunction

  // Inverse affine map: remove the constant, then multiply by the inverse
  // matrix, which for this matrix is its transpose.
  function automatic nibble_t sbox4_inv_affine(nibble_t y);
    nibble_t x, z;
    z = y ^ SBOX_AFFINE_C;
    x[3] = z[3] ^ z[2] ^ z[1];
    x[2] = z[2] ^ z[1] ^ z[0];
    x[1] = z[3] ^ z[1] ^ z[0];
    x[0] = z[3] ^ z[2] ^ z[0];
    return x;
  endfunction

  // One-dimensional 16-entry S-box table, built at elaboration time from
  // the construction above. Entry x of the forward table is
  // affine(inverse(x)); entry y of the inverse table is
  // inverse(inv_affine(y)).
  typedef nibble_t [15:0] sbox4_table_t;

  function automatic sbox4_table_t sbox4_table(bit inverse);
    sbox4_table_t t;
    for (int x = 0; x < 16; x++)
      t[x] = inverse ? gf16_inv(sbox4_inv_affine(4'(x)))
                     : sbox4_affine(gf16_inv(4'(x)));
    return t;
  endfunction

  // Multiply by x in GF(2^8): shift left, conditional XOR with 0x1B.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Products by the InvMixColumns constants 9, b, d and e, built from
  // repeated xtime: 9 = 8+1, b = 8+2+1, d = 8+4+1, e = 8+4+2.
  function automatic byte_t gf256_mul9(byte_t a);
    return xtime(xtime(xtime(a))) ^ a;
  endfunction

  function automatic byte_t gf256_mulb(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(a) ^ a;
  endfunction

  function automatic byte_t gf256_muld(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ a;
  endfunction

  function automatic byte_t gf256_mule(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ xtime(a);
  endfunction

  // Round constant of key-expansion step i (i >= 1): x^(i-1) in GF(2^8).
  function automatic byte_t rcon(int unsigned i);
    byte_t r;
    r = 8'h01;
    for (int unsigned k = 1; k < i; k++) r = xtime(r);
    return r;
  endfunction

endpackage
