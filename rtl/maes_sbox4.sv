// maes_sbox4: the 4-bit substitution box of the modified AES.
//
// Forward direction (INVERSE = 0): the nibble is replaced by its
// multiplicative inverse in GF(2^4) (modulo x^4 + x + 1, zero maps to zero),
// then passed through a 4x4 affine transformation: a bit-matrix product
// followed by the addition of a 4-bit constant. This is the construction of
// the Rijndael S-box carried over to GF(2^4), as the design prescribes. The
// choice of polynomial among the three irreducible ones, and the matrix and
// constant (those of the well-known simplified-AES nibble S-box, giving the
// table 9 4 A B D 1 8 5 6 2 0 3 C E F 7), are this implementation's own.
// Inverse direction (INVERSE = 1): inverse affine map, then GF(2^4) inverse.
// As the design describes, the S-box is a one-dimensional 16-entry lookup
// table; here the table is computed at elaboration time from the field
// arithmetic in maes_pkg, so it is never typed in by hand.
//
// Interface: din -> dout, 4 bits each. Purely combinational, no clock.
module maes_sbox4 #(
  parameter bit INVERSE = 1'b0
) (
  input  maes_pkg::nibble_t din,
  output maes_pkg::nibble_t dout
);
  import maes_pkg::*;

  localparam sbox4_table_t TABLE = sbox4_table(INVERSE);

  assign dout = TABLE[din];
endmodule
