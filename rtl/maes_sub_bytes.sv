// maes_sub_bytes: SubBytes (INVERSE = 0) or InvSubBytes (INVERSE = 1) of the
// modified AES over a whole 128-bit state.
//
// The design replaces the 8-bit Rijndael S-box by a 4-bit one: a byte is
// substituted by two lookups, one for its upper nibble and one for its lower
// nibble, through the same 4-bit S-box (maes_sbox4). The 16 bytes therefore
// use 32 S-box instances working in parallel.
//
// Interface: din -> dout, 128 bits each. Purely combinational.
module maes_sub_bytes #(
  parameter bit INVERSE = 1'b0
) (
  input  maes_pkg::block_t din,
  output maes_pkg::block_t dout
);
  for (genvar n = 0; n < 32; n++) begin : g_nib
    maes_sbox4 #(.INVERSE(INVERSE)) u_sbox (
      .din (din [4*n +: 4]),
      .dout(dout[4*n +: 4])
    );
  end
endmodule
