// maes_add_round_key: AddRoundKey of AES. Every byte of the state is combined
// with the matching byte of the 128-bit round key by bitwise XOR. The same
// step serves encryption and decryption.
//
// Interface: din, round_key -> dout, 128 bits each. Purely combinational.
module maes_add_round_key (
  input  maes_pkg::block_t din,
  input  maes_pkg::block_t round_key,
  output maes_pkg::block_t dout
);
  assign dout = din ^ round_key;
endmodule
