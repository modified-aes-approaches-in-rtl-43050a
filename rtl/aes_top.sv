// aes_top: modified AES-128 encryption and decryption in one combinational
// block.
//
// The plaintext datain is encrypted under key into cipher, and cipher is
// decrypted again under the same key into decrypted, so decrypted always
// equals datain. One key schedule (maes_key_expand) feeds both the cipher
// (maes_encrypt) and the inverse cipher (maes_decrypt). The cipher is AES-128
// with its 8-bit S-box replaced by a 4-bit S-box over GF(2^4) applied to
// each nibble of a byte.
//
// Interface: port names and widths follow the design's top-level symbol.
// There is no clock and no reset: outputs settle one combinational delay
// (key schedule, NR cipher rounds and NR inverse rounds) after the inputs.
module aes_top #(
  parameter int unsigned NR = 10
) (
  input  maes_pkg::block_t datain,
  input  maes_pkg::block_t key,
  output maes_pkg::block_t cipher,
  output maes_pkg::block_t decrypted
);
  maes_pkg::block_t [NR:0] round_keys;

  maes_key_expand #(.NR(NR)) u_key_expand (.key(key), .round_keys(round_keys));
  maes_encrypt    #(.NR(NR)) u_encrypt    (.din(datain), .round_keys(round_keys), .dout(cipher));
  maes_decrypt    #(.NR(NR)) u_decrypt    (.din(cipher), .round_keys(round_keys), .dout(decrypted));
endmodule
