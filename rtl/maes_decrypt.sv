// maes_decrypt: inverse cipher of the modified AES-128, fully unrolled.
//
// The ciphertext is XORed with round key NR, then rounds NR-1 down to 1 each
// apply InvShiftRows, InvSubBytes (two inverse 4-bit S-box lookups per
// byte), AddRoundKey with round key r and InvMixColumns; a final
// InvShiftRows, InvSubBytes and AddRoundKey with round key 0 gives the
// plaintext. This is the standard AES inverse cipher with the design's S-box
// inverted; the design document names decryption but does not detail it.
//
// Interface: din (ciphertext) and round_keys[0..NR] -> dout (plaintext).
// Purely combinational.
module maes_decrypt #(
  parameter int unsigned NR = 10
) (
  input  maes_pkg::block_t        din,
  input  maes_pkg::block_t [NR:0]  round_keys,
  output maes_pkg::block_t        dout
);
  // st[r]: state entering inverse round r (r = NR-1 .. 0)
  maes_pkg::block_t [NR:0] st;

  maes_add_round_key u_ark_first (.din(din), .round_key(round_keys[NR]), .dout(st[NR]));

  for (genvar r = NR - 1; r >= 0; r--) begin : g_round
    logic [127:0] isr, isb, ark;
    maes_shift_rows #(.INVERSE(1'b1)) u_isr (.din(st[r+1]), .dout(isr));
    maes_sub_bytes  #(.INVERSE(1'b1)) u_isb (.din(isr), .dout(isb));
    maes_add_round_key u_ark (.din(isb), .round_key(round_keys[r]), .dout(ark));
    if (r > 0) begin : g_mix
      maes_mix_columns #(.INVERSE(1'b1)) u_imc (.din(ark), .dout(st[r]));
    end else begin : g_last
      assign st[0] = ark;
    end
  end

  assign dout = st[0];
endmodule
