// maes_encrypt: the modified AES-128 cipher, fully unrolled.
//
// The plaintext is XORed with round key 0, then goes through NR rounds. Each
// of rounds 1 .. NR-1 applies SubBytes (two 4-bit S-box lookups per byte),
// ShiftRows, MixColumns and AddRoundKey; the last round leaves out
// MixColumns. This is the AES round structure; only the S-box differs from
// standard AES.
//
// Interface: din (plaintext) and round_keys[0..NR] from maes_key_expand ->
// dout (ciphertext). Purely combinational: one pass through NR rounds.
module maes_encrypt #(
  parameter int unsigned NR = 10
) (
  input  maes_pkg::block_t        din,
  input  maes_pkg::block_t [NR:0]  round_keys,
  output maes_pkg::block_t        dout
);
  maes_pkg::block_t [NR:0] st;   // st[r]: state after round r

  maes_add_round_key u_ark0 (.din(din), .round_key(round_keys[0]), .dout(st[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    logic [127:0] sb, sr, mc;
    maes_sub_bytes  #(.INVERSE(1'b0)) u_sb (.din(st[r-1]), .dout(sb));
    maes_shift_rows #(.INVERSE(1'b0)) u_sr (.din(sb), .dout(sr));
    if (r < NR) begin : g_mix
      maes_mix_columns #(.INVERSE(1'b0)) u_mc (.din(sr), .dout(mc));
    end else begin : g_last
      assign mc = sr;
    end
    maes_add_round_key u_ark (.din(mc), .round_key(round_keys[r]), .dout(st[r]));
  end

  assign dout = st[NR];
endmodule
