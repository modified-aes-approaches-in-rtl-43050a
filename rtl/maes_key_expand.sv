// maes_key_expand: AES-128 key schedule of the modified AES.
//
// The 128-bit cipher key is expanded into NR + 1 round keys with the
// Rijndael key schedule: words w[0..3] are the key; each following group of
// four words starts with w[4i-4] XOR SubWord(RotWord(w[4i-1])) XOR
// {Rcon(i), 0, 0, 0}, and every other word is w[j-4] XOR w[j-1]. SubWord
// uses the design's 4-bit S-box on each nibble (maes_sbox4), since that is
// the only S-box of this cipher; Rcon(i) is x^(i-1) in GF(2^8).
//
// Interface: key (128 bits) -> round_keys[i], i = 0..NR, round_keys[0]
// being the key itself. Purely combinational: NR chained expansion steps.
module maes_key_expand #(
  parameter int unsigned NR = 10
) (
  input  maes_pkg::block_t        key,
  output maes_pkg::block_t [NR:0]  round_keys
);
  import maes_pkg::*;

  assign round_keys[0] = key;

  for (genvar i = 1; i <= NR; i++) begin : g_step
    logic [31:0] w0, w1, w2, w3, rot, sub, t;
    assign w0  = round_keys[i-1][127:96];
    assign w1  = round_keys[i-1][95:64];
    assign w2  = round_keys[i-1][63:32];
    assign w3  = round_keys[i-1][31:0];
    assign rot = {w3[23:0], w3[31:24]};

    for (genvar n = 0; n < 8; n++) begin : g_sub
      maes_sbox4 #(.INVERSE(1'b0)) u_sbox (.din(rot[4*n +: 4]), .dout(sub[4*n +: 4]));
    end

    localparam byte_t RC = rcon(i);
    assign t = sub ^ {RC, 24'h0};

    assign round_keys[i][127:96] = w0 ^ t;
    assign round_keys[i][95:64]  = w1 ^ w0 ^ t;
    assign round_keys[i][63:32]  = w2 ^ w1 ^ w0 ^ t;
    assign round_keys[i][31:0]   = w3 ^ w2 ^ w1 ^ w0 ^ t;
  end
endmodule
