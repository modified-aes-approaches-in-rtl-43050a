// maes_mix_columns: MixColumns (INVERSE = 0) or InvMixColumns (INVERSE = 1).
//
// Each of the four state columns is multiplied by a fixed circulant matrix
// over GF(2^8) (x^8 + x^4 + x^3 + x + 1). Forward matrix rows are
// [2 3 1 1] rotated; multiplying by 2 is a left shift with a conditional XOR
// of 0x1B when the shifted value overflows, multiplying by 3 is that result
// XOR the unshifted byte. The inverse matrix [e b d 9] is standard AES; the
// design document does not spell it out.
//
// Interface: din -> dout, 128 bits each. Purely combinational.
module maes_mix_columns #(
  parameter bit INVERSE = 1'b0
) (
  input  maes_pkg::block_t din,
  output maes_pkg::block_t dout
);
  import maes_pkg::*;

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a0, a1, a2, a3;
    assign a0 = din[127 - 32*c      -: 8];
    assign a1 = din[127 - 32*c -  8 -: 8];
    assign a2 = din[127 - 32*c - 16 -: 8];
    assign a3 = din[127 - 32*c - 24 -: 8];

    always_comb begin
      if (!INVERSE) begin
        dout[127 - 32*c      -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
        dout[127 - 32*c -  8 -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
        dout[127 - 32*c - 16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
        dout[127 - 32*c - 24 -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
      end else begin
        dout[127 - 32*c      -: 8] = gf256_mule(a0) ^ gf256_mulb(a1)
                                   ^ gf256_muld(a2) ^ gf256_mul9(a3);
        dout[127 - 32*c -  8 -: 8] = gf256_mul9(a0) ^ gf256_mule(a1)
                                   ^ gf256_mulb(a2) ^ gf256_muld(a3);
        dout[127 - 32*c - 16 -: 8] = gf256_muld(a0) ^ gf256_mul9(a1)
                                   ^ gf256_mule(a2) ^ gf256_mulb(a3);
        dout[127 - 32*c - 24 -: 8] = gf256_mulb(a0) ^ gf256_muld(a1)
                                   ^ gf256_mul9(a2) ^ gf256_mule(a3);
      end
    end
  end
endmodule
