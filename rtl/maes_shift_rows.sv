// maes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1).
//
// The state is the usual 4x4 byte matrix, byte (row r, column c) being byte
// r + 4c of the block, byte 0 at bits [127:120]. ShiftRows rotates row r
// cyclically left by r bytes: row 0 stays, rows 1, 2 and 3 move by one, two
// and three places, as in standard AES. The inverse rotates right.
//
// Interface: din -> dout, 128 bits each. Purely combinational wiring.
module maes_shift_rows #(
  parameter bit INVERSE = 1'b0
) (
  input  maes_pkg::block_t din,
  output maes_pkg::block_t dout
);
  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      // output (r, c) takes input (r, c + r) forward, (r, c - r) inverse
      localparam int SRC_C = INVERSE ? (c - r + 4) % 4 : (c + r) % 4;
      assign dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*SRC_C) -: 8];
    end
  end
endmodule
