// ShiftRows: row r of the 4x4 byte state is rotated left by r positions
// (row 0 stays, row 3 moves by three). Bytes fill the state column by column
// (row r, column c = byte r + 4c, byte 0 in the top bits). Pure wiring.
// The shift amounts follow the design's ShiftRows example; the column-wise
// byte order is this design's choice (that of the AES standard).
module shift_rows (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  import aes_pkg::*;

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        q[byte_lsb(r, c) +: 8] = d[byte_lsb(r, (c + r) % 4) +: 8];
  end
endmodule
