// InvShiftRows: row r of the 4x4 byte state is rotated right by r positions,
// undoing ShiftRows. Same byte order as shift_rows. Pure wiring.
// The design names this step; the rotation is the AES standard's.
module inv_shift_rows (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  import aes_pkg::*;

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        q[byte_lsb(r, (c + r) % 4) +: 8] = d[byte_lsb(r, c) +: 8];
  end
endmodule
