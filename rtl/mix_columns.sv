// MixColumns: each state column, read as a polynomial with GF(2^8)
// coefficients, is multiplied by a(x) = {03}x^3 + {01}x^2 + {01}x + {02}
// modulo x^4 + 1. Per column:  out_r = 2 s_r ^ 3 s_(r+1) ^ s_(r+2) ^ s_(r+3).
// Multiplication by 2 is xtime, by 3 is xtime plus the byte. Combinational.
// The design describes the column-polynomial product; the fixed polynomial
// and the xtime construction are the AES standard's.
module mix_columns (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  import aes_pkg::*;

  always_comb begin
    byte_t s [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) s[r] = d[byte_lsb(r, c) +: 8];
      for (int r = 0; r < 4; r++)
        q[byte_lsb(r, c) +: 8] = xtime(s[r]) ^ xtime(s[(r + 1) % 4]) ^ s[(r + 1) % 4]
                               ^ s[(r + 2) % 4] ^ s[(r + 3) % 4];
    end
  end
endmodule
