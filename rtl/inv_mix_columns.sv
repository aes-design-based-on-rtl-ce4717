// InvMixColumns: each state column is multiplied by
// a^-1(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e} modulo x^4 + 1, undoing
// MixColumns:  out_r = e s_r ^ b s_(r+1) ^ d s_(r+2) ^ 9 s_(r+3).
// The constant multiplications are sums of xtime powers. Combinational.
// The design only names this step; polynomial and construction are the AES
// standard's.
module inv_mix_columns (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  import aes_pkg::*;

  // Multiply by a constant with bits only in positions 0..3.
  function automatic byte_t mulc(input byte_t b, input logic [3:0] k);
    byte_t acc, p;
    acc = '0;
    p   = b;
    for (int i = 0; i < 4; i++) begin
      if (k[i]) acc ^= p;
      p = xtime(p);
    end
    return acc;
  endfunction

  always_comb begin
    byte_t s [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) s[r] = d[byte_lsb(r, c) +: 8];
      for (int r = 0; r < 4; r++)
        q[byte_lsb(r, c) +: 8] = mulc(s[r], 4'he) ^ mulc(s[(r + 1) % 4], 4'hb)
                               ^ mulc(s[(r + 2) % 4], 4'hd) ^ mulc(s[(r + 3) % 4], 4'h9);
    end
  end
endmodule
