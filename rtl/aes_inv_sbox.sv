// AES inverse S-box without a lookup table: the inverse affine transformation
//   b_i = x_(i+2) ^ x_(i+5) ^ x_(i+7) ^ d_i,  d = {05}, indices mod 8,
// followed by the same composite-field GF(2^8) inverter as the forward S-box.
// Reusing the inverter for decryption is this design's choice. Purely
// combinational.
module aes_inv_sbox (
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [7:0] b;

  always_comb begin
    for (int i = 0; i < 8; i++)
      b[i] = x[(i + 2) % 8] ^ x[(i + 5) % 8] ^ x[(i + 7) % 8];
    b = b ^ 8'h05;
  end

  gf28_inv u_inv (.x(b), .y(y));
endmodule
