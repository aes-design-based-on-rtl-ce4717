// AES S-box without a lookup table: the multiplicative inverse in GF(2^8)
// (composite-field inverter gf28_inv) followed by the AES affine
// transformation  s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,
// c = {63}, indices mod 8. Computing the S-box saves the table memory, as
// the design intends. Purely combinational, one byte in, one byte out.
module aes_sbox (
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [7:0] b;

  gf28_inv u_inv (.x(x), .y(b));

  always_comb begin
    for (int i = 0; i < 8; i++)
      y[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    y = y ^ 8'h63;
  end
endmodule
