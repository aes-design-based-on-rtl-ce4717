// SubBytes: the AES S-box applied to each of the 16 bytes of a 128-bit state.
// Sixteen computed S-boxes (aes_sbox) work in parallel; purely combinational.
// Computing rather than storing the S-box follows the design.
module sub_bytes (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.x(d[8*i +: 8]), .y(q[8*i +: 8]));
  end
endmodule
