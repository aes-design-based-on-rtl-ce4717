// InvSubBytes: the AES inverse S-box applied to each of the 16 bytes of a
// 128-bit state, sixteen computed inverse S-boxes in parallel. Purely
// combinational. The design names this step; computing it with the shared
// inverter is this design's choice.
module inv_sub_bytes (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_inv_sbox u_sbox (.x(d[8*i +: 8]), .y(q[8*i +: 8]));
  end
endmodule
