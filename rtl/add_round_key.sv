// AddRoundKey: bitwise XOR of the 128-bit state with the 128-bit round key.
// Combinational; it is the step exactly as the design describes it.
module add_round_key (
  input  aes_pkg::block_t d,
  input  aes_pkg::block_t round_key,
  output aes_pkg::block_t q
);
  assign q = d ^ round_key;
endmodule
