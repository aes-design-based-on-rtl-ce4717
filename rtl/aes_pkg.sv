// Shared types and constants of the AES-128 design with a Secure Double Rate
// Register (SDRR) at its input.
//
// A 128-bit block is held MSB first: byte i (i = 0..15) occupies bits
// [127-8i -: 8], and the 4x4 state is filled column by column, so state row r,
// column c is byte r + 4c. This is the byte order of the AES standard.
// The round count of AES-128 (10) and the key-schedule round constants live
// here so that the encryption, decryption and key expansion agree on them.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NR = 10;           // rounds of AES-128

  // Round index, 0 (initial AddRoundKey) to NR.
  typedef logic [3:0] round_t;

  // Bit offset of state element (row, col) inside a block.
  function automatic int unsigned byte_lsb(input int unsigned row, input int unsigned col);
    return 120 - 8 * (row + 4 * col);
  endfunction

  // Multiplication by x ({02}) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Key-schedule round constant of round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input round_t r);
    byte_t v;
    v = 8'h01;
    for (int unsigned i = 1; i < 11; i++)
      if (i < r) v = xtime(v);
    return v;
  endfunction

endpackage
