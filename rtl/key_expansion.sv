// AES-128 key expansion, shared by encryption and decryption.
//
// On start the cipher key becomes round key 0. In each following cycle one
// further round key is formed from the previous one,
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ rcon(r),  w1' = w1 ^ w0',
//   w2' = w2 ^ w1',                             w3' = w3 ^ w2',
// with four computed S-boxes, until round key 10 is written eleven cycles
// after start. All round keys stay in a register array, so decryption can
// read them in reverse order. key_valid[i] is set once round key i is
// written; ready rises with key_valid[10].
// That the design has a key expansion block shared by encryption and
// decryption follows the design; the one-key-per-cycle schedule and the
// stored key array are this design's choices.
module key_expansion
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  block_t       key,
  output block_t       round_keys [NR+1],
  output logic [NR:0]  key_valid,
  output logic         ready
);
  round_t     cnt;          // index of the round key written next
  logic       running;
  block_t     last;         // most recently written round key
  logic [31:0] w3_sub;
  block_t     next_key;

  // SubWord(RotWord(w3)): rotate the last word left by one byte, then S-box.
  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.x(last[8*((i + 3) % 4) +: 8]), .y(w3_sub[8*i +: 8]));
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    w0 = last[127:96] ^ w3_sub ^ {rcon(cnt), 24'h0};
    w1 = last[95:64] ^ w0;
    w2 = last[63:32] ^ w1;
    w3 = last[31:0]  ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cnt       <= '0;
      key_valid <= '0;
    end else if (start) begin
      running   <= 1'b1;
      cnt       <= round_t'(1);
      key_valid <= (NR+1)'(1);
    end else if (running) begin
      key_valid[cnt] <= 1'b1;
      cnt            <= cnt + round_t'(1);
      if (cnt == round_t'(NR)) running <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      round_keys[0] <= key;
      last          <= key;
    end else if (running) begin
      round_keys[cnt] <= next_key;
      last            <= next_key;
    end
  end

  assign ready = key_valid[NR];
endmodule
