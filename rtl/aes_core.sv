// AES-128 core: encryption and decryption sharing one key expansion.
//
// On start the key expansion (one round key per cycle) and the encryption
// datapath begin together; the key schedule stays ahead of the encryption,
// which needs round key r only 4r+1 cycles after start. When encryption
// ends, its cipher text is handed to the decryption datapath, which reads
// the stored round keys in reverse order. done pulses when the decryption
// ends; cipher_text and plain_text_out then both hold the results of the
// operation. A start while busy is ignored.
// Timing: done rises 83 cycles after the start cycle (41 for encryption,
// 1 to hand over, 41 for decryption); cipher_text is valid 41 cycles after
// start.
// Sharing one key expansion between encryption and decryption follows the
// design; chaining decryption behind encryption matches its waveforms (the
// recovered plain text equals the input); the handshake is this design's.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plain_text,
  input  block_t key,
  output logic   busy,
  output logic   enc_done,
  output logic   done,
  output block_t cipher_text,
  output block_t plain_text_out
);
  block_t      round_keys [NR+1];
  logic [NR:0] key_valid;
  logic        keys_ready;
  round_t      enc_idx, dec_idx;
  logic        enc_busy, dec_busy, dec_start;
  logic        go;

  assign go = start && !busy;

  key_expansion u_keys (
    .clk, .rst_n, .start(go), .key,
    .round_keys, .key_valid, .ready(keys_ready)
  );

  aes_encrypt u_enc (
    .clk, .rst_n, .start(go), .plain_text,
    .round_key(round_keys[enc_idx]), .round_idx(enc_idx),
    .busy(enc_busy), .done(enc_done), .cipher_text
  );

  // Decryption starts in the cycle after encryption ends.
  always_ff @(posedge clk) begin
    if (!rst_n) dec_start <= 1'b0;
    else        dec_start <= enc_done;
  end

  aes_decrypt u_dec (
    .clk, .rst_n, .start(dec_start), .cipher_text,
    .round_key(round_keys[dec_idx]), .round_idx(dec_idx),
    .busy(dec_busy), .done, .plain_text(plain_text_out)
  );

  assign busy = enc_busy || enc_done || dec_start || dec_busy;

  // The key schedule must stay ahead of both datapaths.
  a_enc_key_ready : assert property (@(posedge clk) disable iff (!rst_n)
    enc_busy |-> key_valid[enc_idx]);
  a_dec_key_ready : assert property (@(posedge clk) disable iff (!rst_n)
    dec_busy |-> keys_ready);
endmodule
