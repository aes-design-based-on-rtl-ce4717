// AES-128 with a Secure Double Rate Register (SDRR) at its input.
//
// The SDRR chooses, with sel, between the input data (sel = 0) and the
// random data (sel = 1) and passes the choice through its two cascaded
// registers to the AES core. The core encrypts the block with the given key
// and decrypts the cipher text again with the same shared key schedule, so
// with sel = 0 plain_text_out returns plain_text_in, and with sel = 1 the
// core processes the random block through exactly the same registers and
// logic. Because real and random data are handled by one datapath, no
// second copy of the combinational logic is needed for the random data.
//
// Interface: present sel, plain_text_in, rng and key with a one-cycle start
// (ignored while busy). start and key are delayed by two registers to meet
// the SDRR output; done pulses 85 cycles after the start cycle with
// cipher_text and plain_text_out valid (cipher_text alone is valid 43 cycles
// after start, marked by enc_done).
// The SDRR in front of the AES datapath follows the design. The random data
// comes from outside (the random number generator is not part of this
// RTL); the handshake and the key delay are this design's choices.
module aes_sdrr_top
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  block_t           plain_text_in,
  input  block_t           rng,
  input  block_t           key,
  input  logic             start,
  output logic             busy,
  output logic             enc_done,
  output logic             done,
  output block_t           cipher_text,
  output block_t           plain_text_out
);
  block_t sdrr_q, key_d1, key_d2;
  logic             start_d1, start_d2, core_busy;

  sdrr #(.WIDTH(128)) u_sdrr (
    .clk, .sel, .data_in(plain_text_in), .rand_in(rng), .q(sdrr_q)
  );

  // start and key follow the data through two register stages.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_d1 <= 1'b0;
      start_d2 <= 1'b0;
    end else begin
      start_d1 <= start && !busy;
      start_d2 <= start_d1;
    end
  end

  always_ff @(posedge clk) begin
    key_d1 <= key;
    key_d2 <= key_d1;
  end

  aes_core u_core (
    .clk, .rst_n, .start(start_d2), .plain_text(sdrr_q), .key(key_d2),
    .busy(core_busy), .enc_done, .done,
    .cipher_text, .plain_text_out
  );

  assign busy = start_d1 || start_d2 || core_busy;
endmodule
