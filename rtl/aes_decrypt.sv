// Iterative AES-128 decryption datapath, the mirror of aes_encrypt.
//
// The initial AddRoundKey uses round key 10. Each of rounds 1..9 then runs
// InvShiftRows -> isr_reg -> InvSubBytes -> isb_reg -> AddRoundKey -> ark_reg
// -> InvMixColumns -> st_reg, and st_reg loops back to InvShiftRows. The
// final round has no InvMixColumns: its AddRoundKey result (round key 0)
// goes to the plain-text output register. Round r uses round key 10 - r.
// The order of the steps follows the design; the register after every step
// (as in the encryption datapath), the phase controller and the start/done
// handshake are this design's choices.
//
// Interface: start (one cycle, ignored while busy) captures cipher_text.
// The module names the round key it needs on round_idx and expects it on
// round_key in the same cycle. done pulses 41 cycles after the start cycle
// (1 load, 1 initial AddRoundKey, 4 per middle round, 3 for the last round);
// plain_text stays valid until the next operation ends.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NROUNDS = NR
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t cipher_text,
  input  block_t round_key,
  output round_t round_idx,
  output logic   busy,
  output logic   done,
  output block_t plain_text
);
  typedef enum logic [2:0] {P_IDLE, P_INIT, P_ISR, P_ISB, P_ARK, P_IMC} phase_t;

  phase_t phase;
  round_t round;
  logic   last_round;
  block_t ct_reg, st_reg, isr_reg, isb_reg, ark_reg;
  block_t isr_out, isb_out, imc_out, ark_in, ark_out;

  inv_shift_rows  u_isr (.d(st_reg),  .q(isr_out));
  inv_sub_bytes   u_isb (.d(isr_reg), .q(isb_out));
  add_round_key   u_ark (.d(ark_in),  .round_key(round_key), .q(ark_out));
  inv_mix_columns u_imc (.d(ark_reg), .q(imc_out));

  assign ark_in     = (phase == P_INIT) ? ct_reg : isb_reg;
  assign last_round = (round == round_t'(NROUNDS));
  assign round_idx  = round_t'(NROUNDS) - round;
  assign busy       = (phase != P_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        P_IDLE: if (start) begin
          phase <= P_INIT;
          round <= '0;
        end
        P_INIT: begin
          phase <= P_ISR;
          round <= round_t'(1);
        end
        P_ISR: phase <= P_ISB;
        P_ISB: phase <= P_ARK;
        P_ARK: begin
          if (last_round) begin
            phase <= P_IDLE;
            done  <= 1'b1;
          end else begin
            phase <= P_IMC;
          end
        end
        P_IMC: begin
          phase <= P_ISR;
          round <= round + round_t'(1);
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (phase == P_IDLE && start)      ct_reg  <= cipher_text;
    if (phase == P_INIT)               st_reg  <= ark_out;
    if (phase == P_IMC)                st_reg  <= imc_out;
    if (phase == P_ISR)                isr_reg <= isr_out;
    if (phase == P_ISB)                isb_reg <= isb_out;
    if (phase == P_ARK && !last_round) ark_reg <= ark_out;
    if (phase == P_ARK && last_round)  plain_text <= ark_out;
  end
endmodule
