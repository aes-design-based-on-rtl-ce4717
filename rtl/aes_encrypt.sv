// Iterative AES-128 encryption datapath.
//
// One round's hardware is used for all rounds, with a register behind each
// step: SubBytes -> sb_reg -> ShiftRows -> sr_reg -> MixColumns -> mc_reg ->
// Round_sel1 -> AddRoundKey -> ark_reg, and ark_reg loops back to SubBytes.
// Round_sel1 picks the plain-text register for the initial AddRoundKey, the
// MixColumns register in rounds 1..9, and the ShiftRows register in round 10,
// which has no MixColumns. Round_sel2 steers the last AddRoundKey result into
// the cipher-text register instead of back into the loop.
// This datapath, its registers and both selectors follow the design's round
// diagram; the phase controller and the start/done handshake are this
// design's own.
//
// Interface: start (one cycle, ignored while busy) captures plain_text. The
// module names the round key it needs on round_idx (0..10) and expects it on
// round_key in the same cycle. Timing: 1 cycle to load, 1 for the initial
// AddRoundKey, 4 per middle round and 3 for the final round: done pulses 41
// cycles after the start cycle, with cipher_text valid from then on.
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned NROUNDS = NR
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plain_text,
  input  block_t round_key,
  output round_t round_idx,
  output logic   busy,
  output logic   done,
  output block_t cipher_text
);
  typedef enum logic [2:0] {P_IDLE, P_INIT, P_SB, P_SR, P_MC, P_ARK} phase_t;
  typedef enum logic [1:0] {SEL_PLAIN, SEL_MIX, SEL_SHIFT} round_sel1_t;

  phase_t      phase;
  round_t      round;
  round_sel1_t round_sel1;
  logic        round_sel2;         // 1: AddRoundKey result goes to cipher_text
  block_t      pt_reg, sb_reg, sr_reg, mc_reg, ark_reg;
  block_t      sb_out, sr_out, mc_out, ark_in, ark_out;

  sub_bytes     u_sb  (.d(ark_reg), .q(sb_out));
  shift_rows    u_sr  (.d(sb_reg),  .q(sr_out));
  mix_columns   u_mc  (.d(sr_reg),  .q(mc_out));
  add_round_key u_ark (.d(ark_in),  .round_key(round_key), .q(ark_out));

  always_comb begin
    if (phase == P_INIT)                  round_sel1 = SEL_PLAIN;
    else if (round == round_t'(NROUNDS))  round_sel1 = SEL_SHIFT;
    else                                  round_sel1 = SEL_MIX;
    unique case (round_sel1)
      SEL_PLAIN: ark_in = pt_reg;
      SEL_SHIFT: ark_in = sr_reg;
      default:   ark_in = mc_reg;
    endcase
    round_sel2 = (phase == P_ARK) && (round == round_t'(NROUNDS));
  end

  assign round_idx = round;
  assign busy      = (phase != P_IDLE);

  // Control.
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
          phase <= P_SB;
          round <= round_t'(1);
        end
        P_SB:   phase <= P_SR;
        P_SR:   phase <= (round == round_t'(NROUNDS)) ? P_ARK : P_MC;
        P_MC:   phase <= P_ARK;
        P_ARK: begin
          if (round_sel2) begin
            phase <= P_IDLE;
            done  <= 1'b1;
          end else begin
            phase <= P_SB;
            round <= round + round_t'(1);
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // Datapath registers.
  always_ff @(posedge clk) begin
    if (phase == P_IDLE && start) pt_reg <= plain_text;
    if (phase == P_SB)            sb_reg <= sb_out;
    if (phase == P_SR)            sr_reg <= sr_out;
    if (phase == P_MC)            mc_reg <= mc_out;
    if (phase == P_INIT || (phase == P_ARK && !round_sel2)) ark_reg <= ark_out;
    if (round_sel2)               cipher_text <= ark_out;
  end
endmodule
