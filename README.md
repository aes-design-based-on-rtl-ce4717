# AES-128 with a Secure Double Rate Register (SDRR) input

Power-analysis attacks recover an AES key by correlating a chip's supply
current with the data it processes. This design places a **Secure Double
Rate Register (SDRR)** in front of an AES-128 encryption/decryption core. The
SDRR is a 2:1 multiplexer followed by two registers. A select signal decides
whether the core works on the real input block or on a random block. Both
kinds of block go through the same registers and the same combinational
logic, so random data can be mixed into the core's activity without a second
copy of the AES datapath.

Behind the SDRR is an iterative AES-128 core:

- an encryption datapath with a register behind every step of a round;
- a mirrored decryption datapath that decrypts the cipher text again;
- one key schedule shared by both datapaths;
- S-boxes computed in a composite Galois field rather than read from a table.

Everything is synthesizable SystemVerilog. The testbenches check it against
an independent reference model and the worked examples of the AES standard
(FIPS-197).

## Top level: `aes_sdrr_top`

| port             | dir | width | meaning                                                   |
|------------------|-----|-------|-----------------------------------------------------------|
| `clk`, `rst_n`   | in  | 1     | rising-edge clock, synchronous active-low reset           |
| `sel`            | in  | 1     | SDRR select: 0 = `plain_text_in`, 1 = `rng`               |
| `plain_text_in`  | in  | 128   | real input block                                          |
| `rng`            | in  | 128   | random block, supplied by an external random source       |
| `key`            | in  | 128   | cipher key                                                |
| `start`          | in  | 1     | one-cycle request; ignored while `busy`                   |
| `busy`           | out | 1     | an operation is in flight                                 |
| `enc_done`       | out | 1     | pulse: `cipher_text` is valid                             |
| `done`           | out | 1     | pulse: `plain_text_out` is valid as well                  |
| `cipher_text`    | out | 128   | AES-128 encryption of the selected block                  |
| `plain_text_out` | out | 128   | decryption of `cipher_text` (equals the selected block)   |

Drive `sel`, `plain_text_in`, `rng` and `key` in the same cycle as `start`.
They may change from the third cycle after `start` onwards. Counting the
start cycle as cycle 0, `enc_done` pulses in cycle 43 and `done` in cycle 85.
Blocks use the byte order of the AES standard: byte 0 is bits `[127:120]`,
and the state is filled column by column.

Hierarchy:

```
aes_sdrr_top
├── sdrr                 mux (input/random) + two cascaded registers
└── aes_core
    ├── key_expansion    11 round keys, one per cycle, kept in registers
    ├── aes_encrypt      SubBytes→REG→ShiftRows→REG→MixColumns→REG→sel1→AddRoundKey→REG
    │     sub_bytes ×16 aes_sbox, shift_rows, mix_columns, add_round_key
    └── aes_decrypt      InvShiftRows→REG→InvSubBytes→REG→AddRoundKey→REG→InvMixColumns→REG
          inv_shift_rows, inv_sub_bytes ×16 aes_inv_sbox, add_round_key, inv_mix_columns
aes_sbox / aes_inv_sbox → gf28_inv → gf24_inv, gf24_mul → gf22_mul
```

`aes_pkg` holds the shared types (`block_t`, `byte_t`, `round_t`), the round
count `NR = 10`, the state indexing function, `xtime` and the round
constants.

## The SDRR

`sdrr` (parameter `WIDTH`, default 128) computes `mux = sel ? rand_in :
data_in`, then `reg1 <= mux; q <= reg1`. Both registers use the rising edge
of the one clock. The registers have no reset because they only carry data.
Whatever `sel` chose in cycle *n* appears on `q` in cycle *n + 2*. The top
therefore delays `start` and `key` by two cycles so that they meet the
SDRR's output at the core.

With `sel = 0` the core encrypts and then decrypts the real block. With
`sel = 1` it does the same to the random block, through the identical
circuit. The random source is not part of this RTL: the random block is the
`rng` port.

What is *not* built: the SDRR concept also aims to keep real and random data
in the registers at the same time, so that the combinational logic works on
random data for part of every clock cycle. The source description gives no
schedule for interleaving the two inside the AES datapath. Here, each
operation processes the one block the SDRR presented when it started. A
variant that puts an SDRR in place of *every* pipeline register was
described only as prior work, and is not included.

## Encryption round datapath (`aes_encrypt`)

The core is iterative: one round's hardware is reused for all ten rounds,
with a register behind every step.

```
pt_reg ─┐
mc_reg ─┼─ Round_sel1 ─ AddRoundKey ─┬─ ark_reg ─ SubBytes ─ sb_reg ─ ShiftRows ─ sr_reg ─ MixColumns ─ mc_reg
sr_reg ─┘        ^ round_key         └─ (Round_sel2, last round) ─ cipher_text
```

- **Initial round** (`P_INIT`): Round_sel1 takes the plain-text register, and
  `ark_reg <= pt ^ k0`.
- **Rounds 1–9**: four cycles, `P_SB`, `P_SR`, `P_MC` and `P_ARK`.
  Round_sel1 takes the MixColumns register.
- **Round 10**: there is no MixColumns, so this round takes three cycles.
  Round_sel1 takes the ShiftRows register. Round_sel2 writes the sum into
  `cipher_text` instead of back into `ark_reg`.

The latency is 1 (load) + 1 + 9×4 + 3 = **41 cycles** from `start` to `done`.
The datapath asks for round key `round_idx` and expects it on `round_key` in
the same cycle. In `aes_core`, this is a mux over the stored keys.

## Decryption (`aes_decrypt`)

Decryption is the mirror image. First the cipher text is XORed with round
key 10. Each of rounds 1–9 then runs InvShiftRows → InvSubBytes →
AddRoundKey (key 10−r) → InvMixColumns, with a register after each step. The
last round skips InvMixColumns, and its AddRoundKey with key 0 writes
`plain_text`. This datapath also takes 41 cycles. In `aes_core`, decryption
starts the cycle after encryption's `done`, on the encryption result. The
core's total latency is therefore 41 + 1 + 41 = 83 cycles, or 85 at the top.

## Shared key schedule (`key_expansion`)

On `start` the key becomes round key 0. Each following cycle forms the next
round key, using four S-boxes on `RotWord(w3)` plus the round constant.
After 11 cycles all eleven keys are in a register array (11 × 128 bits).
Encryption needs key *r* only in cycle 4r+1, so the schedule is always ahead
of it. Two assertions in `aes_core` check this. Decryption reads the same
stored keys in reverse order, so one key schedule serves both directions.
`key_valid[i]` shows which keys are written.

## The computed S-box (composite field)

No S-box table is stored. Each S-box (`aes_sbox`) first takes the
multiplicative inverse in GF(2^8) and then applies the AES affine map
(`s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ 0x63`). The inverse
S-box (`aes_inv_sbox`) applies the inverse affine map (`b_i = x_(i+2) ^
x_(i+5) ^ x_(i+7) ^ 0x05`) first and then uses the same inverter.

Inverting in GF(2^8) directly is expensive. `gf28_inv` instead maps the byte
into the isomorphic field GF((2^4)^2), inverts there, and maps back:

1. **δ (isomorphic map).** An 8×8 XOR matrix turns the byte into a pair
   `(ah, al)` of GF(2^4) elements, standing for `ah·y + al`.
2. **Norm.** For an element `ah·y + al` with `y^2 = y + λ`, the inverse is
   `(ah·d⁻¹)·y + (ah ^ al)·d⁻¹`, where `d = λ·ah² ^ (ah ^ al)·al`. The
   hardware computes `ah²`, multiplies by the constant `λ = {1100}`, forms
   `(ah ^ al)·al` and XORs the two.
3. **GF(2^4) inverse** (`gf24_inv`). The field has 16 elements, so
   `d⁻¹ = d^14 = d²·d⁴·d⁸`, formed with five GF(2^4) multipliers. Zero gives
   zero, as the S-box needs.
4. **Two multipliers** give `ah·d⁻¹` and `(ah ^ al)·d⁻¹`.
5. **δ⁻¹** maps the result back to the AES field.

`gf24_mul` multiplies in GF(2^4) = GF((2^2)^2) with `z^2 = z + φ`, `φ = {10}`:

```
p_hi = (ah^al)·(bh^bl) ^ al·bl          three GF(2^2) multipliers,
p_lo = φ·(ah·bh)       ^ al·bl          one constant ×φ, XORs
```

`gf22_mul` multiplies in GF(2^2), field polynomial `x^2 + x + 1`, with three
AND gates and two XORs: `p1 = (a1^a0)(b1^b0) ^ a0b0`, `p0 = a1b1 ^ a0b0`.

The block structure (δ, squaring, ×λ, multiply, inverse, two multipliers,
δ⁻¹, and the 4-bit and 2-bit multipliers) follows the original description.
That description does not print the δ matrix, λ, φ or the field
polynomials. The values used here are those of the common composite-field
construction. They are proven correct by exhaustive tests: all 256 inverses,
all 256 S-box and inverse S-box entries, and all products of the small
multipliers.

## ShiftRows and MixColumns

`shift_rows` rotates row r left by r bytes; `inv_shift_rows` rotates it
right. `mix_columns` multiplies each column by `{03}x³+{01}x²+{01}x+{02}`
mod `x⁴+1`, using `xtime`. `inv_mix_columns` uses
`{0b}x³+{0d}x²+{09}x+{0e}`, with each constant product built as a sum of
`xtime` powers. `add_round_key` is a 128-bit XOR.

## How this RTL relates to the original description

It follows the description in:

- the SDRR structure;
- the SDRR placed only at the plain-text input of the proposed design;
- the Round_sel1/Round_sel2 round datapath with its four registers;
- the round order for encryption and decryption;
- one key expansion shared by both directions;
- an S-box computed through GF((2^4)^2);
- the worked ShiftRows example.

These are choices of this design:

- the `start`/`busy`/`enc_done`/`done` handshake and the reset;
- the two-cycle delay of `start` and `key`;
- a register after every decryption step;
- the key schedule producing one round key per cycle into stored registers;
- the field constants;
- the GF(2^4) inverter as `x^14`;
- decrypting the encryption result, rather than a separate cipher-text
  input.

The original shows the random data and the plain text recovered from the
cipher text in its waveforms, and this design matches that behaviour. The
original's schematics of a fully unrolled core (one hardware block per
round) were not followed; the iterative datapath of the proposed block
diagram was used instead. Delay and power figures from an FPGA flow are not
reproduced.

Size after generic synthesis: about 8.4 k word-level cells and 3.6 k
flip-flop bits for the whole top. 3.1 k of those bits are the core; 1.4 k of
them are the stored round keys.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. `tb/aes_ref_pkg.sv` is the
reference model. It uses shift-and-add field multiplication and finds
inverses by search. It was written independently of the RTL and is itself
checked against the standard's published vectors. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_sdrr_top.sv --top-module tb_aes_sdrr_top
./obj_dir/Vtb_aes_sdrr_top
```

Replace `tb_aes_sdrr_top` with any other testbench name to run it instead.

`tb_aes_sdrr_top` runs the top at its only size. It starts with the
standard's example, with `sel = 0`: plain text
`3243f6a8885a308d313198a2e0370734`, key `2b7e151628aed2a6abf7158809cf4f3c`,
cipher `3925841d02dc09fbdc118597196a0b32`. It continues with the same block
through the random path and 30 random operations, checking results and cycle
counts. It also counts four behaviours and requires each to happen:

- the input data is selected;
- the random data is selected;
- a start is ignored while busy;
- the inputs change mid-operation without effect.

The datapath testbenches check the 41-cycle and 83-cycle latencies, and the
key-schedule testbench checks when each round key appears.

Each testbench has been shown to catch a deliberately broken copy of its
module, for example a wrong affine constant, a missing ×φ, the wrong
Round_sel1 input in the last round, or a bypassed SDRR register.

## Changing it

- `NR` in `aes_pkg` is the AES-128 round count. The key schedule only
  implements AES-128, so it should stay 10.
- `sdrr` has a `WIDTH` parameter. The AES core is fixed at 128 bits.
- To feed a real random number generator, drive `rng` from it. To put the
  SDRR behind other registers, instantiate `sdrr` in their place and derive
  `sel` from a random bit.
