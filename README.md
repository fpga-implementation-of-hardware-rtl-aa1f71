# Compact iterative AES-128 encryptor with a sub-pipelined composite-field S-box

This is a small AES-128 encryption core. It spends area rather than speed. A single 128-bit
round of hardware is built and used ten times. The S-boxes compute the byte inverse in the
composite field GF((2^4)^2), and all their nibble products come from small look-up tables.
Each S-box is cut into four pipeline stages. MixColumns forms its {02} and {03} products with
Vedic ("vertically and crosswise") multipliers instead of the usual xtime logic. The core
encrypts one block at a time, and each block takes 60 clock cycles.

Everything is synthesizable SystemVerilog-2017. All testbenches are self-checking and run with
plain Verilator.

## Interface and timing

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock, all registers on the rising edge |
| `rst`        | in  | 1     | synchronous reset, active high |
| `start`      | in  | 1     | accepted when idle: loads `plaintext` and `key`; ignored while `busy` |
| `plaintext`  | in  | 128   | block to encrypt |
| `key`        | in  | 128   | cipher key |
| `ciphertext` | out | 128   | result register; keeps its value until the next block finishes |
| `busy`       | out | 1     | a block is in flight |
| `done`       | out | 1     | one-cycle pulse: `ciphertext` has just been written |

All 128-bit values use the FIPS-197 byte order. The first byte of the block is in bits 127:120.
Byte `4*c + r` is row `r` of column `c`. The port list adds up to 3 x 128 + 5 = 389 pins. That
matches the I/O count reported for the original FPGA implementation.

`plaintext` and `key` are sampled only on the edge that accepts `start`. After that edge it
takes exactly 60 rising edges before `done` is high and `ciphertext` is valid. You can start
the next block in the same cycle that `done` is high.

```
edge   0        : start accepted, state <= plaintext ^ key, round key <= key
edges  1..60    : rounds 1..10, six edges each
edge  60        : ciphertext <= last AddRoundKey,  done = 1 in the following cycle
```

## The round loop

The datapath is one AES round closed into a loop. The loop holds six registers, so one round
takes six cycles:

```
          +-------------------------------------------------------------+
          v                                                             |
  [1 state_q] -> S-box st.1 -> [2] -> st.2 -> [3] -> st.3 -> [4] -> st.4 -> [5 S-box out]
                                                                          |
              ShiftRows (CS1) -> MixColumns (CS2) / bypass (CS3) -> [6 mix_q]
                                                                          |
                                               AddRoundKey(round key) ----+--> ciphertext (CS11)
```

Register 1 is the state. Registers 2-5 are the four stage registers inside each of the sixteen
S-boxes. Register 6 (`mix_q`) holds the ShiftRows/MixColumns result. AddRoundKey sits between
register 6 and register 1. The initial AddRoundKey (plaintext XOR key) has its own XOR bank on
the load path.

Only one block is ever in the loop. The sequencer, `aes_control`, counts a phase 0..5 inside
each round and a round number 1..10. It decodes eleven control signals from them:

| signal | active                        | action |
|--------|-------------------------------|--------|
| CS10   | `start` while idle            | load plaintext XOR key into the state, the key into the key register |
| CS4..CS7 | phase 0..3                  | enable S-box stage register 1..4 (state and key S-boxes) |
| CS1    | phase 4                       | ShiftRows active; otherwise its multiplexers output zero |
| CS2    | phase 4, rounds 1..9          | MixColumns active; otherwise its operands are forced to zero |
| CS3    | round 10                      | final round: MixColumns is bypassed |
| CS8    | phase 4                       | replace the round key by the next one |
| CS9    | phase 5, rounds 1..9          | load the AddRoundKey result back into the state |
| CS11   | phase 5, round 10             | load the AddRoundKey result into the ciphertext register |

`mix_q` loads every cycle. CS1 is low outside phase 4, so outside that phase `mix_q` captures
zeros and the round logic behind the S-boxes stays quiet. The S-box stage registers use their
enables the same way: each holds its value except in its own phase.

Two things follow from this schedule. First, the stage enables only ever advance one block,
so the pipeline registers add latency without adding throughput. They shorten the critical
path, and with it the clock period. Second, if you need more throughput, you can feed up to
six independent blocks into the loop, one per phase. That would need one round key per block
in flight, and it is not built here.

Assertions check the control rules. The state register is never loaded from two sources at
once. Exactly one phase action is active per busy cycle. Outside reset, the ciphertext changes
only on a CS11 load. Every CS11 load is followed by `done`.

## The composite-field S-box (`sbox_cfa`)

The AES S-box is `S(a) = A * inv(a) + {63}`. Here `inv` is the inverse in GF(2^8) modulo
x^8+x^4+x^3+x+1, with 0 mapped to 0, and `A` is the affine bit matrix. Inverting directly in
GF(2^8) is expensive. Instead the byte is moved into an isomorphic field in which the
inversion reduces to 4-bit arithmetic:

* GF(2^4) = GF(2)[x]/(x^4+x+1)
* GF((2^4)^2) = GF(2^4)[X]/(X^2 + X + lambda), with lambda = {1100} (= {C})

An element is written `ah*X + al` with two nibbles. Its inverse is

```
d        = lambda*ah^2 + ah*al + al^2        (a single GF(2^4) value)
inverse  = (ah * d^-1) * X + ((ah + al) * d^-1)
```

The isomorphism `delta` is the GF(2)-linear map that sends the AES generator x to
beta = {21}. beta is a root of x^8+x^4+x^3+x+1 in the composite field, so bit i of the input
contributes beta^i to the output. The rows of the 8x8 matrices `DELTA` and `DELTA_INV` in
`sbox_cfa.sv` follow from that choice. Output bit j is the parity of `ROW[j] & input`. Any
other root, or any other irreducible `X^2 + X + lambda`, gives a different but equally valid
pair of matrices.

The work is cut into four stages, each ending in a register:

| stage | logic | register contents |
|-------|-------|-------------------|
| 1 | `delta`, split into nibbles, `ah ^ al` | ah, ah^al, al (12 bits) |
| 2 | `cul`: d = lambda*ah^2 + ah*al + al^2 | ah, ah^al, d |
| 3 | `gf4_inv`: d^-1 | ah, ah^al, d^-1 |
| 4 | two table products, `delta^-1`, affine transform | the output byte |

* `cul` ("combine upper and lower nibbles") does the step that merges the two halves into one
  value.
* `gf4_mul_lut` is the GF(2^4) multiplier. It is a 256 x 4-bit constant table, filled at
  elaboration from a shift-and-add product, so it synthesizes to a ROM or LUT logic.
* `gf4_inv` is a 16-entry table.
* The squarings and the multiplication by lambda in `cul` are linear, so they are plain XOR
  networks.

`PIPELINED = 0` removes the registers and gives the combinational form of the same S-box.
`stage_en` is then ignored.

## MixColumns with Vedic multipliers

Each column is multiplied by the circulant matrix [02 03 01 01]:
`s'_r = {02}s_r + {03}s_(r+1) + s_(r+2) + s_(r+3)`. `mix_column` forms the eight constant
products of a column with `vedic_gf_mul`, and `mix_columns` holds four columns.

A Vedic multiplier is an ordinary integer multiplier. `vedic_mul2` builds the 2x2 product
from one vertical product, a crosswise sum and a second vertical product. `vedic_mul4`
combines four 2x2 blocks at weights 1, 4, 4 and 16. GF(2^8) needs polynomial products
instead, where additions are XORs and no carries propagate. Both multipliers therefore have a
`CARRYLESS` parameter:

* `CARRYLESS = 0` (the default) gives integer products.
* `CARRYLESS = 1` turns every adder into XOR. The same structure then gives polynomial
  products over GF(2).

`vedic_gf_mul` multiplies a byte by a 4-bit constant. It splits the byte into nibbles, runs
each nibble through a carry-less 4x4 Vedic multiplier, and combines the results as
`hi << 4 ^ lo`. It then reduces that polynomial (degree at most 10) modulo x^8+x^4+x^3+x+1.

## Key schedule

`key_expansion` holds only the current round key and the round constant. It computes the next
key in place: `t = SubWord(RotWord(w3)) ^ rcon`, `w0' = w0 ^ t`, `w1' = w1 ^ w0'`, and so on.
SubWord uses four more `sbox_cfa` instances driven by the same stage enables as the state
S-boxes. They start in phase 0 of every round, from the key of the previous round. CS8 then
installs the new key in phase 4, just before AddRoundKey uses it in phase 5. No round-key
memory is needed.

## Module map

```
aes128_encrypt_top
 +- aes_control          phase/round counters, CS1..CS11
 +- key_expansion        on-the-fly key schedule, 4 x sbox_cfa
 +- add_round_key  x2    initial and in-loop AddRoundKey
 +- sub_bytes            16 x sbox_cfa
 |   +- sbox_cfa         cul (gf4_mul_lut), gf4_inv, 2 x gf4_mul_lut
 +- shift_rows           byte permutation gated by CS1
 +- mix_columns          4 x mix_column, CS2 gating, CS3 bypass
     +- mix_column       8 x vedic_gf_mul
         +- vedic_gf_mul 2 x vedic_mul4 (carry-less) -> 4 x vedic_mul2
aes_pkg                  state/byte types, ctrl_t (CS1..CS11), NR, ROUND_CYCLES, helpers
```

## Size

Coarse synthesis of the top gives about 1,330 flip-flops:

* state, round-output, ciphertext and round-key registers: 4 x 128
* rcon and the controller
* 20 S-boxes with 40 stage bits each after synthesis (44 as written; synthesis merges a few)

The 80 small tables appear as ROMs: 60 GF(2^4) multipliers and 20 inverters. The published
implementation reports 684 flip-flops. It must keep fewer stage registers or share S-boxes
between the state and the key schedule, and how it does either is not known. Treat this RTL
as functionally faithful, not as a gate-for-gate reproduction.

## How it departs from the published design

* **Throughput.** The published throughput figures (14,383 Mbit/s at 112.37 MHz, 8,672 Mbit/s
  at 67.75 MHz) equal 128 bits per clock cycle. An iterative core that holds one block at a
  time cannot reach that. This core delivers 128 bits per 60 cycles, about 240 Mbit/s at
  112 MHz.
* **Key size.** Only 128-bit keys and 10 rounds are supported. The published simulation
  waveforms show a 256-bit key input, which this core does not accept.
* **No decryption.** The inverse transformations are not built.
* **This design's own choices.** The description gives the roles of CS1 (ShiftRows), CS2
  (MixColumns) and CS3 (final round). It says only that CS4..CS11 handle the S-boxes and
  AddRoundKey, so their assignment here is this design's own. So are the field polynomials,
  lambda, the isomorphism matrices, the positions of the S-box stage boundaries, the reading
  of the CUL unit as the norm computation, and the on-the-fly key schedule.
* **Gated outputs.** The "outputs become zero when CS1 is low" behaviour is built as an AND on
  the ShiftRows multiplexers. The register behind them then loads zeros. CS2 is built the
  same way, as operand isolation of the MixColumns multipliers.
* **Final round.** MixColumns is left out of round 10, as AES requires.

## Simulation

Each block has a testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. The reference
model `tb/aes_ref_pkg.sv` is written straight from the AES definition. It computes
shift-and-add GF(2^8) products, finds the S-box inverse by search, and expands the full key
schedule. It shares no code with the RTL.

Build and run any testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_encrypt_top.sv \
    --top-module tb_aes128_encrypt_top -Mdir obj_top
./obj_top/Vtb_aes128_encrypt_top
```

What the testbenches cover:

* **`tb_aes128_encrypt_top`** runs the whole core at its default configuration. It encrypts
  the FIPS-197 Appendix B block (`3243f6a8...` -> `3925841d...`) and the Appendix C.1 block
  (`00112233...` -> `69c4e0d8...`), plus 20 random key/plaintext pairs. It checks the
  60-cycle latency of every block. It also counts each mechanism, and fails if any never
  happens: initial load, stepped S-box stages, CS1 zeroing, MixColumns rounds, final-round
  bypass, key updates, loop reloads, ciphertext loads, a `start` ignored while busy, blocks
  back to back, and a reset while busy.
* **`tb_sbox_cfa`** streams all 256 bytes through the pipelined S-box with a 4-cycle latency.
  It also checks that stages hold while disabled, and checks the combinational variant.
* **`tb_sub_bytes`** and **`tb_mix_columns`** check the FIPS-197 round-1 states
  (`193de3be...` -> `d42711ae...` and `6353e08c...` -> `5f726415...`).
* **`tb_key_expansion`** checks all round keys of the FIPS-197 key and of random keys.
* **`tb_aes_control`** compares every control signal in every cycle with an independently
  written schedule.
* **The arithmetic blocks** (`gf4_mul_lut`, `gf4_inv`, `cul`, `vedic_mul2`, `vedic_mul4`,
  `vedic_gf_mul`) are checked exhaustively.
