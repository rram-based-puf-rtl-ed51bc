# EPUF: SHA-256 with an embedded RRAM PUF, used for authentication and AES-128 key generation

A physical unclonable function (PUF) turns manufacturing randomness into
bits that differ from chip to chip. Used on its own, a small memory-type PUF
has two weaknesses: it offers few challenge/response pairs, and its bits
drift with age and temperature, so it normally needs error correction.

This design removes both weaknesses with two ideas:

1. **Redundant RRAM bits.** Every PUF bit is stored in 8 resistive RAM
   (RRAM) cells wired in parallel to one bit line. A bit reads as 1 while
   the *sum* of its 8 cell currents is above 24 uA, which is 8 × the 3 uA
   at which a single cell is no longer readable. One or two cells that
   degrade early do not flip the bit, so no error-correction logic is
   needed.
2. **The PUF hidden inside a hash.** The PUF bits never leave the chip. In
   each of the 64 SHA-256 rounds, row *t* of two small PUF arrays picks one
   bit in the upper half and one in the lower half of the message word
   W<sub>t</sub>, and those two bits are inverted before the round uses
   the word. The hash algorithm is otherwise unchanged. Every challenge
   message therefore gives a digest that is specific to the chip (any
   message is a valid challenge). Knowing challenge/digest pairs does not
   reveal the PUF bits.

The resulting *embedded PUF* (EPUF) is used in two ways (`epuf_aes_system`):

* **Authentication.** The chip returns the digest of a challenge. A
  verifier that recorded the chip's PUF bits at enrolment recomputes the
  digest and compares.
* **Key generation.** The upper 128 digest bits become the cipher key of an
  on-chip AES-128 core, which encrypts a plaintext block. The key is never
  output.

## Storing and reading one PUF bit

The part that needs the most care is how a bit comes into being.

*As fabricated*, the RRAM cells carry a broad, device-specific spread of
read currents. This spread is the entropy source. The model draws each
cell's current from 1 to 9 uA with a hash of the instance's `SEED`, row and
column.

*Self-programming* (`puf_program_ctrl`) runs once, started by `prog_start`.
It visits the 64 rows in turn and spends two clocks on each:

| clock | action |
|-------|--------|
| RD | The row is selected and the sense amplifiers compare each bit's summed current with the **programming reference**, 8 × 5 uA. This level lies inside the as-fabricated distribution. The 8 results (4 bits × 2 arrays) are captured. |
| WR | Bits that read above the reference are SET to the low-resistance state (LRS, "1"). All other bits are RESET to the high-resistance state (HRS, "0"). All 8 cells of a bit are programmed alike. |

`prog_done` pulses 2·64+1 clocks after the start edge. The program enables
are forced low while `rst_n` is asserted. Without this, a random power-up
state could write the non-volatile array before reset takes effect.

After programming, an LRS cell carries 7 to 15 uA and an HRS cell 0.3 to
1 uA, a ratio above 10×. A bit of 8 LRS cells therefore carries at least
56 uA, and a bit of 8 HRS cells at most 8 uA.

*Reading* uses the **read reference** `CELLS_PER_BIT` × 3 uA: 24 uA for
8 cells, 6 uA for 2 cells, 12 uA for 4 cells. The 3 uA level is where a
single cell counts as failed. An LRS bit reads correctly as long as its
cells together stay above the reference, even if some of them have drifted
below 3 uA. The testbenches show this. With one cell of an LRS bit dropped
to 2 uA, the 8-cell bit still reads 1, while a 1-cell-per-bit array built
from the same model reads 0.

The crossbar and sense amplifiers are analog parts. `rram_crossbar` and
`rram_sense_amp` are behavioural models. They are written for simulation
and are not meant for synthesis. Cell drift (retention loss, read
disturbance) is not modelled over time. A test imposes it with the task
`rram_crossbar.set_cell_na(row, col, nA)`.

## Inverting two bits of W<sub>t</sub> per round

`puf_wt_modifier` holds:

* two 64 × 4-bit PUF arrays (`rram_puf_array`). Each has 64 × 32 cells and
  4 sense amplifiers;
* one 6:64 row decoder, shared by both arrays and addressed by the round
  number *t*;
* two 4:16 decoders (`bit_select_decoder`). The array `u_arr_hi` selects a
  bit of W<sub>t</sub>[31:16] and `u_arr_lo` a bit of W<sub>t</sub>[15:0].
  Response bit 3 is the decoder's most significant input.

```
mask   = { onehot16(row t of upper array), onehot16(row t of lower array) }
W_t'   = W_t ^ mask          // exactly two bits inverted, one per half
```

This read path is combinational and lies inside the round clock. The
modified word goes only into the round computation. The message-schedule
recurrence keeps using the original words, so the schedule and the round
constants K<sub>t</sub> are those of standard SHA-256.

## Timing

| operation | clocks | notes |
|-----------|--------|-------|
| PUF self-programming | 129 after `prog_start` | once after fabrication |
| `sha256_core` / `epuf` hash | 64 after `start` | 1 round per clock (320 ns at a 5 ns round clock) |
| `aes128_core` encryption | 20 after `start` | 2 clocks per round (20 ns at 1 ns) |
| system authentication | 66 after `op_start` | one clock to launch the hash, 64 rounds, one to register |
| system encryption | 88 after `op_start` | 66, then one to launch AES, its 20 clocks, and one to register |

The cores start on a one-cycle `start` pulse, raise `busy`, and pulse
`done` for one cycle when their result register is valid. A `start` while
busy is ignored. All resets are active-low (`rst_n`) and asynchronous.

Inside `aes128_core`, phase 0 of a round registers
ShiftRows(SubBytes(state)). Phase 1 computes the next round key with
`aes_key_expand` and registers MixColumns(state) ^ key, or state ^ key in
round 10. The initial AddRoundKey happens on the start clock. Rcon starts
at {01} and is doubled in GF(2<sup>8</sup>) after every round.

## Interfaces of the top (`epuf_aes_system`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, active-low reset |
| `prog_start` / `prog_done` | in / out | 1 | run PUF self-programming / it finished |
| `op_start` | in | 1 | start an operation (taken when idle) |
| `op_encrypt` | in | 1 | 1 = key generation + encryption, 0 = authentication |
| `challenge` | in | 447 | challenge message, first bit at [446] |
| `challenge_len` | in | 9 | its length in bits, 0 to 447 |
| `plaintext` | in | 128 | block to encrypt |
| `busy`, `done` | out | 1 | operation running / result valid (pulse) |
| `digest` | out | 256 | chip-specific digest (authentication mode) |
| `ciphertext` | out | 128 | AES-128 result (encryption mode) |

Parameters: `CELLS_PER_BIT` (default 8) and the per-chip seeds `SEED_HI`
and `SEED_LO`, which stand in for manufacturing variation in simulation.

## Module map

```
epuf_aes_system                  mode sequencer, result registers
├── epuf                         SHA-256 with the PUF in the W_t path
│   ├── sha256_padder            message -> one 512-bit block
│   ├── sha256_core              A..H registers, round counter, feed-forward
│   │   ├── sha256_msg_schedule  16-word sliding window, W_t recurrence
│   │   ├── sha256_k_rom         K_t
│   │   └── sha256_round         one round (Ch, Maj, Σ0, Σ1, adders)
│   └── puf_wt_modifier          PUF bit inversion
│       ├── puf_program_ctrl     self-programming sequencer
│       ├── row_decoder          6:64
│       ├── rram_puf_array ×2    behavioural: crossbar + 4 sense amps
│       │   ├── rram_crossbar    behavioural: 64 × 32 cells
│       │   └── rram_sense_amp   behavioural
│       └── bit_select_decoder ×2  4:16
└── aes128_core                  state register, AddRoundKey, round control
    ├── aes_sub_shift            16 S-boxes + ShiftRows
    │   └── aes_sbox             GF(2^8) inverse + affine map
    ├── aes_mix_columns
    └── aes_key_expand           one key-schedule step (4 S-boxes)
```

`sha256_pkg` holds H0..H7 and the SHA-256 bit functions. `aes_pkg` holds
the GF(2<sup>8</sup>) helpers and the state byte order: byte 4·c + r (row
r, column c) is at bits [127−8n −: 8], as in FIPS-197.

## Design choices to know about

The following points are this design's choices, or places where the RTL
follows the standard rather than the original description of the design:

* **SHA-256 functions.** Σ0, σ0, σ1, the 64 round constants and the final
  H + A..H feed-forward are those of FIPS 180-4. The digest is plain
  SHA-256 whenever the mask is zero. `tb_sha256_core` checks this against
  published digests.
* **Single-block challenges.** Padding appends one 1 bit, zeros and a
  64-bit length. Challenges are therefore at most 447 bits. Multi-block
  messages are not supported.
* **Per-bit programming.** Self-programming compares the summed current of
  a bit's cells, not each cell alone. With the cells wired in parallel,
  no single cell can be read.
* **Current levels.** The as-fabricated range (1 to 9 uA), the LRS range
  (7 to 15 uA), the HRS range (0.3 to 1 uA) and the 5 uA programming
  reference are assumed values. The 3 uA failure level, its scaling with
  the number of cells per bit, and the >10× on/off ratio are given values.
* **Key bits.** The AES key is `digest[255:128]`, which is hash words
  H0..H3.
* **AES microarchitecture.** The 2-clocks-per-round split was chosen to
  meet the given 20-clock latency. The AES core only encrypts.
* **PUF read.** The PUF read is not pipelined. The read of row *t* happens
  in the same clock as round *t*.
* **Skewed arrays.** Self-programming does not force the number of 1 bits
  to half. A bit is 1 when its fresh current sum is above the reference,
  so an array can hold more 0s than 1s or the reverse. The 4:16 decoding
  still always inverts exactly one bit per half-word.
* **Not modelled.** The analog device physics (gap dynamics, temperature,
  read stress) and the 10-year reliability figures that come from it. The
  verifier's database is off-chip.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops with `$finish`. Each has a
watchdog. Reference models are in `tb/tb_ref_pkg.sv` and share no code
with the RTL:

* SHA-256 with optional per-round masks. Its constants are computed from
  square and cube roots of primes.
* AES-128 with an S-box found by exhaustive inverse search.

Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sha256_pkg.sv rtl/aes_pkg.sv tb/tb_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg.sv) tb/tb_epuf_aes_system.sv \
  --top-module tb_epuf_aes_system -o sim
./obj_dir/sim
```

Swap the last testbench file and the `--top-module` name to run any other
testbench.

`tb_epuf_aes_system` runs the top at its default size with no parameter
overrides. It takes about a minute. It does the following:

1. Self-programs the PUF and checks every bit's state and separation.
2. Enrols the chip by reading the programmed cell currents.
3. Checks authentication digests and encryption results against the
   reference models, with the 66- and 88-clock latencies.
4. Checks that a start while busy is ignored.
5. Drops one cell of every LRS bit in ten rows to 2 uA and checks that the
   digest does not change.
6. Fails a whole bit and checks that the digest changes in more than 64 of
   its 256 bits.

It counts each of these events and fails if one never happens.

Per-block testbenches:

* `tb_sha256_*`: published digests, random blocks, the schedule, the
  constants and the padding.
* `tb_aes_*`: the FIPS-197 example values, the full S-box and random
  blocks.
* `tb_rram_*` and `tb_puf_*`: the models, the programming sequence, the
  redundancy behaviour and the bit inversion.
* `tb_epuf`: device-specific digests, and two chips giving different
  digests for the same challenge.
