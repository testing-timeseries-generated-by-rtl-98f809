# Ring-coupled chaotic map PRNG

This is a pseudorandom bit generator built on a chaotic map. Four coupled
coordinates iterate the piecewise-linear map

    x_{n+1}^(j) = 1 - 2|x_n^(j)| + k^(j) x_n^(j+1),   j = 1..4,   x^(5) = x^(1)

with k = (+1, -1, +1, -1). Any value that leaves [-1, 1] is folded back by
adding or subtracting 2. The fold keeps the trajectory on the 4-dimensional
torus [-1, 1]^4 and makes every coordinate uniformly distributed there. Each
iteration, 24 well-balanced bits are taken from each coordinate. The four
24-bit strings are rotated and XORed in pairs, which gives one 48-bit output
block per clock. The initial conditions, the coupling signs, the rotations and
the XOR pairing together form the key.

Everything is written in synthesizable SystemVerilog-2017 and runs with plain
Verilator. The arithmetic is Q4.28 fixed point.

## Contents

| file | what it is |
|---|---|
| `rtl/rcm_pkg.sv` | Q4.28 type, constants, the key structure `key_t`, the reference key `KEY_DEFAULT` |
| `rtl/rcm_channel.sv` | one coordinate: the map step, the two comparators, the fold-back switch and the state register |
| `rtl/rcm_map.sv` | `P` channels closed into a ring (default `P = 4`) |
| `rtl/string_mx.sv` | cuts bits 5..28 out of a coordinate and rotates them |
| `rtl/shift_regs.sv` | holds the four rotation settings |
| `rtl/xor_block.sv` | XORs the four strings in two key-selected pairs into 48 bits |
| `rtl/key_block.sv` | key register and the load → seed → run sequencer |
| `rtl/rcm_prng.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rcm_prng_stats` |

## The map in Q4.28

A Q4.28 number is a 32-bit two's-complement word divided by 2^28. The state
always lies in [-1, 1]. So `1 - 2|x|` lies in [-1, 1], `±x^(j+1)` lies in
[-1, 1], and their sum `s` lies in [-2, 2]. That range fits the format's
[-8, 8) with room to spare. Doubling is a shift, the coupling coefficient is
±1 (a conditional negation, not a multiplier), and the fold adds or subtracts
a constant. **Every step is therefore exact.** The hardware computes exactly
what an ideal real-number implementation would compute from the same
(quantised) initial conditions. The testbenches rely on this: their reference
models iterate the map in `real` and compare bit for bit.

`rcm_channel` is organised like a block diagram of the map:

- `sum = 1 - 2|x| + k·x_couple`
- comparator 1: `c_gt = sum > 1`; comparator 2: `c_lt = sum < -1`
- `c_in = !c_gt && !c_lt` (two inverters and an AND)
- switch code `sel = 1·c_gt + 2·c_lt + 3·c_in`
- the switch picks `sum - 2` (code 1), `sum + 2` (code 2) or `sum` (code 3)

Both comparisons are strict, so `s = ±1` passes unchanged. The channel
registers its result (the unit delay of the map). `x_nxt` and `sel` are exposed
so that the next value and its fold branch can be observed.

`rcm_map` wires channel j to read channel j+1, and the last channel to read
the first. All channels update on the same edge.

## Which bits become output

Bits are numbered 1..32 from the least significant bit, so bit 5 is `word[4]`.
The output uses **bits 5..28 (`word[27:4]`), 24 bits per coordinate**:

- Bits 1..4 are the least significant fraction bits. They are dropped on
  purpose, to hide the fine state of the map.
- Bits 29..32 are the sign and integer bits. For a value in [-1, 1) they are
  all copies of the sign, so they carry at most one bit of information among
  them and are strongly correlated with each other.

Bit numbering from the LSB is this design's reading. `tb_rcm_prng` measures
the balance |N0 - N1| / N of every bit position over 30,000 iterations. Bits
5..28 stay below 0.02. In this two's-complement format bits 29..32 are
balanced too, but they are redundant for the reason above. Published
bit-balance plots of such maps show bits 30..32 as unbalanced; that result
probably comes from a different number representation.

## From four strings to a 48-bit block

1. **String M_x** (`string_mx`): takes `word[27:4]` and rotates it left by
   the channel's setting modulo 24. With setting 0 it is the plain bit field.
2. **Shift registers** (`shift_regs`): hold the four settings. They are
   loaded when the generator is seeded and reduced modulo 24 on the way in.
3. **XOR block** (`xor_block`): pairs the strings. Code 0 gives
   `{M1^M2, M3^M4}` (the reference pairing), code 1 gives `{M1^M3, M2^M4}`
   and code 2 gives `{M1^M4, M2^M3}`. Code 3 behaves like code 0. The first
   pair goes to `rnd[47:24]`.

So each iteration takes 96 bits from the four coordinates and delivers 48. The
XOR of two coordinates hides each one's value, and the key-chosen rotations
and pairing are there to make the generator state harder to reconstruct.

## Key, start-up and timing

`key_t` (154 bits, packed):

| field | meaning |
|---|---|
| `x0[4]` | initial conditions, Q4.28. They should lie in [-1, 1]. |
| `k_neg[4]` | 1 selects k^(j) = -1, 0 selects +1 |
| `shift[4]` | 5-bit rotation per string, taken modulo 24 |
| `pair` | XOR pairing code (`pair_e`) |

`KEY_DEFAULT` is the reference configuration:

- x0 = (0.292, -0.90258, 0.0258, 0.990258), rounded to the nearest Q4.28 value
- k = (+1, -1, +1, -1)
- no rotation
- pairing code 0

Sequence, counted in rising edges:

| edge | event |
|---|---|
| t | `key_load` = 1 is sampled. The key is captured. |
| t+1 | `seed`: `x` ← `x0` and the rotation settings are loaded. `ready` rises. |
| t+2 | First iteration (if `run` = 1). `rnd` is registered and `rnd_valid` = 1 after this edge. |
| t+2+n | One more block per clock while `run` is high. A clock with `run` low pauses the generator with its state held. |

The first output block is built from x_1; x0 itself is never output. After
`rnd_valid` the port `x` holds the coordinates the block came from. A
`key_load` while running cancels that cycle's step and re-seeds. After reset
(synchronous, active low) the generator holds `KEY_DEFAULT` but stays idle
until the first `key_load`.

## Top-level ports (`rcm_prng`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `key_load` | in | 1 | capture `key` and re-seed |
| `key` | in | `key_t` | see above |
| `run` | in | 1 | iterate while high |
| `ready` | out | 1 | seeded and running |
| `rnd_valid`, `rnd` | out | 1, 48 | output block |
| `x` | out | 4 × 32 | the four timeseries (Q4.28) |
| `fold` | out | 4 × 2 | switch code each channel takes on the next iteration |

The design uses no vendor primitives. The clock comes from outside; the
original FPGA build ran it at 1 MHz from a PLL, which is not part of this RTL.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

- `tb_rcm_channel`: 3000 random loads (including -1, 0 and +1), compared
  against the real-number model. All three fold branches are hit.
- `tb_rcm_map`: the 4-D map from the reference key, and a 5-D instance with
  random seeds and signs. 5000 iterations per seed, with every coordinate and
  fold code compared.
- `tb_string_mx`, `tb_xor_block`, `tb_shift_regs`, `tb_key_block`:
  exhaustive or random checks of extraction and rotation (all settings 0..31),
  pairing codes, the modulo reduction, and the load/seed/run sequence.
- `tb_rcm_prng` (end to end, default size): a cycle-accurate reference model
  checks `rnd_valid`, `rnd`, `x`, `fold` and `ready` on every clock. It also
  checks the 2-edge latency and the one-block-per-clock rate.
  - It runs 30,000 reference-key iterations, then 24 random keys with random
    pauses and re-keying.
  - It counts every mechanism: both fold directions, pass, every pairing
    code, rotation, modulo reduction, pause and re-key while running.
  - It also reports bit balance and the share of ones.
- `tb_rcm_prng_stats`: the full statistical run, 10^9 output bits (about
  20 s in Verilator).
  - The stream is cut into 1000 sequences of 10^6 bits, MSB of each block
    first. Each sequence gets the NIST SP 800-22 frequency (monobit) and runs
    tests.
  - It also makes a 100-bin histogram of 10^7 iterations of each coordinate.
  - Result with the reference key: 989/1000 sequences pass the frequency test
    and 986/1000 pass the runs test. The acceptance bound is 0.9806. The
    worst histogram bin deviates 0.9 % from the mean of 10^5.

The other 13 tests of the NIST suite are not reproduced here.

To run one, for example the end-to-end test:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
        rtl/rcm_pkg.sv tb/tb_rcm_prng.sv --top-module tb_rcm_prng
    ./obj_dir/Vtb_rcm_prng

The package must come first on the command line. `-y rtl` lets Verilator find
every other module by its file name.

## What follows the reference and what is this design's own

These parts follow the generator's published description:

- the map and its fold rule
- p = 4 and k = (-1)^(i+1)
- Q4.28
- the two-comparator / three-way-switch structure of a channel
- bits 5..28 and 24-bit strings
- XORing the strings in two pairs into a 48-bit block
- a key that carries the initial conditions, parameters, shift settings and
  XOR selection
- the reference key

These choices are this design's own:

- **Shift settings.** They are implemented as a cyclic left rotation of each
  24-bit string. The source says only that shift registers exist, that the key
  sets them, and that the reference run uses shift 0.
- **XOR pairing.** It is selectable from the key as one of three pairings with
  the given encoding. The source says only that the pairing is random and
  part of the key.
- **Coupling coefficients.** They are limited to ±1 (a sign bit per channel),
  since the map is defined for those values.
- **Key interface.** The key is a parallel word. Loading runs load → seed →
  run, followed by the `run` pause control, the reset behaviour and the
  2-clock latency.
- **Bit order.** The numbering of bits from the LSB, the order of the 48
  output bits, and the MSB-first reading used for the statistics.
- **Rounding.** The reference initial conditions are rounded to nearest.

The original build reports a gate count of about 1400 for the 4-D map on its
FPGA. This RTL was not synthesized for that device, so the figure has not been
compared.
