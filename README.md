# 64-point radix-4 SDF FFT with Booth / Kogge-Stone twiddle multipliers

This is a streaming FFT for 64 complex points. It takes one complex sample
per clock and, after a fixed latency, returns one frequency bin per clock.
It uses the radix-4 *single-path delay feedback* (SDF) pipeline. Each of the
log4(64) = 3 stages has one radix-4 butterfly. Three feedback shift registers
per stage hold the samples the butterfly still waits for, and the butterfly
results it has not yet sent on. The stages hold 63 words in total
(3 x (16 + 4 + 1) = N - 1).

Between stages, every sample is rotated by a twiddle factor. The complex
multiplier that does this is built from radix-4 (modified) Booth multipliers.
Their partial products are summed by Kogge-Stone parallel-prefix adders. The
same adder forms the sum and the difference of the four real products. The
point of this arrangement is a short multiplier critical path: the
Kogge-Stone adder resolves every carry in log2(n) levels.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) and is parameterized.
The defaults are N = 64 points, 8-bit inputs, 8-bit twiddles and an
8 x 8 Booth multiplier with a 16-bit adder.

## Module hierarchy

```
fft64_r4sdf                 top: input register, stage chain, controller
├── sdf_controller          modulo-N sample counter, out_valid / out_pos / out_bin
└── r4sdf_stage  x log4(N)  one SDF stage (S = 0, 1, 2)
    ├── feedback_delay x 3  L-word feedback shift registers (L = 16, 4, 1)
    ├── r4_butterfly        radix-4 DIF butterfly (adders only)
    ├── twiddle_rom         W_N^e table, computed at elaboration  (not in last stage)
    └── complex_multiplier  (not in last stage)
        ├── booth_multiplier x 4
        │   ├── booth_encoder        radix-4 recoding of the multiplier
        │   ├── booth_pp_gen x BW/2  partial-product rows
        │   └── ks_adder x BW/2      row summation + negation correction
        └── ks_adder x 2             real part (subtract), imaginary part (add)
fft_pkg                     widths, stage lengths, base-4 digit reversal, twiddle words
```

## Top-level interface (`fft64_r4sdf`)

| port | dir | width (N = 64) | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high; clears all storage |
| `in_valid` | in | 1 | a sample is present; when low the entire pipeline holds |
| `data_real_in`, `data_imaginary_in` | in | 8 | signed input sample |
| `data_real_out`, `data_imaginary_out` | out | 15 | signed output bin, unscaled |
| `out_valid` | out | 1 | a new output sample is in the output register (one pulse per accepted input once the pipeline is full) |
| `out_first` | out | 1 | first sample of an output block |
| `out_pos` | out | 6 | position of the sample in its 64-sample output block |
| `out_bin` | out | 6 | frequency index k of the sample |

Parameters: `N` (a power of 4, default 64), `DW` (input width, default 8) and
`TW` (twiddle width, default 8, with TW-2 fraction bits). The output width
is `DW + 1 + 2*log4(N)`.

The output is the unscaled DFT, `X[k] = sum_n x[n] exp(-j 2 pi n k / N)`,
except for twiddle rounding. No bits are discarded, so no input can overflow:
one guard bit at the input plus two bits per butterfly cover the worst case
of 64 x 128 x sqrt(2) = 11585.

## How a radix-4 SDF stage works

This schedule is the core of the design. It is in `r4sdf_stage.sv`.

A stage with feedback length L works on blocks of 4L consecutive samples.
For the 64-point FFT, L is 16 in stage 0, 4 in stage 1 and 1 in stage 2. The
decimation-in-frequency butterfly needs x[k], x[k+L], x[k+2L] and x[k+3L].
The last of these arrives 3L clocks after the first. The stage therefore has
three L-word shift registers D0, D1 and D2. All of them shift on every enabled
clock. A local count `cnt` (0 .. 4L-1) divides the block into four phases of
L clocks:

| phase | D0 input | D1 input | D2 input | stage output |
|---|---|---|---|---|
| 0 | new sample | D1 (recirculate) | D2 (recirculate) | D0 = y1 of previous block |
| 1 | D0 (recirculate) | new sample | D2 (recirculate) | D1 = y2 of previous block |
| 2 | D0 (recirculate) | D1 (recirculate) | new sample | D2 = y3 of previous block |
| 3 | y1 | y2 | y3 | y0 (butterfly) |

In phase 3, D0, D1 and D2 present x[k], x[k+L] and x[k+2L] just as x[k+3L]
arrives. This works because a word that is loaded and then recirculated
comes back to the output every L clocks, in its slot. The butterfly then
computes:

```
y0 = a0 +   a1 + a2 +   a3        y2 = a0 -   a1 + a2 -   a3
y1 = a0 - j a1 - a2 + j a3        y3 = a0 + j a1 - a2 - j a3
```

y0 leaves at once. y1, y2 and y3 go into the registers that just emptied.
They leave during phases 0, 1 and 2 of the next block, while the new block's
samples flow in behind them. So each stage emits y0, y1, y2, y3 (L samples
each) of a block, starting 3L clocks after the block's first sample arrived.
This is exactly the block order the next stage, with length L/4, expects.

Output k of group m is multiplied by `W_{4L}^{m k}`. The twiddle table is
indexed with `m * k * N/(4L)`. The last stage (L = 1) has no multiplier. Each
stage registers its output, so a stage adds 3L + 1 clocks of latency.

**Timing.** The input register adds one clock. In total, sample 0 of a block
comes out as bin 0 after `1 + sum(3L + 1) = N + log4(N)` accepted samples:
67 for N = 64. Stage s sees its block position as
`(count - 1 - s) mod 4L`. Here `count` is the controller's modulo-N count of
accepted samples, so one counter times all stages. Blocks follow each other
with no gap, and throughput is one sample per clock.

**Stalls.** `in_valid` is the enable of every register in the design. With
it low, nothing moves. A block's results leave only while later samples are
being fed. To flush the last block, feed about one more block (zeros will do).

**Output order.** The spectrum leaves in base-4 digit-reversed order. Output
position p = (d2 d1 d0) in base 4 holds bin k = (d0 d1 d2). For N = 64, p = 1
is bin 16 and p = 4 is bin 4. `out_bin` gives k for each sample. No reorder
buffer is included.

## Arithmetic units

**Kogge-Stone adder (`ks_adder`, 16 bits by default).** Pre-processing forms
p = a ^ b and g = a & b for each bit. The carry-in is merged into bit 0's
generate. The prefix tree has log2(WIDTH) levels. At level k, each position
i >= 2^k merges its (G, P) pair with the pair 2^k positions to its right:
`G = G_i | P_i & G_{i-2^k}`, `P = P_i & P_{i-2^k}`. Post-processing XORs p
with the carries. Subtraction is `a + ~b` with carry-in 1.

**Booth multiplier (`booth_multiplier`, 8 x 8 -> 16 by default).** Both
operands are signed two's complement. The encoder recodes the multiplier into
BW/2 digits in {-2, -1, 0, +1, +2}, one per overlapping bit triplet. Each
`booth_pp_gen` outputs 0, m or 2m for its digit, inverted when the digit is
negative. The rows are sign-extended and shifted by 2i. A chain of Kogge-Stone
adders sums them. One last adder adds a correction word that holds the "+1" of
each inverted row, at bit 2i. The product is exact.

**Complex multiplier.** It computes
`(xr + j xi)(wr + j wi) = (xr wr - xi wi) + j (xr wi + xi wr)` with four Booth
multipliers, one Kogge-Stone subtractor and one Kogge-Stone adder. It then
rounds to nearest: it adds 2^5 and shifts right by 6, the number of twiddle
fraction bits. Inside the FFT, the multiplicand is the stage's sample word
(11 bits after stage 0, 13 after stage 1). The multiplier operand is the
8-bit twiddle.

**Twiddles.** `twiddle_rom` holds `W_N^e = cos(2 pi e/N) - j sin(2 pi e/N)`
for e = 0 .. N-1. Each word is 8 bits with 6 fraction bits: +1.0 = 64 exactly,
and W^8 = (45, -45). The words are rounded to nearest and computed at
elaboration by `fft_pkg::twiddle_word`, so they follow any N.

## Accuracy

The rounding of the twiddle words (1/128) limits the accuracy. Measured
against a double-precision DFT, the error stays within 3 % of the sum of input
magnitudes; the testbenches enforce this bound, plus 4 LSB. For a bit-exact
reference, use the fixed-point recursion in `tb/tb_fft64_r4sdf.sv`: a radix-4
DIF with the same twiddle words and the same rounding. It matches the RTL on
every sample.

## Where this RTL goes beyond, or departs from, the source design

The source describes the stage chain, the radix-4 SDF principle, the Booth
encoder -> partial products -> Kogge-Stone adder flow, the complex product
formula and the 8-bit widths. The following points are choices made here:

* **Three stages, not four.** One block diagram of the source draws four
  stages with feedback blocks labelled 32, 16, 4 and 1. A 64-point radix-4
  transform has three stages (16, 4, 1), and that is what is built. A
  four-stage chain would be a 256-point transform, and a "32" block does not
  fit a radix-4 stage.
* **Word growth.** The source gives no widths beyond the 8-bit inputs. Here
  the data grow two bits per stage and are never scaled. As a result, the
  Booth multipliers inside the FFT have 11- or 13-bit multiplicands rather
  than 8 bits. The stand-alone `booth_multiplier` default is the 8 x 8 unit.
* **Twiddle format** (8-bit, 6 fraction bits, round to nearest) and the
  product rounding are this design's choice.
* **Butterfly adders** use ordinary `+`/`-`. The Kogge-Stone adders sit where
  the source puts them: inside the multiplier, and for the sum and difference
  of the complex product.
* **Control and interface.** The source names only clock, reset and the
  data ports. These are additions: the `in_valid` stall, the input register,
  the per-stage output registers, the single modulo-N counter, and the
  `out_valid` / `out_first` / `out_pos` / `out_bin` outputs. Reset is
  synchronous and active high.
* **No output reordering.** Bins come out digit-reversed, with their index.
* The Booth row encoding uses explicit sign extension and a correction word.
  It does not use the sign-extension-prevention trick.

## Simulating

Each testbench checks its results itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. To run the 64-point end-to-end test with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fft_pkg.sv tb/tb_fft64_r4sdf.sv --top-module tb_fft64_r4sdf
./obj_dir/Vtb_fft64_r4sdf
```

The package file must come first. Other modules are found through `-Irtl` by
file name. Swap in another testbench name to run the other tests.

| testbench | what it shows |
|---|---|
| `tb_fft64_r4sdf` | top at default parameters. It streams 7 blocks back to back, with random stalls: ramp, impulse, tone, full-scale DC, full-scale alternating, random. It checks every bin bit-exactly against the fixed-point model and against a float DFT, and checks bin index, block marker and the 67-sample latency. It counts stalls, block boundaries, non-trivial twiddle rotations and reordered bins, and fails if any never happened. |
| `tb_fft16_ramp` | same checks with `N = 16` (two stages, latency 18), starting with the ramp 0 .. 15 |
| `tb_r4sdf_stage` | a 16-point first stage (L = 4, with twiddles) and a last stage (L = 1) against a block model, with stalls |
| `tb_sdf_controller` | counter, first `out_valid` after exactly LAT samples, position, digit reversal |
| `tb_feedback_delay` | delay of exactly LEN enabled clocks, with enable gaps |
| `tb_r4_butterfly` | random and full-scale inputs against rotation by quarter turns |
| `tb_twiddle_rom` | exact points (1, -j, -1, +j, (45,-45)); all 64 entries within 1/2 LSB of 64 cos, -64 sin |
| `tb_complex_multiplier` | random operands and the four unit twiddles against the integer formula |
| `tb_booth_multiplier` | all 65536 pairs of the 8 x 8 unit, plus a 16 x 16 copy with 0x2AC9 x 0x2AC9, 0x2AC9 x 0x02C9 and random pairs |
| `tb_booth_pp_gen`, `tb_booth_encoder` | each Booth digit, and recoding of every 8-bit multiplier |
| `tb_ks_adder` | 2 + 3 = 5, carry across all 16 bits, carry-in, random, 8-bit copy |

## Changing the design

* **Other lengths.** Set `N` to any power of 4. The stage count, feedback
  lengths, twiddle table and output width all follow. N = 16 and N = 64
  are simulated end to end.
* **More twiddle precision.** Increase `TW`. The Booth multipliers then get a
  wider (even) multiplier operand, and the rounding shift follows `TW - 2`.
* **Scaling instead of growth.** Change `fft_pkg::stage_width` and truncate
  in `r4sdf_stage` where the butterfly result is stored. The testbench model
  then has to scale the same way.
