# Two-stage polyphase decimation filter for a 1 GS/s delta-sigma ADC

A fourth-order delta-sigma modulator sampling at 1 GS/s with an oversampling ratio of 25
produces a 4-bit stream whose quantization noise has been pushed out of the 20 MHz signal
band. To turn it into a 40 MS/s, high-resolution signal, the stream has to be low-pass
filtered and its rate cut by 25. At 1 GHz even a 14-bit accumulator is too slow for a
0.18 µm standard-cell process, so the usual cascaded integrator-comb (CIC) sinc filter is
not an option.

This design does no arithmetic at all at 1 GHz. The decimation is split into two stages of
5. Each stage is written in **polyphase form**: the input is first cut into blocks of five
consecutive samples, and five sub-filters, one per sample position, each compute their part
of one output per block. Stage 1 therefore runs at 200 MHz and stage 2 at 40 MHz. Only a
5-bit ring counter and five 4-bit capture registers ever see the 1 GHz clock.

```
 din 4b        decimator 1        sinc_filter        decimator 2         fir_filter
 1 GS/s ──► 5 slots + block reg ──► H1(z), 17 taps ──► 5 slots + block ──► Hf(z), 64 taps ──► dout 28b
              ▲ ring counter 1      200 MS/s, 14 b       ▲ ring counter 2   40 MS/s
              ▲ reset sync 1                             ▲ reset sync 2
```

## The overall response and the factor that moves

The target first stage is a fourth-order 10-tap sinc,
`Hs(z) = ((1 - z^-10) / (1 - z^-1))^4`. It has 2.4 dB of droop at 20 MHz and at least
76.8 dB of alias rejection. Factoring `1 - z^-10 = (1 - z^-5)(1 + z^-5)` splits it into

```
Hs(z) = (1 + z^-1 + z^-2 + z^-3 + z^-4)^4 · (1 + z^-5)^4 = H1(z) · (1 + z^-5)^4
```

A filter `G(z^5)` in front of a decimate-by-5 is the same as `G(z)` after it. So
`(1 + z^-5)^4` moves past the first decimator and becomes `(1 + z^-1)^4` at 200 MS/s. There
it is multiplied into the second-stage low-pass filter. Stage 1 is left with the 17-tap
`H1(z)` (a 5-tap fourth-order sinc), with taps

```
h1 = 1 4 10 20 35 52 68 80 85 80 68 52 35 20 10 4 1      (sum 625)
```

Stage 2 is the 64-tap `Hf(z) = Hpc(z)·(1 + z^-1)^4`. Here `Hpc` is a 60th-order
equiripple low-pass at 200 MS/s: pass band to 18.25 MHz with under 1 dB ripple, stop band
from 24 MHz at 50 dB. The taps of `Hf` are scaled so that the largest is ±1024 and then
rounded to integers. `Hf` is symmetric, `hf(n) = hf(63-n)`, and its first half is

```
  1   6  13  18  17   8  -9 -31  -52  -64  -61  -40   -7   28   51    52
 26 -20 -69 -100 -94 -46  36 124  180  168   64 -132 -392 -666 -894 -1024
```

The whole filter, seen from the 1 GS/s input, is therefore
`htot = h1 ⊛ (hf upsampled by 5)`, which has 17 + 5·63 = 332 taps, followed by keeping one
sample in 25. The end-to-end testbenches check the RTL against exactly this convolution.

## Polyphase bookkeeping

In both stages a block `k` holds five consecutive samples `x(5k) … x(5k+4)`, where
`x(5k+4)` is the newest. Each output is aligned to the newest sample of its block,
`y(k) = Σ h(n) x(5k+4-n)`. Tap `n = 5d + i` then belongs to sub-filter `i`, which sees the
sample stream `x(5k+4-i)` delayed by `d` blocks.

For `H1` the five sub-filters are

| sub-filter | taps | input |
|---|---|---|
| E0 | 1, 52, 68, 4 | x(5k+4) |
| E1 | 4, 68, 52, 1 (mirror of E0) | x(5k+3) |
| E2 | 10, 80, 35 | x(5k+2) |
| E3 | 20, 85, 20 (symmetric) | x(5k+1) |
| E4 | 35, 80, 10 (mirror of E2) | x(5k) |

The sub-filters themselves are not symmetric, but they are mirror images of each other in
pairs. Two samples that meet the same coefficient can therefore be added before they are
multiplied. For `Hf`, G0/G3 and G1/G2 are mirror pairs of 13 taps and G4 (12 taps) is
symmetric on its own. Each of the 32 distinct coefficients `hf(k)` thus multiplies exactly
one pre-added pair: the samples at taps `k` and `63-k`.

## Stage 1: `sinc_filter`

- **Delay lines.** There are three block delays for the E0/E1 inputs and two for each of
  the others. They shift on the block edge.
- **Pre-addition.** Eight 4-bit carry-lookahead adders (`cla4`) form the nine multiplicands
  `y0 … y8`:

  | y0 | y1 | y2 | y3 | y4 | y5 | y6 | y7 | y8 |
  |---|---|---|---|---|---|---|---|---|
  | ×4 | ×52 | ×68 | ×1 | ×35 | ×80 | ×10 | ×20 | ×85 |

  `y8` is a single sample, because E3's centre tap has no partner.
- **Partial products.** Multiplying by a constant means adding shifted copies, one per `1`
  bit. This gives 20 partial products. Six pairs do not overlap (for example `16·y8` and
  `y8`), so each pair is simply one row with the two fields side by side. That leaves 14
  rows. Rows with the same number of trailing zeros are listed next to each other, so the
  full adders that would only see those zeros are removed by synthesis.
- **Wallace tree.** `wallace_tree` reduces the 14 rows to a sum vector and a carry vector.
  It uses six levels of 3:2 full-adder rows, and each level costs one full-adder delay
  whatever the width.
- **Vector merging adder.** A 14-bit Kogge-Stone parallel-prefix adder
  (`kogge_stone_adder`) adds the two vectors. It has four levels of `(G,P)·(G',P')` dot
  operators.
- **Output.** The result is registered on the block edge. It is 14 bits, unsigned, with
  gain 625: full scale 15·625 = 9375. The 1/10⁴ normalisation is not applied.

## Stage 2: `fir_filter`

- **Delay lines.** Each branch has a 12-block delay line of 14-bit samples.
- **Pre-addition.** 32 `ripple_carry_adder`s of 14 bits form the 15-bit multiplicands. At
  40 MHz a ripple carry adder is fast enough.
- **Positive and negative trees.** Every multiplicand is expanded into one row per `1` bit
  of `|hf|`. This gives 39 rows for positive coefficients and 57 rows for negative ones.
  Each group is reduced by its own Wallace tree, treating every row as an unsigned number.
- **The coefficient 180.** It has four `1` bits, but `180a = 4·9·(4a + a)`. Two ripple
  carry adders form `5a` and then `45a = 8·5a + 5a`, and `45a·4` goes into the positive
  tree as one row. That leaves 36 positive rows.
- **Subtraction.** `pos − neg = pos_s + pos_c + ~neg_s + ~neg_c + 2`. The two inverted
  vectors of the negative tree, the two positive vectors and a constant `1` row pass
  through a small 5-row carry-save stage. A 28-bit Kogge-Stone adder with carry-in 1 then
  supplies the other `+1`.
- **Output.** The result is registered on the block edge. It is 28 bits, two's complement,
  at full precision: `|out| ≤ 9375 · Σ|hf| = 84,243,750 < 2^27`. The DC gain is
  625 · (−5818), so a constant full-scale input gives −54,543,750. The overall gain is
  negative because of how the coefficients were scaled. Scale and round the output
  downstream as the application needs.

## Decimators, ring counters and reset

`polyphase_decimator` is the low-power serial-to-parallel converter. Each input sample is
written once, into one of five slot registers chosen by the ring-counter phase. On the first
phase of the next block, a bank of five block registers takes all five slots together and
holds them for the whole block period. Every register therefore toggles at the block rate.
A shift-register decimator would instead clock four registers at the full rate, for about
2.5× the clock power.

`ring_counter` divides by 5. A single `1` circulates in a 5-bit ring, so the feedback path
has no logic between flip-flops, which is what lets it run at 1 GHz. A binary mod-5 counter
needs about three gate delays of feedback. An assertion checks that the ring stays one-hot.

`reset_sync` asserts reset asynchronously and releases it through two flip-flops. One
synchronizer serves the 1 GHz ring counter and the stage-1 datapath. The other is advanced
at 200 MHz and serves stage 2.

**Clocking.** The whole design runs on one master clock `clk`. The 200 MHz and 40 MHz clocks,
and the five phase-shifted clocks of each decimator, are implemented as clock enables taken
from the ring counters:

- `ce5` is ring 1 in phase 0, once every 5 clocks.
- `ce25` is `ce5` with ring 2 in phase 0, once every 25 clocks.

Enables keep the RTL in a single clock domain and make it easy to simulate. For the low-power
intent, a physical implementation would turn the enables back into gated clocks.

## Interface and timing (`decimation_filter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock, one modulator sample per cycle (1 GHz in the target) |
| `arst_n` | in | 1 | asynchronous reset, active low. Assert it with a falling edge: power-up or between clock edges |
| `din` | in | 4 | modulator output, offset binary 0…15 |
| `sinc_out` | out | 14 | stage-1 output, one new value every 5 clocks |
| `sinc_valid` | out | 1 | high for the one cycle after `sinc_out` changes |
| `dout` | out | 28 signed | filter output, one new value every 25 clocks |
| `dout_valid` | out | 1 | high for the one cycle after `dout` changes |

Timing, counted from the release of `arst_n`:

- The third rising edge takes the first sample, `x(0)`.
- The output whose newest input was taken at edge `n` is on `dout` after edge `n + 41`.
- The sinc output is on `sinc_out` after edge `n + 6`.
- Outputs come at newest-input positions 9, 34, 59, … counted from `x(0)`.
- After a reset both stages restart from an all-zero history.

The shared constants (widths, taps, `M = 5`) are in `rtl/decim_pkg.sv`.

## Verification

Every block has a self-checking testbench in `tb/` that ends with a `TB_RESULT` line.

| testbench | what it checks |
|---|---|
| `tb_cla4`, `tb_ripple_carry_adder`, `tb_kogge_stone_adder`, `tb_wallace_tree` | arithmetic against integer sums. Exhaustive for `cla4`, random plus corner cases for the others, at the widths used |
| `tb_reset_sync` | asynchronous assertion; release after exactly two enabled edges |
| `tb_ring_counter` | reset state, rotation, hold without enable, period 5 |
| `tb_polyphase_decimator` | block contents and order, one block per 5 samples, at the full rate and at 1/5 rate |
| `tb_sinc_filter` | every output against a 17-tap convolution, plus impulse and full scale |
| `tb_fir_filter` | every output against a 64-tap convolution, plus impulse, full scale and both output signs |
| `tb_decimation_filter` | the whole design at full size against the 332-tap response. Covers latency 41 and 6, output spacing 25 and 5, a mid-stream reset, full-scale input and outputs of both signs |
| `tb_workload_tone` | the evaluation case described below |

**The evaluation case.** `tb/dsm_model.sv` is a behavioural modulator with the modulator's
noise transfer function:

```
NTF(z) = (1 + 1.352z^-1)(1 - 1.998z^-1 + z^-2)(1 - 1.988z^-1 + z^-2)
         / ((1 - 1.204z^-1 + 0.3771z^-2)(1 - 1.43z^-1 + 0.6585z^-2))
```

It is realised in error-feedback form with a 16-level quantizer. It drives a 17.5 MHz tone,
bin 1367 of a 5^7-sample record, through the filter. The last 3125 outputs are Hann-windowed
and transformed, and the SNR is reported; the test requires the tone at bin 1367 and more
than 80 dB. The measured SNR is 89.9 dB, and every output is bit-exact with the reference.
The real continuous-time modulator, driven close to its maximum stable amplitude, reaches
93 dB with this filter. The stand-in model is run at 7/15 of full scale to stay stable,
which accounts for the gap.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/decim_pkg.sv tb/tb_decimation_filter.sv --top-module tb_decimation_filter
./obj_dir/Vtb_decimation_filter
```

Every testbench runs in well under a second.

## Where this RTL departs from, or goes beyond, the original circuit

- **Clock enables.** Clock enables replace the divided and phase-shifted clocks (see
  Clocking).
- **Sub-filter inputs.** The assignment of samples to sub-filters follows from aligning each
  output to the newest sample. One input pairing given for G1/G2 in the original description (`y(5k+2)` and
  `y(5k+1)`) clashes with G3's input. This design uses `y(5k+3)` and `y(5k+2)`, which is
  the only consistent choice.
- **Coefficient signs.** Two coefficient signs given in one summary table of the original (`h1`, `h22`)
  disagree with the coefficient table and the partial-product tables. The latter are used.
- **Wallace tree.** The exact grouping of the original sinc Wallace tree is not reproduced.
  This tree groups rows in order and has the same number of levels (six).
- **FIR subtraction.** The two's-complement subtraction adds 2, not 1. Inverting both
  vectors of the negative tree needs `+2`; a single carry-in would leave the result off by
  one.
- **Widths and registers.** The output width (28 bits, no rounding), the output registers,
  the valid strobes, the reset of the data registers and the reset-synchronizer depth are
  this design's choices.
- **Not included.** The alternatives considered for lower droop are not included: a 5-tap
  sinc with a 74th-order FIR, or a 7th-order inverse-sinc equalizer after the FIR. Also
  left out is a CIC sinc built from carry-save accumulators in current-mode logic. The
  modulator itself is analog and appears only as the behavioural stimulus model.
- **Timing.** Timing closure at 1 GHz / 200 MHz / 40 MHz depends on the cell library and is
  not established by this RTL.
