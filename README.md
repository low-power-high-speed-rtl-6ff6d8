# PRML read-channel DSP: a four-way time-interleaved adaptive equalizer with difference-metric Viterbi decoding

A magnetic-disk read channel that uses Class IV partial response (PR-IV,
channel polynomial 1 - D^2) has to equalize the read-back samples and then run a
maximum-likelihood sequence detector on them. The target here is 100 Mb/s. At
that rate a single 6x6 multiplier per tap, and an 8-input sum, are hard to
build cheaply in power. This design does not pipeline the multipliers. It
splits the equalizer into **four identical FIR channels, each running at a
quarter of the symbol rate** and each equalizing every fourth sample. It also
splits the detector into **two 1-D Viterbi decoders at half the symbol rate**.
This works because 1 - D^2 couples only samples two apart, so the even and odd
samples form two independent 1 - D channels. The decoders use the
*difference-metric* form of the two-state Viterbi algorithm. It stores one
past input and one state bit instead of two growing path metrics.

The architecture, word widths, adder tree, carry-select stagings, sample and
coefficient bussing, decision rules and survivor depth follow a published
low-power CMOS read-channel prototype from 1993. Where that source leaves a
detail open (binary points, the exact update rule, reset, clocking style), this
RTL makes its own choice and says so. The choices are listed in
[Departures and choices](#departures-and-choices).

## Signal path

```
            +--------------------- parallel_equalizer ----------------------+
 x_in  ---> | delay_line --> ch1 (ph0) --> z[0] --+--> slicer --> coef_update |
 6 bit      |   |             |  x,c chain        |                   |      |
 1/clk      |   +- x_in ----> ch2 (ph1) --> z[1]  |    coef --> ch1 --+      |
            |   +- x_in ----> ch3 (ph2) --> z[2]  |    (ch1 -> ch2 -> ch3 -> ch4)
            |   +- x_in ----> ch4 (ph3) --> z[3]  |                          |
            +-------------------------------------+--------------------------+
   z[0], z[2] --> dm_viterbi A (even samples) --+
                                                +--> data_out (1 bit per clock)
   z[1], z[3] --> dm_viterbi B (odd samples)  --+
```

`prml_dsp` is the top. `clock_gen` makes the four phase enables `ph[3:0]`.

## Four channels on one clock

The original design clocks its four channels with four 25 MHz clocks, each
offset by one symbol period T from the previous one. All latches are
positive-edge triggered. This RTL uses one symbol-rate master clock `clk` and
four one-hot enables: `ph[i]` is high in the cycle that ends in channel i+1's
edge. `ph[0]` is high in the first cycle after reset, and each enable repeats
every four cycles.

A channel (`fir_filter`) does two things at each of its enabled edges:

1. **Input and coefficient latches.** It takes eight samples and eight
   coefficients.
2. **Product latches.** It takes the eight products of the values latched at
   the previous enabled edge. The multipliers therefore have a whole 4T
   period.

The carry-select adder tree then sums the products combinationally. The
output `z[i]` changes at channel i's edge and then holds for 4T. It is the
equalized value of the sample that arrived at the previous enabled edge.

**Sample bussing.** There is no broadcast of a 100 MS/s delay line to all
channels:

* Channel 1 takes its eight taps from the symbol-rate `delay_line`. Tap 0 is
  the current input; tap j is the input from j clocks ago.
* Channel k+1 takes tap 0 directly from the input. It takes tap j from tap
  j-1 of channel k's *input latches*.

Channel k latched x[n]..x[n-7] one clock earlier. One clock later, channel
k+1 needs x[n+1]..x[n-6], which is the fresh input plus channel k's first
seven latches. So the wiring runs only between neighbouring channels.

**Coefficient bussing.** Works the same way. The update circuit drives only
channel 1's coefficient latches. Each later channel copies the previous
channel's latches at its own edge, one T later. All four channels of one
quarter-rate window therefore use the same coefficient set. The update
circuit's outputs need to be valid only until channel 1 has taken them.

## Equalizer arithmetic

| quantity | width | format |
|---|---|---|
| input sample, equalizer output `z`, Viterbi input | 6 bits | two's complement; one PR level = 24 steps (levels -24, 0, +24) |
| coefficient | 6 bits | two's complement; 16 = 1.0 (range -2 .. +1.94) |
| tap product | 10 bits | full 12-bit product >>> 2 |
| channel sum `acc` | 13 bits | exact sum of eight products |

* **Multiplier (`csm_mult`, tiled from `full_adder`).** A Baugh-Wooley
  two's-complement array. The partial-product bits that combine one sign bit
  with one magnitude bit are inverted. Adding the constants 2^6 and 2^11 then
  makes the array's unsigned sum equal the signed product. The rows are
  reduced in carry-save form, one row of full adders per multiplier bit. A
  final ripple row merges the result. The top 10 of the 12 product bits are
  kept. This loses no range, because even (-32)x(-32) >>> 2 = 256 fits.
* **Accumulator (`csel_accumulator`).** A binary tree of seven carry-select
  adders (`csel_adder`):
  * four 10-bit adders, staged 2-3-5;
  * two 11-bit adders, staged 2-3-6;
  * one 12-bit adder, staged 2-4-6.

  Each adder's result is one bit wider than its inputs, so the tree cannot
  overflow. Each upper stage of an adder computes its sum for carry-in 0 and
  for carry-in 1, and the carry from below selects one. The extra top bit
  needs a sign correction. If the two input sign bits differ, the top bit
  copies the adder's own top sum bit. Otherwise it is the carry out.
* **Output scaling.** `z = saturate(acc >>> 2)` to 6 bits. With 16 = 1.0, a
  single main tap of 16 passes a sample through unchanged.

## Coefficient adaptation

Only channel 1's output is sliced and used to adapt the coefficients, so the
coefficients change once every four symbols. A disk channel varies slowly, so
this is acceptable. It costs some convergence speed and some residual error.

* **`slicer`.** Decides -24, 0 or +24, with thresholds at +/-12. The error is
  `e = decision - z`.
* **`coef_update`.** Keeps each coefficient in a 10-bit register: the 6-bit
  bus word plus 4 fraction bits. This is a sign-sign stochastic-gradient
  rule. When training, each register moves one step toward
  sign(e) * sign(x_j):
  * up by `step_up` fraction LSBs;
  * down by `step_dn` fraction LSBs.

  Each register saturates at its range limits. Nothing changes when e = 0.
* **Sample signs.** They are captured one quarter-rate cycle before they are
  used. They belong to the samples whose products produced the current error.
* **Loop timing.** The new coefficients are combinational. Channel 1 and the
  internal registers take them at the same edge, so the loop through
  multiply, accumulate and update is 8T.
* **Loading.** With `train` low, the registers load from the switch inputs
  `coef_sw`:
  * The main tap (`MAIN_TAP`, default 3) is forced positive, keeping only 5
    switch bits.
  * Its two neighbours are forced negative.
  * The other taps take all 6 switch bits.

  Raising `train` starts adaptation from the loaded values.

## Difference-metric Viterbi decoder

For a 1 - D channel with bits x in {0,1} and samples z = x[k] - x[k-1] +
noise, the two path metrics L+ (path ends in state 1) and L- (path ends in
state 0) matter only through their difference. After a *merge* (both
surviving paths pass through one state at the previous node), that difference
is fixed by the sample that caused the merge. So the decoder stores:

* `beta`: the state of the most recent merge;
* `z_p`: the input that caused it.

For each new input z, `dm_decision` forms d = (z_p - z)/2 with a 6-bit
subtractor (the 7-bit difference with its LSB dropped). One PR level is 24,
so half a level difference corresponds to 12 in d. The decision table is:

| beta | merge at state 1 | no merge | merge at state 0 |
|---|---|---|---|
| 1 | d >= 0 | -12 <= d < 0 | d < -12 |
| 0 | d >= 12 | 0 <= d < 12 | d < 0 |

* **Any merge** (`change_input`) replaces z_p with z.
* **A merge at the other state** (`change_beta`) flips beta. The merge state
  is `beta xor change_beta`.

**Survivor rows (`survivor_rows`).** Two 10-bit shift registers hold the bit
sequences ending in state 0 and in state 1. Each step shifts a 0 into row 0
and a 1 into row 1. On a merge, both rows first take the merge state's row as
their history. The decoded bit is the oldest bit of row 1.

**Ties and run length.** This table is slightly asymmetric at its boundaries.
After a 1 -> 0 transition, a run of zero samples sits exactly on the beta = 1
boundary (d = -12) and produces no merges. Row 1 then holds an unresolved
alternative until the next transition. A run of equal bits within one
interleave must therefore be shorter than the survivor depth, or the output
is wrong. That is 10 steps, so with margin about 7 bits. In a real drive the
run-length-limited modulation code enforces this. The testbenches generate
data with that limit. Apart from this, the decoder is exactly a two-state
Viterbi decoder that breaks metric ties toward state 1. `dm_viterbi_tb`
checks it step by step against such a reference on noisy input.

## Interleaving and latency

* **Decoder A** steps on the edges that end `ph[1]` and `ph[3]`, taking
  `z[0]` and `z[2]` (channels 1 and 3, the even samples).
* **Decoder B** steps on the edges that end `ph[2]` and `ph[0]`, taking
  `z[1]` and `z[3]` (channels 2 and 4).

Each decoder first catches z in an input latch and uses it at its next step.
`data_out` shows, in every cycle, the bit from whichever decoder stepped at
the last edge. The result is one bit per clock, in order.

With the default `MAIN_TAP = 3`, bit a[k] leaves `data_out` **29 clocks**
after the PR-IV sample x[k] containing it entered `x_in`:

* 3 for the main-tap position;
* about 6 through the channel latches;
* 2 x 10 for the decoder's input latch and ten-step survivor rows, at 2
  clocks per step.

`prml_dsp_tb` measures this figure and checks it.

## Top-level ports (`prml_dsp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | symbol-rate clock; synchronous active-low reset |
| `x_in` | in | 6 | one input sample per clock |
| `train` | in | 1 | 1: adapt; 0: load coefficients from `coef_sw` |
| `step_up`, `step_dn` | in | 4 | update step sizes (fraction LSBs) for increases / decreases |
| `coef_sw` | in | 8 x 6 | coefficient switches |
| `z`, `acc` | out | 4 x 6, 4 x 13 | the four channel outputs and sums |
| `coef` | out | 8 x 6 | channel-1 coefficient latches |
| `dec`, `err` | out | 6, 7 | slicer decision and error |
| `vit_bit`, `vit_merge`, `vit_state`, `vit_mstate` | out | 2 each | per decoder: output bit, merge flag, beta, merge state |
| `data_out` | out | 1 | merged decoded bit stream |
| `ph` | out | 4 | phase enables |

Parameters:

* `FRAC`: coefficient fraction bits, default 4.
* `MAIN_TAP`: default 3.
* `STEP_W`: step-size width, default 4.
* `DEPTH`: survivor depth, default 10.

The shared widths are in `prml_pkg`.

## Departures and choices

These follow the source design's structure but fill in, or replace, details
it does not give:

* **Clocking.** Four phase enables on one clock replace four offset clocks.
  The sampling instants are the same.
* **Input.** The prototype was fed two interleaved 50 MS/s streams. Here the
  input is one 6-bit sample per symbol clock.
* **Formats.** These are this design's choices:
  * the coefficient binary point (16 = 1.0);
  * the choice of the top 10 product bits;
  * the `acc >>> 2` output scaling;
  * the slicer thresholds (+/-12).
* **Update rule.** Sign-sign form with 4 fraction bits and saturation. The
  two step-size inputs are read as the up and down step sizes. The source
  names the stochastic-gradient algorithm and two step-size settings but not
  the arithmetic.
* **Main tap.** Taken as tap 3 of 0..7. The source only calls it the middle
  coefficient.
* **Decision table.** Where the closed-form merge condition (merge at state 0
  when z_p - z <= -1) and the published 6-bit truth table disagree at the
  boundary, the truth table is followed. The run-length remark above follows
  from this.
* **Survivor exchange.** The copy direction between survivor rows is taken
  from the trellis: the merge state's row is copied. The source's signal name
  for it uses the opposite state labelling.
* **Reset.** All registers clear to zero on reset. The source does not
  describe reset.
* **Circuit-level detail.** The carry-select adder's transistor-level bit-slice
  cells are modelled behaviourally, one add per stage and carry value. So are
  the full-adder transistor sizes.

Not part of this RTL:

* **Timing recovery.** The source does not include it either. Samples are
  assumed to arrive correctly timed.
* **The A/D converter.** It is outside the DSP.
* **On-chip coefficient ROM/RAM.** The prototype used switches instead, and
  so does this design (`coef_sw`).
* **Power.** The measured power and voltage behaviour cannot be reproduced by
  RTL.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `full_adder_tb`, `csm_mult_tb`, `dm_decision_tb`, `slicer_tb` | exhaustive |
| `csel_adder_tb` | exhaustive at 10 bits; random and corner operands at 11 and 12 bits |
| `csel_accumulator_tb`, `fir_filter_tb`, `coef_update_tb`, `survivor_rows_tb` | random stimulus against integer reference models |
| `parallel_equalizer_tb` | all four channels against a plain symbol-rate FIR, with fixed and then adapting coefficients; requires the slicer error to fall during training |
| `dm_viterbi_tb` | noiseless data decoded exactly with a 10-step latency; noisy data matched step by step against a metric-based Viterbi reference |
| `prml_dsp_tb` | end to end at default parameters (see below) |

`prml_dsp_tb` writes run-length-limited random bits through a PR-IV channel
with inter-symbol interference (x = 18(a[k]-a[k-2]) + 8(a[k-1]-a[k-3]) +
noise). It loads the coefficients, then trains. After convergence it requires
every output bit to match, at the 29-clock latency. It also counts each
mechanism and fails if one never occurs:

* coefficient load, and the switch to training;
* coefficient increases and decreases;
* all three slicer decisions;
* output saturation;
* merges at each state, and no-merge steps, in both decoders.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/prml_pkg.sv tb/prml_dsp_tb.sv --top-module prml_dsp_tb -o sim
./obj_dir/sim
```

Replace `prml_dsp_tb` with any other testbench name. Building the end-to-end
testbench takes a few seconds; it then simulates 20,000 clocks in well under
a second.
