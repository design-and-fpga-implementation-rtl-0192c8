# Log-domain fuzzy controller with a servomotor plant, in SystemVerilog

A fuzzy controller with singleton consequents computes its output as a
weighted average:

    u = sum_i( fs_i * c_i ) / sum_i( fs_i )

Here `fs_i` is the firing strength of rule `i` and `c_i` is its consequent.
In hardware, the multiplications and the one division dominate the cost and
the delay. This design works on logarithms instead. Every membership value is
stored as `-ln(mu)`, so:

* the minimum of two memberships becomes the **maximum** of two stored values;
* `fs_i * c_i` becomes an addition, `ln|c_i| - A_i`, where `A_i = -ln(fs_i)`;
* a sum of terms is approximated by its largest term, `ln(sum x) ~ max ln x`;
* the division becomes a subtraction.

The whole defuzzifier therefore reduces to one subtraction per rule, a
maximum and a minimum search, an addition and one exponential lookup:

    D_i = ln|c_i| - A_i
    LO  = max_i D_i + min_i A_i          (= ln|num| - ln(den), approximately)
    u   = +-exp(LO)                      (sign of the rule that gave max D)

No multiplier or divider is left in the controller. The plant multiplies only
by constants.

The repository holds the controller and a closed test loop around it:

* a square-wave reference between 0 and 2.0;
* a second-order digital model of a DC servomotor, `1/(0.02 s^2 + s)` sampled
  at T = 0.01 s;
* the logic that turns the plant output into the controller's next error and
  rate of error.

The loop comes in two versions, built side by side in the top module
`ld_fuzzy_top`:

* **single-cycle** (`u_single`, ports ending `_s`): one sample per clock;
* **pipelined** (`u_pipe`, ports ending `_p`): four register stages, one
  controller output and one plant output per clock.

The published design built these two as separate FPGA designs, running at
67.6 and 248.7 million inferences per second respectively.

## Number formats

| Quantity | Format | Notes |
|---|---|---|
| error input | 10 bit unsigned, 2.8 | 0 .. 3.996 |
| rate input | 10 bit unsigned, 6.4 | magnitude of a *falling* error, 0 .. 63.94 |
| stored `-ln(mu)` | 16 bit unsigned, 4.12 | a membership of 0 is stored as `0xFFFF` |
| log of consequent magnitude | 16 bit signed, 4.12 | a zero consequent is stored as -8.0 |
| `D`, `A`, `LO` | 18 bit signed, 12 fraction bits | |
| exp-table address | 12 bit signed, 3.8 | -8 .. +7.996 |
| controller output `u` | 20 bit signed, 12 fraction bits | |
| plant output, reference, error | 24 bit signed, 16 fraction bits | |
| plant coefficients | 20 bit signed, 16 fraction bits | |

All widths and types are in `rtl/ld_pkg.sv`.

## The controller datapath

`ld_controller` chains these parts:

1. **Fuzzifier** (`ld_fuzzifier`). There are two tables of 1024 rows, one per
   input. A row holds `-ln(mu)` for the five triangular sets NB, NM, ZR, PM
   and PB.
   * The triangles are centred at -2W, -W, 0, W and 2W. NB and PB saturate
     at 1 outside them.
   * W = 1 for the error and W = 50 for the rate.
   * Rate-table row `r` holds the memberships of `-r`. The loop only ever
     presents a falling error, so only the magnitude is stored.
   * The tables are constants computed at elaboration with `$ln`. They are
     not data files.
2. **Inference and rule base** (`ld_inference`). For each of the 25
   (error set, rate set) pairs, `A = max(le, lr)`. The rule table and the
   constants `ln 50`, `ln 100` and `ln 150` come from `ld_pkg`.
   * The 5x5 rule base is the usual diagonal table: the output is ZR on the
     anti-diagonal and grows by one step per set away from it.
   * The output singletons are 0, ±50, ±100 and ±150.
3. **SUB1 and the two comparators** (`ld_defuzz_select`, which uses
   `ld_top2` twice). It forms all `D_i` and finds:
   * the two largest `D`;
   * the two smallest `A`;
   * the sign of the rule that gave the largest `D` (lowest index on a tie).
4. **Correction** (`ld_correction`).
   * By default `LO = D1 + A1`. This plain form is the one built in
     hardware.
   * With `USE_CORRECTION = 1` it also uses the runners-up:
     `LO = (D1 + exp(D2 - D1)) - (exp(A1 - A2) - A1)`. Two more exponential
     tables (`ld_exp_rom` with `NEGATE = 1`) provide the `exp` terms.
5. **Output stage** (`ld_output_stage`). `LO` is cut to 3.8 and looked up in
   a 4096-row exponential table (`ld_exp_rom`). The stage then applies the
   sign.
   * `LO` below -8 gives 0.
   * `LO` above +7.996 saturates.

**Sign and the falling half of the square wave.** The tables only cover a
non-negative error with a falling rate. When the error is negative,
`ld_next_input` folds it:

* it negates error and rate and raises `mirror`;
* the controller negates its output.

This is exact because the rule base is odd-symmetric. A folded rate that is
positive (the error is growing) is clamped to zero, and `clamp` is raised.

## The plant and the next input

`ld_plant` implements `y(k) = a0 x(k) + a1 x(k-1) + a2 x(k-2) - b1 y(k-1) - b2 y(k-2)`
with a0 = 0.0033, a1 = a2 = 0, b1 = -1.667 and b2 = 0.667.

* The plant has a pole at z = 1 (an integrator). `B2` is therefore derived
  from `B1` so that `1 + b1 + b2` is exactly zero after quantisation. With
  independently rounded coefficients the output drifts.
* The terms that depend on history (the "adding factor") are recomputed each
  clock from the stored samples.

`ld_next_input` forms:

* `error = step - y`;
* `rate = (previous error - error) * 100`, that is, `1/T`;
* the fold, clamp and saturation described above.

`ld_step_gen` toggles the reference between 2.0 and 0 every `HALF_PERIOD`
enabled clocks. The default is 64.

## The pipelined loop: four interleaved loops

This is the part that departs most from a plain reading of the original
description, so it gets the most space here.

The pipelined controller has registers:

* after the inference maxima (stage 1);
* after the comparators (stage 2);
* after the exponential table and sign (stage 3).

The plant register is stage 4. A plant output therefore appears four clocks
after the error/rate pair that caused it, yet the loop takes a new pair every
clock.

If each new pair were formed from the newest plant output as one loop, every
controller decision would act on a plant output four samples old. With this
servomotor that loop does not converge: a model of it overshoots to about
4.6. So `ld_system` with `PIPELINED = 1` runs **four independent copies of
the loop interleaved in time** (C-slow operation):

* **Plant.** `ld_plant` with `INTERLEAVE = 4` keeps a separate history for
  each copy. One sample back for a copy is four stored samples back in the
  shift register.
* **Error history.** It is four deep. The rate of a copy is formed from that
  copy's own previous error.
* **Input pairs.** The pair formed in clock `n` belongs to copy `n mod 4`.
  Its plant output is visible after the edge that ends clock `n + 3`, which
  is exactly when that copy next needs it.
* **Start-up.** The first plant output appears in the fifth clock. During
  the first four clocks the pairs are computed from the zero initial plant
  output (error 2.0, rate 0), and the plant waits for the first valid
  controller output (3 clocks with `sample_p_o` low).

The four copies see the same reference, so after a reset they follow the same
trajectory and the plant output moves in groups of four. Per clock, the
pipelined loop reaches 1.8 after 28 clocks and stays within 2.5 % of 2.0
from clock 40, with no overshoot. The original reports 27 and 46 clocks for
its pipelined loop. It also reports an initial oscillation, which this
interleaved form does not show.

`en_i` low stalls a whole loop: the step source, the error history, the
controller pipeline and the plant all hold. A stalled pipelined loop therefore
resumes with its four copies still aligned.

## Single-cycle timing

With `PIPELINED = 0`, the controller is purely combinational between the
plant registers. Each enabled clock:

* stores one new plant sample;
* forms the next error and rate from it.

From reset, the single-cycle loop reaches 1.8 after 7 samples and stays at or
above 1.95 from sample 10. It never exceeds 2.0 by more than 0.0002. The
original reports 8 and 11 samples and zero overshoot.

## With the correction factor

With `USE_CORRECTION = 1`, the single-cycle loop tracks a real-arithmetic
model of the corrected formula to within 0.03. Over the first rising half,
the 10 %–90 % rise takes:

* 6 samples without correction, settling in 10 samples;
* 8 samples with correction, settling in 13 samples, with a 0.24 %
  overshoot.

The original's continuous-time simulation found the two versions almost
identical. In this fixed-point, discrete-plant loop the plain form is the
faster one. This supports keeping the plain form as the default, since it
also needs two fewer tables and four fewer adders.

## What is this design's own and what is not

Followed from the original description:

* log-domain algorithm and correction formula;
* 10-bit inputs and their 2.8 / 6.4 formats;
* 16-bit 4.12 log tables of 1024 rows;
* 4096-row exponential table addressed in 3.8;
* 5x5 rule base with W = 1 and W = 50;
* output sign taken from the winning rule;
* plant coefficients and difference equation;
* next-input formulas;
* register placement of the three controller stages.

Choices made here:

* the output format of the exponential table (7.12);
* the width of D and LO and the storage of a zero membership or zero
  consequent;
* triangle corner shapes beyond the given W;
* the sizes of the two correction tables;
* folding negative errors with a mirror flag;
* clamping a rising rate to zero;
* the square-wave period;
* the enable/stall;
* the four-copy interleaving of the pipelined loop;
* the plant's coefficient quantisation;
* zero reset values.

Not built:

* the 7x7 controller and the three `400/(s^2 + sigma s)` plants, which the
  original only simulates in software;
* the oscilloscope/DAC output path;
* anything specific to the FPGA board.

Clock rates (67.6 and 248.7 MHz in the original) depend on the device and
are not claimed here. Generic synthesis gives:

* 79 flip-flop bits for the single-cycle loop, against 84 registers
  reported for the original;
* 756 flip-flop bits for the pipelined loop, against 642.

The interleaved plant and error history account for most of the
difference.

## Files

| File | Contents |
|---|---|
| `rtl/ld_pkg.sv` | widths, types, rule table, plant coefficients |
| `rtl/ld_fuzzy_top.sv` | both loops side by side |
| `rtl/ld_system.sv` | one closed loop, single-cycle or pipelined |
| `rtl/ld_controller.sv` | fuzzifier → inference → defuzzifier, optional pipeline |
| `rtl/ld_fuzzifier.sv`, `ld_inference.sv`, `ld_defuzz_select.sv`, `ld_top2.sv`, `ld_correction.sv`, `ld_output_stage.sv`, `ld_exp_rom.sv` | controller parts |
| `rtl/ld_plant.sv`, `ld_next_input.sv`, `ld_step_gen.sv` | loop parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ld_ref_pkg.sv` | real-arithmetic reference controller (plain and corrected) shared by the loop testbenches |
| `tb/tb_ld_loop_correction.sv` | step response with and without the correction factor |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
testbenches compare against models written in real arithmetic, not against
copies of the RTL.

To run the end-to-end test at the default sizes, with Verilator 5:

    verilator --binary --timing rtl/ld_pkg.sv tb/tb_ld_ref_pkg.sv \
        $(ls rtl/ld_*.sv | grep -v ld_pkg) tb/tb_ld_fuzzy_top.sv --top tb_ld_fuzzy_top
    ./obj_dir/Vtb_ld_fuzzy_top

What `tb_ld_fuzzy_top` does:

* It runs both loops for two full square-wave periods (256 clocks) with a
  7-clock stall.
* It compares every plant output with the reference model.
* It counts step changes, pipeline fill, mirrored (falling-half) samples,
  rate clamps, braking outputs (negative `u` while the error is positive)
  and stall clocks. It fails if any of them never happens.
* It checks rise and settling times against bounds around the published
  figures.

To test a single module, replace the testbench file and `--top` (for
example `tb/tb_ld_controller.sv`).

To change the design:

* Membership widths are parameters of `ld_fuzzifier`.
* The plant coefficients are parameters of `ld_plant`. They are not exposed
  at `ld_system`; edit the package constants `A0_Q` .. `B2_Q`.
* The correction factor is the `USE_CORRECTION` parameter of the top.
