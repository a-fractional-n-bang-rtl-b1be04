# Fast-locking fractional-N bang-bang PLL: digital core

A bang-bang PLL (BBPLL) gets its very low jitter from a narrow-bandwidth loop driven by
a 1-bit phase detector. Because the loop is slow and the detector carries no magnitude,
a channel switch of hundreds of MHz normally takes tens of microseconds. Auxiliary
dead-zone detectors speed up acquisition, but they make the loop fall into limit cycles.
This core attacks that problem in three ways:

* **Type-II gear shift.** While an auxiliary detector fires, the main loop-filter gains
  are boosted, and so is the integral-to-proportional ratio R = alpha/beta. The gains are
  then halved step by step back to their low-jitter values. Each step is triggered by a
  lock detector that watches the running average of the main detector output.
* **Adaptive frequency switching (AFS).** Before a jump, the core measures how many
  Hz one coarse capacitor of the DCO is worth at the current frequency. It uses the DTC
  and the main detector that are already in the loop. It then pre-sets the coarse bank
  by round(dFCW / M), so the PLL starts close to the new channel.
* **Two nested auxiliary loops.** A fine loop has a 200 ps dead zone and about
  6 MHz/step. A coarse loop has a 400 ps dead zone and about 40 MHz/step. Each loop has
  an integral path into its own capacitor bank and a feed-forward path into the
  frequency control word (FCW).

The target is an 8.5–10 GHz DCO with a 250 MHz reference, so the FCW is about 34–40.
The logic runs once per reference cycle. The exception is the multi-modulus divider,
which runs on the DCO clock.

Everything analog is outside the RTL: the DCO and its banks, the DAC with its RC filter,
the DTC, the three phase detectors and the reference. Their digital signals are the
ports of the top module `bbpll_digital_core`. The testbenches close the loop through a
behavioural phase-domain model of these parts (`tb/bbpll_analog_model.sv`).

## Block map

```
 e_main ──┬─► lock_detector ─► gear_shift_ctrl ──beta,alpha──► main_loop_filter ─► dsm_dac ─► dac_code
          │                         ▲ aux error != 0                 (PI)          (1st-order)
          ├─────────────────────────┼───────────────────────────────────────────► afs_controller
          │                         │                                              │ ic_pulse, cal, dIc
 e_fine ──┼─► aux_integrator ───────┼──────────────────────────────────────► fine_bank
 e_coarse ┼─► aux_integrator ───────┴──(+ AFS offset + pulse)──────────────► coarse_bank
          │
          │   fcw_cur ─► fcw_combiner (−gamma_f·e_f −gamma_c·e_c + (1−z^-1)·cal)
          │                 └─► dsm_mmd ──n──► mmd_divider ─► div (dco_clk domain)
          │                        └──q──► lms_calibration ─► dtc_code
          └──────────────────────────────────────┘ (LMS error)
```

| File | Contents |
|---|---|
| `rtl/bbpll_pkg.sv` | Shared types (`fcw_t`, `lf_t`, `gexp_t`, `terr_e`), design constants and decode functions |
| `rtl/lock_detector.sv` | Running sum of m = 32 main-detector samples and the below-threshold decision |
| `rtl/gear_shift_ctrl.sv` | Gain-exponent sequencer for GS-II and GS-I |
| `rtl/main_loop_filter.sv` | Saturating PI filter with power-of-two gains |
| `rtl/dsm_dac.sv` | First-order delta-sigma from the filter output to the DAC code |
| `rtl/aux_integrator.sv` | Saturating up/down counter for the fine or coarse bank |
| `rtl/fcw_combiner.sv` | FCW plus auxiliary feed-forward plus differentiated AFS word |
| `rtl/dsm_mmd.sv` | First-order delta-sigma on the FCW: division ratio and accumulated quantization error |
| `rtl/lms_calibration.sv` | DTC code = g·q, with g adapted by sign-data LMS |
| `rtl/mmd_divider.sv` | Programmable counter divider on the DCO clock |
| `rtl/afs_controller.sv` | AFS measurement and coarse-code prediction |
| `rtl/bbpll_digital_core.sv` | Top level: wiring, channel register, coarse-bank sum |

Each file starts with a comment that covers the module's function, interface and timing.
The comment also says which parts follow the published design and which are local choices.

## Sign conventions and number formats

There is one sign convention throughout. **e = +1 means the divider edge arrives late**,
which means the time error is positive and the DCO is too slow. A +1 must therefore
*raise* the DCO frequency through the loop filter and the auxiliary banks.

In the divider path a late divider edge is corrected by dividing by *less*. The
auxiliary feed-forward terms are therefore *subtracted* from the FCW:
`fcw_tot = fcw − gamma_f·e_f − gamma_c·e_c + (cal − cal_prev)`. If you flip the
detector polarity, flip both places.

The auxiliary detectors deliver a 2-bit code `{sign, magnitude}`:

* `00` or `10`: inside the dead zone (no error);
* `01`: error beyond the dead zone, positive;
* `11`: error beyond the dead zone, negative.

| Quantity | Format |
|---|---|
| FCW, `cal`, AFS `M` | signed, 8 integer + 20 fractional bits (DCO periods per reference period); LSB = 238 Hz at 250 MHz |
| Loop-filter state | signed, 10 integer + 16 fractional bits, saturating |
| beta, alpha | signed exponents: beta = 2^beta_exp, alpha = 2^alpha_exp |
| DAC code | signed 10 bits |
| Fine and coarse banks | unsigned 7 bits, reset to mid-scale 64 |
| Division ratio | unsigned 7 bits (8..127) |
| DTC code | unsigned 10 bits |
| LMS gain | unsigned, 10 integer + 12 fractional bits (codes per DCO period) |

The feed-forward weights are gamma_f = 1.19 DCO periods (1247805 LSB) and gamma_c = 3.4
DCO periods (3565158 LSB). One fine-detector firing moves the divider edge by about
140 ps. This matches the minimum fine dead zone over process corners, which keeps the
time error from overshooting past the opposite threshold. The coarse weight scales the
same rule to the 400 ps coarse dead zone.

## Main loop

The PI filter computes `y = beta·e + I` with `I += alpha·e`. Both gains are powers of
two, so the multiplications are shifts. Steady state uses beta = 2^-4 and
alpha = 2^-12 (R = 2^-8), chosen for the best jitter. A first-order delta-sigma
modulator maps y to the DAC code. `freeze` holds the integrator and drops the
proportional term.

## Gear shift (the hard part)

The auxiliary loops are fast, but they leave a residual frequency error. A
narrow main loop cannot absorb that error before the time error crosses a dead zone
again, and the result is a limit cycle. The cure is to make the main loop wide whenever
the auxiliary loops are active, then narrow it gradually.

1. **Boost.** In any cycle where the fine or the coarse auxiliary error is non-zero,
   `gear_shift_ctrl` loads beta = 2^4. In type-II mode (`gs_type2=1`) it loads
   alpha = 2^-1, so R = 2^-5. In type-I mode it loads alpha = 2^-4, which keeps
   R = 2^-8. The boost also restarts the lock detector's window.
2. **Wait for a zero crossing of the average.** `lock_detector` sums 32 main-detector
   samples. If |sum| < 4 (an average below P = 1/8), it emits a pulse and starts a new,
   empty window. Otherwise the window keeps sliding. A decision is therefore possible
   at most once every 32 cycles. It typically comes right after the time error has
   changed sign, when the +1s and −1s balance.
3. **Step.** Each pulse divides both gains by q = 2 (exponent − 1, parameter `Q_LOG2`).
   Each gain is clamped at its steady-state value. In type-II mode beta reaches 2^-4
   after 8 steps; alpha is then still 2^-9 and needs 3 more steps to reach 2^-12,
   for 11 steps in all. Type-I mode needs 8 steps.
4. **Settled.** `gs_settled` is high once both gains are back at steady state.

Why type II helps: for a second-order loop, the settling speed is set by the real part
of the closed-loop poles. That real part grows with R until the two poles meet, then
stays constant. At the large boosted beta, the steady-state R = 2^-8 is far below the
coincident-pole point, so the loop crawls. Boosting R to 2^-5 puts it in the fast
region while keeping enough phase margin. In the end-to-end test the same 0.75 GHz jump
locks in 293 cycles with GS-II and 916 cycles with GS-I.

The minimum time the gear shift adds is m × (number of steps) = 32 × 11 cycles, reached
when the residual error is already small. A larger m gives more robust decisions but a
slower gear shift. A smaller q gives a larger capture range ΔF_max ≈ 2·beta_gs·k_f·(2q−1)/(q−1)
but more steps. The top-level parameters `GS_M`, `GS_THRESH` (= P·m) and `GS_Q_LOG2` make these
trade-offs adjustable. Their defaults are 32, 4 and 1.

## Adaptive frequency switching

A channel switch is requested with `fcw_target` and a one-cycle `switch_req`.
`afs_controller` then runs through these states:

| State | Cycles | Action |
|---|---|---|
| PULSE | 1 | Coarse code +1 for exactly one reference cycle. The DCO runs ΔFc faster for one period and injects a time error of M·T0, where M = ΔFc/F_ref. |
| WAIT | 4 | Lets the injected error reach the detector through the loop latency. |
| STAIR | ≤ 50 | `cal` rises by Δ = 0.006 DCO periods per cycle (6291 LSB). `cal` is differentiated and added to the FCW, so each step pulls the divider edge back by Δ. When the main detector output changes sign, the injected error has been cancelled and M = steps × Δ. |
| DIVIDE | 10 | Restoring division, one quotient bit per cycle: dIc = round(dFCW / M). |
| APPLY | 1 | `afs_apply` strobe. The top loads the new FCW and adds dIc to a signed coarse-offset register. |

The resolution is Δ·F_ref ≈ 1.5 MHz of coarse-bank step, and the range is
50 × 1.5 MHz = 75 MHz. The estimate is measured at the current frequency, so it follows
the local slope of the non-linear tuning curve. The error that remains after the
pre-set comes from tuning-curve curvature and rounding; the auxiliary loops and the gear
shift remove it.

Adding the *difference* of `cal` to the FCW is equivalent to adding `cal` at the DTC
input. The advantage is that the DTC range is not enlarged. For the same reason `cal`
is never reset: a jump back to zero would be differentiated into a phase step. Each
measurement is taken relative to the value of `cal` when its staircase starts.

With `afs_freeze_en=1`, the main loop filter, the auxiliary integrators, the
auxiliary errors and the LMS loop are all held while the core measures.
With `afs_en=0`, a request is applied at once with dIc = 0.

## Auxiliary loops

Two `aux_integrator` instances count the fine and coarse auxiliary errors into 7-bit
saturating bank codes. The coarse bank output is the sum of three saturating terms:
the integrator, the accumulated AFS offset, and the one-cycle AFS pulse. With `aux_en=0`
both auxiliary errors are forced to zero, and the gear shift then has no trigger.

## Divider, delta-sigma and DTC path

`dsm_mmd` turns the fractional FCW into an integer division ratio per reference cycle
with a first-order error-feedback accumulator. It also outputs the accumulated
quantization error q, which is the divider phase error in DCO periods.
`lms_calibration` outputs DTC code = g·q. It adapts the gain with
g ← g − 2^-6·e·q(previous cycle), so g converges to T0 / t_lsb and the quantization
error is cancelled at the detector. `mmd_divider` is a down-counter on `dco_clk` that
reloads with the ratio captured at the start of each output period.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and has
a watchdog. With Verilator 5:

```sh
t=tb_bbpll_digital_core      # or any other tb/tb_*.sv
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv rtl/bbpll_pkg.sv tb/$t.sv \
  --top-module $t -Mdir obj_$t -o sim
./obj_$t/sim
```

Unit testbenches (`tb_<module>.sv`) compare each block against a reference model
written independently in the testbench. They cover saturation, clamping, the
lock-detector window, the gear-shift step counts in both modes, the AFS cycle budget
and divide latency, staircase overflow, LMS convergence and divider edge counts.

`tb_bbpll_digital_core` runs the top at its default parameters in closed loop with the
analog model. It counts every mechanism and fails if any of them never occurs: fine
and coarse auxiliary firing, gear-shift boost, gear-shift steps and settling, AFS
measurement, AFS pre-set and freeze, fractional dithering, and LMS adaptation. It also
checks settling to ±650 kHz, the return to steady-state gains, the AFS estimate
against the model's local coarse slope, LMS convergence and the divider edge count.

Four more closed-loop testbenches use the same model:

* `tb_bbpll_jumps` sweeps ten channel jumps between 8.5 and 10 GHz.
* `tb_bbpll_modes` makes the same −0.75 GHz jump (9.5 → 8.75 GHz) with each
  combination of techniques.
* `tb_bbpll_gs_params` runs seven loops side by side, each with different gear-shift
  parameters (through the helper `tb/bbpll_loop_harness.sv`). It checks the number of
  steps, ceil(11 / log2 q), and the minimum gear-shift duration of m cycles per step.
* `tb_bbpll_afs_sweep` makes downward jumps of 0.25 to 1.5 GHz from 10 GHz, with and
  without AFS, and compares how long the auxiliary loops stay active.

Typical results, in reference cycles of 4 ns:

| Scenario | Locking |
|---|---|
| Acquisition from −25 MHz | 320 |
| +0.75 GHz, AFS + GS-II (`tb_bbpll_digital_core`) | 293 (1.17 µs); M estimate 0.168 vs. model 0.161 |
| Jumps of ±0.25 to ±1.5 GHz, AFS + GS-II | 222 – 457 |
| −0.75 GHz, auxiliary loops only | no lock in 30000: limit cycle with the fine detector re-firing about 240 times |
| −0.75 GHz, GS-II | 376 (1.50 µs) |
| −0.75 GHz, AFS + GS-II | 418 (1.67 µs); auxiliary loops idle after 110 instead of 190 |
| −0.75 GHz, GS-I | 1231 (4.92 µs) |
| −0.75 GHz, AFS + GS-I | 1245; auxiliary loops idle after 143 instead of 407 |
| −0.25 … −1.5 GHz from 10 GHz, auxiliary loops active, without / with AFS | 132–207 / 43–195 |
| GS-II with q = 2 / 4 / 8 | 423 / 384 / 2122 (q = 8 overshoots) |
| GS-II with m = 16 / 8 | 390 / 338 |
| GS-II with P = 1/4 / 1/16 | 386 / 430 |

The model's values are assumptions: a 40 MHz coarse step with curvature, a 300 kHz DAC
LSB, 200/400 ps dead zones and 210 fs detector noise. The figures above depend on them.
The published chip locks in under 390 cycles (1.56 µs) over the same jump range. Its
reported times for the −0.75 GHz jump are 1.73 µs (GS-II), 1.16 µs (AFS + GS-II),
5 µs (GS-I) and more than 80 µs (techniques off).

The model reproduces the relative ordering of these results with one exception. In the
model, AFS shortens the auxiliary phase but not the total time. The total is dominated
by the gear-shift tail, at least 32 × 11 cycles, plus the residue left by the model's
coarse-curve curvature. The proportional kick of the boosted beta (up to 16 DAC LSBs,
about 4.8 MHz) also keeps the instantaneous frequency outside the ±650 kHz band until
beta has been reduced.

## Deviations and limits

* The analog parts are only modelled in the testbench, and the top has no register
  interface. Configuration bits and FCW are plain ports.
* Both delta-sigma modulators are first order. The published design does not state
  their order.
* The DTC range-reduction technique of the published chip is not implemented. The DTC
  code is g·q clamped to 10 bits.
* Any non-zero error from either auxiliary detector triggers the gear-shift boost. The
  source diagram shows a single auxiliary detector.
* Bank saturation. If the fine bank runs into its limit during a large jump made
  without AFS, the fine feed-forward path can keep the time error between the fine and
  coarse dead zones. The coarse loop then stops firing, and only the DAC range is left
  to absorb the remaining error. The model shows this after several jumps have left the
  fine bank far from mid-scale. Wider banks or re-centring would avoid it; neither is
  part of this design.
* The AFS staircase is limited to 50 steps (75 MHz). A coarse step larger than that
  saturates the estimate. The auxiliary loops then correct a larger residue.
* The widths of the banks, DAC, DTC and LMS gain, the AFS wait length, the divider
  implementation and all reset values are local choices. Each is documented in its module.
