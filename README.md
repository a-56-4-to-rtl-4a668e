# 60 GHz all-digital PLL with multi-rate two-point FMCW modulation

This is an all-digital phase-locked loop (ADPLL) for a 56.4–63.4 GHz FMCW
radar transmitter. It keeps a 60 GHz digitally controlled oscillator (DCO)
locked to a 100 MHz crystal reference and sweeps it in a triangular chirp of
up to about 1.2 GHz.

The DCO has three tuning banks:

| Bank | Name | Step per code |
|---|---|---|
| CB | coarse | 367 MHz |
| MB | mid-coarse | 35 MHz |
| FB | fine | 1.64 MHz |

A chirp that wide cannot be done by the fine bank alone. It must cross many
MB codes and at least one CB code. Each bank has its own gain error, and a
plain phase-locked loop would see every bank switch as a frequency step.

The design fixes this with **two-point modulation**. There are two paths:

- **Slow point (reference path).** At the 100 MHz reference rate, the wanted
  frequency ramp is added to the loop's reference phase, so the loop expects
  the chirp.
- **Fast point (direct path).** In a separate, faster clock domain
  (CKM = CKV/128 … CKV/1024), the DCO is driven open-loop through a
  linearization table. The table says, for every (CB, MB) pair:
  - the fine-bank word at the lower switchover point;
  - the fine-bank word at the upper switchover point;
  - the fine-bank increment per CKM cycle.

Between switchovers the direct path only accumulates that increment and
compares it with the switchover limit. At a switchover it moves to the
neighbouring (CB, MB) entry and starts at the matching fine-bank value, so
the frequency does not jump. The loop corrects only the small residual error,
using its own part of the fine bank (FB_Loop). That part never has to cover
the chirp.

## Clock domains

| Clock | Source | Used by |
|---|---|---|
| CKV | DCO output (about 60 GHz) | RF output |
| CKV/32 | prescaler (`divider_chain`) | variable-phase counter, TDC, FREF retiming |
| CKV/64 | prescaler | both SigmaDelta modulators |
| CKR | FREF resampled by CKV/128 (`fref_retimer`) | reference-phase path, loop filter, loop controller, calibrations, FSK path |
| CKM | CKV/128, /256, /512 or /1024 (`sel_mod`) | linearization table and the direct path |

The loop uses CKV/32 as its feedback phase, so the frequency command word is
FCW = f_CKV / (32 · f_REF).

- FCW format: Q8.20.
- Example: 60.5 GHz gives FCW = 18.90625.

Resampling FREF with CKV/128 ties CKR to CKM. The reference-phase
compensation and the direct path therefore stay cycle-aligned.

## Phase detection (`ref_phase_accum`, `var_phase_counter`, `tdc_normalizer`, `phase_detector`)

- **Reference phase Rr.** `ref_phase_accum` adds FCW plus the compensation
  word once per CKR edge. Phase words are Q12.20, in units of CKV/32 periods.
- **Integer variable phase Rv.** `var_phase_counter` counts CKV/32 edges in a
  12-bit counter and captures the count on the CKV/32 edge that detects the
  retimed reference.
- **Fractional variable phase ε.** The TDC gives the delay from the last
  CKV/32 rising edge to the FREF edge, in inverter delays.
  - `tdc_normalizer` multiplies this by 1/K_TDC to get ε as a fraction of a
    period.
  - 1/K_TDC is the inverse of the CKV/32 period in delays, Q0.20.
  - `tdc_normalizer` also picks the retiming edge (SEL_EDGE). When FREF lands
    within a quarter period of a rising CKV/32 edge, FREF is retimed on the
    falling edge, away from the metastable region.
- **Phase error.** `phase_detector` forms φE = Rr − Rv − ε, wrapped to the
  12-bit integer range.
  - When the falling-edge path is used with ε < ½, the counter was sampled one
    CKV/32 edge late. One count is added back to correct this.
  - This correction is this design's own. The glitch remover below handles
    what is left.

### Glitch removal (`glitch_remover`)

A skew between the counter and TDC sampling can produce a one-cycle jump of
a whole CKV/32 period in φE. During tracking, if |φE[k] − φE[k−1]| > 0.5,
φE holds its previous value for that one cycle.

A second comparator uses the same difference with a programmable threshold.
It gives a clock-quality / lock flag.

## Loop filter and acquisition (`loop_filter`, `iir_stage`, `loop_ctrl`)

**`loop_filter`** does the following:

- Runs φE through four switchable first-order IIR stages, y += 2^−λ·(x − y).
- Applies a proportional gain 2^−α and, in type-II mode, an integral gain
  2^−ρ.
- Shifts gears hitlessly. When α changes, an offset register absorbs the jump
  of the proportional term, so the output does not step.

**`loop_ctrl`** runs acquisition in this order:

1. **CB.** Coarse bank, type-I.
2. **MB.** Mid-coarse bank, type-I.
3. **TRK1.** Fine bank, type-I, IIR off.
4. **TRK2.** Fine bank, type-II, IIR on.

Each stage length is programmable. At each switch the controller:

- freezes the bank it used;
- clears the filter;
- subtracts the φE present at the switch from all later φE, so the next stage
  starts from zero error.

Scaling of the filter output:

- It is first multiplied by `norm` = 32·f_REF / K_DCO, which turns phase per
  cycle into fine-bank codes.
- It is then shifted right by 5 for CB and by 4 for MB.
- The fine-bank word keeps 10 fraction bits for the SigmaDelta and is clamped
  to ±22 codes.

The loop assumes a fine-bank gain of 1 MHz per code, so `norm` = 3200 at
100 MHz.

The real step ratios are 224 (CB/FB) and 21 (MB/FB), not the 32 and 16 the
shifts assume. This choice keeps the multipliers as shifts. The loop absorbs
the gain error, but the real CB and MB stage gains come out 7× and 1.3×
higher than nominal. The end-to-end test uses a smaller α in those stages to
compensate.

## Fine bank (`fb_loop_decoder`, `fb_mod_decoder`, `sigma_delta`)

The fine bank has three parts:

- FB_Loop1 and FB_Loop2: 22 unit cells each, used by the loop.
- FB_Mod: 38 unit cells, used by the direct path.
- Two SigmaDelta-dithered cells.

FB_Mod is sized to 1.75 MB steps: 1.75 × 35 / 1.64 ≈ 38.

In the idle state, half of every part is ON. This gives both directions equal
headroom.

`fb_loop_decoder` maps the signed loop word onto the two FB_Loop sub-banks
like this:

- **Upward drift.** It fills the upper half of FB_Loop1 first, then the upper
  half of FB_Loop2.
- **Downward drift.** It empties the lower half of FB_Loop2 first, then the
  lower half of FB_Loop1.

`fb_mod_decoder` is a plain thermometer decoder filled from the top.

`sigma_delta` is a first-order or MASH 1-1 second-order modulator at CKV/64.

- Input: a 10-bit fraction.
- Output: a dither word in −1 … 2.
- Two instances: one for FB_Loop and one for FB_Mod.

## Linearization table and direct path (`sram_sp`, `fmcw_direct_path`, `mismatch_corrector`)

The table holds three arrays of 512 × 16 bits (24 kbit), one `sram_sp`
instance each:

| Array | Content | Format |
|---|---|---|
| FB_min | FB_Mod word at the lower switchover point | Q6.10 |
| FB_max | FB_Mod word at the upper switchover point | Q6.10 |
| FB_step | FB_Mod increment per CKM cycle | 16 fraction bits of one cell |

- The index is {CB, MB}.
- Along the tuning curve the order is MB 0 … `mb_last` inside a CB code, then
  the next CB code.

`fmcw_direct_path` is a small state machine that does the following:

- It keeps the current entry and prefetches the next entry in the ramp's
  direction. Switchovers then need no SRAM access at CKM speed.
- It adds ±FB_step to the FB_Mod accumulator every CKM cycle.
- When the accumulator passes FB_max (going up) or FB_min (going down), it
  switches to the neighbouring entry. In the same cycle the output starts at
  that entry's FB_min or FB_max.
- It reverses the ramp after `n_half_ckm` CKM cycles, within the index range
  `start_idx` … `end_idx`.
- While `mod_en` is high, it also drives CB and MB through the mod_en
  multiplexer in `adpll_core`. The loop then keeps only FB_Loop.

The FB_Mod fraction is corrected before it reaches its SigmaDelta.
`mismatch_corrector` does this correction:

- It multiplies the fraction by (1 + ε), where ε is the measured relative
  error of the dither cell against an average integer cell.
- It uses an 8 × 10 multiplier on |ε|, a shift, a sign select and an adder.
- |ε| ranges up to 25 % in 1/1024 steps.
- It saturates rather than wraps.

## Reference-path compensation (`mod_comp_gen`, `fsk_direct_path`)

`mod_comp_gen` produces the slow point:

- It keeps a frequency offset in FCW units, with 12 extra fraction bits.
- It adds `comp_step` = k_mod / f_REF / 32 every CKR cycle.
- It reverses after `n_half_ckr` cycles.

Its output is added to FCW in `ref_phase_accum`.

`fsk_direct_path` is a two-point FSK path at the reference rate. A data bit
selects ±`fsk_dev`, which is:

- added to the FCW;
- multiplied by `fsk_gain` = 32·f_REF/K_FB (Q12.4) and added to the FB_Mod
  centre word.

When `fsk_en` is high it takes over FB_Mod from the FMCW path.

## Calibrations (`tdc_gain_cal`, `freq_meas`, `arith_divider`, `lut_cal`, `kdco_cal`)

- **`tdc_gain_cal`.** Sums 2^L measurements of the CKV/32 period in TDC
  delays. It then divides 2^(20+L) by the sum to get 1/K_TDC.
- **`freq_meas`.** Averages the advance of the variable phase (counter plus
  TDC) over 2^L reference cycles. This is an open-loop frequency counter, used
  to characterize the banks and the dither mismatch.
- **`arith_divider`.** A shared restoring divider: 32/16 bit, 33 cycles,
  one quotient bit per cycle.

- **`lut_cal`.** Builds one table entry from a measured record: (CB, MB)
  index, FB_min, FB_max and dn.
  - dn is the number of CKM cycles the ramp takes from one switchover point to
    the next.
  - It computes FB_step = (FB_max − FB_min) / dn, rounded to nearest and
    saturated to 16 bits.
  - It then writes all three words. Latency is 35 CKM cycles per record, with
    a valid/ready handshake.
  - A direct `lut_we` write has priority.

The switchover point for each bank pair is the middle of the overlap between
the two neighbouring (CB, MB) settings.

- **`kdco_cal`.** Measures the fine-bank gain in closed loop, so the FSK
  path needs no programmed gain.
  1. While locked, it offsets the channel FCW by +`kc_dev`, waits `kc_settle`
     cycles, and sums 2^L samples of the loop's fine-bank word.
  2. It repeats this with −`kc_dev`.
  3. The difference of the two sums gives cells per FCW unit:
     gain = Δsum · 2^(13−L) / dev in Q12.4, which is 32·f_REF/K_DCO.

  Once valid, it replaces `fsk_gain`.

  It measures the FB_Loop cells, not FB_Mod itself. The two use the same
  unit cell, so a mismatch between the two parts goes undetected.

  With the default loop gains, the settle time must be about 1500 reference
  cycles. Shorter times underestimate the gain.

Not built: the sequence that finds the switchover words. It would lock the
loop at each switchover frequency with both bank settings and count CKM
cycles.

- The `cal_*` records, or raw `lut_*` writes, are CKM-domain inputs. Use them
  only while `mod_en` is low.
- `norm` stays a programmed input.

The end-to-end test derives the records from the DCO step sizes and sends
them through `lut_cal`.

## Analog parts and models

The DCO and TDC are behavioural models. They use `real` arithmetic and
`$realtime`, so they are for simulation only.

- **`dco_model`.** Frequency = base + bank steps, with 367 / 35 / 1.64 MHz
  per code. It has a programmable dither-cell error and a 53.9 GHz base, so
  the 32 CB codes cover the whole band.
- **`tdc_model`.** 12.2 ps uniform stages, 6-bit output.

`divider_chain` models the /32 prescaler, whose first stages are analog
(ILFD and CML), as ideal toggle stages.

The FREF slicer and the power amplifier have no logic function and are not
modelled:

- FREF enters as a digital clock.
- `ckv` is the RF output.
- `ckv32` is the 2 GHz test output.

## Hierarchy

- `adpll_fmcw_top`: everything. It contains:
  - `adpll_core`: all synthesizable logic. It takes `ckv`, `tdc_code` and
    `period_code` and drives all bank control words.
  - `tdc_model`
  - `dco_model`
- `adpll_pkg`: shared widths, the loop-mode enum and the table-entry struct.

Configuration inputs are static, or change only while the block that uses
them is idle.

## Where it departs from the source description

These choices are this design's own:

- All word widths except the 10-bit FB_Mod fraction and the 8-bit |ε|.
- The CB/MB normalization shifts (5 and 4).
- The SEL_EDGE rule and the one-count phase correction.
- The table index order.
- The gear-shift offset mechanism.

Things that differ from the source or are left out:

- **CB/FB ratio.** The block diagram quotes CB/FB = 32 and MB/FB = 16. The measured
  steps give 224 and 21, and the loop uses the shifts as printed.
- **Dither cells.** The source places three fractional (dithered) cells at
  the edge of the fine bank. Here each SigmaDelta output (−1 … 2) drives one
  modelled dither cell whose step is a multiple of a unit cell.
- **Variable-phase counter.** The 10-bit synchronous plus 2-bit asynchronous counter is
  built as one 12-bit synchronous counter.
- **Chirp length in the end-to-end test.** The test chirp is 90 MHz over 12 µs
  and makes three bank switchovers each way, one of them a CB change. The document's chirps run
  1–1.22 GHz over 0.42–8.2 ms, which would take hours to simulate at 60 GHz
  resolution. The counters (24 bit), the table (512 entries) and the step
  resolution (16 fraction bits) hold those sizes. The FSK test uses the
  document's ±20 MHz deviation.
- **Calibration procedures.** The switchover-search sequencer is not present.
  The K_DCO calibration is a simple averaging version of its own (see the
  section above). `lut_cal` and `kdco_cal` each have a divider of their own
  rather than one shared divider.
- **No phase-noise claims.** Phase noise, spurs and the analog behaviour are
  not modelled beyond ideal steps and quantization.

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/adpll_pkg.sv rtl/*.sv \
  tb/tb_adpll_fmcw_top.sv --top-module tb_adpll_fmcw_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Put `adpll_pkg.sv` first, and do not list it twice.

`tb_adpll_fmcw_top` runs the full transmitter at its default parameters,
about 70 µs of simulated time:

1. TDC calibration.
2. CB → MB → TRK1 → TRK2 lock to 60.5 GHz.
3. Frequency check with the edge counter and `freq_meas`.
4. One displaced FREF edge, which must be frozen by the glitch remover.
5. An up/down chirp with switchover and turn events.
6. Fine-bank gain calibration with ±5 MHz steps. The result must be within
   3 % of the model's 32·f_REF/K_FB.
7. ±20 MHz FSK using only the calibrated gain.

The chirp's table is written through `lut_cal`.

It counts each mechanism as it is exercised. Block testbenches compare
against a reference model with `$urandom` stimulus.

Resets are asynchronous and active low. They need a real falling edge, so
testbenches drive `rst_n` 1 → 0 → 1.
