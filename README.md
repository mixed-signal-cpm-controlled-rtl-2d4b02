# Minimum power point tracking with a current-mode dc-dc converter

A digital circuit that must run at a fixed clock can do so at many supply
voltages V_DD, as long as the threshold voltage is lowered (forward body bias)
when V_DD is lowered. A lower V_DD saves dynamic power, a lower threshold
costs leakage power, and somewhere between them lies a minimum power point
(MiPP). This design finds that point in closed loop, and it needs no power
sensor to do it. The dc-dc converter that supplies the load is a
current-programmed (CPM) converter. Its digital voltage loop already holds
the two numbers that make up the load power: the voltage reference V_ref[n]
and the peak-current reference i_c[n]. The tracker multiplies them.

The RTL here is the digital part of such a system, after the paper by
A. Parayandeh and A. Prodic, "Mixed-Signal CPM Controlled DC-DC Converter IC
with Embedded Power Management for Digital Loads". It covers:

* the MiPPT controller and its adaptive body-bias (ABB) loop;
* the pass/fail checker that drives the MAC test chips;
* the converter's digital voltage loop and the sigma-delta reference DAC;
* the digital side of the peak-current modulator;
* the efficiency optimiser that picks power-stage segments, gate swing and
  PFM;
* the MAC test-load chips, as logic.

Everything analog is outside the RTL and is reached through ports: the
windowed ADC, the current DAC and comparator, the power stage, the
gate-swing circuit and the body-bias DAC.

## System map

```
                      e_n (windowed ADC)              cmp (current comparator)
                          |                                   |
 V_ref --> sigma_delta_dac --> sd_ref (ADC reference)         |
   |                      v                                   v
   |            digital_compensator --i_c, delta_ic--> current DAC
   |                      | i_c                               |
   |          +-----------+-------------+                     |
   |          v                         v                     v
   |   efficiency_optimizer --seg/gssc/pfm--> cpm_modulator --> P_gate, N_gate,
   |          ^ eff_en                                         P_en[3], N_en[3], gssc_sl, pfm
   |          |
 mippt_controller (abb_loop + power_meter) --vbb--> ABB DAC --> V_BBN, V_BBP
   ^   ^ pass, pass_aux, verdict
   |   |
 mac_controller --clk_mac, X_in, Y_in--> digital_load (main)  --p_mac_load-->  board  --p_mac_in-->
                                      \-> digital_load (aux)   --p_mac_aux_load-> board --p_mac_aux_in-->
```

`mippt_top` wires all of this. The two load chips' output pins leave the top
as `p_mac_load`/`p_mac_aux_load`. The checker's inputs come back in as
`p_mac_in`/`p_mac_aux_in`. On a board these are plain wires. Keeping them
apart lets a testbench corrupt a chip's output when the chip is too slow,
which is an analog effect of low V_DD and body bias.

## The search: ABB loop inside a perturb-and-observe loop

This is the part that needs the closest reading.

### ABB loop (`abb_loop`)

The ABB loop sets the body-bias code V_BB[n] to the highest threshold
voltage at which the *auxiliary* MAC chip still passes at the target clock.

* The first verdict after `start` picks the direction.
* **Passing**: V_BB goes down one code per passing verdict, towards reverse
  bias. At the first failing verdict it goes back up one code and
  `freq_lock` rises.
* **Failing**: V_BB goes up one code per failing verdict, towards forward
  bias, until a verdict passes or V_BB reaches `VBB_MAX`. At the limit,
  `at_fbb_limit` is also set.
* A verdict whose window straddled a V_BB or V_DD change is discarded
  (`SKIP` = 1). Each V_BB step therefore costs two pass/fail windows.

The search always ends on the boundary. It uses the auxiliary chip, whose
supply sits one V_ref LSB below the main chip's. So while the auxiliary chip
probes one code past the boundary, the main chip keeps working. That offset
is made in the analog domain and is not in this RTL.

### MiPPT controller (`mippt_controller`)

The controller steps the converter reference V_ref one LSB at a time and
reruns the ABB loop at each step:

1. On `en_optim`: apply zero body bias (code 20), run the ABB loop, then
   measure power P.
2. Perturb: V_ref − 1, ABB, measure. If P fell, the search goes down.
   Otherwise it goes up.
3. Step V_ref in the search direction, run ABB, measure. Repeat while P
   keeps falling. At the first rise (or an equal value), restore the V_ref
   and V_BB of the previous point and raise `optim_done`.

When the search goes up, its first step returns V_ref to the starting code.
That point is compared with the perturbed one, not with the start. Starting
at 0x45 in a load whose minimum is at 0x49, the reference visits

    45 → 44 → 45 → 46 → 47 → 48 → 49 → 4A → 49

which matches a published measurement of the real system. Both
`tb_mippt_controller` and `tb_mippt_top` reproduce it.

Zero body bias is applied only when the search starts. Later ABB runs
continue from the present V_BB, so the bias moves smoothly as V_DD changes.

### Power measurement (`power_meter`)

P = V_ref × Σ i_c over 2^AVG_LOG2 switching cycles (256 by default). It has
no units and is only compared with other measurements. In steady state the
average peak-current reference equals the load current, so no sense
resistor is needed.

### Duration of a search

Each V_ref step costs one ABB run plus one measurement. At the defaults:

* one ABB step is 2 windows × 1024 vectors × 2 clocks = 4096 clocks;
* one measurement is 256 cycles × 12 clocks = 3072 clocks.

A search of about ten steps takes a few hundred thousand system clocks. The
pass/fail window length dominates the speed, as in the original system.

## Pass/fail checking (`mac_controller`, `digital_load`, `mac_unit`)

Each load chip holds 12 units that each do an 8×8 multiply and a 16-bit
accumulate. All units receive the same PRBS vectors. The chip's 16-bit
output is the sum of the 12 accumulators modulo 2^16, so each clock it
advances by 12·X·Y.

The checker does the following:

* It generates `clk_mac` as clk/(2·MAC_HALF).
* It changes X/Y only where `clk_mac` falls. X comes from a PRBS-15 and Y
  from a PRBS-17, each advanced 8 steps per vector.
* It predicts every new output from the previous *observed* one, so an error
  counts only in the vector where it happens.
* It counts errors over a window of `N_VEC` vectors (1024). At the end of the
  window it pulses `verdict` and updates `pass`/`pass_aux`.

Neither the load nor the checker needs a clear or reset of the
accumulators.

## Converter control path

* **`digital_compensator`**: incremental PI law, once per switching cycle:
  delta_ic = KI·e[n] + KP·(e[n] − e[n−1]), with KP = 8 and KI = 1.
  i_c = i_c + delta_ic, saturated to 0..1023. `delta_ic` is the increment
  actually applied.
* **`sigma_delta_dac`**: a first-order accumulator-carry modulator. Any
  2^8 consecutive output bits hold exactly V_ref ones.
* **`cpm_modulator`**: a switching cycle is `CYCLE_CLKS` = 12 clocks, and
  `tick` marks its start and is the loop's sampling strobe.
  * The low side turns off at the tick.
  * The high side turns on one clock later. This is the SR latch set.
  * The comparator resets the latch (R), with one clock of blanking, or the
    10-clock maximum on-time does.
  * The low side turns on one clock after the high side turns off.
  * In PFM a cycle fires only if e[n] > 0 (output below reference), and the
    low side stays off.
  * Segment and gate-swing selections change only at a cycle start.
* **`efficiency_optimizer`** acts only while `eff_en` = Pass ∧ Pass_aux
  holds. It keeps its last setting otherwise. It reads i_c[n]:

| i_c (≈ mA) | segments `seg_sl` | gate swing `gssc_sl` | mode |
|---|---|---|---|
| ≥ 200 | 111 (3) | 7 (full) | PWM |
| 100–199 | 011 (2) | 7 | PWM |
| 50–99 | 001 (1) | 7 | PWM |
| 15–49 | 001 | 1…6, rising with i_c in six equal bands | PWM |
| < 15 | 001 | 7 | PFM |

## Codes and units

| Signal | Width | Meaning |
|---|---|---|
| V_ref[n] `vref` | 8 | converter reference. About 13.5 mV per code near 1 V, estimated from the published run (0x45 ≈ 0.93 V, 0x49 ≈ 0.99 V). |
| V_BB[n] `vbb` | 6 | body bias, 30 mV per code, offset binary: 20 = zero bias, below 20 = reverse, above 20 = forward. The ABB DAC makes V_BBN = V_BB and V_BBP = V_DD − V_BB. |
| e[n] `e_n` | 4, signed | windowed-ADC error, reference − output |
| i_c[n] `i_c` | 10 | peak-current reference, about 1 mA per code (assumed) |
| X_in, Y_in / P_MAC | 8 / 16 | MAC vectors and output |
| seg_sl, gssc_sl | 3 | segment thermometer code, gate-swing level |

## Where this RTL departs from, or adds to, the paper

The paper gives the algorithm, the signal names and the measured behaviour,
but few implementation numbers. This design made the following choices:

* One system clock with strobes replaces separate converter and MAC clocks.
  The published system ran the MAC at 100 MHz and the converter at 8 MHz.
  Here the ratio is 6, not 12.5. The board sets the absolute frequencies.
* Window length 1024 vectors, averaging 256 cycles and the discarded
  straddling verdict are this design's own values.
* FBB limit of code 40 (+0.6 V) and a reverse-bias floor of 0. The search
  range for V_ref is 30–100.
* The compensator law and gains, the i_c scale, the PFM rule, the dead time,
  the maximum on-time and the optimiser thresholds (placed where the
  published efficiency curves show each technique helping) are all this
  design's own.
* How the 12 MAC units reach one output pin is not described. The sum is
  this design's choice.
* A tie in measured power ends the search.
* The one-LSB supply offset of the main chip, the body-bias DAC, the
  windowed ADC, the current DAC and comparator, the segmented power stage
  and the gate-swing circuit are analog. They are not modelled in the RTL.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mippt_pkg.sv tb/tb_mippt_top.sv --top-module tb_mippt_top
obj_dir/Vtb_mippt_top
```

Use the same command for any other `tb/tb_<module>.sv`.

`tb_mippt_top` runs the whole system at its default sizes, in under a
second. It surrounds the RTL with behavioural models:

* a converter whose output moves by (i_c − i_load) each cycle;
* a windowed ADC, e = clamp((256·V_ref − v)/32, ±7);
* a sensed current rising 64 codes per clock, which drives the comparator;
* a load drawing 300 + 6·min((V−73)², 100) + 3·(V_BB − (95−V)) codes;
* timing failures of the auxiliary chip when V_BB + V < 95, and of the main
  chip when V_BB + V < 94.

The test:

* optimises from 0x45, from 0x52 and from 0x5B (about 1.23 V, where the
  first ABB run goes deep into reverse bias), and all three runs settle at
  0x49 with V_BB = 22;
* then forces load currents that select each power-stage configuration.

It counts every mechanism: reverse and forward ABB steps, locks, V_ref
steps in both directions, a search that reverses, `optim_done`, Pass_aux
failures, power measurements, comparator-ended and maximum-duty pulses,
skipped PFM cycles, 3/2/1 segments and scaled gate swing. Each must occur.
It also checks that the main chip never fails once the body bias has first
locked, and that every power reading is within 2 % of V·i_load.

The unit testbenches compare each block with an independent model. Examples:

* the exact PI arithmetic with saturation;
* Σ i_c × V_ref after exactly 256 ticks;
* the region table above;
* pulse width min(L+1, 10) for a comparator trip after L clocks;
* verdicts after injected single-vector and whole-window errors;
* ABB end points and verdict counts;
* the expected V_ref sequence of the search.

## Size

After coarse synthesis, the whole top is about 440 word-level cells and 672
flip-flops. 384 of those flip-flops are the two 12-unit MAC load chips. The
MiPPT controller with its ABB loop and power meter is about 210 cells and
132 flip-flops, in line with the paper's note that the tracker is a few
hundred gates.
