# DAC built-in self-test by frequency counting

Checking a DAC's linearity usually needs a voltmeter good to a fraction of an LSB.
This design needs none. The DAC output drives a linear voltage-controlled oscillator
(VCO). A counter counts the VCO's oscillations during one period T of a slow test
clock. That count D is proportional to the output voltage, D = T · f(V). The design
steps the DAC through every code and keeps the counts. From them, plain digital logic
finds non-monotonic codes, offset error, gain error, differential non-linearity (DNL)
and integral non-linearity (INL). Each result is compared with a programmable threshold
to give one `pass` bit.

Two properties make this work:

* **Precision is bought with time.** If one LSB moves the VCO by f_LSB, then one LSB
  gives TP counts when T = TP / f_LSB. With TP = 10, a 0.1 LSB error is a whole count.
  The test time is about 2^N · T.
* **Noise averages out.** The counter integrates the VCO phase over the whole period.
  Random noise on the DAC output speeds the VCO up as often as it slows it down, so the
  count settles on the mean voltage. No repeated sampling or statistics hardware is needed.

The scheme follows the letter "BIST scheme for DAC testing" (S.J. Chang, C.L. Lee,
J.E. Chen). The RTL, the sequencing, the clock-domain handling and the arithmetic
described below are this implementation's.

## Blocks

```
 input_code ──0┐                                        ┌──────── output (analogue)
               MUX──dac_code──► DAC under test ──V_i──┐ │
 pattern ────1─┘                 │V_min  │V_max       ▼ ▼
 counter (TPG)                   └───────┴──────► linear VCO ◄── vco_sel
    ▲ en                                              │ osc
 bist_ctrl ── labels ──────────┐                      ▼
                               ▼              index counter (counts per period T)
 DSP (bist_dsp) ◄── D_min, D_max, D_i, D_i-1 ◄── result store (bist_memory)
    │
    └── pass, done, flags, per-code DNL / INL
```

| Module | Role |
|---|---|
| `dac_bist` | Top for simulation: `dac_bist_core` plus the `linear_vco` model. The DAC is outside it. |
| `dac_bist_core` | Everything digital and synthesizable. |
| `bist_ctrl` | Sequencer: calibration, sweep, labels for each counting period. |
| `pattern_counter` | Test pattern generator. It holds one code per clock period. |
| `test_mux` | Sends the normal `input_code` (test = 0) or the test pattern (test = 1) to the DAC. |
| `linear_vco` | Behavioural model of the VCO, not synthesizable. It selects the DAC output, V_min or V_max. |
| `index_counter` | Counts VCO oscillations per clock period. |
| `bist_memory` | Four registers: D_min, D_max, D_i, D_i-1. An optional array holds every D_i. |
| `bist_dsp` | Computes the formulas below, compares them with the thresholds, and drives pass. |
| `dac_bist_pkg` | Shared types (`vco_sel_e`, `win_tag_t`) and constants. |

## Test sequence and timing

Hold `test` low for normal operation. `input_code` then passes through the MUX to the
DAC, and the BIST is idle. Raising `test` and keeping it high runs the whole test.
Each step below lasts one clock period T:

1. **Calibrate low.** V_min drives the VCO. The count is D_min.
2. **Calibrate high.** V_max drives the VCO. The count is D_max.
3. **Sweep.** The DAC output drives the VCO. The pattern counter applies codes
   0, 1, …, 2^N−1, one per rising clock edge. Period i yields D_i.
4. **Done.** `done` rises and `pass` is valid. Both hold until the next test starts,
   even after `test` falls.

`done` rises 2^N + 7 clocks after `test` is first sampled high. That is 2 calibration
periods, 2^N code periods, 2 clocks of index-counter latency, 1 clock in the store,
1 in the DSP and 1 to flag. During the sweep, a `res_valid` pulse per code carries
`res_code`, `dnl_s` and `inl_s`. Dropping `test` early aborts the test cleanly: the
controller returns to normal mode and discards the counts still in flight. So keep
`test` high until `done`.

Every counting period gets a label (`win_tag_t`: nothing / V_min / V_max / code, with
first and last flags). The index counter delivers a period's count two edges after the
period ends, so the controller delays each label by three registers
(`IDX_LATENCY + 1`). Label and count then reach the store on the same edge. That shared
pipeline is what keeps the counts aligned with the codes. If you change the index
counter's latency, change `IDX_LATENCY` in the package with it.

## Counting across two clocks

The counter is clocked by the VCO, which is unrelated to the test clock. The
straightforward form reads the count at the end of each period and resets the counter.
That form samples a binary word while it may be changing, and it loses any oscillations
that arrive while the reset is applied. `index_counter` avoids both problems:

* In the VCO domain a K-bit counter runs freely and wraps. It is kept in Gray code, so
  at most one bit changes per oscillation.
* At each rising test-clock edge the Gray value passes through two synchroniser flops.
  It is then converted to binary, and the previous sample is subtracted (mod 2^K).

The difference is exactly the number of oscillations between two successive clock
edges. It is correct across wraps, provided one period never holds 2^K or more
oscillations. So choose K ≥ log2(T · f_max). The VCO-domain reset is asserted
asynchronously and released on the VCO clock.

## Turning counts into DNL, INL, offset and gain

TR is the number of counts per LSB. The design takes it from the calibration:
TR = R / M, with R = D_max − D_min and M = 2^N − 1. In other words, the ideal DAC gives
V_min at code 0 and V_max at code 2^N−1. The quantities checked are:

| Quantity | Definition (LSB) | Reported as (× R) |
|---|---|---|
| non-monotonic | D_i < D_i−1 for some i | flag `nonmono` |
| offset | (D_0 − D_min) / TR | `off_s` = (D_0 − D_min) · M |
| gain | (D_last − D_max) / TR − offset | `gain_s` = (D_last − D_max) · M − `off_s` |
| DNL_i | (D_i − D_i−1) / TR − 1 | `dnl_s` = (D_i − D_i−1) · M − R |
| INL_i | DNL_1 + … + DNL_i | `inl_s` = running sum of `dnl_s` |

Multiplying every result by R removes the divider, and multiplying by M = 2^N − 1 is a
shift and a subtract. **To get LSB, divide a reported value by `full_scale` (= R).**
A check fails when |value| · 16 > threshold · R. The four thresholds (`dnl_thr`,
`inl_thr`, `off_thr`, `gain_thr`) are 8-bit values in LSB with 4 fraction bits, so
8'd8 means 0.5 LSB. `pass` = done and no flag set. `cal_fail` means D_max ≤ D_min.
`max_abs_dnl_s` and `max_abs_inl_s` give the worst values of the sweep.

Only four counts are needed at any time, so `bist_memory` holds just four registers.
Set `KEEP_ALL_CODES = 1` to add a 2^N × K array that keeps every D_i. After the test,
read it through `rd_addr` / `rd_data` (one clock of read latency) to inspect the
measured transfer curve.

## Choosing the clock period and counter length

With VCO gain K_VCO and LSB voltage V_LSB, one LSB is f_LSB = K_VCO · V_LSB.
For test precision TP (counts per LSB), set T = TP / f_LSB. The counter must hold
T · f_max, so K ≥ log2(T · f_max). The defaults fit the reference example:

| | value |
|---|---|
| DAC resolution N | 8 |
| VCO range `F_MIN_HZ`–`F_MAX_HZ` | 10–100 MHz |
| VCO input range `V_LO`–`V_HI` | 0–3 V (model assumption) |
| TP | 10 |
| T = 10 · 256 / 90 MHz | 28.44 µs |
| largest count T · f_max | 2844 → K = 12 |
| sweep 256 · T | 7.28 ms (7.48 ms with calibration and pipeline) |

The clock period is not a parameter of the RTL; it is whatever clock you apply. Only K
has to match it.

## Measured behaviour

`tb_dac_bist_full` runs the default configuration at full size. It uses an 8-bit DAC
with uniform ±2 LSB noise, redrawn every 10 ns, and T = 28.44 µs. The calibration gives
D_min = 284 and D_max = 2844, so TR = 10.04 counts per LSB. The worst |DNL| over all
codes came out at about 0.20 LSB, and the noisy ideal DAC passes with 0.5 LSB
thresholds. Counting alone can be off by ±1 count, which is ±0.1 LSB, in each of the
two counts behind a DNL value; the remaining error is residual noise. The reference
simulation reports about ±0.1 LSB. A 0.6 LSB error on one code, under the same noise,
is flagged.

`tb_dac_bist_precision` shows what the clock period buys. A 0.1 LSB step on one code
of a 4-bit DAC is measured at three test precisions:

| TP | T | worst DNL error |
|---|---|---|
| 1 | 167 ns | 1.0 LSB (the step is invisible) |
| 10 | 1.67 µs | 0.11 LSB |
| 40 | 6.67 µs | 0.03 LSB (the step is resolved) |

A count can be off by up to one oscillation at each end of its period. So a DNL value
is good to about 2/TR LSB, where TR is the number of counts per LSB.

`tb_dac_bist` runs a 4-bit DAC with TP = 10. It runs the test on an ideal DAC and on
DACs with each kind of error: one code below its neighbour, +1 LSB offset, slope
errors, a 0.85 LSB step on one code, and a 2 LSB bow. It checks that exactly the
expected flags rise and that the measured sizes match what was injected (within about
one count).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dac_bist_pkg.sv \
          tb/tb_dac_bist.sv --top-module tb_dac_bist
./obj_dir/Vtb_dac_bist
```

| Testbench | What it covers |
|---|---|
| `tb_dac_bist_full` | defaults, 8-bit noisy DAC, two full sweeps (≈6 s) |
| `tb_dac_bist` | 4-bit, all error types, code memory read-back, abort, normal mode |
| `tb_dac_bist_precision` | 4-bit, the same 0.1 LSB step measured at TP = 1, 10 and 40 |
| `tb_dac_bist_core` | core with a testbench oscillator; every per-code result against an independent edge count |
| `tb_index_counter`, `tb_bist_dsp`, `tb_bist_ctrl`, `tb_bist_memory`, `tb_pattern_counter`, `tb_test_mux`, `tb_linear_vco` | one block each |

`tb/dac_model.sv` is the behavioural DAC used as the device under test. Its offset,
slope error, single-code error, bow and noise can all be set at run time.

For synthesis, use `dac_bist_core` with the package and its submodules. `linear_vco`
and therefore `dac_bist` use real numbers and delays.

## Design choices beyond the published scheme

* **Calibration starts with `test`.** The scheme measures D_min and D_max first and
  then sets `test` to start the pattern counter. Here one rising edge of `test` runs
  both calibration periods and then the sweep. The MUX already selects the test
  pattern during calibration.
* **The index counter is never reset.** It runs freely and successive samples are
  subtracted, instead of storing and resetting the counter at each period end. The
  count per period is the same.
* **TR comes from the calibration.** The scheme's formulas divide by TR without
  defining it. Here TR = (D_max − D_min)/(2^N − 1). Everything is reported multiplied
  by D_max − D_min, so no divider is needed.
* **Thresholds are run-time inputs**, one per check, in LSB with four fraction bits.
  The scheme only mentions "a predefined detection threshold".
* **Four registers are the default store**, as the scheme suggests for area. The
  all-codes memory that the scheme's block diagram shows is available through
  `KEEP_ALL_CODES`.
* **The VCO input range is 0–3 V.** This is a model assumption. The VCO chooses
  between the DAC output, V_min and V_max, and its phase integrates a time-varying
  input.
* **Reset, abort and the extra outputs are this design's own.** Reset is asynchronous
  and active low. Dropping `test` aborts. The per-code result stream, the worst-case
  values and `cal_fail` are additions.

Not included: the DAC itself (it is the device under test) and a transistor-level VCO.
