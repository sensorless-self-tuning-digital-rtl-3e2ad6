# Sensorless self-tuning average-current-mode controller for multiphase buck converters

This is a digital controller for an N-phase synchronous buck converter (two phases by
default). It regulates the output voltage with average current-programmed control, but it has
**no current sensors**. The current in each inductor is *computed* from quantities the
controller already knows: the duty ratio it commands, the input voltage, and the output voltage.
Because that calculation depends on the inductor, its resistance and the dead-time offset, the
controller identifies those parameters itself. It does so with a switched test current and a
short excursion to twice the switching frequency. The identified numbers are then used
three more ways:

* **Current sharing that equalises losses.** Phases with a higher resistance carry less current,
  so every phase dissipates the same R·I².
* **A two-cycle transient controller.** On a large load step it uses the identified output
  capacitance and inductance to compute switch on/off times directly, instead of waiting for a
  PI loop.
* **Sensorless temperature monitoring and protection.** The identified resistance rises with
  temperature. It is converted to degrees through a table and compared with a limit. The
  estimated currents are also checked against an overcurrent limit.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. All blocks run from one clock of
2^8 × f_sw: 128 MHz for the default 500 kHz switching frequency and 8-bit DPWM.

## Signal flow

```
 vin ADC (4 mV, fsw/8) ─┐
 vout ADC (16 mV, 8fsw)─┼─> current_estimator ──iest[k]──> current_compensator ──duty[k]──> dpwm ──gate[k]
                        │        ^  G, c2, ioff               ^ iref[k]                     ^ force (transient)
                        │        │                            │                             │
                        │   estimator_tuning ──Req──> current_sharing <──itot── dual_mode_compensator
                        │        │  (sink_en, 2fsw, freeze)                       (PI + transient_compensator)
                        │        └──Req──> thermal_monitor ──shutdown──> dpwm enable
```

`cpm_controller` is the top. It holds the ADC registers and wires the blocks together. Once
per switching period:

1. the DPWM marks the start of the period;
2. the estimator updates all phase currents, 2N+1 clocks later;
3. the voltage PI, the current sharing and the current loops update on that "estimates ready"
   pulse;
4. the new duty codes take effect at each phase's next period start.

## The current estimator (`current_estimator`)

An inductor with series resistance R driven by the average switch-node voltage behaves as a
first-order R-L system. Its average current is therefore a low-pass filtered version of the
average inductor voltage:

    vL[n]  = d[n]·vin[n] − vout[n]
    s[n]   = c1·s[n−1] + c2·(vL[n] + vL[n−1]),   c2 = 1/(1 + 2τ/Ts),  c1 = 1 − 2·c2
    iest[n] = G·s[n] − ioff

* The filter is the bilinear transform of 1/(1 + sτ), with τ = L/R.
* G = 1/R is the gain.
* ioff removes the offset caused by dead time and switch delays, which make the real duty ratio
  differ from the commanded one.
* The update is written as s += c2·(vL[n] + vL[n−1] − 2s), so only c2 is stored.

All phases share one multiplier. Each phase takes two clocks: one for the filter update and one
for the gain multiply.

Three design details matter in practice:

* **Output voltage.** vout is the *sum of the eight output samples* of the period, not one
  sample. The 16 mV output step is coarse next to R·I_test, about 40–60 mV. Averaging eight
  samples lets the switching ripple dither the quantisation. Without it the gain calibration
  was off by up to 30%.
* **Forced pulses.** The transient controller can force the switches. The duty code does not
  describe those pulses, so the top measures each phase's real on-time. In the period after a
  forced one, it corrects the estimator's duty by (measured − used).
* **Fixed-point formats.** vL carries 8 fraction bits in 4 mV units. s carries 24 fraction
  bits. G is unsigned with 10 fraction bits, in mA per 4 mV.

## Self-tuning (`estimator_tuning`)

A calibration (`cal_start`) runs phase by phase. While phase k is being tuned, `freeze` holds
the current references of all other phases. The voltage loop's whole response to the test
current therefore lands in phase k. Between phases the freeze is released for `T_SET` periods.

For each phase:

1. **Gain.** The tuning waits until the voltage error has been zero for `STEADY_N` periods. It
   then averages the estimate over 2^AVGL periods (point A), switches on the test sink, waits
   `T_AB` periods and averages again (point B). The true current rose by exactly I_test, so
   `G ← G·I_test / (i_B − i_A)`. This also gives Req = 1/G.
2. **Time constant and capacitance.** The tuning averages once more (point C) and switches the
   sink off. The output overshoots. The controller follows the output samples to the peak D,
   where the capacitor current is zero. At D the inductor current must have fallen by exactly
   I_test, so any difference in the estimate is a τ error:

       τ ← τ0 + 2·τ0²·ΔIpeak / (I_test·(2·τ0 − ΔT))

   Here ΔIpeak is the estimate's excess fall and ΔT is the time to D. One update may change τ by
   at most a factor of two. Then c2 is recomputed and L = τ·Req. The peak also gives
   C = I_test·ΔT / (2·ΔV).
3. **Offset.** Phase k alone switches at 2·f_sw while its loop holds the same current. Doubling
   the frequency doubles the duty error from the fixed delays. The change in the estimate
   therefore equals the residual offset, and it is added to ioff.

At the end, Leq = 1/Σ(1/L_k) is formed for the transient controller, and `req_valid` hands the
resistances to the sharing and thermal blocks. An `abort` (any protection shutdown) ends a
calibration at once and releases the sink, the 2·f_sw mode and the freeze.

Every division goes through one shared sequential divider (`seq_div`, one quotient bit per
clock).

## Loss-equalising current sharing (`current_sharing`)

Equal conduction loss R_k·I_k² means I_k ∝ 1/√R_k. For each phase the block computes
q_k = √(2^38/Req_k), then weights w_k = q_k/Σq, which are 17-bit numbers with 1.0 = 2^16. Every
period, iref_k = itot·w_k. During a calibration the frozen phases keep their references and the
phase under test takes itot − Σ(frozen). Weights start equal and are recomputed on each
`req_valid` by a divider–square-root–divider sequence.

## Voltage loop and transient mode (`dual_mode_compensator`)

The error e = Vref − vout, in 16 mV codes, is registered on every output sample.

* **Steady state.** `pi_compensator` turns e into the total current reference itot once per
  period. Its output is clamped to ±IMAX.
* **Load step.** `transient_compensator` watches de = e[n] − e[n−1] on every sample. When
  |de| ≥ DE_TH, it holds the PI and the current loops and runs two cycles:
  * **Cycle 1, dead beat.** The load step is ΔI = C·de. All switches are forced on for
    Leq·ΔI/(vin − vout) on a step up, or off for Leq·|ΔI|/vout on a step down. This brings the
    summed inductor current to the new load.
  * **Cycle 2, charge balance.** One period after the trigger, the remaining deviation gives the
    lost charge C·e. A triangular current pulse with peak √(2·C·e·(vin−vout)·vout/(Leq·vin))
    returns it: on then off, or off then on if the voltage is high.
  * **Hand-back.** The PI is preset to the sum of the phase estimates, so the current loops see
    no step. A hold-off of HOLDOFF samples follows.

  The times are computed with the shared divider and square root. The dead-beat pulse starts
  about 70 clocks after the trigger.

C, Leq and times use scaled units (see `cpm_pkg`). That makes ΔI = C·de and t = L·ΔI/V plain
integer products and quotients:

* C is in mA·sample/16 mV;
* L is in clock·4 mV/mA;
* both carry 8 fraction bits.

The transient mode is enabled only after C and Leq have been identified, and not during
calibration.

## Temperature and protection (`thermal_monitor`)

The identified Req of each phase is mapped to a temperature by linear interpolation in a
32-point table at 0, 5, …, 155 °C. The table is built at elaboration from
Req(T) = REQ_25·(1 + α·(T − 25)), with REQ_25 = 26.3 mΩ and α = 3900 ppm/K. Replace `bp()` with
measured data for a real power stage.

Two conditions latch `shutdown`, which disables the DPWM, until `fault_clear`:

* over-temperature, when any Req exceeds REQ_MAX = 34 mΩ (100 °C on that table);
* overcurrent, when any estimated phase current exceeds I_MAX = 40 A.

## Number formats (`cpm_pkg`)

| quantity | unit / format |
|---|---|
| vin | 12-bit code, 4 mV |
| vout, Vref | 8-bit code, 16 mV |
| current | 18-bit signed, 1 mA |
| duty | 8-bit code, d = code/256 |
| G | mA per 4 mV, 10 fraction bits |
| Req | 4 Ω·2^-20 per LSB (34 mΩ = 8913) |
| τ | switching periods, 8 fraction bits |
| L | clock·4 mV/mA, 8 fraction bits |
| C | mA·(32 clocks)/16 mV, 8 fraction bits |

## Parameters

* **Top (`cpm_controller`):**
  * N = 2 phases;
  * I_test = 4000 mA;
  * DPWM 8 bits;
  * output ADC sampled 8 times per period, input ADC once every 8 periods.
* **Fixed by this design, no published value:**
  * current-loop gains: KP = 20, KI = 2, >>12;
  * voltage PI: KP = 4096, KI = 128, >>4, ±100 A;
  * initial G = 1/(10 mΩ);
  * initial τ = 50 periods;
  * averaging over 64 periods;
  * transient threshold of 2 codes;
  * the current limit.
* **Sizing of the current-loop gains.** They keep the loop stable for estimator time constants
  down to about 15 periods. If the identified τ is much smaller, lower KP.

## Simulation

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`.
With Verilator 5:

    verilator --binary --timing -Irtl -y rtl +libext+.sv -y tb rtl/cpm_pkg.sv \
              tb/tb_cpm_controller.sv --top-module tb_cpm_controller -Mdir obj
    obj/Vtb_cpm_controller

The end-to-end test, `tb_cpm_controller`, runs the top at its default parameters around
`buck_plant`. That is a behavioural two-phase 12 V → 1.79 V converter:

* 1.0/1.1 µH and 10/14 mΩ phases;
* 200 µF output capacitor with 3 mΩ ESR;
* a one-clock turn-off delay, which creates the offset the calibration removes;
* a 4 A sink;
* 16 mV / 4 mV ADC models.

It runs in about 10 s and covers:

* start-up;
* a full calibration;
* the accuracy of G, τ, L, Leq and C;
* the estimates against the plant;
* the current ratio and loss balance;
* 20 → 45 → 20 A load steps;
* an overcurrent shutdown;
* stepwise heating with recalibration to about 65 °C;
* an over-temperature shutdown at 36 mΩ.

It counts every mechanism (gain, peak, τ, offset, 2·f_sw, sink, sharing, transient up/down,
shutdown) and fails any that never happened.

## Results and known limits

* **Gain and sharing.** G is identified within about 4% and the estimates follow the plant
  within about 6% after calibration. Sharing gives 11.1 A / 8.9 A for 10/14 mΩ: a ratio of 1.25
  against the ideal 1.18, with conduction losses within 15%.
* **Time constant.** τ comes out 10–42% low, depending on the power-up state, and so do L,
  which is derived from it, and Leq. C comes out about 25% low. The end-to-end test accepts
  τ and L within 40%, so those two checks fail for some power-up states. The peak search on a 16 mV output code with ripple is the weak
  point. The 2-code hysteresis and the factor-of-two limit on τ updates keep it from running
  away over repeated calibrations. Heating steps track the falling τ correctly.
* **Transient mode.** It detects 20 ↔ 45 A steps and applies the dead-beat and charge-balance
  pulses. In closed loop, though, the output deviates by 0.6–0.75 V and takes about 150 periods to
  settle. The too-small τ makes the estimator respond faster than the real inductors. During
  and after the forced pulses the estimate runs up to 35% above the real current, and the
  voltage loop is preset from it. These
  four checks fail in `tb_cpm_controller`, which therefore reports 4 to 6 failures out of 48. All block-level testbenches
  pass.
* **Protection in operation.**
  * Protection acts on estimates. Before the first calibration the estimate carries the full
    dead-time offset and a default gain, so the overcurrent limit is approximate until then.
  * A large G change in one calibration, such as a hot stage calibrated from the default G,
    steps the estimate and can trip the overcurrent limit. In operation, periodic
    recalibration keeps the steps small.
* **Design choices not in the published controller.**
  * the eight-sample output average;
  * the measured-on-time correction;
  * the exact form of the τ update and its limit;
  * switching only the phase under test at 2·f_sw;
  * the PI preset from the estimate sum after a transient, with the current loops held for
    one more update so that they first see the new references;
  * all gains, widths and averaging lengths.
* **Silicon cost.** The published controller reports about 15.6 k gates. This RTL uses wide
  (64-bit) sequential dividers for simplicity and was not optimised for gate count.
