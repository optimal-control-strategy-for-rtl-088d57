# Charge-balance transient controller for a digital buck converter

A buck converter regulated by an ordinary PID loop answers a load step
slowly: the loop bandwidth is a fraction of the switching frequency, so the
output capacitor has to carry the difference between the new load current and
the inductor current for many switching periods. This controller removes most
of that deviation. In steady state a voltage-mode PID loop drives the switch.
When the load current jumps by more than a threshold, a charge-balance
controller (CBC) takes over. It holds the switch fully on (load rose) or
fully off (load fell), so the inductor current moves at its largest possible
slope. It then reverses the switch at the one instant after which the
capacitor gets back exactly the charge it has lost. When the inductor current
has reached the new load current, it hands the switch back to the PID loop.
Further steps that arrive while a transient is still running are handled as
well (successive load changes). This is the case the method was made for.

The RTL follows the controller described in *Optimal Control Strategy for
Buck Converter Under Successive Load Current Change*. It keeps the FPGA
block partition of that design: a PID compensator, a DPWM, a load-step
detector, a capacitor-current zero-crossing block, the charge-balance
controller and a PWM selection block. The reference operating point is
Vin = 5 V, Vo = 1.5 V, fs = 250 kHz, L = 1.5 uH, C = 290 uF.

## The charge-balance rule

Let the capacitor current be ic = iL - io. Over a transient the output
voltage returns to where it started only if the integral of ic is zero. With
the switch on, iL rises at m1 = (Vg - Vo)/L. With the switch off, it falls
at m2 = Vo/L.

Take a positive load step at t0. The switch is forced on and ic starts
negative, so the capacitor discharges. ic crosses zero at tz, when iL passes
the new load current. Let Qa be the integral of ic from t0 to tz, and Qb the
integral from tz up to now. If the switch is turned off at t2, iL falls back
to io in T3 = (m1/m2)·T2, where T2 = t2 - tz. During T3 the capacitor gets a
further (m1/m2)·Qb. The charge sums to zero when

    Vo·Qa + Vg·Qb = 0          (positive step: switch on, then off)
    (Vg - Vo)·Qa + Vg·Qb = 0   (negative step: switch off, then on; T3 = (m2/m1)·T2)

So the controller needs no model of the load. It only integrates ic and
watches for the sign of the weighted sum to flip. Only the ratio of Vg to Vo
enters, and the same ratio sets T3 from a counted T2. At t3 the inductor
current equals the load current and the voltage is back at its reference,
which is the time-optimal response.

**Successive steps.** A second step in the same direction can arrive before
the balance is reached, or after it, during the return phase. The controller
then forces the drive state again. It does **not** clear the integral: the
charge is still counted from the first t0. tz becomes the *last* zero
crossing, so Qa is the integral from t0 to the last crossing, and the same
two equations still hold. This is what lets one transient absorb several
steps. If a successive step finds ic already past zero, no new crossing will
come, so the old crossing and its T2 count are kept.

A step in the *opposite* direction during a transient starts a new transient
from zero charge. The original analysis leaves this case open; this is this
design's choice.

## Block structure

```
 vo ─────────────► compensator ──duty──► dpwm ──pwm_out──┐
                     ▲   (PID)    valid   │ load          │
                     └──────────load──────┘               ▼
 io ──► load_step ──pos_step/neg_step──┬──────────────► pwm_logic ──► pwm
 io,il ► crosszero ──ic, ic_zero──► cbc ──pwm_pos/pwm_neg──┘
                                     └── active ──► compensator.hold
```

| module | clock | what it does |
|---|---|---|
| `cbc_top` | all | wires the blocks; top-level ports are plain signals |
| `compensator` | 100 MHz | d(k) = d(k-1) + A e(k) + B e(k-1) + C e(k-2), once per period, with clipping |
| `dpwm` | 200 / 100 MHz | 800-count counter (250 kHz), trailing-edge compare, `load` strobe once per period |
| `load_step` | 20 MHz | flags a change of io larger than `THRESHOLD` within `WINDOW` samples |
| `crosszero` | 20 MHz | ic = il - io, flags the zero crossing that ends the discharge (or recharge) |
| `cbc` | 100 MHz | integrates ic, tests the balance, times T2/T3, handles successive steps |
| `pwm_logic` | – | priority: step pulse > CBC force on/off > DPWM output |
| `cbc_pkg` | – | widths, state/direction enums, slope-ratio function |

The three clocks come from one PLL and must have coinciding rising edges:
200 MHz, 100 MHz and 20 MHz, from a 50 MHz reference at 4/1, 2/1 and 2/5.
The PLL is the FPGA vendor's primitive and is not part of the RTL.
`tb/pll1.sv` is a simulation model of it. The 20 MHz clock also paces the
three A/D converters.

### CBC state machine (`cbc.sv`)

| state | switch (positive / negative step) | leaves when |
|---|---|---|
| `ST_VMC` | PID/DPWM | any step: t0, clear the integrals → `ST_DRIVE` |
| `ST_DRIVE` | on / off | on a zero crossing, latch Qa and restart T2; once crossed and balanced: t2 → `ST_RECOVER` |
| `ST_RECOVER` | off / on | after T3 = ratio·T2 cycles: t3 → `ST_VMC` |

A same-direction step in `ST_DRIVE` or `ST_RECOVER` returns to `ST_DRIVE`
and keeps the integral. The balance test is a signed compare of
`wa·Qa + Vg·(Qtot - Qa)` with 48-bit products. The slope ratio is a Q10
constant computed at elaboration from `VG_MV`/`VO_MV`: 2389/1024 for m1/m2,
439/1024 for m2/m1.

The zero crossing is seen late. ic is sampled at 20 MHz and then passes the
converter, a register and an edge detector, about 8 cycles of 100 MHz in all.
`ZC_LATENCY` preloads the T2 counter with that delay. Without it, the return
phase comes out short by m1/m2 times the delay, and the inductor current ends
above the load current.

## Number formats and scaling

* Converter codes are 10 bits. `vo` is the *voltage error* after an analog
  error amplifier. Code 512 means zero error, and a lower code means the
  output is low. `io` and `il` must share one scale and one offset, because
  only their difference is used (11-bit signed `ic`).
* The PID output is the duty ratio as a 14-bit fraction (2^14 = 100 %). The
  DPWM maps it to counts as round(d·800/2^14).
* The PID coefficients are the published values A = 27.8, B = -49.54,
  C = 22.1, kept with 8 fraction bits (7117, -12682, 5658). The original does
  not state the units of e and d. Here a coefficient times one error code
  moves the duty by coefficient/2^14. The loop gain therefore depends on the
  analog error-amplifier gain. The testbench uses 0.25 mV per code
  (±128 mV range), and with it the PID loop alone shows about 97 mV of
  deviation for a 5 A step. With coarser codes the plain loop is sluggish;
  with finer ones it becomes unstable.
* The CBC integrals are in code × 100 MHz cycles. Only their ratio matters,
  so the converter scale does not enter the balance test.

## Timing

* `load` is high for one 100 MHz cycle at the start of every 4 us period.
  The PID takes the current `vo` code and presents the new duty with
  `dpw_valid` two cycles later. The DPWM uses it at once, in the same
  period, about count 6 of 800. This keeps the loop delay to a fraction of
  a period.
* A load step shows in `pos_step`/`neg_step` one 20 MHz cycle after the first
  converter sample that contains it. `pwm_logic` forces the switch from that
  pulse directly. The CBC follows within two 100 MHz cycles and holds the
  switch from then on.
* While the CBC is active, the PID skips its samples (`hold`), so it resumes
  from its pre-transient state without wind-up.

## Where this RTL departs from, or adds to, the original

* **Own choices where the original is silent:** the step-detection rule
  (change over a 4-sample window, hold-off, threshold 64 codes), the
  crossing-direction rule, the duty and coefficient number formats, reset
  behaviour (asynchronous, active high), the meaning of `Initialize`
  (preset d to Vo/Vin) and `Overflow` (result clipped), `ZC_LATENCY`, the
  priority inside `pwm_logic`, and the handling of an opposite-direction step.
* **Added link:** `cbc.active → compensator.hold`. The original block
  diagram shows no connection from the CBC to the PID.
* **Left out:** the clock inputs that the original diagram draws on the CBC
  (20 MHz) and Logic blocks are not needed here. The whole CBC runs on
  100 MHz.
* **Size:** the original FPGA build reports 4,429 logic elements, 2,848
  registers and 251,560 memory bits. Synthesised generically, this RTL has fewer
  than 300 flip-flops and no memory. The original does not say what its memory held, so nothing here
  corresponds to it.
* **Analog parts** (power stage, gate driver, sense amplifiers, A/D
  converters) are outside the RTL. `tb/buck_model.sv` models them for
  simulation.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | checks against |
|---|---|
| `tb_compensator` | integer reference of the PID law, clipping, 2-cycle latency, hold, initialize |
| `tb_dpwm` | high time per period = round(d·800/2^14), `load` every 400 cycles |
| `tb_load_step` | pulses for sharp, smeared and successive steps; none for noise, drift, small steps |
| `tb_crosszero` | reference ic and crossing flags on ramps and random data |
| `tb_cbc` | closed around ideal inductor-current slopes: charge sums to within 8 % of the moved charge, iL meets io at hand-back, T3 = ratio·T2 |
| `tb_pwm_logic` | full truth table |
| `tb_cbc_top` | full controller at default parameters against the buck model, next to a PID-only loop |

`tb_cbc_top` runs single and successive steps of 5 A and 10 A. Results with
the model (ideal components, no ESR):

| pattern | deviation CBC / PID | settling (±10 mV) CBC / PID |
|---|---|---|
| 0 → 5 A | 30 / 97 mV | 20 / 83 us |
| 5 → 0 A | 56 / 68 mV | 19 / 18 us |
| 0 → 5 → 10 A, 2nd step in drive | 34 / 180 mV | 8 / 195 us |
| 10 → 5 → 0 A, 2nd step in drive | 56 / 96 mV | 15 / 111 us |
| 0 → 5 → 10 A, 2nd step in return | 30 / 155 mV | 7 / 123 us |
| 10 → 5 → 0 A, 2nd step in return | 56 / 80 mV | 34 / 115 us |

At hand-back the inductor current is within 0.15 A of the load current. The
negative cases gain less, because the inductor current can fall only at
Vo/L = 1 A/us. That slope, not the controller, sets their deviation. For a
single 5 A load release the PID loop alone already settles about as fast.

These numbers do not match the published ones. For 0 → 5 → 10 A the
original simulation reports 15 mV and 11 us with charge balance, against
102 mV and 81 us for its PID. For 10 → 5 → 0 A it reports 21 mV and 12 us.
Three things in this model make the charge-balance response worse. First,
the step is seen only after the 20 MHz sampling and the 4-sample detection
window. Second, a 25 mA current resolution is assumed. Third, the second
step's timing is arbitrary, so the second step can land late in a phase.
The PID reference is also tuned differently, since the scale of its
coefficients is unknown. Take the table as a check of the mechanism, not as
a reproduction of the published figures.

## Simulating

Plain Verilator 5 (the testbenches use `--timing` for the clock and plant
models):

```
verilator --binary --timing --top-module tb_cbc_top -Irtl -Itb -y rtl -y tb \
    +libext+.sv rtl/cbc_pkg.sv tb/tb_cbc_top.sv -o sim
./obj_dir/sim
```

Swap the top module and file name for the other testbenches. The end-to-end
run covers 2 ms of converter time and finishes in well under a second.

## Changing it

* Another operating point: set `VG_MV`/`VO_MV` on `cbc_top`. The slope ratios
  and balance weights follow. Set `D_INIT` to Vo/Vin in Q14.
* Another switching frequency: set `PERIOD` (200 MHz / fs).
* Another converter pipeline: set `ZC_LATENCY` in `cbc` to the delay, in
  100 MHz cycles, from a true zero crossing to `ic_zero` being seen.
* Another sensing scale: adjust `THRESHOLD` (in current codes). Retune or
  rescale the PID coefficients to the error-amplifier gain.
