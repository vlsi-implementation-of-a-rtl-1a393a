# Demand-mode dual chamber rate-responsive pacemaker pulse generator

A demand pacemaker stimulates the heart only when the heart fails to beat
by itself in time. The pulse generator here does that for two chambers of
the right heart. It waits for an intrinsic beat in the atrium. If no beat
comes within the escape interval, it paces the atrium. It then waits one
AV delay (200 ms) for the ventricle and paces the ventricle only if no
ventricular beat is sensed in that time. The escape interval gives a base
rate of 72 beats per minute (833 ms from beat to beat). In rate-responsive
operation, an activity-sensor level shortens the interval when the body
needs more oxygen.

The whole generator is two escape timers and one small state machine that
reloads them and looks at their expiry flags. The controller's rules are
those of the original thesis design (A. Panda, *VLSI Implementation of a
Demand mode Dual Chamber Rate Responsive Cardiac Pacemaker*, NIT Rourkela).
Widths, the time base, the rate arithmetic, the sense detector and the
exact meaning of the non-DDD modes were chosen here; they are listed in
the section "What is this design's own".

```
 adc_atrium ──► sense_detect ──sa──┐                    ┌──► pa (atrial pace)
 adc_ventricle► sense_detect ──sv──┤                    ├──► pv (ventricular pace)
                                   ▼                    │
                            dual_chamber_ctrl ──────────┘
                              ▲ za   │ ta      ▲ zv   │ tv
                              │      ▼         │      ▼
                           pm_timer (A)      pm_timer (V)
                              ▲ va_ms          ▲ av_ms (lri_ms in VVI)
                              └──── rate_adapt ◄── activity, threshold, slope
                                                    rate_mod_en

 sc_s ──► single_chamber_pacemaker (single_chamber_ctrl + pm_timer) ──► sc_p
```

`pacemaker_top` holds both paths. The single chamber pacemaker is the
simpler, separate design the dual chamber one grew from. It sits beside the
dual chamber path with its own ports and shares only the clock and reset.

Each controller can also be used alone, with its expiry input `z` driven
from outside. The original design calls that the pacemaker "without
delay". Adding the escape timer, which supplies `z`, makes the pacemaker
"with delay".

## The controllers and their timing

This is the part that needs the most care when the RTL is changed.

### Single chamber: Reset Timer, Wait, Pace

`single_chamber_ctrl` has three states:

| state       | leaves to   | when                                   |
|-------------|-------------|----------------------------------------|
| Reset Timer | Wait        | always, after one cycle                |
| Wait        | Reset Timer | `s` (beat sensed)                      |
| Wait        | Pace        | `z` (timer expired) and not `s`        |
| Wait        | Wait        | neither                                |
| Pace        | Reset Timer | always, after one cycle                |

A sensed beat wins over an expired timer. So a beat that arrives in the
same cycle as the expiry still inhibits the pace.

The outputs are **Mealy**. `p` is high in the one cycle in which the machine
decides to enter Pace, which is the Wait cycle where `z & !s` holds. `t` is
high in the cycle in which it decides to enter Reset Timer. The timer is
therefore reloaded at the same clock edge at which the state becomes Reset
Timer. Both outputs are one-cycle pulses. Because `p` depends
combinationally on `s` and `z`, register it if it drives a pad.

The `s` input is level-sensitive. While it is held high, the machine
alternates between Reset Timer and Wait, restarting the timer every other
cycle. It never paces during that time, and it paces one escape interval
after `s` falls. The dual chamber path instead puts an edge detector
(`sense_detect`) in front of its controller, so one long pulse counts as
one beat.

### Dual chamber: two triples of states

`dual_chamber_ctrl` has Reset Timer A, Wait A, Pace A, Reset Timer V,
Wait V and Pace V. In DDD mode the states run in this order:

```
Reset Timer A → Wait A ─(za & !sa)→ Pace A → Reset Timer V → Wait V ─(zv & !sv)→ Pace V → Reset Timer A
                  │ sa                  ▲                     │ sv                           ▲
                  └─────────────────────┘ (skip Pace A)       └──────────────────────────────┘ (skip Pace V, to Reset Timer A)
```

- **Atrial sense in Wait A.** The machine goes straight to Reset Timer V.
  The AV delay then runs from the intrinsic atrial beat; this is atrial
  tracking.
- **Ventricular sense in Wait V.** The machine goes to Reset Timer A, so
  the next atrial escape interval is timed from that beat.
- **Other chamber's input.** While the machine is in one chamber's states,
  it ignores the sense and expiry inputs of the other chamber.

The outputs `pa`, `pv`, `ta` and `tv` follow the same Mealy rule as the
single chamber controller.

### Cycle-exact intervals

Each timer counts `N × TICK_DIV` clock cycles for a load value of `N` ms.
The Pace and Reset Timer states take one cycle each. This gives the
following times, all checked by the testbenches:

| event pair (DDD)                          | clock cycles            |
|-------------------------------------------|-------------------------|
| `pa` → `pv`, no ventricular beat          | `AV × TICK_DIV + 2`     |
| `pv` → `pa`, no atrial beat               | `VA × TICK_DIV + 2`     |
| `sa` → `pv` (tracking)                    | `AV × TICK_DIV + 1`     |
| `pv` → `pv` in DDI with the atrium sensed | `(VA + AV) × TICK_DIV + 3` |
| `pv` → `pv` in VVI, no beats              | `LRI × TICK_DIV + 2`    |
| single chamber `p` → `p`, no beats        | `interval × TICK_DIV + 2` |
| single chamber sensed beat → `p`          | `interval × TICK_DIV + 1` |

At the default 50,000 cycles per ms, one unsensed 72-per-minute beat lasts
41,650,004 cycles. That is 4 cycles (80 ns at 50 MHz) longer than 833 ms.

A sense event that arrives while the controller sits in a Pace or Reset
Timer state, or in the other chamber's states, is dropped. Each of those
states lasts one cycle. The sense detector gives one pulse per beat, and
it does not hold the pulse.

## Pacing modes

`mode` (`pm_pkg::pace_mode_e`) selects the response. `rate_mod_en` is the
fourth letter of the mode code (R).

| mode | chambers paced / sensed | response to a sensed beat |
|------|-------------------------|---------------------------|
| DDD  | both / both | Inhibits that chamber's pace. An atrial beat starts the AV delay (tracking). |
| DDT  | both / both | Triggers an immediate pace in the same chamber, in the same cycle as the sense. An expired timer also paces. |
| DDI  | both / both | Inhibits only. An atrial beat cancels `pa`, but the machine still waits for TimerA to expire before it starts the AV delay, so the ventricle keeps the base rate and does not track the atrium. |
| VVI  | ventricle / ventricle | Inhibits. The atrial states are skipped, and TimerV is loaded with the whole beat-to-beat interval. |

DDDR, the main configuration, is DDD with `rate_mod_en` set. DDTR is DDT
with `rate_mod_en` set. The mode can be changed at any time, and the
machine follows the new rules from its next decision. In DDI, a register
(`ddi_a_inhibit`) holds the atrial sense until TimerA expires.

## Rate response

`rate_adapt` maps the activity level `S` to a rate. The rate stays flat up
to a threshold and rises linearly with a programmable slope above it:

```
rate = 72                                   if S <= threshold or rate modulation is off
rate = 72 + (slope × (S − threshold)) / 4   otherwise, limited to MAX_RATE (180)
lri_ms = 60000 / rate      (truncated)
av_ms  = 200
va_ms  = lri_ms − 200
```

`S` and the threshold are 8 bits wide. The slope is 4 bits, in quarter
beats per minute per sensor step. The division is done by a restoring
divider that produces one quotient bit per cycle. The block loops through
three steps:

1. Sample the target rate (1 cycle).
2. Divide (16 cycles).
3. Write `rate_ppm`, `lri_ms`, `va_ms` and `av_ms` together and pulse
   `update` (1 cycle).

The loop is 18 cycles long. A change on the sensor therefore shows at the
outputs within 36 cycles. A timer picks up a new value only at its next
reload, so a rate change takes effect from the next beat. After reset, the
outputs hold the base-rate values (72, 833, 633, 200).

`MAX_RATE` must stay below 300 per minute, so that `lri_ms` remains above
the 200 ms AV delay. `av_ms` is a constant output, kept so that both timer
load values come from one place.

## Time base and timers

`pm_timer` is a 16-bit down-counter. `load` (the controller's `t`) and
reset both load `load_value`. The counter then counts down once every
`TICK_DIV` clock cycles. `zero` (the `z` input of the controller) stays
high from the moment the count reaches 0 until the next load. The
prescaler restarts on each load, so an interval is exact to the cycle. The
default `TICK_DIV = 50000` makes the tick 1 ms with a 50 MHz clock. With
`TICK_DIV = 1` the timer counts clock cycles.

## Sensing input

Each chamber's sensing circuit delivers one pulse per detected R wave. The
board digitises both channels together as 14-bit two's complement samples
(−8192 … 8191), with a shared `adc_valid` strobe. `sense_detect` raises
`sa` or `sv` for one cycle on the first valid sample above
`sense_threshold` that follows a sample at or below it. A long input pulse
therefore counts as one beat.

## Outside this RTL

The following parts have no logic function, or their protocols are not
specified, so they are not modelled here:

- the ECG front end: the AD620 instrumentation amplifier (gain about 200),
  the 200 Hz – 2 kHz band-pass filter and the 50 Hz twin-T notch filter;
- the 555-based R-wave pulse generator;
- the output driver, the leads and the battery;
- the serial interfaces of the board's ADC (LTC1407A-1 with LTC6912-1
  preamplifier) and DAC (LTC2624).

Samples enter as parallel words with a strobe, and the pace outputs are
one-cycle logic pulses. A DAC interface, or an output stage with a real
pulse width, has to be added for hardware use. Diagnostic memory and
telemetry are not part of this design.

## What is this design's own

These points follow the thesis:

- the states and transitions of both controllers;
- Mealy outputs;
- sense priority over expiry;
- the signal names (s, z, p, t; sa, za, sv, zv, pa, pv, ta, tv);
- 72 per minute, the 200 ms AV delay and the 16-bit timer load and count;
- a rate response that is flat below a threshold and linear with a
  programmable slope above it;
- the 14-bit two's complement ADC samples, taken from two channels at the
  same time.

These points are choices made here:

- The clock is 50 MHz, with a 1 ms tick, and the prescaler restarts on
  each load.
- The beat-to-beat interval is split as VA = LRI − AV for TimerA, with
  AV for TimerV. In VVI, TimerV gets the whole LRI.
- The rate response uses an 8-bit sensor, a quarter-step slope, a
  180-per-minute limit and a serial divider.
- DDT, DDI and VVI behave as described in the mode table.
- Sense events are detected on the rising crossing of a threshold.
- Pace pulses are one cycle wide.
- The thesis keeps the timers internal and brings out only the pace
  pulses. `pacemaker_top` also brings out the sense events, the state, the
  DDI register, the current rate and interval, and both timer counts, for
  observation. A design that needs only `pa`, `pv` and `sc_p` can leave
  the others open.
- Reset is synchronous and active high. It puts the machine in
  Reset Timer (A) and loads each timer.
- The original design blends a fast and a slow sensor (a pacing-rate
  profile). Here there is one sensor curve, because the blending
  algorithm is not specified.

## Files

| file | contents |
|------|----------|
| `rtl/pm_pkg.sv` | interval type, mode and state enums, constants |
| `rtl/pm_timer.sv` | escape timer with prescaler |
| `rtl/single_chamber_ctrl.sv` | three-state controller |
| `rtl/single_chamber_pacemaker.sv` | controller + timer |
| `rtl/dual_chamber_ctrl.sv` | six-state controller with modes |
| `rtl/rate_adapt.sv` | sensor curve and interval division |
| `rtl/sense_detect.sv` | sample threshold and edge detector |
| `rtl/pacemaker_top.sv` | top level |
| `tb/heart_model.sv` | behavioural two-chamber heart for closed-loop tests |
| `tb/tb_*.sv` | self-checking testbenches |

Top-level parameters: `TICK_DIV` (50000), `BASE_RATE` (72), `MAX_RATE`
(180), `AV_MS` (200), `SAMPLE_W` (14).

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_pm_timer`: expiry exactly at `N × TICK_DIV` cycles for divisors 1
  and 3, reload in mid-count, and freezing with `en`.
- `tb_single_chamber_ctrl`, `tb_dual_chamber_ctrl`: directed sequences for
  every transition, and for every mode of the dual controller. Then
  thousands of random cycles, including random mode changes, are compared
  with a reference model.
- `tb_single_chamber_pacemaker`: pace period, inhibition by faster
  intrinsic beats, and the escape time after the last sensed beat.
- `tb_rate_adapt`: reset values, the flat, linear and limited parts of the
  curve, `60000/rate`, and the 18-cycle update period.
- `tb_sense_detect`: one event per rising crossing on a random sample
  stream.
- `tb_pacemaker_top`: a closed loop with `heart_model`, at 2 cycles per
  ms. It covers DDD pacing, tracking and full inhibition; DDDR at 180 and
  112 per minute; DDT triggering; DDI; and VVI pacing and inhibition. The
  single chamber path runs alongside. It counts each mechanism and fails
  if one never occurs.
- `tb_workload_555`: the bench test, in which a 555 astable source
  (1 s high, 10 s low) stands in for the heart. It runs at 50 cycles per
  ms and checks VVI pacing between the input pulses, one sense per pulse,
  and that the single chamber path never paces while its input is high.
- `tb_workload_timer_load`: the short simulations in which the timers
  count clock cycles (`TICK_DIV = 1`). The single chamber pacemaker is
  loaded with 8 and both dual chamber timers with 10. It checks every
  pace spacing with and without sensed beats.
- `tb_pacemaker_full`: all defaults (50,000 cycles per ms). It runs DDDR
  through beats at 72 and 180 per minute and one tracked beat, about
  150 million cycles, which takes a little over a minute in Verilator.

Run a testbench with Verilator like this:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/pm_pkg.sv tb/tb_pacemaker_top.sv --top-module tb_pacemaker_top
./obj_dir/Vtb_pacemaker_top
```

The testbenches use `$urandom` only, and they need no files.
