# Calibrated ring-oscillator clock with cyclic power gating

A ring oscillator makes a clock entirely on chip: nothing outside can stop
or slow it, which makes it attractive for security-relevant timing such as
a watchdog that resets the platform. Its weakness is that its frequency
moves with process, supply voltage and temperature, so a count of its
cycles is not a known time. This design fixes that in the simplest way:
at boot it counts the ring-oscillator cycles that fit into a known number
of cycles of the real-time clock (RTC), keeps that ratio, and from then on
measures time in units of the ratio. The RTC is used only once. Power
management then runs on the calibrated ring-oscillator clock: a cyclic
power-gating (CPG) controller switches a gated domain on and off in every
short, fixed period, so its average speed and power follow the duty cycle
without changing the supply voltage.

```
 rst_n --> +-----------------+ ro_clk  +------------------------+ clk_en  +------------------+
           | ring_oscillator |---+---->| cpg_controller         |-------->| power_gated_ro   |
           | (free running)  |   |     | period T_CPG, off-time |         | ring_oscillator  |--> clk_out
           +-----------------+   |     | timer, ON/SLEEP/OFF/   |         | + gated_ro_counter--> gro_out
                                 |     | WAKEUP                 |         +------------------+
 rtc_clk, enable1, enable2       |     +------------------------+
 prog_load_value, trig_units,    |        ^ cpg_run, t_off   |
 wdt_kick                        v        | & hold_signal    +--> pwr_on, save, restore
              +-------------------------+ |                       (power switch, retention cells)
              | ro_calibrator           |-+
              | RTC counter, hold sync, |--> ro_ratio, ro_is_faster, trig_signal
              | RO counter, watchdog    |
              +-------------------------+
```

All files are in `rtl/` (design) and `tb/` (self-checking testbenches).

| module | role |
|---|---|
| `cpg_ro_clock_gen` | top: wires the parts together |
| `ro_calibrator` | RTC-based calibration, hold signal, ratio, trigger, watchdog |
| `cpg_controller` | cyclic power-gating controller |
| `power_gated_ro` | the gated domain: a gated ring oscillator with its counters |
| `gated_ro_counter` | per-stage counters, adder and output register of the gated oscillator |
| `ring_oscillator` | behavioural model of a gated ring oscillator (not synthesizable) |
| `cpg_pkg` | phase type `cpg_state_e` and default widths |

## The ring oscillator

An odd number n of inverting stages in a loop oscillates at
f = 1 / (2 n Td), Td being one stage delay. `ring_oscillator` models this
with transport delays: the first stage is a NAND of the last stage and
`enable`, the others are inverters. With `enable` low the ring settles to
1,0,1,... within n stage delays and restarts from stage 0 when `enable`
rises. The defaults are 3 stages of 500 ps, a 333 MHz clock. Variation of
process, voltage and temperature is represented only by the
`STAGE_DELAY_PS` parameter; to try a slow or fast corner, change it.

This model is for simulation. In silicon the ring is a hand-placed cell,
on an FPGA a loop of LUTs; a synthesis tool reports it as a combinational
loop, which is what it is.

## Calibration against the RTC (`ro_calibrator`)

Two counters in two clock domains:

1. **RTC side.** `enable1` (raised after the power-good reset) starts the
   RTC counter. On the RTC edge at which it reaches `prog_load_value`
   (P) a match flag is registered; OR feedback keeps it set and the
   counter stops itself. A load value of 0 means 2^PROG_W.
2. **Crossing.** The flag goes through two RO-clock flip-flops and becomes
   `hold_signal`.
3. **RO side.** `enable2` (raised by software after `enable1`) starts the
   RO counter. `hold_signal` stops it. The frozen value is `ro_ratio`:
   the RO cycles in the calibration window.

The window runs from `enable2` to the P-th RTC edge after `enable1`, so
`ro_ratio` is the number of RO edges in that time plus the two RO cycles
the synchroniser takes. Software that raises `enable2` late shortens the
window and with it every later time unit. The two enables should be
raised together, or the delay between them should be kept small against
P RTC periods. `ro_is_faster` is `ro_ratio > P`: the oscillator made more
cycles than the RTC in the same time.

**Tampered RTC.** If the RTC is stopped the hold signal never comes. The
RO counter keeps running, its MSB sets after 2^(RO_W-1) RO cycles, and
`rtc_tamper` and `trig_signal` rise. With RO_W = 24 and the default
333 MHz this takes 25 ms. On a working RTC the MSB is never reached as
long as P x f_RO / f_RTC < 2^23. For a 32.768 kHz RTC that is about
10,200 RO cycles per RTC cycle, so any 8-bit P is safe.

**Watchdog in calibrated time.** After `hold_signal` two counters run on
the RO clock. The LOW counter restarts each time it has counted
`ro_ratio` cycles. One LOW round is therefore one calibration window,
P RTC periods long, whatever the oscillator's actual speed. The HIGH
counter counts these rounds. When it equals `trig_units` (non-zero),
`wdt_expired` and `trig_signal` rise, exactly `trig_units*ro_ratio + 1`
RO cycles after the last `wdt_kick` (or after `hold_signal`). The
trigger stays set until reset. Timing error: because the ratio includes
the two or three synchroniser cycles, each calibrated unit is longer than
P RTC periods by two to three RO periods. With a 32.768 kHz RTC, P = 64
and stage delays of 400, 500 and 650 ps (416, 333 and 256 MHz), the
two-window timeout in `tb_pvt_calibration` comes out at 3.87575 ms at all
three corners, within 9 ns of each other.

## Cyclic power gating (`cpg_controller`)

Every period is `T_CPG` cycles long. The off time `T_off` is loaded from
`t_off` (clamped to `T_CPG`) into the period timer at the start of every
period, so the duty cycle

    duty = (T_CPG - T_off) / T_CPG

can change from one period to the next with no lost cycles. A change of
`t_off` in the middle of a period takes effect at the next period. Inside
a period:

| phase | cycles | `pwr_on` | `clk_en` |
|---|---|---|---|
| `CPG_ON` | T_CPG - T_off | 1 | 1 |
| `CPG_SLEEP` | first T_SLEEP off cycles: supply switched off, decaying | 0 | 0 |
| `CPG_OFF` | the rest | 0 | 0 |
| `CPG_WAKEUP` | last T_WAKEUP off cycles: supply back on, settling | 1 | 0 |

If T_off < T_SLEEP + T_WAKEUP, the wake-up keeps its length (at most
T_off) and the sleep is cut short. `save` pulses in the last ON cycle
before the domain goes off, and `restore` in the last WAKEUP cycle before
it comes back. They are meant for state-retention registers. `run` low
(sampled at the period start) gives a period that is all ON. The
defaults, T_CPG = 100 and T_SLEEP = T_WAKEUP = 10, give duty steps of 1 %.
`pwr_on`, `clk_en` and `state` come straight from flip-flops, so no state
change can glitch the power-switch or clock enable. `save`, `restore` and
`period_start` are decoded from the period counter. Two assertions guard
the rules: the clock is never enabled without power, and the off time
changes only at a period start. In `ro_calibrator` one more checks that the
hold signal's source stays set while the hold is set.

## The gated domain (`power_gated_ro`, `gated_ro_counter`)

The domain switched by the CPG controller is itself a gated ring
oscillator with one counter per stage (`power_gated_ro`, which holds a
`ring_oscillator` and a `gated_ro_counter`). Each counter is clocked by
its own stage output and held in reset while `enable` is low (and at
power-on reset). The counts are
summed into `count`. The sum is loaded into `out` on the falling edge of
`enable`, i.e. at the end of each powered-on window, before the counters
clear. Started from rest, the ring gives one rising edge, on one of its
stages, every two stage delays, so a window of length W holds the number
of k >= 1 with 2 k Td < W. In the top, `gro_out` therefore reports the
stage transitions of the last ON window: 3 x (ON cycles of the calibrated
clock) when both rings have the same stage delay. The 8-bit per-stage
counters wrap.

## How the top connects them

* The calibration oscillator runs from the power-good reset on.
* The CPG controller is clocked by that oscillator, `ro_clk`. It starts
  gating only when `cpg_run` is high and calibration is done
  (`hold_signal`). Before that it holds the domain ON.
* The gated oscillator and its counters are enabled by the controller's
  `clk_en`.
* The power switch and the retention cells are physical cells outside this
  RTL. Their controls `pwr_on`, `save` and `restore` are outputs.
* The RTC is an input.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_STAGES` | 3 | ring stages, odd |
| `CAL_STAGE_DELAY_PS`, `GRO_STAGE_DELAY_PS` | 500 | stage delays of the two rings |
| `PROG_W` | 8 | width of `prog_load_value` |
| `RO_W` | 24 | RO calibration counter; MSB = tamper trigger |
| `TRIG_W` | 8 | width of `trig_units` |
| `CNT_W` | 8 | per-stage counter of the gated ring |
| `T_CPG`, `T_SLEEP`, `T_WAKEUP` | 100, 10, 10 | CPG period and transition times, in `ro_clk` cycles |

Only the three-stage ring is given by the design this RTL follows. Every
other number above is a choice of this implementation.

## What follows the original architecture and what is chosen here

These parts follow the original architecture:

* the odd inverter ring and its frequency;
* the gated oscillator with one counter per stage, counters reset by
  Enable, an adder and a register loaded from Enable;
* the two calibration counters and their enables;
* the self-stopping RTC counter with a programmable load value;
* the hold signal that stops the RO counter;
* the RO-counter MSB as the trigger for a stopped RTC;
* the signal names RO_Ratio, RO_is_faster, HIGH/LOW count and trigger;
* the CPG fixed period, the off-time timer reloaded every period, the
  duty-cycle relation, sleep and wake-up times and state retention;
* running power management on the calibrated clock.

These are choices of this implementation:

* **HIGH/LOW counters.** The original shows counters named HIGH and LOW,
  compared with the RO counter, feeding the trigger. It does not say what
  they do. Their use as a watchdog counting calibrated windows is this
  design's reading of the stated aim, a watchdog timer on the calibrated
  clock. `trig_units` and `wdt_kick` are added for it.
* **Register edge.** The output register of the gated counters loads on
  the falling edge of Enable.
* **Phases.** The CPG period runs ON first, then off. Wake-up sits at the
  end of the off time. The `save`/`restore` timing and the `run` input
  are this design's own.
* **Top wiring.** Which oscillator is gated by what, and that CPG starts
  after calibration.
* **Numbers.** All widths, delays and cycle counts.
* **Resets.** Asynchronous, active-low resets. The enables are treated as
  quasi-static levels.

The original reports an FPGA implementation of 18 Spartan-3E slices for
the whole design. This RTL has about 121 flip-flop bits, mostly from the
24-bit calibration and watchdog counters, so it is larger than that
figure.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Verilator 5 with timing support is needed because the ring model uses
delays:

```
verilator --binary --timing --assert -y rtl -y tb rtl/cpg_pkg.sv \
    tb/tb_cpg_ro_clock_gen.sv --top-module tb_cpg_ro_clock_gen -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ring_oscillator` | period 2nTd for 3 and 5 stages, stage lag Td, stopping and settling |
| `tb_gated_ro_counter` | random edge counts per stage, live sum, capture at the end of the window, clearing, wrap |
| `tb_power_gated_ro` | captured count against the ring's timing for random window lengths, 3 ns period, silence while disabled |
| `tb_ro_calibrator` | ratio against its own edge count for four RO speeds (faster and slower than the RTC), late `enable2`, watchdog cycle count and real time, kick, stuck trigger, tamper after 2^23+1 cycles |
| `tb_cpg_controller` | phase sequence, enables, save/restore and duty cycle of every period, cycle by cycle, for off times 0 to above T_CPG, mid-period changes, `run` low |
| `tb_pvt_calibration` | workload: three copies of the top at fast, typical and slow stage delays, one real 32.768 kHz RTC, P = 64: ratio, no tamper, watchdog cycle count and equal real timeout at every corner, CPG running on each calibrated clock (about 30 s) |
| `tb_cpg_ro_clock_gen` | the whole design at default parameters: calibration, three duty cycles, gated-ring counts per window, silence while gated, watchdog kick and expiry, then a boot with a stopped RTC. It counts every mechanism and fails if one never occurred. It takes about 30 s. |

Except in `tb_pvt_calibration`, the RTC in the testbenches runs at 30.5 ns
instead of 30.5 us to keep the runs short. Only the ratio changes with
this; nothing in the RTL depends on the RTC frequency.
