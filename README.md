# Digital average-current-mode control for a buck converter, with VCOs instead of ADCs

This is the FPGA half of a cascade controller for a DC-DC step-down (buck)
converter. An outer voltage loop sets a current reference. An inner
current-mode loop turns the transistor off when the *average* inductor current
reaches that reference. The controller needs no A/D converter. The inductor
current and the output voltage each drive a voltage-controlled oscillator
(VCO). The FPGA counts the VCO pulses, and a pulse count over an interval is
the integral of the signal over that interval. The count therefore already is
an average.

The reference system runs at 25 kHz switching (Ts = 40 us), from 12 V in to
5 V out, with L = 270 uH, C = 100 uF, a 6.8 Ω / 3.4 Ω load and a 1.5 A
average-current limit. Every default in the RTL is set for that system.

## Measuring by counting

A VCO gives `f = F0 + S·u`. Counting its edges from t_a to t_b gives

    N = ∫ f dt = F0·(t_b − t_a) + S·∫ u dt

So N is linear in the average of `u` over the window. Nothing is sampled and
nothing between samples is lost. The analog front end is outside the RTL:

| signal | conditioning | VCO input |
|---|---|---|
| inductor current iL | 0.1 Ω shunt, instrumentation amplifier, + 0.683 V offset | 0.683 V + 1.1585 V/A · iL (0 … 2 A → 0.68 … 3 V) |
| output voltage u0 | 2.2 k / 1 k divider, + 0.683 V offset | 0.683 V + u0 / 3.2 |

The offset keeps the VCO above about 0.7 V. Below that, its frequency no
longer follows the input. The VCO runs from 23 MHz at 0 V to about 140 MHz at
3 V and saturates near 150 MHz. At 140 MHz a 40 us period holds 5600 pulses,
which is the full-scale count. All quantities inside the controller are
counts per switching period. `dcm_pkg::vco_counts()` converts a VCO input
voltage to counts using the straight line f = 23 MHz + 39 MHz/V · u, and the
package derives the defaults from it:

| constant | meaning | value |
|---|---|---|
| `I_ZERO_COUNT` | current channel count at 0 A | 1985 |
| `I_LIMIT_COUNT` | count at the 1.5 A limit | 4695 |
| `U_REF_COUNT` | voltage channel count at 5 V | 4422 |
| `PERIOD_CLKS` | 50 MHz clocks per 25 kHz period | 2000 |

A different VCO or front end only changes these numbers. If you retune the
hardware, recompute them with the same formula.

## The current modulator: how a switching period works

This is the core of the design (`current_modulator`, `current_counters`).
It is also the part that needs the most care.

* The current VCO clocks two 16-bit counters. **Z_off** counts while the
  transistor is off. **Z_on** counts while it is on. An adder forms
  `Z(iL) = Z_off + Z_on`.
* The period pulse `cl` **sets** the PWM flip-flop, which turns the
  transistor on.
* The digital comparator **resets** the flip-flop as soon as `Z(iL) ≥ i_ref`.
  That edge turns the transistor off. It also clears both counters, so a new
  measurement starts there.

A measurement window therefore runs from one switch-off to the next. It
covers one off interval and then one on interval, which is about Ts in steady
state. The transistor stays on until the current, averaged over that window,
reaches the reference. The window length is not fixed: it is set by where
the switch-offs fall. `il_dig` holds the adder value at each window end. In
simulation it matches the integral of the VCO frequency over the window to
within one count.

The design adds three rules that the basic scheme leaves open:

* **Maximum duty.** The pulse `dmax`, at 90 % of the period, forces a
  switch-off if the comparator has not fired. It also restarts the window.
  Without it, the transistor stays on for as long as the current is below
  the reference, for example during start-up.
* **Skipped period.** If the count has already reached `i_ref` when `cl`
  arrives, that period's on pulse is skipped, and the window restarts at
  `cl`.
* **Priority.** A reset of the flip-flop wins over a set in the same cycle.

The counters, the comparator and the flip-flop all run on the current VCO's
own pulses, so the PWM edge is placed to within one VCO period (7 … 40 ns).
The switch-off comes one VCO edge after the count reaches `i_ref`, because
the comparator looks at the registered count. `cl`, `dmax` and `i_ref` come
from the system clock. They pass through toggle synchronisers, which adds
2–3 VCO edges of delay.

### The inner loop does not settle by itself

The window always starts at the previous switch-off. Because of that, the
rule "switch off when the window integral reaches R" restores the average
current but does not restore the switch-off phase. Linearise it around a
steady state with on-time t, peak current P and current slopes m1 (on) and
m2 (off). Write δt_n for the change of the on-time and δi_n for the change
of the current at turn-on. The comparator condition and the inductor then
give

    (a + b·P)·(δt_n − δt_{n−1}) + b·Ts·δi_n = 0
    δi_{n+1} = δi_n + (m1 + m2)·δt_n

Here `a` is the VCO offset rate and `b` its gain in counts per ampere. This
map has determinant exactly 1 for any gains. With an ideal inductor a
disturbance neither grows nor decays. It oscillates with a period of about
6 switching periods at the default values. Only losses in the power stage
damp it, such as the shunt and winding resistance. In the closed-loop
testbench, with 0.25 Ω of series resistance, the inductor current keeps
swinging by several hundred mA from one period to the next. The output
voltage follows with a ripple of about ±0.3 V. The long-term averages are
still regulated. Anyone building on this modulator should expect this
behaviour and should look at the window definition first if steadier
current is needed. The RTL implements the scheme as described and does not
add a compensating term.

## Voltage loop

`voltage_counter` counts the voltage VCO over each full period, from `cl` to
`cl`. The output voltage is nearly flat, so one counter is enough. The count
of the finished period goes to the system clock domain as `u0_dig`, with a
one-cycle `u0_valid`.

`voltage_controller` is a discrete PI controller that runs once per period:

    e      = u_ref − u0_dig                          (counts)
    integ  = clamp(integ + KI·e, 0, (I_MAX − I_MIN)·2^FRAC)
    i_ref  = clamp(I_MIN + (KP·e + integ) >> FRAC, I_MIN, I_MAX)

`I_MIN` is the zero-current count and `I_MAX` the 1.5 A limit. Clamping the
integrator to the same span is the anti-windup. The gains KP = 588/256 and
KI = 30/256 are this design's own choice. They aim at a crossover near
1 kHz with the 100 uF capacitor, and they are parameters. The new `i_ref`
reaches the comparator a few VCO cycles after the `cl` that ended the
voltage window, which is early in that period's on time.

## Module map and interfaces

```
dcm_buck_controller            top: clk, rst_n, en, vco_i, vco_u, u_ref -> pwm (+ monitors)
├── cl_oscillator              clk domain: cl every PERIOD, dmax at DMAX
├── voltage_counter            vco_u domain counter, captured at cl, handed to clk
│   ├── reset_sync, toggle_sync, word_sync
├── voltage_controller         clk domain PI -> i_ref, iref_load, limited
└── current_modulator          vco_i domain: comparator + PWM flip-flop
    ├── current_counters       Z_off, Z_on, adder
    └── reset_sync, toggle_sync, word_sync
dcm_pkg                        widths, types, VCO scaling, default counts
```

The top has three clock inputs. `clk` is the system clock, 50 MHz by
default. `vco_i` and `vco_u` are the VCO outputs, each used as a clock. The
VCOs never stop (their lowest frequency is 23 MHz), so both are valid clocks.
`rst_n` resets asynchronously and is released separately in each domain.
`pwm` drives the gate driver and changes on `vco_i` edges. The monitor
outputs are in the domain that produces them, as listed in the top's header
comment. `u_ref` is in counts; use `dcm_pkg::U_REF_COUNT` for 5 V.

For timing closure, the current-modulator logic must run at the highest VCO
frequency, about 150 MHz. That covers the 17-bit adder, the 17-bit
comparator and the flip-flop.

## What follows the source design and what is chosen here

Taken from the source design:

* the VCO-plus-counter measurement
* the two counters, Z_off and Z_on, with their adder
* the digital comparator and the set/reset PWM flip-flop clocked by `cl`
* a window that restarts at switch-off
* the 16-bit reference
* one voltage counter per period
* the PI voltage controller with a 1.5 A limit
* 25 kHz switching
* the circuit values behind the count constants

Chosen here:

* the 50 MHz system clock
* the 90 % maximum duty cut and the skip rule
* reset-over-set priority
* counter saturation
* all clock-domain crossing and reset logic
* the PI gains, number format and anti-windup
* the reset value of `i_ref`, which is 0 and keeps the transistor off until
  the first voltage sample arrives

Two points had two possible readings:

* **VCO gain.** One value quoted for the VCO is 15.6 MHz/V. The measured
  curve and the 5600-pulse full scale give about 39 MHz/V. The constants use
  39 MHz/V.
* **Voltage window.** The voltage window could start at `cl` or at the end
  of the on pulse. It starts at `cl` here. The length is Ts either way.

Not in the RTL:

* the VCOs (TLC2933A-type parts)
* the analog acquisition circuits
* the power stage
* the VCO enable line of the board

The testbench models the analog parts. `tb/vco_model.sv` is a behavioural,
non-synthesizable VCO.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cl_oscillator` | cl spacing, dmax position, enable gating (short period) |
| `tb_current_counters` | both counters and the adder against a model, random on/clear, saturation |
| `tb_current_modulator` | exact switch-off edge at `i_ref` + 1 VCO edge, `il_dig`, dmax cut, skipped periods, turn-on only after `cl`; VCO faster while on, as with real current |
| `tb_voltage_counter` | per-period count within 3 edges of the true count, and no edge lost or counted twice over 40 periods of random VCO frequency |
| `tb_voltage_controller` | `i_ref`, strobe timing and the limit flag against a real-arithmetic PI model, including both clamps |
| `tb_dcm_buck_controller` | closed loop at full default parameters with a switched buck model and two VCO models |

The closed-loop run covers 4 ms: start-up into 6.8 Ω, a step to 3.4 Ω at
2 ms and a step back at 3 ms. It takes about one second. Results:

* Every one of the ~96 measurement windows matches the window integral.
* Start-up average current: 1.54 A over the first 400 us, with `i_ref`
  held at the limit.
* 400 us average of u0: 5.07 V at 6.8 Ω, 4.70 V at 3.4 Ω, 5.21 V after
  returning to 6.8 Ω. At 3.4 Ω the load needs 1.47 A, right at the 1.5 A
  limit, and the oscillating inner loop delivers less than the limit on
  average.
* u0 range after the steps: 3.88 … 5.18 V and 4.42 … 5.96 V.

The testbench requires that comparator switch-offs, maximum-duty cuts,
skipped periods, the current limit and the per-period voltage updates each
occur.

Run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dcm_pkg.sv \
    tb/tb_dcm_buck_controller.sv --top-module tb_dcm_buck_controller
./obj_dir/Vtb_dcm_buck_controller
```

Replace the testbench name to run the others. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/dcm_pkg.sv rtl/<module>.sv`. The
remaining warnings are expected:

* unused package constants
* unused monitor-only counter outputs
* the reset synchroniser's output feeding asynchronous resets
