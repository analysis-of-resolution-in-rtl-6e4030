# Fixed-point real-time model of a boost converter

A hardware-in-the-loop (HIL) rig replaces a power converter with a digital
model that runs in real time. A real controller then switches the model's
transistor and reads back its currents and voltages through converters, as
if the power stage were there. This RTL is such a model for a lossless boost
converter (L = 1 mH, C = 100 uF, 200 V in, 400 V / 300 W out, 100 kHz
switching). It works in fixed-point arithmetic and computes one explicit-Euler
time step of 10 ns per clock cycle, so it runs at 100 MHz.

The model is built around how wide each signal must be. The two state
variables, inductor current and capacitor voltage, are added to themselves
millions of times. They need many fractional bits so that the tiny per-step
increments are not lost: 26 and 36 bits. Each state reaches the other half of
the loop as a *feedback signal*, and the feedback does not need those bits.
It only has to be as precise as the sampled input it is combined with. The
default build therefore sends the voltage back with 3 fractional bits instead
of 24, and the current with 10 instead of 17. A sweep testbench measures the
cost of that choice against a real-valued model.

## The converter equations

With `Q` the switch command, `vg` the input voltage and `ir` the load current,
each step is

| case | inductor voltage vL | capacitor current iC | inductor current next |
|---|---|---|---|
| `Q = 1` (switch closed) | `vg` | `-ir` | `iL + dt/L * vL` |
| `Q = 0`, `iL > 0` (CCM, diode conducts) | `vg - vout_fb` | `il_fb - ir` | `iL + dt/L * vL` |
| `Q = 0`, `iL <= 0` (DCM) | `0` | `-ir` | `0` |

and always `vout(k) = vout(k-1) + dt/C * iC(k-1)`. Here `vout_fb` and `il_fb`
are the feedback signals. In DCM the inductor current is forced to exactly
zero. A step in CCM that overshoots below zero is therefore corrected on the
next cycle. The mode comes from `Q` and the sign of the full-precision `iL`.

## Datapath and signal formats

Formats are written QX.Y: a sign bit, X integer bits and Y fractional bits,
two's complement, 1+X+Y bits wide. X or Y can be negative. For example, the
constant dt/L ≈ 1.0e-5 is Q-16.25, a 10-bit word whose LSB weighs 2^-25.

```
 vg Q9.3 ─────────┐
                  ├─ vl_select ─ vL Q12.3 ─ euler_integrator (x dt/L) ─ iL Q8.17 ─┬─ round ─ iin Q8.4 (DAC)
 vout_fb Q11.3 ───┘   (mode)                    (clear in DCM)                     └─ round ─ il_fb Q8.10 ─┐
   ^                                                                                                       │
   │                  ir Q2.10 ─┐                                                                          │
   │                            ├─ ic_select ─ iC Q9.10 ─ euler_integrator (x dt/C) ─ vout Q11.24 ─┐      │
   │                  il_fb ────┘   (mode)                                                         │      │
   │                    ^                                                                          │      │
   │                    └──────────────────────────────────────────────────────────────────────────┼──────┘
   └──────────────────── round ◄───────────────────────────────────────────────────────────────────┤
                                                                           vout_ext Q11.1 (DAC) ◄─ round
```

| signal | format | bits | origin |
|---|---|---|---|
| `vg` input | Q9.3 | 13 | 13-bit ADC |
| `ir` input | Q2.10 | 13 | 13-bit ADC |
| `iL` state | Q8.17 | 26 | from the range (127.3 A worst case) and the smallest increment (about 2 mA) |
| `vout` state | Q11.24 | 36 | from the range (792.7 V worst case) and the smallest increment (about 20 uV) |
| dt/L, dt/C | Q-16.25, Q-13.22 | 10 each | codes 336 and 419 (dt = 10 ns) |
| `vL` | Q12.3 | 16 | lossless difference of vg and vout_fb |
| `iC` | Q9.10 | 20 | lossless difference of il_fb and ir |
| `vout_fb` | Q11.3 | 15 | sizing rule below |
| `il_fb` | Q8.10 | 19 | sizing rule below |
| `iin`, `vout_ext` outputs | Q8.4, Q11.1 | 13 each | 13-bit DACs, integer bits as in the states |

Intermediate signals follow lossless rules. A sum or difference gets
Q(max(X1,X2)+1).max(Y1,Y2) and a product gets Q(X1+X2+1).(Y1+Y2). The state
widths come from ceil(log2(range/increment)) plus 8 guard bits, a sign bit
and one spare integer bit. The spare bit is why the states never overflow
in practice. The integrators still wrap, rather than saturate, if they do.

## How wide a feedback signal has to be

A feedback signal keeps all the integer bits of its state, since its range is
the same. The question is its fractional bits, Y. The feedback is always
added to or subtracted from an input sample (`vout_fb` from `vg`, `il_fb`
from `ir`), so its precision beyond that sample's buys nothing. The rule
built into the defaults is:

1. Y(feedback) ≥ Y(input), and
2. X(feedback) + Y(feedback) ≥ X(input) + Y(input),
3. with the usual fixed-point bound: the feedback's quantisation error stays below 2^-Y.

The top computes its default feedback widths with
`hil_pkg::fb_frac_bits(x_fb, x_in, y_in) = max(y_in, x_in + y_in - x_fb)`.
A change of ADC format therefore carries over to the feedback signals.
For `vout_fb` against `vg` (Q9.3), rule 1 gives Y ≥ 3 and rule 2 gives
Y ≥ 1, hence Q11.3. For `il_fb` against `ir` (Q2.10), rule 1 gives Y ≥ 10 and
rule 2 gives Y ≥ 4, hence Q8.10. The reasoning is about *moving* bits, the
bits that actually change during a run. The error stops falling once the
feedback's moving bits (the integer bits its swing covers, plus Y) match the
input's. Rules 1 and 2 meet that for most operating points without knowing
the swings in advance. When the state barely moves, they may miss it, but
then the error is small anyway.

`tb/tb_feedback_sweep.sv` runs the experiment behind this rule. Eleven copies
of the model run side by side. In each, every signal has 24 more fractional
bits than its default, except one input and its feedback signal. A
real-valued model gives the reference. The mean absolute error of each state
is measured relative to 400 V and 0.75 A. Results in log10 of the relative
error, from the iL state (vout behaves alike):

| run | feedback | floor (Y = 48 or 41) | above the rule | at the knee | Y = 0 | coarsest |
|---|---|---|---|---|---|---|
| 200 ms from 400 V | vout_fb, vg Q9.3 | -3.21 | -3.20 (Y=8) | -2.28 (Y=3) | -0.65 (Y=0) | -0.34 (Y=-3) |
| 200 ms from 400 V | il_fb, ir Q2.10 | -2.94 | -2.94 (Y=10) | -2.92 (Y=4) | -2.89 (Y=0) | +0.80 (Y=-4) |
| first 2 ms from 0 V | vout_fb | -4.22 | -4.22 (Y=8) | -4.02 (Y=3) | -2.93 (Y=0) | -1.58 (Y=-3) |
| first 2 ms from 0 V | il_fb | -4.68 | -4.68 (Y=10) | -4.37 (Y=4) | -2.78 (Y=0) | -0.29 (Y=-4) |

Each curve is flat above a knee and rises steeply below it. For the current
feedback the knee sits at Y ≈ 0 in steady state and at Y ≈ 4 during start-up,
where the current swings over 7 integer bits. That is where the moving-bits
argument puts it, and the default Q8.10 is well above both. For the voltage
feedback in steady state, Q11.3 is the knee itself: the error there is
about 8 times the floor over 200 ms and 1.6 times over the 2 ms start-up.
The flat floor is reached around Y = 5 to 8. Anyone who wants the voltage
feedback's share of the error to be negligible should set `FBV_Y` a few bits
higher. It costs a few bits in one subtractor.

## Rounding

Every place that drops bits rounds to nearest: the product before it enters
a state, the two feedback signals and the two DAC outputs. Truncation would
be one adder cheaper, but in a closed loop it is biased. Dropping bits
always moves the value down, by half an LSB on average. In the integrator
that is about 0.2 % of every inductor-current increment at the default
formats, and it accumulates over the 500 steps of each switch phase.
Measured against the real-valued model, truncation raised the error about
tenfold in the integrators. In the feedback signals it put the error at
Q11.3 some 50 to 80 times above the floor, and then the voltage feedback would
need far more bits. `fx_requantize` keeps truncation available through
`ROUND = 0`. Rounding the largest positive value up saturates instead of
wrapping.

## Interface and timing (`boost_hil_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (one model step per cycle), asynchronous active-low reset to 0 |
| `en` | in | 1 | step enable; low pauses the model with both states held |
| `load`, `il_init`, `vout_init` | in | 1, 26, 36 | load the initial conditions (takes priority over `en`) |
| `q` | in | 1 | switch command, 1 = closed |
| `vg`, `ir` | in | 13, 13 | ADC samples, Q9.3 and Q2.10 |
| `iin`, `vout_ext` | out | 13, 13 | DAC words, Q8.4 and Q11.1 |
| `il`, `vout` | out | 26, 36 | the states, full precision |
| `il_fb`, `vout_fb` | out | 19, 15 | the feedback signals |
| `mode` | out | 2 | 0 switch closed, 1 CCM, 2 DCM |

The whole step is combinational between the two state registers: round,
subtract, select, multiply by a constant, round and add. Inputs present
before a rising edge determine the states after it, and the outputs follow
the states combinationally. The critical path is one constant multiply and
two adders, about 16x10 and 20x10 bits at the default formats. The design
has no handshake. The model is free-running, and real time is kept by
`dt = 1 / f_clk`. At a different clock, recompute the constants, for
example `DTL_CODE = round(dt/L * 2^DTL_Y)`, and check that they still fit
their format.

## Modules

| file | what it is |
|---|---|
| `rtl/hil_pkg.sv` | package: conduction-mode enum, mode decoding, `imax`, and `fb_frac_bits`, the feedback sizing rule |
| `rtl/fx_requantize.sv` | QX.YI to QX.YO with rounding or truncation; the feedback signals and DAC outputs |
| `rtl/vl_select.sv` | subtractor and three-way select for vL |
| `rtl/ic_select.sv` | subtractor, negation and select for iC |
| `rtl/euler_integrator.sv` | constant multiply, rounding, accumulate, state register with load/clear/enable |
| `rtl/boost_hil_top.sv` | the model: two integrators closed through the two feedback signals |

All formats are parameters of the top (`VG_X/VG_Y`, `IR_X/IR_Y`, `IL_X/IL_Y`,
`VO_X/VO_Y`, `FBV_Y`, `FBI_Y`, `DTL_*`, `DTC_*`, `OUT_W`). The intermediate
widths are derived from them with the rules above. Feedback widths with
negative Y are allowed down to X + Y = 1.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M` line.

- `tb_fx_requantize`, `tb_vl_select`, `tb_ic_select`: random operands and
  extreme values in every mode. Expected values are computed in real
  arithmetic, which is exact at these widths.
- `tb_euler_integrator`: the iL and vout configurations under random
  increments, loads, clears and pauses. It includes deliberate wrap-around
  and checks every cycle against an integer reference.
- `tb_boost_hil_top`: the default build in closed loop with a 533 Ω load
  (ir formed from `vout_ext`), 200 V input with ±3 V noise and a 50 % duty
  cycle at 100 kHz. It makes two runs, 2 ms from 400 V and 3 ms of start-up
  from 0 V, with a pause and reloads. Every output is compared bit for bit
  each cycle with an integer model of the same arithmetic, and the error
  against a real-valued model is bounded (about 1e-5 for vout and 1e-3 for
  iL, relative). It also checks that closed-switch steps, CCM, DCM, a
  negative current forced to zero, a pause and a reload all occur.
  Start-up peaks at 127.3 A and about 793 V, the worst-case ranges the state
  formats were sized for.
- `tb_feedback_sweep`: the resolution sweep above, about a minute long.

With plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hil_pkg.sv tb/tb_boost_hil_top.sv \
          --top-module tb_boost_hil_top -Mdir obj_top -o sim && obj_top/sim
```

Replace the testbench name for the others. `-Irtl -Itb` lets Verilator find
the modules by file name.

## What is assumed rather than given

- **Time step.** dt = 10 ns is inferred from the constant formats, which need
  dt/L < 2^-16, and from the smallest inductor-current increment of about
  2 mA at 200 V. The codes 336 and 419 follow from it.
- **Rounding** instead of truncation everywhere bits are dropped (see above).
- **Wrap-around** on state overflow. The spare integer bit makes it
  unreachable in normal operation.
- **Output formats.** Q8.4 and Q11.1 keep the states' integer bits in the
  13-bit DAC words.
- **Mode source.** `iL > 0` is taken from the full-precision state for both
  selects.
- **Controls.** Reset to zero, the `en` pause and the `load` of initial
  conditions are additions for use on a bench.
- **Outside the RTL.** The ADCs, the DACs, the controller that drives `q`
  and the load are not modelled. The testbenches generate `vg` and `ir` and
  a constant-duty PWM. A resistive load is emulated by deriving `ir` from
  the model's own output voltage.
