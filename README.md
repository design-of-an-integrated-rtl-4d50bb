# Digital voltage-mode controller for a 100 V synchronous buck converter

This is a small, fully digital controller for a synchronous buck converter that
steps 100 V down to either 48 V or 24 V at up to about 100 W, switching at
1 MHz. It measures the output voltage through an external ADC, runs a
fixed-point recursive PID once per switching period, and drives the high-side
and low-side switches with a counter-based PWM that keeps one clock of dead
time between them. One pin selects which of the two converters it serves; the
coefficients, target voltage and start-up ramp change with it.

The design is meant to be small: one PID update per microsecond leaves plenty
of time, so the whole controller is a handful of adders, three 12 x 10
multipliers and about 130 flip-flops. The hard parts are the number formats,
the 444-step modulator and the crossing of the duty word between a 4 MHz and a
444 MHz clock.

## Signal flow

```
            clk_pid (4 MHz)                                   clk_pwm (444 MHz)
 adc ──► sample_averager ──V──┐                                 
 (u7.4)   4 samples/period     ▼                                 
 mode ─► tuning_select ─vref─► setpoint_filter ─Ref─► pid_core ─d─► duty_cdc ─► dpwm ─► pwm_pos
                 └─ A0 A1 A2, rate ────────────────────┘   │                       └──► pwm_neg
                                                          └─► stabilisation_indicator ─► stabilised
```

`buck_controller` is the top. Everything left of `duty_cdc` runs on the PID
clock, everything right of it on the PWM clock. Each domain has its own reset
synchroniser (`sync_2ff` with its input tied high): the external `rst` is
asynchronous and active high, and each domain leaves reset on its own clock.

| Module | Role |
|---|---|
| `buck_ctrl_pkg` | word widths, number formats, tuning constants, limits, types |
| `tuning_select` | mode multiplexers: coefficients, target voltage, rate limit |
| `sample_averager` | 4 ADC samples per period, averaged to 0.25 V resolution; issues the 1 MHz PID enable |
| `setpoint_filter` | ramps the reference from 0 V towards the target at a fixed rate |
| `pid_core` | recursive PID with saturated feedback and duty limit |
| `stabilisation_indicator` | flags that the duty word has not changed for 15 updates |
| `sync_2ff` | two-flop synchroniser, also used for the resets |
| `duty_cdc` | moves the 9-bit duty word into the PWM clock domain |
| `dpwm` | 444-step sawtooth comparator PWM with dead time |
| `buck_controller` | top level |

## The fixed-point PID

### Control law

The controller is the incremental (recursive) form of a PID:

```
e(k)  = Ref(k) - V(k)
U(k)  = Us(k-1) + A0·e(k) + A1·e(k-1) + A2·e(k-2)
Us(k) = clamp(U(k), -1.6, 16)          (fed back)
d(k)  = clamp(U(k), 0, 399/512)        (duty word)
```

Only the last two errors and the last saturated output are stored. Because the
output itself is the integrator state, clamping the fed-back value is the
anti-wind-up: when the input voltage is too low to reach the target, the state
cannot run away, and when the input recovers the duty word comes off its limit
within a few hundred microseconds (165 µs in the closed-loop test).

### Number formats

All formats are two's complement `sI.F` (sign, I integer bits, F fraction
bits) except the ADC word and the duty word.

| Signal | Format | Bits | Note |
|---|---|---|---|
| ADC sample | u7.4 | 11 | 1/16 V per LSB, 0 … 127.94 V |
| Ref, V, e | s7.2 | 10 | 0.25 V per LSB |
| A0, A1, A2 | s0.11 | 12 | |
| P0 = A0·e(k) | s5.13 | 19 | |
| P1 = A1·e(k-1) | s6.13 | 20 | |
| P2 = A2·e(k-2) | s4.13 | 18 | |
| S0 = P0 + P1 | s6.13 | 20 | |
| S1 = P2 + Us(k-1) | s5.13 | 19 | |
| U = S0 + S1 | s7.13 | 21 | |
| Us | s4.13 | 18 | clamped to −13107 … 131071 (−1.6 … 16−2⁻¹³) |
| d | u0.9 | 9 | counts of the 444-step period, limited to 399 |

The widths come from worst-case signal ranges: reference 0 … 90 V, measured
voltage 0 … 105 V, coefficients below 1 in magnitude. Each product is formed
at 22 bits and cut to its listed width; the dropped upper bits are sign copies
for all errors within those ranges, so nothing overflows in normal operation.
The duty word is `U` with four of its 13 fraction bits truncated, then limited
to 0 … 399.

### Why the coefficients are scaled by 444/512

A 9-bit duty word would naturally index a 512-step PWM period. The PWM clock
cannot go above 444.44 MHz (2.25 ns), so a 1 MHz period has only 444 steps.
The duty word is nevertheless fed straight into the 444-step comparator, which
makes the real duty `d/444` instead of `d/512`, a gain of 512/444. The
coefficients are multiplied by 444/512 to cancel it, and the 90 % duty limit
becomes 0.9 × 444 = 399.6, rounded down to 399 counts.

| Mode | A0 | A1 | A2 | Target | Ramp |
|---|---|---|---|---|---|
| 48 V (`mode`=1) | 379 (0.18506) | −687 (−0.33545) | 312 (0.15234) | 192 (48 V) | 15 LSB/µs (3.75 V/µs) |
| 24 V (`mode`=0) | 269 (0.13135) | −491 (−0.23975) | 224 (0.10938) | 96 (24 V) | 10 LSB/µs (2.5 V/µs) |

The coefficients are the 2⁻¹¹ codes nearest to the real-valued tunings. They
belong to a deliberately aggressive tuning that overshoots on a plain step;
the ramped reference removes the start-up overshoot while keeping the fast
disturbance response.

### Timing

`pid_core` does the whole update in one PID clock. On the edge where its
enable is high it loads e(k-1), e(k-2), Us, the duty word and `d_valid`. The
enable is the averager's `valid`, high in one of every four PID clocks.

## Measurement: oversampling and the 0.25 V step

The inductor ripple is at the switching frequency, so sampling the output once
per period would alias it into the loop. The ADC is instead sampled four times
per period at the 4 MHz PID clock and the four samples are averaged.

The averaged value is cut to 2 fraction bits on purpose. A digital loop falls
into a limit cycle when one step of the output voltage is larger than one step
of the measurement. One PWM step moves the output by Vin/444, which is 0.225 V
at 100 V. A 0.25 V measurement step keeps the loop clear of that up to
Vin = 111 V.

The average is formed combinationally in the cycle that presents the fourth
sample, so the PID uses it on the same clock edge. Registering the average
first would cost another 250 ns of loop delay, and the loop has no phase
margin to spare (see below).

## Reference ramp

`setpoint_filter` starts the reference at 0 V after reset. At each PID update
it moves the reference toward the target by at most the rate limit:
`r(k) = r(k-1) + clamp(target − r(k-1), ±rate)`. Switching `mode` while the
converter runs therefore ramps the output from 48 V down to 24 V (or up)
instead of stepping it.

## Stabilisation flag

At each update the new duty word is compared with the previous one (XOR, then
OR of all bits). The result is shifted into a 15-stage shift register, and
`stabilised` is the NOR of all stages. It is high once the duty word has been
identical for 15 updates. It drops at the first update that changes the word.
Reset fills the register with ones, so the flag starts low.

At the nominal 100 V input the default tuning keeps a limit cycle (see
below), so the duty word keeps changing and the flag stays low. It rises when
the duty word sits at its 399 limit, and at lower input voltages where the
loop settles fully (for example 48 V from a 60 V or 80 V input).

## Two clock domains and the duty-word crossing

The PID logic runs at 4 MHz and the PWM counter at 444 MHz. The two clocks
come from separate sources. The only signal that crosses between them is the
9-bit duty word.

`duty_cdc` does not synchronise the bus bit by bit. The source keeps the word
in the PID's duty register. A request bit toggles on the same edge that loads
that register. Only the request bit passes through a two-flop synchroniser.
When the destination sees the synchronised bit change, the word has been
stable for at least two PWM clocks, and it is copied into the register that
feeds the comparator.

The word reaches the comparator on the third PWM clock edge after the PID edge
that produced it (7 ns). Words are 1 µs apart, so the scheme has a wide
margin. The new word takes effect within the running period if the counter
has not yet passed it, just as with a comparator fed directly. The word is
not held back to the next period boundary. `dpwm`'s `period_end` output is
left unconnected in the top.

Constraint for reuse: `d_in` may change only on a source edge where `load` is
high. The next load must come at least about four destination clocks later.

## DPWM and dead time

A counter runs 0 … 443 and wraps, so the period is 444 × 2.25 ns = 999 ns. A
comparator drives PWM1 while `counter <= duty`. A multiplexer forces PWM1 low
when the duty word is zero, because otherwise count 0 would still give a
one-step pulse. PWM1 passes through two registers to give PWM2 and PWM3:

```
pwm_pos = PWM2
pwm_neg = NOR(PWM1, PWM2, PWM3)
```

The low side turns off one clock before the high side turns on. It turns back
on one clock after the high side turns off. So there is one clock (2.25 ns) of
dead time at each edge, and the two drives can never be high together.

For a duty word `d` > 0, the high side is on for `d+1` clocks per period and
the low side for `444 − d − 3` clocks. For `d` = 0 the low side is on for the
whole period. An assertion in `dpwm` checks that the two drives never overlap.
`pwm_neg` is a combinational function of PWM1 and can glitch when the
comparator output changes. Register it if the pre-driver is sensitive to
glitches.

## Closed-loop behaviour

The testbenches close the loop around a switch-level model of the converter.
The model uses the nominal power stages:

- 48 V: 32.8 µH and 0.39 µF
- 24 V: 22 µH and 0.47 µF

The loads are 100 W, 10 W, 1 W and 1 nW at nominal output. Vin is 100 V.

| Case | Mean output | Range in steady state |
|---|---|---|
| 48 V, all four loads | 48.1 V | about 42 … 54 V |
| 24 V, 100 W | 24.1 V | about 22.4 … 25.8 V |
| 24 V, 10 W | 24.1 V | about 19 … 30 V |
| 24 V, 1 W and 1 nW | 24.1 V | about 15 … 33 V |

The mean is right in every case, and the reference ramps, duty limit,
feedback saturation, wind-up recovery and mode switch all behave as intended.
However, the loop does not settle. It keeps a limit cycle of a few volts,
larger at light load on the 24 V converter. Adding series resistance to the
inductor or the capacitor in the model (up to 0.2 Ω) shrinks the cycle but
does not remove it. Shifting the phase between the two clocks changes little.

The oscillation runs at roughly 140 kHz, and the duty word swings down to
zero on every cycle, so the duty limit bounds it. It is not always the only
state the loop can be in.

In one run the PID clock drifts slowly against the PWM clock. There, the 24 V
converter at 100 V input left the cycle after about 500 µs. It then stayed
settled (flag high, ±0.02 V) while the sampling instants drifted through the
whole period.

The 48 V converter at 100 V stayed in the cycle at every sampling phase over
1.25 ms.

Narrowing the Us clamp to the duty range does not help. In an incremental PID
that clamp also cuts the proportional and derivative steps. The output then
no longer averages to the target.

The plant gain is proportional to Vin, so the input voltage decides which
side of the stability edge the loop is on. Runs at 100 W load, started from
0 V:

| Converter | Settles, flag rises | Limit cycle |
|---|---|---|
| 48 V | Vin 60 … 80 V (output within ±0.05 … ±0.4 V) | Vin 85 … 111 V |
| 24 V | Vin 27 … 70 V (output within ±0.1 … ±0.7 V) | Vin 75 … 111 V |

At 54 V input, just above the 48 V minimum, the output holds 48 ± 0.3 V but
touches the duty limit. The gain margin at the nominal 100 V input is
therefore roughly 0.8. Reducing the coefficients' gain or the loop delay by
about a quarter is the scale of change needed; a retuned set has not been
verified here.

The main cause is the tuning. A cycle-level model of the same arithmetic
gives the best case, in which the four samples span the previous period and
the new word applies from the very next pulse. Even there, the 48 V loop
still swings by about ±3.5 V. The real hardware adds delay:

- the new word arrives about 0.75 µs into the period
- it therefore only takes effect in the next pulse

That raises the swing to about ±5 V. The coefficients come from a
continuous-time design with 0.5 µs of assumed dead time. Once the plant is
sampled at 1 µs with a modulator in the loop, they have no phase margin left.

The datapath is exact to the specified formats. The unit tests compare it
bit for bit with an independent model. So this is a property of the tuning in
this sampled loop, not an arithmetic error.

Before relying on the controller, retune A0 … A2 for the sampled loop,
including its real delay. This is only a parameter or package change. The
coefficients are parameters of `tuning_select`, with defaults in
`buck_ctrl_pkg`.

## Limits of operation

- Input voltage: the 399/444 duty limit sets the lowest input at which each
  target is reachable: 53.4 V for 48 V and 26.7 V for 24 V. The 0.25 V
  measurement step sets the highest: 111 V.
- Load: 100 W down to no load, as simulated above.
- Measurement range: 0 … 127.75 V.

## Interface of `buck_controller`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_pid` | in | 1 | PID clock, 4 MHz (four ADC samples per switching period) |
| `clk_pwm` | in | 1 | PWM clock, 444.44 MHz (2.25 ns) |
| `rst` | in | 1 | asynchronous reset, active high |
| `mode` | in | 1 | 0 = 24 V converter, 1 = 48 V converter |
| `adc` | in | 11 | output voltage, u7.4; sampled on rising `clk_pid` |
| `pwm_pos` | out | 1 | high-side switch drive |
| `pwm_neg` | out | 1 | low-side switch drive |
| `stabilised` | out | 1 | duty word unchanged for 15 updates |
| `dbg_duty` | out | 9 | current duty word |
| `dbg_v` | out | 10 | last averaged voltage, s7.2 |

Parameters: `N_STEPS` (444), `N_AVG` (4, a power of two) and `STAB_DEPTH`
(15). `tuning_select` takes the per-mode constants as parameters. The widths
are fixed in `buck_ctrl_pkg`.

The ADC, the gate pre-drivers and the power stage are outside this design.
Their signals are the top's ports.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    --top-module buck_controller_tb rtl/buck_ctrl_pkg.sv tb/buck_controller_tb.sv
./obj_dir/Vbuck_controller_tb
```

Replace the top module and the testbench file for the other benches.

| Testbench | What it checks |
|---|---|
| `buck_controller_tb` | End-to-end at default sizes: 48 V start-up, input drop, input far too low (duty limit, feedback saturation, flag), recovery time, live switch to 24 V, reset and 24 V start-up, no overlap, period length. It counts every mechanism and fails if one never happened. Simulates 3 ms in about a second. |
| `buck_load_tb` | Both converters at 100 W, 10 W, 1 W and 1 nW: ramp, mean within 1 V, peak bound. |
| `buck_vin_tb` | Input-voltage range of both converters, full settling with the flag raised at reduced input, 5 V input steps, drifting PID/PWM clocks, and an input below the range (duty held at its limit). |
| `pid_core_tb` | Bit-exact comparison with a 64-bit integer model, random coefficients and errors, both limits of U and of the duty word, one-cycle latency. |
| `setpoint_filter_tb` | Ramps up and down and random targets against a model. |
| `sample_averager_tb` | Random samples, averaging and truncation, enable every fourth cycle. |
| `stabilisation_indicator_tb` | Flag against a run-length model. |
| `duty_cdc_tb` | Asynchronous 4 MHz / 444 MHz clocks: every word delivered, intact, within 2 … 3 destination cycles. |
| `dpwm_tb` | Period, high-side and low-side on-times, dead time, zero duty, duty limit. |
| `sync_2ff_tb`, `tuning_select_tb` | Latency and reset release; the constant sets recomputed from their decimal values. |

The closed-loop benches use `real` arithmetic and a 1 ps time unit. They reach
into the hierarchy to count internal events such as rate-limited steps and
saturation, so they need the full design.

## Departures and choices

- The original datapath listing pairs A2 with e(k-1). Here the PID feeds
  e(k-2) into the A2 product, as the recursive control law requires.
- The coefficient word has 11 fraction bits. One passage of the original
  mentions a 15-bit fraction, but the width analysis and the product formats
  both rest on 11.
- The duty word goes straight to the comparator as soon as it arrives. It is
  not applied at the period boundary.
- The average is formed in the same cycle as the last sample, to save 250 ns
  of loop delay.
- The select of the multiplexer after the DPWM comparator is taken as
  "duty word is zero", so a zero word gives no pulse at all.
- Truncation is used everywhere a fraction is cut: the average, the products
  and the duty word.
- The Us upper limit is one LSB below 16, because 16 itself does not fit
  s4.13.
- The ADC word is taken as unsigned u7.4.
- The coefficients and per-mode constants are parameters, not registers.
- Resets and their synchronisers are added. Reset forces the high side off
  and the low side on.
- The limit-cycle behaviour described above is a property of the default
  tuning. It is reported here and left unchanged.
