# Two-road traffic light controllers in plain sequential logic

A traffic light for a simple crossing does not need a microcontroller. A
divided clock, a small interval counter and a state machine of six or seven
states are enough to run a fixed light plan. This RTL holds two such
controllers:

* **Fixed-time intersection** (`tl_simple_intersection`). Both roads take
  turns on a fixed loop.
* **Sensed intersection** (`tl_sensed_intersection`). The north-south main
  road stays green until a car waits on the east-west side road. The side
  road has a sensor on its west approach and one on its east approach.

Both controllers run off a 50 MHz board clock and step at 10 Hz. They are
independent designs. `traffic_top` puts them side by side and shares only
the clock and the reset.

## Lamp words

Each road gets a one-hot 3-bit lamp word, `{red, yellow, green}`:

| value  | lamp   |
|--------|--------|
| `100`  | red    |
| `010`  | yellow |
| `001`  | green  |

The encoding is defined once, as `lamp_t` in `rtl/tl_pkg.sv`. The states
(`tl_state_t`), the timer flags (`timer_flags_t`) and the divider's rate
select (`rate_t`) are defined there too.

## The light plans

A *tick* is one period of the 10 Hz controller clock, so 100 ms.

Fixed-time controller (`tl_simple_fsm`):

| state | north-south | east-west | leaves on | lasts (ticks / s) | next |
|-------|-------------|-----------|-----------|-------------------|------|
| S0    | green       | red       | t10       | 12 / 1.2          | S1   |
| S1    | yellow      | red       | t1        | 3 / 0.3           | S2   |
| S2    | red         | red       | t1        | 3 / 0.3           | S3   |
| S3    | red         | green     | t5        | 7 / 0.7           | S4   |
| S4    | red         | yellow    | t1        | 3 / 0.3           | S5   |
| S5    | red         | red       | t1        | 3 / 0.3           | S0   |

One loop takes 31 ticks, which is 3.1 s. After reset the controller starts
in S2, with both roads red.

The sensed controller (`tl_sensed_fsm`) has the same S1 to S5 and one
extra state, SS:

| state | north-south | east-west | transition |
|-------|-------------|-----------|------------|
| S0    | green       | red       | to SS when `sens_w` or `sens_e` is high; otherwise it stays |
| SS    | green       | red       | to S0 if both sensors are low; to S1 on t10 (12 ticks) |
| S1–S5 | as above    | as above  | as above; S5 returns to S0 |

The SS state confirms that a car is really waiting. The car must be sensed
on every tick of the 12-tick confirmation. If it is gone on any tick, the
controller falls back to S0 without touching the main road. If the car
waits through S5, S0 lasts one tick and the controller goes straight back
into SS.

## Timing: the interval timer and its flags

This part needs the closest reading. `tl_timer` is a 4-bit counter. The
state machine clears it on the same tick that it changes state. The
counter then counts ticks and stops at 11. It keeps counting while the
count is 10 or less.

The timer gives three flags:

* `t1 = count > 1`
* `t5 = count > 5`
* `t10 = count > 10`

The state machine sees a flag on one tick and changes state on that same
tick. A state that waits on `tN` therefore lasts N+2 ticks:

* 1 tick to clear the counter
* N+1 ticks to count past N

That gives 3, 7 and 12 ticks for t1, t5 and t10.

Only the sensed controller's return from SS to S0 happens without a timer
clear. The timer is cleared again on the next S0 to SS step, so each
confirmation starts from zero.

The timer clear (`timer_clr`) is a combinational output of the state
machine. The timer acts on it only when it also gets the tick, so the
timer and the state register always change together.

## Clocking: the divider and its tick

`tl_clock_div` counts board cycles up to a divide ratio N and then wraps,
so one output period is exactly N cycles. The divided clock `out_clk` is
high while the count is between 0 and N/2, which is N/2+1 cycles of the N.

Four rates are selected by `{s1, s0}`:

| `{s1,s0}` | rate   | N           |
|-----------|--------|-------------|
| 00        | 0.1 Hz | 500,000,000 |
| 01        | 1 Hz   | 50,000,000  |
| 10        | 10 Hz  | 5,000,000   |
| 11        | 1 kHz  | 50,000      |

The controllers use the 10 Hz setting, given by the `RATE` parameter. The
counter is 29 bits wide, enough for the largest ratio.

The timer and the state machine are not clocked by `out_clk`. They run on
the board clock, and the divider's `tick` output is their clock enable.
`tick` is a one-cycle pulse in the cycle `out_clk` rises. A state change
therefore shows one board cycle (20 ns) after the rising edge of `out_clk`.
This keeps the whole design in one clock domain. `out_clk` is still brought
out as `rate_clk`, for example to blink an LED.

Right after reset, `out_clk` goes high for N/2 cycles before its first full
period. The first tick comes N cycles after reset ends.

## Where this design adds to or departs from the original lab design

* **Reset.** There is a synchronous, active-high `rst`. The original relies
  on power-up values. The reset loads the same values: state S2 (all red)
  and both counters at 0.
* **Single clock with enable.** The original clocks the state machine and
  the timer with the divided clock. Here they use the board clock with
  `tick` as enable, as described above.
* **Rate select as a parameter.** The original hard-wires the select to
  10 Hz. Here the select is the `RATE` parameter of the intersections and of
  the top.
* **SS lamps.** The sensed controller's output table lists S5 twice and SS
  not at all. Here SS shows north-south green and east-west red, and S5
  shows all red as in the fixed-time plan. That is the only reading in which
  the main road stays green while a car is being confirmed.
* **Sensors.** The sensors are assumed to be synchronous to the board clock.
  Asynchronous switches on a real board need a two-flop synchroniser in
  front of `sens_w` and `sens_e`. No synchroniser is included.
* **Not included.** The FPGA board itself and the pin assignment (LEDs,
  switches, the oscillator pin) are not part of this RTL.

## Assertions

The RTL checks these rules with assertions. They are active in simulation
with `--assert`.

* In both state machines, at least one road is always red.
* The fixed-time controller never enters SS.
* The sensed controller leaves SS for S1 only while a car is sensed.
* `tick` only occurs with `out_clk` high.
* The timer count never passes 11.

## Files

| file | contents |
|------|----------|
| `rtl/tl_pkg.sv` | shared types and default divide ratios |
| `rtl/tl_clock_div.sv` | selectable divider, `out_clk` and `tick` |
| `rtl/tl_timer.sv` | interval counter with t1/t5/t10 |
| `rtl/tl_simple_fsm.sv` | fixed-time state machine |
| `rtl/tl_sensed_fsm.sv` | sensed state machine |
| `rtl/tl_simple_intersection.sv` | divider + timer + fixed-time FSM |
| `rtl/tl_sensed_intersection.sv` | divider + timer + sensed FSM |
| `rtl/traffic_top.sv` | both intersections side by side |

Top-level ports of `traffic_top`:

* Inputs: `clk_in` (50 MHz), `rst`, `sens_w`, `sens_e`.
* Outputs for each controller (prefix `simple_` or `sensed_`):
  * `ns` and `ew`: the lamp words
  * `state`: the current state, for observation
  * `rate_clk`: the divided clock

All parameters default to the original lab values. The timer's width and
thresholds are parameters of `tl_timer` (`W`, `T1`, `T5`, `T10`). The
intersections use the defaults, 4, 1, 5 and 10.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tl_clock_div_tb` | All four rates with short ratios: period, high time, tick on the rising edge, and a rate switch in mid-period. |
| `tl_timer_tb` | The flags against a count of enabled edges. Enable and clear are random. |
| `tl_simple_fsm_tb` | State, lamps and `timer_clr` every cycle against the light plan. Flags and enable are random. |
| `tl_sensed_fsm_tb` | The same, with random sensors. It also counts rests in S0, cancelled cars, served cars, and cars served from each sensor alone. |
| `tl_simple_intersection_tb` | How long each state lasts, in board cycles, over three loops. The divide ratio is shortened to 8. |
| `tl_sensed_intersection_tb` | Directed cases with a ratio of 6: no car, a car that leaves early, a car that stays, and a car held through two services. It also checks how long each state lasts. |
| `traffic_top_tb` | Both controllers with random side-road traffic, compared every board cycle with a tick-level reference model. It checks the tick period and fails if any mechanism never happens. The mechanisms are a full loop, a rest, a service, a cancellation, a service from each sensor alone, and the timer resting at 11. |
| `traffic_top_full_tb` | `traffic_top` at full size: a 50 MHz clock and 5,000,000 cycles per tick. It covers one full fixed-time loop and one served car, with every state length checked in board cycles. It simulates 3.2 s of operation and takes about 80 s of wall time. |

The simulator used is Verilator 5, which has only two states. Every register
the design reads is reset. To run a testbench:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tl_pkg.sv tb/traffic_top_tb.sv --top-module traffic_top_tb -o sim
./obj_dir/sim
```

Replace `traffic_top_tb` with the name of any other testbench.

## Resource use

Coarse synthesis of `traffic_top` gives 76 flip-flops and about 120
word-level cells. Most of the flip-flops are the two 29-bit divider
counters. Any small FPGA holds it easily. The smallest Spartan-3E has 1,920
flip-flops.
