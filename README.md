# Timed Moore FSM: pedestrian-crossing traffic light

A logic controller that has to keep a lamp on for 4.5 seconds, or ignore a
button outside a given interval, has to count time. That time is real time, but
the FSM runs in clock cycles. This design shows a compact way to get a *timed*
Moore FSM in synthesizable RTL: a single cycle counter, cleared on every change
of state, that every timing rule of the machine is compared against. The example
is a traffic light for a pedestrian crossing. It has a night mode (flashing
yellow), a day cycle, and a pedestrian button that is served only inside a time
window.

The whole controller is 9 flip-flops (3 for the state, 6 for the counter) plus
comparators and decode logic.

## One counter, three timing rules

The FSM holds `state` and `count`. `count` is 0 in the first cycle after entering
a state. It goes up by one each cycle the FSM stays in that state, and returns to
0 whenever the state changes, including a change back to the same state. Three
kinds of timing parameter are all plain comparisons on this counter. They are
gathered in `timed_state_cmp`:

| parameter | meaning | rule on `count` | effect |
|---|---|---|---|
| timeout `TO` | how long the FSM stays in a state before it reads its inputs again | stay while `count < TO-1` | the state lasts exactly `TO` cycles |
| window `[c1, c2]` | when an external event is accepted | accept while `c1-1 <= count < c2` | the event is accepted in cycles `c1` to `c2` of the state, counting from 1 |
| output delay `d` | how long after entry a delayed output turns on | on while `count >= d` | the output turns on in cycle `d+1` |

The off-by-one rules are the part most often misread. In its first cycle in a
state the FSM already sees `count = 0`, so "leave after `TO` cycles" means
leaving once `count` reaches `TO-1`. For example, with `TO = 8` the counter shows
0 to 7 and the FSM moves on at the edge that ends the cycle where it shows 7.
A window `[2,5]` opens at `count = 1` and closes after `count = 4`. A delay
`d = 2` turns the output on at `count = 2`, leaving it off for the first two
cycles. A bound of 0 acts like 1: the comparisons are made as `count+1 >= X`, so
nothing wraps around.

The counter therefore needs to reach only the longest timeout minus one. It
restarts in every state, so it cannot overflow.

## Inputs: actions and events

- `onn` (controller on) and `st` (day cycle) are *actions*. The FSM reads them
  only when the current state's timeout has expired. A change in the middle of a
  state takes effect when that state ends.
- `btn` (pedestrian button) is an *event*. In the road-green state a5 it moves
  the FSM on in the same cycle, but only inside the window. Anywhere else, and
  outside the window, it is ignored.

## The controller

States, lamps and timeouts (a dot means off):

| state | code | meaning | R1 | YGR | YRG | G1 | R2 | G2 | time in state |
|---|---|---|---|---|---|---|---|---|---|
| a1 | 000 | on / idle, all dark | . | . | . | . | . | . | TO1 |
| a2 | 001 | road yellow, green to red | 1 | 1 | . | . | 1 | . | TO2 |
| a3 | 010 | road red, crossing green | 1 | . | . | . | . | 1 | TO3 |
| a4 | 011 | road yellow, red to green | 1 | . | 1 | . | 1 | . | TO2 |
| a5 | 100 | road green, crossing red, button window open | . | . | . | 1 | 1 | . | TO3, or until Btn |
| a6 | 101 | button served | 1 | . | . | . | R2 for the first TD_G2 cycles | G2 after that | TO6 |
| a7 | 110 | night yellow | . | 1 | . | . | . | . | TO1 |

Transitions. Each happens when the state's time is up; the Btn transition is the
only exception.

- a1: `onn=0` stays in a1 (off). `onn & st` goes to a2 (day). `onn & !st` goes
  to a7, so a1 and a7 alternate and the road's yellow lamp flashes at night.
- a7 goes to a1.
- a2 goes to a3, a3 to a4, a4 to a5, and a5 back to a2, while `onn & st` holds.
  Otherwise each of them goes to a1.
- a5: `btn` during cycles `A5_C1` to `A5_C2` of a5 goes to a6 at once, whatever
  `onn` and `st` are. This check comes before the timeout.
- a6 goes to a4. The road turns red as a6 is entered. The crossing stays red for
  `TD_G2` cycles (time for traffic to clear), then turns green for the rest of
  a6. After a6 the normal yellow state a4 resumes the day cycle.
- The unused code 111 goes to a1 with the counter cleared.

No signal head ever shows red and green at once. The top module asserts this for
both heads.

### Timing parameters

All values are in clock cycles. The original description simulates with a 100 ns
clock.

| parameter | default | origin |
|---|---|---|
| `COUNT_W` | 6 | original design |
| `TO1` (a1, a7) | 1 | original design |
| `TO2` (a2, a4) | 6 | chosen here; no number is given for it |
| `TO3` (a3, a5) | 45 | original design (its longest timeout) |
| `TO6` (a6) | 20 | original design's simulation (the counter runs 0..19 in a6) |
| `A5_C1` | 5 | chosen here; only the name of this bound is given |
| `A5_C2` | 40 | original design |
| `TD_G2` | 2 | chosen here; the original gives 2 only for its generic output-delay example |

With these values a request is served if Btn comes in cycles 5 to 40 of the
45-cycle road-green phase.

## Structure

```
traffic_light_fsm            top: ports onn, st, btn -> six lamps; state and count brought out
 ├─ tfsm_state_reg           state + counter registers, asynchronous reset to a1 / 0
 ├─ tfsm_next_state          transition and counting function (combinational)
 │   └─ timed_state_cmp      timeout and Btn-window compares for the current state
 └─ tfsm_outputs             lamp decoder (combinational)
     └─ timed_state_cmp      output-delay compare for G2/R2 in a6
tfsm_pkg                     state_t enum (fixed codes 000..110) and default timing constants
```

This is the classic two-process FSM split: one register process for state and
counter together, and one combinational process for next state and next count.
The output decode sits in a separate module. The counter lives in the same
register process as the state, not in a counter process of its own. Every
timing parameter is a typed parameter of the top, with the defaults from
`tfsm_pkg`.

Timing: `reset` is asynchronous and active high. State and counter change on the
rising edge of `clk`. The lamps are combinational decodes of these registers, so
they change shortly after each edge. Inputs are sampled at the rising edge and
must already be synchronous to `clk`. This RTL contains no synchronisers or
debouncers for real switches.

## Simulating

Each block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. With plain Verilator, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
    rtl/tfsm_pkg.sv tb/tb_traffic_light_fsm.sv --top-module tb_traffic_light_fsm
./obj_dir/Vtb_traffic_light_fsm
```

Swap in `tb_timed_state_cmp`, `tb_tfsm_state_reg`, `tb_tfsm_next_state` or
`tb_tfsm_outputs` to test a single block.

- `tb_traffic_light_fsm` runs the top at its default parameters. A cycle-accurate
  reference model runs beside it, and state, counter and all six lamps are
  compared every cycle, about 27,000 checks in all. The model is written
  separately: it counts cycles from 1 and uses the window as "cycles c1 to c2".
  The test also measures every visit that ends by timeout against that state's
  `TO`. It steps through a fixed sequence, then 20,000 random cycles:
  - Onn off, then night mode, then two plain day cycles.
  - Btn in a3, and Btn before and after the window (all ignored).
  - Btn on the first and on the last cycle of the window.
  - Btn with St low.
  - St dropped, then Onn dropped, in each day state.
  - An asynchronous reset in the middle of a6.

  At the end it prints how often each mechanism happened, and it fails if any
  happened zero times.
- `tb_day_cycle_trace` replays a reference day-cycle trace at the default
  timing and checks each visit's state and length along the way. The path is
  a1 a2 a3 a4 a5 a2 a3 a4 a5 a6 a4. Btn is pressed in a3 and in a2 (both
  ignored) and at counter value 38 of a5 (accepted). In a6 it checks the
  delayed crossing green and that the counter runs 0..19.
- `tb_tfsm_next_state` and `tb_tfsm_outputs` try every state code, counter value
  and input combination against tables written from the transition and lamp
  rules above.
- `tb_timed_state_cmp` sweeps the counter against directed limits, then tries
  20,000 random limit combinations.
- `tb_tfsm_state_reg` checks the asynchronous reset and loading on the clock edge.

To change the timing, override the top's parameters (for example
`traffic_light_fsm #(.TO3(300), .COUNT_W(9))`). Keep `COUNT_W` wide enough for
`TO-1` of the longest timeout and for `A5_C2`. The testbenches read their
expected values from `tfsm_pkg`, so editing the defaults there keeps them
consistent.

## How far to trust it, and where it departs

- The state table, lamp equations, the a5 Btn/timeout priority, the counter
  rules, reset and state codes come from the original design. The original
  spells out the transitions in code only for a5 and a7. For a1 to a4 and a6
  they were taken from its state diagram and its description of the day and
  night cycles.
- In a5 the Btn check comes before the timeout check. A Btn in the last cycle of
  the window is still served even if `onn` or `st` has dropped. After the window
  closes, a Btn no longer matters and a5 leaves normally when its timeout ends.
- `TO2`, `A5_C1` and `TD_G2` are this design's own values, as listed above.
  Change them to fit a real crossing.
- Only the logic function is modelled. The original also reports glitches and
  sub-nanosecond overlaps of lamp signals after place and route on an FPGA. They
  come from combinational output decoding. If your lamp drivers can react to
  such glitches, register the six outputs; they then lag the state by one cycle.
- A 100 ns clock makes a 45-cycle green only 4.5 µs long. A real installation
  would run the FSM from a slow enable or clock (for example 10 Hz) and scale
  the `TO` values and `COUNT_W` to match.
