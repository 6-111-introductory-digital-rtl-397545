# Traffic light controller for a main street / side street intersection

This is a small synchronous controller for one intersection: a main street
and a side street, each with a red, yellow and green light, and one
pedestrian walk lamp. The main street is favoured: it gets two base
intervals of green for every one of the side street. A car sensor on the
side street and a walk button can each bend the normal cycle. The three
interval lengths can be changed by the user at run time. The controller is
meant for an FPGA board with push buttons, toggle switches and LEDs and a
27 MHz clock.

## The light cycle

Three times, in whole seconds from 0 to 15, set every duration:

| Parameter number | Name   | Meaning            | Value after reset |
|------------------|--------|--------------------|-------------------|
| `00`             | t_BASE | base interval      | 6 s               |
| `01`             | t_EXT  | extended interval  | 3 s               |
| `10`             | t_YEL  | yellow interval    | 2 s               |

The normal cycle, 22 s with the reset values:

    main green  t_BASE   (first half)
    main green  t_BASE   (second half)
    main yellow t_YEL
    side green  t_BASE
    side yellow t_YEL
    back to the first main green

While one street shows green or yellow, the other shows red.

Two things change the cycle:

* **Side street sensor.** The sensor is checked when the first half of
  the main green ends. If it is high, the second half lasts t_EXT instead
  of t_BASE, so a waiting car gets the green sooner. The sensor is checked
  again when the side green ends. If it is high, the side green is held for
  one more t_EXT. It is not checked at the end of that extension, so a
  steady stream of cars cannot keep the side green forever.
* **Walk request.** A press of any walk button sets the walk register.
  The press can come at any time, and the register holds it. When the main
  yellow ends with a request pending, both streets show red and the walk
  lamp lights for t_EXT. The side green follows. The register is cleared as
  the walk ends.

## The state machine (`tlc_fsm`)

Each state has a fixed lamp pattern and a fixed interval. Both are decoded
from the state alone (Moore outputs).

| State              | Lamps                | Interval | On `expired` go to                       |
|--------------------|----------------------|----------|------------------------------------------|
| `S_MAIN_GREEN_1`   | main G, side R       | t_BASE   | `S_MAIN_GREEN_EXT` if sensor, else `S_MAIN_GREEN_2` |
| `S_MAIN_GREEN_2`   | main G, side R       | t_BASE   | `S_MAIN_YELLOW`                          |
| `S_MAIN_GREEN_EXT` | main G, side R       | t_EXT    | `S_MAIN_YELLOW`                          |
| `S_MAIN_YELLOW`    | main Y, side R       | t_YEL    | `S_WALK` if walk pending, else `S_SIDE_GREEN` |
| `S_WALK`           | main R, side R, walk | t_EXT    | `S_SIDE_GREEN`, and pulse `wr_reset`     |
| `S_SIDE_GREEN`     | main R, side G       | t_BASE   | `S_SIDE_GREEN_EXT` if sensor, else `S_SIDE_YELLOW` |
| `S_SIDE_GREEN_EXT` | main R, side G       | t_EXT    | `S_SIDE_YELLOW`                          |
| `S_SIDE_YELLOW`    | main R, side Y       | t_YEL    | `S_MAIN_GREEN_1`                         |

The FSM talks to the timer with a two-signal handshake:

1. The FSM enters a state. On the next clock it raises `start_timer` for
   one clock. In that cycle `interval` already addresses the new state's
   time, so the timer loads the right value.
2. When the interval is over, the timer raises `expired` for one clock.
   The FSM takes its transition on that clock and restarts at step 1.

Two events restart the FSM at `S_MAIN_GREEN_1` and start a fresh timer:
reset, and a reprogramming of any time. The FSM stays there for as long as
Reprogram is held. That restart can coincide with an `expired` left over
from the interval it abandoned. So the FSM ignores `expired` in any clock
where `start_timer` is high.

Assertions in `tlc_fsm` check three rules on every clock. Each street shows
exactly one lamp. The two streets never show green or yellow together. The
walk lamp is on only while both streets are red.

## How seconds are counted (`divider`, `timer`)

`divider` is a free-running counter that wraps every `CLK_HZ` clocks. On
each wrap it gives a one-clock `one_hz_enable` pulse. `timer` latches the
4-bit value on `start_timer`. It raises `expired` one clock after the
value-th enable pulse that follows.

Because the 1 Hz tick runs freely, interval lengths are exact in some cases
and not in others:

* **Intervals that follow each other.** `expired` comes one clock after a
  tick, and the next `start_timer` comes one clock after that. Each new
  interval therefore starts in step with the tick. Every state in the
  running cycle lasts exactly `t * CLK_HZ` clocks.
* **The first interval after reset.** Reset also clears the divider, so
  this interval is exact to within a few clocks.
* **The first interval after a reprogram.** The tick does not restart, so
  this interval can be up to one second short.
* **A zero time.** A value of 0 expires on the clock after the start. The
  state is then visible for two clocks, so a zero t_YEL gives an effective
  yellow of zero. The following state starts two clocks late against the
  tick, so it ends up two clocks short.

## Programming the times (`time_parameters`)

The three times sit in a three-word, 4-bit register file. Reset loads
6/3/2. The write port is driven by the user:

* `time_param_sel` selects the word. It uses the parameter numbers above.
* `time_value` is the new value.
* The word is written on every clock while Reprogram is held.

A write to the unused address `11` is ignored. Reading that address gives 0.

The read port is asynchronous and addressed by the FSM's `interval`. A new
value is visible one clock after it is written.

## Inputs and outputs (`traffic_light_controller`)

| Port             | Dir | Width | Function |
|------------------|-----|-------|----------|
| `clk`            | in  | 1     | system clock, `CLK_HZ` (27 MHz) |
| `reset`          | in  | 1     | reset button |
| `sensor`         | in  | 1     | side street car sensor |
| `walk_request`   | in  | 1     | walk buttons, wired-OR together outside the chip |
| `reprogram`      | in  | 1     | write the selected time |
| `time_param_sel` | in  | 2     | parameter number of the time to write |
| `time_value`     | in  | 4     | new time in seconds |
| `lights`         | out | 7     | `{r_m, y_m, g_m, r_s, y_s, g_s, walk}`, active high (`tlc_pkg::lights_t`) |
| `led_n`          | out | 8     | the same lamps for active-low LEDs: `led_n[6:0] = ~lights`, `led_n[7]` off |
| `state`          | out | 3     | current FSM state, for a display or a logic analyser |

All inputs are active high and asynchronous.

Input conditioning differs by input type:

* **Push buttons** (reset, sensor, walk request, reprogram) go through
  `synchronizer`, a two-flop chain per bit. The synchronized reset is the
  synchronous reset of every block.
* **Toggle switches** (the six bits of `time_param_sel` and `time_value`)
  each go through `debounce`. This is a retriggerable one-shot: a new level
  reaches its output only after holding for `DEBOUNCE_CYCLES` clocks
  (0.01 s). Its two input flops also synchronize it.

The buttons are not debounced, because bounce on them only repeats an
action that is safe to repeat. A bounce on walk request sets the register
again. A bounce on Reprogram writes the same value again and restarts the
FSM again.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `traffic_light_controller` | `CLK_HZ` | 27,000,000 | clock frequency; one "second" is this many clocks |
| `traffic_light_controller` | `DEBOUNCE_CYCLES` | `CLK_HZ/100` | switch stability time, 0.01 s |
| `divider` | `CLK_HZ` | 27,000,000 | as above |
| `debounce` | `STABLE_CYCLES` | 270,000 | as above |
| `synchronizer` | `WIDTH`, `STAGES` | 4, 2 | inputs, flops per input |

| `time_parameters` | `RESET_T_BASE`, `RESET_T_EXT`, `RESET_T_YEL` | 6, 3, 2 | times loaded on reset |

The time width (4 bits) is `TIME_W` in `tlc_pkg`.

## Files

`rtl/` holds one module or package per file:

* `tlc_pkg.sv`: shared types and constants.
* `traffic_light_controller.sv`: the top level.
* `tlc_fsm.sv`, `timer.sv`, `divider.sv`, `time_parameters.sv`,
  `walk_register.sv`, `synchronizer.sv`, `debounce.sv`: the blocks.

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`) and
two for the top level:

* `tb_traffic_light_controller.sv` runs with a 20-clock second. It presses
  the buttons and sets the switches through the real input path. It
  measures the length of every lamp pattern and compares it with the
  sequence above. It covers the normal cycle, both sensor extensions, a walk
  and its clearing, reprogramming in mid-cycle, and a zero yellow time. It
  counts each of these and fails if one never happened.
* `tb_tlc_full.sv` runs at the default 27 MHz parameters. It takes the
  controller through one whole 22 s cycle, 594 million clocks, and checks
  every phase length in clocks. This takes about five minutes.

Each testbench prints `TB_RESULT checks=N failures=M` and finishes.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl rtl/tlc_pkg.sv \
        tb/tb_traffic_light_controller.sv --top-module tb_traffic_light_controller
    ./obj_dir/Vtb_traffic_light_controller

Replace the testbench name to run any other testbench. The package must come
first on the command line. `-Irtl` lets Verilator find the modules.

## Design decisions

The following come from the intended behaviour of the controller:

* the lamp sequence and both deviations;
* the three times, their codes and reset values;
* the 4-bit times and the 2-bit selector;
* the block partition and the signals between blocks (`start_timer`,
  `expired`, `interval`, `value`, `WR`, `WR_Reset`, the 1 Hz enable);
* the one-clock width of the 1 Hz enable and of `expired`;
* restarting the FSM on a reprogram;
* the 0.01 s debounce time;
* the 27 MHz clock.

These are choices of this implementation:

* the FSM's state split, and the restart state, which is the first main
  green;
* the timer handshake details: `start_timer` one clock after each state
  entry, and a stale `expired` is ignored;
* a single side green extension;
* a walk press that coincides with the clear wins;
* Reprogram acts as a level, and address `11` is ignored;
* the two-flop synchronizer depth;
* the debounce counter structure, and the debouncer's reset behaviour;
* debouncing the switches but not the buttons;
* a synchronous reset on the divider;
* input polarity, LED bit order, and the extra `state` output.

Known limitations:

* The first interval after a reprogram can be up to one second short (see
  above).
* A walk press made during the walk itself is lost when the register is
  cleared at the end of that walk.
