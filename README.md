# Traffic light controller for a main street / side street crossing

This controller runs the lights where a main street crosses a side street. Each
street has a red, yellow and green lamp. A single walk lamp serves pedestrians.
The controller gives the main street most of the time. It shortens the main
green when a sensor reports cars waiting on the side street, and it lengthens the
side green while they keep coming. When a pedestrian has pressed a walk button,
it stops all traffic once per cycle. The three interval lengths live in
registers, and an operator can change them at run time with switches and a
button. A two-line character display shows a title, or "You can walk now"
during the walk.

The design targets an FPGA board with a 50 MHz clock. All of it is
synthesizable SystemVerilog in `rtl/`, with a self-checking testbench for each
module in `tb/`.

## The cycle of lights

Three intervals, in whole seconds (0 to 15), set every phase length:

| Interval | Code | Value after reset |
|----------|------|-------------------|
| t_BASE   | 00   | 6 s               |
| t_EXT    | 01   | 3 s               |
| t_YEL    | 10   | 2 s               |

With no side traffic and no walk request, the loop is:

| Phase        | Main   | Side   | Walk | Length     |
|--------------|--------|--------|------|------------|
| Main green   | green  | red    | off  | 2 × t_BASE |
| Main yellow  | yellow | red    | off  | t_YEL      |
| Side green   | red    | green  | off  | t_BASE     |
| Side yellow  | red    | yellow | off  | t_YEL      |

Three events change this loop:

* **Side traffic while Main is green.** If the sensor is high when the first
  t_BASE of Main green ends, Main stays green for only t_EXT more instead of a
  second t_BASE.
* **Side traffic while Side is green.** If the sensor is high when the Side
  t_BASE ends, Side stays green for t_EXT more. The sensor is sampled once, so
  Side green gets at most one extension.
* **Walk request.** A button press sets the walk register. When Main yellow
  ends with a request pending, both streets show red and the walk lamp lights
  for t_EXT. Side green follows. Presses during the walk are ignored.

At no time do both streets show green or yellow together. `tlc_fsm` asserts
this every cycle, and asserts that the walk lamp lights only with both streets
red.

## How a phase is timed

This is the part that most needs care when changing the design. Four pieces
take part:

* `divider` counts the 50 MHz clock. Once per second it raises `tick` for one
  cycle.
* `time_parameters` is a small register file. The FSM's 2-bit `interval`
  output is its read address, and the 4-bit `value` comes back in the same cycle.
* `timer` is a 4-bit down-counter. `start` loads `value`, and each `tick`
  takes one off. `expired` is high while the count is zero.
* `tlc_fsm` owns a registered `start_timer` flag. The flag is high in the
  first cycle of every state, and after reset and reprogramming. In that
  cycle the FSM already drives the new state's `interval`, so the timer loads
  the right length. The FSM ignores `expired` while `start_timer` is high,
  because the timer has not been reloaded yet. From the next cycle on, an
  expired timer moves the FSM to its next state at the following clock edge.

Main green is two FSM states. Each one times its own t_BASE (or the t_BASE
followed by t_EXT when side traffic cuts it short). The lamps do not change
between the two.

The divider runs freely and is not restarted when a phase begins. So an
N-second timer run ends on the N-th tick after the start. That is somewhere
between N−1 and N seconds after the start, plus two clock cycles for
`expired` to be seen and the state to change. A 2 × t_BASE main green is two
such runs. A tick in the same cycle as `start` is not counted. An interval
programmed to 0 lasts two clock cycles.

## Inputs from buttons and switches

Every input from the board is asynchronous to the clock. `debounce_sync`
handles the four control inputs:

* **Reset** passes a two-flip-flop `synchronize` chain, and the result
  (`reset_sync`) resets every block synchronously. Reset is not debounced.
  A bouncing reset only resets the design a few times, and the debouncers
  themselves need a clean reset.
* **Sensor**, **Walk_Request** and **Reprogram** each pass a `debounce`
  instance. Inside it, a two-flip-flop synchronizer is followed by a
  retriggerable counter. Any change of the input restarts the counter. The
  output takes the new value only after the input has held still for `DELAY`
  cycles (500,000 cycles, which is 0.01 s at 50 MHz). The delay from a clean
  input edge to the output is `DELAY + 3` cycles. A burst of bounce shorter
  than `DELAY` never reaches the output.

The interval selector (2 bits) and the interval value (4 bits) are slide
switches. The top passes them through a 6-bit `synchronize` chain.

## Reprogramming the intervals

To set an interval, the operator does three things:

1. Set the selector switches to the interval's code.
2. Set the value switches to the number of seconds.
3. Press Reprogram.

While the debounced Reprogram signal is high, `time_parameters` writes the
value into the selected register on every clock edge, and `tlc_fsm` is held
in its starting state, the first half of Main green. When the button is
released, the sequence starts again from Main green with the new value. Code
11 selects no register: pressing Reprogram with it changes no value, but it
still restarts the sequence. Reading address 11 returns 0, and the FSM never
reads it. A reset restores 6, 3 and 2 s. Reprogramming does not clear a
pending walk request.

## Walk register

`walk_register` is a set/clear flip-flop. The debounced button sets it.
`wr_reset` from the FSM clears it. `wr_reset` is high for the whole walk and
wins over a press in the same cycle, so a press during the walk is lost. The
register keeps a request from its press until the end of the next Main yellow.

## Display text

`lcd_message` outputs two lines of 16 ASCII characters, with character 0 at
the left and unused places filled with spaces. After reset it shows
"Traffic Light" / "Controller". While the walk lamp is lit it shows
"You can walk now" on the first line and blanks the second, one clock cycle
after the lamp changes. It shows the title again when the walk ends. The design
does not include the controller that drives the display itself, because that
depends on the board's display and its bus. Such a controller should copy the
two lines to the panel.

## Modules

```
tlc_top                      top level; parameters CLK_HZ, DEBOUNCE_CYCLES
├── debounce_sync            conditions Reset, Sensor, Walk_Request, Reprogram
│   ├── synchronize          (reset)
│   └── debounce ×3          each with its own synchronize
├── synchronize              selector and value switches
├── walk_register
├── time_parameters          t_BASE / t_EXT / t_YEL registers
├── divider                  1 Hz enable
├── timer
├── tlc_fsm                  states, lamps, interval, start_timer, wr_reset
└── lcd_message
tlc_pkg                      interval codes and reset values, state enum,
                             lamp struct lamps_t, LCD line type
```

The ports of `tlc_top` are:

| Port                      | Dir | Width       | Meaning                                      |
|---------------------------|-----|-------------|----------------------------------------------|
| `clk`                     | in  | 1           | board clock, `CLK_HZ` cycles per second      |
| `reset`                   | in  | 1           | active high, asynchronous                    |
| `sensor`                  | in  | 1           | side street car sensor                       |
| `walk_request`            | in  | 1           | the walk buttons, wired-OR                   |
| `reprogram`               | in  | 1           | write the selected interval                  |
| `time_parameter_selector` | in  | 2           | 00 t_BASE, 01 t_EXT, 10 t_YEL                |
| `time_value`              | in  | 4           | seconds, 0–15                                |
| `lamps`                   | out | 7           | `lamps_t`: r_m, y_m, g_m, r_s, y_s, g_s, walk |
| `lcd_line0`, `lcd_line1`  | out | 16 × 8 bits | display text                                 |

Two parameters set the size: `CLK_HZ` (default 50,000,000) sets the length of
a second, and `DEBOUNCE_CYCLES` (default 500,000) sets the debounce time. For
simulation, both can be made small without changing the behaviour.

## Choices this design makes

The sequence, the three intervals and their codes and reset values, the
4-bit interval width, the 50 MHz clock, the 0.01 s debounce, the walk
register's behaviour and the two display messages are all part of the
specification this controller implements. The following points are this
design's own:

* The state split and encoding: eight states, with Main green as two states
  plus an extension state.
* The `start_timer` handshake, and the free-running divider with its ±1 s
  phase tolerance.
* The debouncer's internals. Only its behaviour was specified: a synchronous
  output that changes after 0.01 s of stable input.
* Reset is only synchronized, not debounced, and is active high.
* The selector and value switches are synchronized. A plain block diagram of
  this controller would wire them straight into the register file.
* The divider takes the synchronized reset, like every other block.
* The register file is written on the level of the Reprogram signal. Code 11
  writes nothing and reads 0.
* The display is taken to be 16 × 2 characters, which is why the title is
  split over two lines. The title returns after the walk.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tlc_pkg.sv tb/tb_tlc_top.sv \
          --top-module tb_tlc_top -Mdir obj_top
obj_top/Vtb_tlc_top
```

Use the same command for any other testbench: add `rtl/tlc_pkg.sv`, the
testbench file and `-Irtl`, and Verilator finds the modules by their file
names.

* `tb_<module>` tests each module on its own. Each compares the outputs with
  values it works out itself, and covers the module's rules: exact debounce
  latency and bounce rejection, tick spacing, timer expiry on the N-th tick,
  register writes and reset values, and every FSM transition under random
  inputs with a coverage count.
* `tb_tlc_top` runs the whole controller with a 20-cycle second and a 4-cycle
  debounce. It goes through the normal loop, both sensor extensions, a walk
  (checking the display text), a press during the walk, reprogramming of each
  interval and of code 11, and a reset in mid-run. It measures every phase in
  seconds and in clock cycles, and counts each of these events. A count of
  zero is a failure.
* `tb_tlc_top_full` runs `tlc_top` at its real size: 50 MHz and a 500,000-cycle
  debounce. It checks the reset values, reprograms the intervals to
  2 s, 1 s and 1 s through the debounced button, and then follows one full
  cycle with a bouncing walk press and side traffic. It takes about three
  minutes to simulate. One loop at the 6, 3 and 2 s reset values would
  be about 1.1 billion cycles (roughly seven minutes). The full loop at those
  values is covered at the reduced clock in `tb_tlc_top`.
