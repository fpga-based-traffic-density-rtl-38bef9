# Density-adaptive traffic signal controller

A fixed-time traffic light gives each approach of an intersection the same
green whether ten cars are queued or none. This controller instead lets a
vehicle detector outside the FPGA decide how busy each approach is, and
sizes each green to the traffic waiting.

Detection runs elsewhere: a camera and an object detector on a PC count
the vehicles on each of the four approaches. The PC reduces each count to
a 2-bit density class and sends the four classes over a serial line. The
FPGA logic here does the rest. It receives the classes and runs the signal
plan: green for the served approach, a fixed 3 s yellow, then a fixed
2 s all-red clearance. The green time comes from the approach's class.
The logic also drives the twelve lamps and a two-digit countdown.

The logic is small: about 90 flip-flops and 140 word-level cells.
It uses one clock domain. A slow "clock" is really a one-second enable
strobe.

## Signal plan

The four approaches get right of way one at a time, in the order North,
East, South, West, then North again. Each turn has three phases:

| phase  | served approach | all others | length                         | countdown |
|--------|-----------------|------------|--------------------------------|-----------|
| GREEN  | green           | red        | from density class, see below  | shown     |
| YELLOW | yellow          | red        | 3 s                            | shown     |
| RED    | red             | red        | 2 s (all-red clearance)        | dark      |

| density class | meaning              | green time (`GREEN_*` parameter) |
|---------------|----------------------|----------------------------------|
| `00`          | low                  | 5 s  (`GREEN_LOW`)               |
| `01`          | medium               | 10 s (`GREEN_MEDIUM`)            |
| `10`, `11`    | high (both the same) | 15 s (`GREEN_HIGH`)              |

A full round therefore lasts `4 × (green + 5)` seconds: 40 s with every
approach at low density and 80 s with every approach at high density.

**When a density takes effect.** The controller reads an approach's class
once, at the moment that approach's green starts. A new byte that arrives
in the middle of a green does not shorten or lengthen that green. It
applies from the next green of each approach. Bytes can arrive at any
time and as often as the host likes. The most recent one always wins.

**Reset.** The manual reset button returns the controller to the start of
North's green and clears the stored densities to low (`00`). It stays
that way until the host sends a byte.

## The density message

One UART frame carries all four classes. The frame is 8 data bits, no
parity, one stop bit, least significant bit first, at 9600 baud by
default:

```
bit   7 6 | 5 4 | 3 2 | 1 0
      North| East|South| West
```

Each field sits at the same index as its approach's lamp head on the lamp
bus (below), so one index `d` selects both. In the code, `traffic_pkg::dir_t`
numbers the approaches West = 0, South = 1, East = 2, North = 3. The
service order North → East → South → West is a step downward in this
numbering (`next_dir`).

The receiver samples every bit in the middle of its bit cell. A frame with
a low stop bit is dropped and lights `led_frame_err`. A low pulse on the
idle line shorter than half a bit is ignored. A byte reaches the density
registers about 9.5 bit times after its start bit begins, 1 ms at
9600 baud.

## Outputs

**Lamp bus**, `traffic_lights[11:0]`: three bits per approach, red in the
low bit:

| bits | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|------|---|---|---|---|---|---|---|---|---|---|----|----|
| lamp | W red | W yellow | W green | S red | S yellow | S green | E red | E yellow | E green | N red | N yellow | N green |

**Countdown**, `hex1:hex0`: the whole seconds left in the current green or
yellow phase. A phase of N seconds shows N in its first second and 1 in
its last. The tens digit is dark for values below 10. Both digits are dark
during all-red. The segments are active low, with bit i driving segment
a…g for i = 0…6, as on common-anode displays.

**Debug LEDs**: `led_density` is the last byte received. `led_rx_seen`
means a byte has arrived since reset. `led_rx_toggle` flips on every byte.
`led_frame_err` shows that a bad frame was seen. `led_dir` and
`led_phase` show the controller state.

## Blocks

```
uart_rxd ─► uart_rx ─► density_regs ─► traffic_fsm ─► traffic_lights[11:0]
                                           ▲   │
            clock_divider (1 s tick) ──────┘   └─► countdown_display ─► hex1, hex0
key_reset_n ─► reset_sync ─► reset of every block
```

| file | role |
|------|------|
| `rtl/traffic_pkg.sv` | approach, density, phase and lamp types; the 3 s and 2 s constants; `next_dir` |
| `rtl/uart_rx.sv` | 8N1 receiver with a two-flop input synchronizer, start-bit check and stop-bit check |
| `rtl/density_regs.sv` | holds the last byte and splits it into four classes |
| `rtl/clock_divider.sv` | counter that pulses `tick` for one clock every `CLK_HZ/TICK_HZ` clocks |
| `rtl/traffic_fsm.sv` | the signal plan: approach, phase, seconds remaining, lamp decode |
| `rtl/countdown_display.sv` | seconds to two decimal digits to 7-segment patterns (combinational) |
| `rtl/reset_sync.sv` | push-button reset: asserts at once, releases on the second clock edge |
| `rtl/traffic_top.sv` | wires the above together and adds the debug LEDs |

### Timing inside the controller

Everything runs on `clk`. The divider is cleared by reset, so its ticks
fall every `CLK_HZ` clocks counted from the release of reset. The FSM
changes phase in the clock after the tick that ends a phase. Each phase
therefore lasts exactly N × `CLK_HZ` clocks. The only exception is the
first phase after reset, which is a clock or two longer because of the
reset synchronizer.

`traffic_fsm` holds `remaining`, the seconds left. On each tick it counts
down. When the count is at 1, the tick loads the next phase and its
length. Entering GREEN looks up the new approach's class at that moment.
Two assertions guard the FSM. One checks that at most one approach is
green or yellow at any time. The other checks that `remaining` never
reaches zero.

## Parameters

| parameter (top) | default | meaning |
|-----------------|---------|---------|
| `CLK_HZ` | 50 000 000 | board clock frequency |
| `BAUD` | 9 600 | serial rate (`CLK_HZ/BAUD` must be at least 4) |
| `TICK_HZ` | 1 | timer resolution; all times are in ticks |
| `GREEN_LOW`, `GREEN_MEDIUM`, `GREEN_HIGH` | 5, 10, 15 | green seconds per class, 1…99 |

The 3 s yellow and 2 s all-red are constants in `traffic_pkg`. Counters
are 7 bits wide, which is enough for the two-digit display.

## What is specified and what is chosen

These points come from the system description the design follows:

- the split into UART input, FSM, clock divider and 7-segment display;
- the density classes 00/01/10-11;
- greens that are short, moderate or extended by class;
- fixed 3 s yellow and 2 s red;
- a two-digit countdown during green and yellow;
- the twelve-lamp bus layout;
- a manual reset;
- debug LEDs showing serial reception and FSM activity.

These are this implementation's own choices:

- **Green times 5 / 10 / 15 s.** The description only ranks them.
- **The 2 s red read as an all-red clearance** between one approach's
  yellow and the next approach's green.
- **One approach at a time**, served clockwise North, East, South, West.
  Opposite approaches are not paired.
- **Sampling the class at the start of green**, rather than adjusting a
  green already running.
- **The message format**: one byte holding four fields in lamp-bus order,
  8N1 framing, 9600 baud, and a 50 MHz clock.
- **Reset values**: all approaches low until the first byte; start at
  North green.
- **Display details**: active-low segments, a dark leading zero, and a
  dark display during all-red.
- **Reset and divider structure**: a synchronized push-button reset, and
  the divider built as an enable strobe rather than a derived clock.
- **The meaning of each debug LED.**

The board also has a serial transmit pin. It is left unused, because
nothing is specified to travel from the FPGA back to the PC.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one
with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/traffic_pkg.sv \
          tb/tb_traffic_top.sv --top-module tb_traffic_top -Mdir obj -o sim
obj/sim +verilator+rand+reset+2
```

| testbench | what it covers |
|-----------|----------------|
| `tb_uart_rx` | random bytes sent back to back and with gaps; latency of `valid`; bad stop bit; glitch; reset mid-frame |
| `tb_density_regs` | field positions, hold, reset |
| `tb_clock_divider` | tick spacing and width, restart on reset |
| `tb_traffic_fsm` | six rounds with random class changes: order, every phase length, lamp bits, countdown |
| `tb_countdown_display` | all values 0…127, against its own segment table |
| `tb_reset_sync` | asynchronous assert, release on the second edge |
| `tb_traffic_top` | end to end at a scaled clock (1 s = 200 clocks). It checks every phase length to the clock, the lamps, the digits every second, the debug LEDs, a dropped bad frame, a reset mid-round, a class change deferred to the next green, and every class and approach at least once. |
| `tb_density_workloads` | low, medium and high density on all approaches: round lengths of 40, 60 and 80 s |
| `tb_traffic_top_full` | the top at its defaults (50 MHz, 9600 baud). One byte, then one complete North turn (5 + 3 + 2 s), with phase lengths checked to within 4 clocks of N × 50 000 000. It simulates 5 × 10⁸ clocks and takes about four minutes. |

The scaled testbenches override only `CLK_HZ` and `BAUD` on the top. The
signal plan and green times are the same as in hardware.
