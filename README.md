# Reaction timer: a 68000 bus peripheral

This circuit measures how long a person takes to react to a light. The host
processor (a 68000) starts a test with one register write. The circuit then
lights an LED and counts milliseconds until the person flips a stop switch. It
freezes the count and interrupts the host, which reads the result from the same
register. The host does nothing while the measurement runs: the hardware does
the timing and reports once.

The whole design is a handful of gates and 29 flip-flops. What needs care is
the protocol: the meaning of the two state bits, and the clocks. Those come
first below.

## Blocks

```
             A23..A20, AS, UDS, LDS, R/W
 68000 bus ─────────────► bus_interface ──► DTACK (open drain)
                              │ write_reg          │ read_reg
                   D0, D1     ▼                    ▼
 SW1 ──(preset)──► start_stop_regs          read_buffer ──► D15..D0
                              │ {START,STOP}       ▲
                              ▼                    │ Q[15:0]
                        control_logic ──► LED1, IRQSF
                          │ en   │ clear           │
 PCLK ──► clock_divider ──┴──► ms_counter ─────────┘
            (1000 Hz)
```

| Module | Role |
|---|---|
| `reaction_timer` | Top level. Wires the blocks together and brings out the bus, PCLK, the switch, the LED and the interrupt. |
| `bus_interface` | Decodes a word access to `$B00000` into `read_reg` / `write_reg` and drives the open-drain DTACK. |
| `start_stop_regs` | The START and STOP flip-flops. They are clocked by `write_reg`, and STOP is preset by the switch. |
| `control_logic` | Turns {START, STOP} into counter enable, counter clear, LED and interrupt. |
| `clock_divider` | Divides PCLK down to 1000 Hz. |
| `ms_counter` | 16-bit millisecond counter with enable and asynchronous clear. |
| `read_buffer` | Tri-state driver that puts the count on D15..D0 during a read. |
| `reaction_timer_pkg` | Register address nibble, widths, frequencies, and the `rt_mode_e` mode type. |

## The register and its four modes

There is one register, at `$B00000`. Writing it loads data bit 0 into START and
bit 1 into STOP. Reading it returns the 16-bit count. The two flip-flops are the
timer's entire state. Each of their four values is a mode (`rt_mode_e`):

| START | STOP | Mode | LED1 | Counter | IRQSF |
|:-:|:-:|---|---|---|---|
| 0 | 0 | `MODE_CLEAR` | off | held at 0 | inactive |
| 1 | 0 | `MODE_RUN` | **on** | counts | inactive |
| 1 | 1 | `MODE_STOPPED` | off | frozen | **active** |
| 0 | 1 | `MODE_IDLE` | off | frozen | inactive |

These are the control equations (`control_logic`):

```
cnt_en  =  START & ~STOP          led1_n  = ~cnt_en
cnt_rst = ~START & ~STOP          irqsf_n = ~(START & STOP)
```

Only the host moves the timer between modes, with one exception: the stop
switch. SW1 drives the asynchronous preset of STOP. While the switch is at 1,
STOP is 1, whatever the host last wrote. The move from RUN to STOPPED is
therefore immediate, and it does not depend on any clock.

### Host sequence for one test

1. Write `0` (START=0, STOP=0). This clears the counter.
2. Write `1` (START=1, STOP=0). The LED lights and counting starts.
3. The person flips SW1 to 1. STOP is preset, the LED goes dark, the count
   freezes and IRQSF goes low.
4. In the interrupt routine, read `$B00000` to get the reaction time in ms.
5. Write `2` (START=0, STOP=1). This withdraws the interrupt. Without this
   step the host would be interrupted again at once. The count is kept.

SW1 must be back at 0 before step 2 of the next test. While SW1 is at 1, STOP
stays 1, so writing START=1 goes straight to STOPPED.

## Bus interface

A cycle selects the register when all of the following hold:

- A23..A20 equal `B`;
- AS, UDS and LDS are all low;
- R/W gives the direction: `read_reg` for a read, `write_reg` for a write.

The decode is purely combinational. Two consequences:

- Only the upper nibble is decoded, so the register also appears at every
  address from `$B00000` to `$BFFFFF`.
- A byte access, with only one data strobe low, is ignored and gets no DTACK.

DTACK goes low as soon as either select is active. It is open drain: the
module drives 0 or leaves the line at high impedance. The board's pull-up
provides the high level, so other slaves can share the line. The DTACK
asserts with gate delay only, so the bus cycle runs with no wait states.

During a read, `read_buffer` drives the count onto D15..D0. At all other
times it leaves the data bus at high impedance. The top-level `data` port is
therefore an `inout`. Write data also comes in on it: D0 and D1 go to the
flip-flops.

## Clocks and timing

The circuit uses three clocks, following the structure of the original
block diagram:

- **`write_reg`** clocks START and STOP. Data is loaded on its rising edge,
  which is the moment the last strobe of a write cycle falls. The 68000 puts
  write data on the bus before it asserts the data strobes, so D0/D1 are
  stable at that edge. `write_reg` comes from combinational decode logic. On
  an FPGA it should reach the flip-flops glitch-free. In practice this holds
  when A23..A20 and R/W are stable before AS falls, as they are on a 68000.
- **The 1000 Hz divided clock** clocks the counter.
- **PCLK** clocks only the divider.

The counter enable, the clear and the bus read are all asynchronous to the
1000 Hz clock. This has three effects:

- **Resolution.** The count is the number of rising edges of the 1000 Hz clock
  while the timer was in RUN. For a true reaction time of *t* ms it reads
  ⌊*t*⌋ or ⌊*t*⌋+1, depending on the phase of the divider. The end-to-end
  testbench checks the exact count, using an edge model built from PCLK cycles.
- **Clear.** Clearing is asynchronous, so writing `0` empties the counter at
  once, not at the next millisecond edge.
- **Reading.** The count is not synchronised to the bus. The host should read
  it only after the interrupt, when the count is frozen. A read during RUN may
  land on a counter edge and see a mixture of old and new bits.

### Clock divider

`clock_divider` is a modulo-N counter on PCLK, with N = `PCLK_HZ / TICK_HZ`.
Its output is registered and is high for the second half of each period. The
programmable board clock can be set anywhere from 392 kHz to 90 MHz. This
design sets it to **1 MHz**, which gives N = 1000 and a 10-bit divider.

Other settings only need a new parameter value. For example, 25 MHz gives
N = 25 000 and a 15-bit divider. Choose a PCLK that is a multiple of 1000 Hz,
or the tick rate will be off by the remainder of the division.

After reset the divided clock first rises N/2 PCLK cycles later, then every N
cycles.

### Range

A 16-bit count of 1 ms steps holds up to 65.535 s. A longer reaction wraps to
zero: the counter does not saturate.

## Reset

The host protocol needs no reset. For simulation and a defined power-up, this
design adds an active-high `rst`:

- START is cleared.
- STOP is set, through the same preset pin as the switch. The timer comes up
  idle: LED off, no interrupt.
- The counter is cleared.
- The divider restarts its phase.

## Choices made in this design

The blocks, their connections, the register address, the data-bit
assignment, the mode meanings, the active-low LED and interrupt, the
open-drain DTACK, the 1000 Hz rate and the 16-bit width follow the original
lab description. The following are this design's own choices:

- PCLK is set to 1 MHz, so the divider is 10 bits.
- The divider output is a square wave, high for the second half of each
  period.
- The counter clear is asynchronous, and the counter wraps at 65 535.
- `rst` is an added power-on reset that gives the idle mode.
- In the idle mode (START=0, STOP=1) the LED is off and the count is held.
  The original only says that the interrupt is withdrawn there.
- The switch preset is level-sensitive while the switch is held at 1.

The following are not part of the RTL: the 68000 itself, its start and
interrupt routines, and programming the board clock. The testbench plays the
role of the host. In the original setting the top level sits inside a board
wrapper. The wrapper's IRQSF pin is routed to the processor's interrupt input.

## Parameters

| Module | Parameter | Default |
|---|---|---|
| `reaction_timer` | `PCLK_FREQ_HZ` | 1 000 000 |
| | `TICK_FREQ_HZ` | 1000 |
| | `CNT_WIDTH` | 16 (at most 16, the data bus width) |
| `clock_divider` | `PCLK_HZ`, `TICK_HZ` | 1 000 000, 1000 |
| `ms_counter` | `WIDTH` | 16 |
| `read_buffer` | `WIDTH` | 16 |

After coarse synthesis the top level is 35 word-level cells and 29 flip-flop
bits:

- 16 for the counter;
- 11 for the divider (10 count bits and the output register);
- 2 for START and STOP.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_bus_interface` | All 256 combinations of A23..A20 and the strobes, against a reference decode. DTACK is read through a pull-up. |
| `tb_start_stop_regs` | 2000 random writes, switch toggles and resets, against a reference model. Also that data changes without a write edge change nothing. |
| `tb_control_logic` | The four modes against the table above. |
| `tb_clock_divider` | The output level on every PCLK cycle for N = 1000 and N = 7. Also a reset in mid-period. |
| `tb_ms_counter` | Random enable, the asynchronous clear between edges, and the wrap from 65 535 to 0. |
| `tb_read_buffer` | Driving, and high impedance observed both through a second driver and through pull-ups. |
| `tb_reaction_timer` | End to end, with all parameters at their defaults (see below). |

`tb_reaction_timer` performs 68000-style word cycles and runs nine complete
tests. Eight have random reaction times of 120–450 ms plus a random fraction
of a millisecond. One lasts 65 000 ms, close to the 16-bit limit. For each
test it checks:

- the LED and interrupt levels in every mode;
- the exact count, from its own PCLK-based model of the divided clock;
- that the count stays frozen while stopped and kept in idle;
- that every other address and every byte access gets no DTACK, leaves the
  data bus undriven and does not change the mode.

It also counts how often each mechanism occurred: clear, start, switch stop,
interrupt, read, interrupt withdrawal, frozen count, LED lit and ignored
cycle. A mechanism that never happens counts as a failure. The run simulates
67 s of circuit time, which takes about 30 s of wall time.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/reaction_timer_pkg.sv tb/tb_reaction_timer.sv --top-module tb_reaction_timer
./obj_dir/Vtb_reaction_timer
```

Replace `tb_reaction_timer` with any other testbench name. The package file
must come first.
