# Gated frequency counter with a one-hot controller

This design measures the frequency of a digital input. It counts the input's
rising edges during a fixed gate time and shows the count on two 7-segment
digits. The clock is 2.000 MHz and the gate is 2000 clocks, which is 1 ms.
So the count is the frequency in kHz: a 25 kHz square wave reads `25`.

A small controller sequences each measurement. It has three states and
uses one flip-flop per state (one-hot). The rest is a synchronizer per
external input, a rising-edge detector, a two-digit BCD counter, a
divide-by-2000 gate timer, a result register and two BCD-to-7-segment
decoders.

## How a measurement runs

```
            PB1 (Start, active low)        S1_1 (signal)
                 |                               |
            synchronizer                    synchronizer
                 | START_S                       | SIGNAL_S
                 v                               v
   +----------------------+                rise_detect
   |   control_unit       |                      | one-clock pulse per 0->1
   |  IDLE  COUNT  WAIT   |--COUNT_ENABLE-----> AND ---> CE
   |                      |--COUNT_CLEAR---------------> CLR  bcd_cntr2 (00..99)
   |                      |--DATA_STORE---+                       | tens, ones
   |                      |               +--> ENA  dffe8 (8-bit result register)
   |                      |--TIMER_RESET--> div2000 --TIME_UP--+       |
   +----------------------+ <--------------------------------- +   bcd_7seg x2
        | | |                                                        |     |
     BAR1_1..3 (state LEDs)                                        DIS1  DIS2
```

The three states:

| State | Outputs that are 1           | Leaves when            | Goes to |
|-------|------------------------------|------------------------|---------|
| IDLE  | TIMER_RESET, COUNT_CLEAR     | START_S = 1            | COUNT   |
| COUNT | COUNT_ENABLE                 | TIME_UP = 1            | WAIT    |
| WAIT  | DATA_STORE                   | START_S = 0            | IDLE    |

- **IDLE.** The timer and the BCD counter are held at zero. The displays
  still show the last result.
- **COUNT.** The BCD counter counts each rising edge of the input. The
  displays still show the previous result.
- **WAIT.** The count is copied into the result register. The controller
  stays here until Start is released, so holding the button gives exactly
  one measurement.

A press that is released before the gate ends still completes the
measurement. In that case WAIT lasts one clock, which is enough to store the
result.

### The one-hot controller

Each state has its own flip-flop, and exactly one of them holds a 1. A
state's D input is 1 in two cases. Either the state is active and its exit
condition is false, or the state before it is active and that state's exit
condition is true:

```
D_IDLE  = IDLE  & ~START_S | WAIT  & ~START_S
D_COUNT = IDLE  &  START_S | COUNT & ~TIME_UP
D_WAIT  = COUNT &  TIME_UP | WAIT  &  START_S

TIMER_RESET = COUNT_CLEAR = IDLE      COUNT_ENABLE = COUNT      DATA_STORE = WAIT
```

All outputs come straight from flip-flops, so they do not glitch. Reset is
asynchronous: it presets IDLE and clears COUNT and WAIT. An assertion in
`control_unit` checks that the state stays one-hot.

### Why the inputs are synchronized

The controller reads Start in two D equations, for IDLE and COUNT. If Start
changed close to a clock edge, one flip-flop could see 1 and the other 0.
The machine would then land in a state with no bit set, or two bits set.
A flip-flop on the clock first (`synchronizer`, `STAGES = 1`) makes START_S
change only just after a clock edge. The measured signal goes through an
identical synchronizer. `STAGES = 2` gives the more robust two-flip-flop
chain, but adds one clock of latency. Reset is not synchronized: it only
forces every flip-flop into a known value, and it is released with no input
active.

### Edge detection and the count

`rise_detect` is a two-state machine. Its one flip-flop holds the input's
value at the previous clock, and its output is `sig & ~state`. That is a
one-clock pulse after each 0->1 transition. ANDed with COUNT_ENABLE it
drives the BCD counter's clock enable. So only edges inside the gate are
counted, and each edge is counted exactly once.

`bcd_cntr2` is two `bcd_cntr` decades. The units decade's terminal count
(count is 9 and CE is 1) enables the tens decade, so 09 -> 10 and 99 -> 00
take a single clock.

### The gate timer

`div2000` is a 16-bit counter, `count16`, with a synchronous reset. The
terminal count is the AND of only those counter bits that are 1 in N-1.
For N = 2000, N-1 = 1999 = 0b111_1100_1111, which is bits 10, 9, 8, 7, 6,
3, 2, 1 and 0. Counting up from 0, the first value with all those bits set
is 1999 itself, so a 9-input AND is enough. The terminal count is ORed with
TIMER_RESET into the counter's synchronous reset. The counter therefore runs
0..1999, and its terminal count is TIME_UP.

## Timing of one measurement

These numbers are for the defaults, with Start pressed between clock edges:

| Event                                   | Clock edges after the press |
|-----------------------------------------|-----------------------------|
| START_S = 1                             | 1                           |
| controller enters COUNT (timer at 0)    | 2                           |
| TIME_UP (timer at 1999)                 | 2 + 1999                    |
| controller enters WAIT                  | 2 + 2000                    |
| result in the register, on the displays | 2 + 2001                    |

COUNT lasts exactly `TIMER_DIV` clocks. An input whose period is P clocks
therefore gives exactly `TIMER_DIV / P` counts when P divides `TIMER_DIV`.
Otherwise it gives one of the two nearest whole numbers, depending on phase.
After Start is released, the controller is back in IDLE two clocks later.

## Limits of the reading

- **Two digits.** The counter wraps after 99. The display shows the count
  modulo 100, so 125 kHz reads `25`, the same as 25 kHz. There is no
  overflow indicator.
- **Sampling.** The input is sampled at 2 MHz. Only signals below 1 MHz
  (high and low for at least one clock each) are counted correctly. A
  1 MHz square wave gives 1000 counts and reads `00`.
- **Resolution.** The gate is 1 ms, so the reading has 1 kHz steps and a
  +/-1 count uncertainty from phase.

## Modules

| File                   | Role |
|------------------------|------|
| `rtl/freqcnt.sv`       | Top level. Board pins, wiring, button inversion, the AND of the edge pulse with COUNT_ENABLE |
| `rtl/control_unit.sv`  | One-hot controller (IDLE, COUNT, WAIT) |
| `rtl/synchronizer.sv`  | `STAGES`-flip-flop input synchronizer, asynchronous clear |
| `rtl/rise_detect.sv`   | 0->1 transition detector, two states |
| `rtl/bcd_cntr2.sv`     | Two-digit BCD counter built from two `bcd_cntr` |
| `rtl/bcd_cntr.sv`      | One decade: CE, synchronous CLR, TC = CE & (count = 9) |
| `rtl/div2000.sv`       | Divide-by-N gate timer (N = 2000) built on `count16` |
| `rtl/count16.sv`       | 16-bit up counter, synchronous reset |
| `rtl/dffe8.sv`         | 8-bit register with enable, asynchronous active-low clear and preset |
| `rtl/bcd_7seg.sv`      | BCD to 7-segment decoder, active high, blanks codes 10..15 |
| `rtl/freqcnt_pkg.sv`   | State-bit positions, digit and segment types, segment patterns |

### Top-level ports

| Port     | Dir | Meaning |
|----------|-----|---------|
| `CLK0`   | in  | 2.000 MHz clock |
| `PB1`    | in  | Start button, active low |
| `PB4`    | in  | Reset button, active low (asynchronous master reset) |
| `S1_1`   | in  | Signal to measure |
| `DIS1`   | out | Tens digit segments `{G,F,E,D,C,B,A}`, 1 = lit |
| `DIS2`   | out | Units digit segments `{G,F,E,D,C,B,A}`, 1 = lit |
| `BAR1_1` | out | IDLE |
| `BAR1_2` | out | COUNT (on for only 1 ms per measurement) |
| `BAR1_3` | out | WAIT |

### Parameters of `freqcnt`

| Parameter     | Default | Meaning |
|---------------|---------|---------|
| `TIMER_DIV`   | 2000    | Gate length in clocks (2 to 65536). With a 2 MHz clock, 2000 gives a 1 ms gate and a reading in kHz |
| `SYNC_STAGES` | 1       | Flip-flops per input synchronizer |

## Choices made in this implementation

The state machine, the outputs of each state, the clock rate, the gate
length, the divide-by-2000 structure, the single-flip-flop synchronizers, the
edge-gated count enable and the pin names form the core of the design. The
following details are this implementation's own:

- The Reset button acts as an **asynchronous** reset. It covers the state
  flip-flops, the synchronizers, the edge detector and the result register.
  The BCD counter is cleared synchronously by COUNT_CLEAR in IDLE. The gate
  timer is reset synchronously by TIMER_RESET in IDLE.
- The edge detector is a Mealy machine. Its pulse is combinational from the
  synchronized input.
- `bcd_cntr`'s terminal count is gated by CE so that it can enable the next
  decade directly. CLR has priority over CE.
- `DIS1` is the tens digit and `DIS2` the units digit.
- Segments are active high with the usual a-g layout. The 6 has its top bar,
  the 7 has no f segment, and the 9 has its bottom bar. Invert the outputs
  for common-anode displays.
- After 99 the counter wraps with no indication.
- The timer's divisor is a parameter. Its decoder is built from the set
  bits of N-1, which for 2000 is the same 9-bit AND as in the fixed design.
- `dffe8` has two asynchronous controls, clear and preset. Some synthesis
  front ends reject this form. In this design preset is tied inactive.

The board's LED displays and LED bar are outside the RTL. Their drive
signals are the top-level outputs.

## Simulating

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/freqcnt_pkg.sv tb/tb_freqcnt.sv \
          --top-module tb_freqcnt -Mdir obj_freqcnt -o sim
./obj_freqcnt/sim
```

Replace `freqcnt` with any other module name to run its unit test. The
testbenches reset or drive everything they read, so random initial values
(`+verilator+rand+reset+2`) do not matter.

`tb_freqcnt` runs the whole design at its default size. It does twelve
measurements with input periods of 80, 250, 40, 16, 2, 21, 20, 23 and 1000
clocks, plus no input at all. The 80-clock period is the 25 kHz case. It
also resets in the middle of a count. Each measurement checks:

- the 2-clock start latency;
- the exact 2000-clock gate;
- that the old reading is held while a new count runs;
- the new reading, decoded from the segment outputs;
- WAIT lasting while Start is held;
- the return to IDLE;
- a one-hot LED bar in every cycle.

It also counts how often each mechanism occurred: start, time-out, store,
wait for release, short press, tens carry, wrap past 99 and master reset.
It fails if any of them never occurred.

The unit tests compare each block with an independent model:

- `tb_control_unit`: an enumerated-state reference of the state chart,
  under 5000 random cycles.
- `tb_bcd_cntr` and `tb_bcd_cntr2`: integer counters.
- `tb_bcd_7seg`: segment letters for each numeral.
- `tb_div2000`: the terminal-count period at N = 2000 and N = 7.
- `tb_count16`: a full 2^16 wrap.
- `tb_synchronizer`: one-stage and two-stage chains.
- `tb_dffe8`: enable, clear, preset and their priority.
- `tb_rise_detect`: pulse count and pulse width.

All of these pass.
