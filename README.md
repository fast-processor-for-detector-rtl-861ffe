# MD-1 fast event processor

A fast, programmable processor that sits on-line between the coordinate
chambers of the MD-1 magnetic detector and the experiment computer. For each
triggered event it reconstructs the particle helices from the track-centre
coordinates, classifies the event and decides whether it is worth recording.
Its speed comes from a horizontally microprogrammed structure rather than
from a fast general-purpose CPU:

* a **control unit** (CU) issues one 40-bit control word every 30 ns step;
* the word moves **one number over a shared 24-line bus, the unibus**, from
  the output register of one unit to the input registers of any number of
  other units, and gives units their operation modes;
* each **arithmetic unit** (two summers, a conveyor multiplier, a divider, a
  function table, an interval tester, a comparator, several storages, a stack
  and an "absence of number" detector) has its own input and output
  registers. Once loaded it works on its own for its dead time, while the bus
  serves other units.

So several operations run at once, and the program, not the hardware, is
responsible for reading each result only after its unit's dead time. This
RTL models the machine at step accuracy: one clock period is one 30 ns bus
cycle. That gives 3·10^7 control words per second at 33.3 MHz.

## Number format

All units exchange 24-bit floating-point numbers:

| bits  | field |
|-------|-------|
| 23    | mantissa sign, 1 = negative. This bus line is the **sign line** that conditional jumps test |
| 22    | exponent sign, 1 = negative |
| 21:16 | exponent magnitude, 0..63 |
| 15:0  | mantissa M, value = (−1)^s · M/2^16 · 2^E, normalized (M[15] = 1) |

The number zero is the all-low word. Units normalize before they put a
result on the bus. Results are truncated. An overflow saturates to the
largest magnitude, and an underflow flushes to zero. The field widths are
fixed by the original design. The bit order, the fraction convention and the
rounding are choices of this implementation. The shared arithmetic
(`fp_add`, `fp_mul`, `fp_div`, `fp_lt`, `fp_abs_lt`) is in `rtl/md1_pkg.sv`.

## The control word

Bit 39 separates the two kinds of word.

**AU words (bit 39 = 0)** drive the arithmetic unit (`md1_pkg::md1_cw_t`):

| bits  | lines |
|-------|-------|
| 37:35 | summer 1: 1st number in, 2nd number in (starts), "+ or −" (1 = subtract) |
| 34:32 | summer 2: the same |
| 31:30 | multiplier: 1st number in, 2nd number in (starts a product) |
| 29:28 | divider: dividend in, divisor in (starts) |
| 27    | function table: argument in |
| 26    | interval unit: next number in |
| 25:24 | comparator: 1st number in, 2nd number in |
| 23:22 | PS, WS: cell address (starts a read) |
| 21    | WS: number in (write the bus word at ADDR) |
| 20    | superfast storage: number in (register ADDR[2:0]) |
| 19:18 | stack: number in (push), reset |
| 17:16 | function type: sqrt, sin, cos, arcsin |
| 15:14 | comparator operation: `<`, `|a|<|b|`, keep smaller, keep greater |
| 13:10 | **source**: which unit's output register drives the bus this step (0 = none) |
| 9:0   | ADDR: cell address (PS/WS) or register number (superfast) |

Input lines are position coded, one line per action, so one word can load
the same number into several units. Only one unit may drive the bus at a
time, so its output gate is selected by the 4-bit source field. This is how
all the units' lines fit into 40 bits. Reading the multiplier, the function
table or the stack through the source field also advances or pops them.

**Control words (bit 39 = 1)** are taken by the CU decoder
(`md1_pkg::md1_ci_t`): op in bits 38:35, a 16-bit count n in bits 29:14 and a
14-bit target in bits 13:0. A control word costs one step, and nothing is
issued to the AU in that step.

| op | effect |
|----|--------|
| JMP t | jump |
| JS t / JNS t | jump if the sign line was 1 / 0 |
| CALL t / RET | subroutine call and return (8-deep return stack) |
| WAIT n | issue nothing for n steps in all. It saves program memory when waiting out a dead time |
| SETC n, LOOP t | load the step counter; decrement it and jump while it is not zero (SETC 5 runs a loop body five times) |
| HALT | end of program, `done` rises |

The sign line is sampled at the end of every step in which a unit drives the
bus. A conditional jump therefore tests the last word placed on the bus:
typically a comparator, interval or absence-unit answer issued the step
before.

## Timing rules for programs

The whole machine is one pipeline of independent units, so timing is the
programmer's job. A unit started by an input line in step *t* has its result
readable from step *t + LAT + 1*:

| unit | LAT (steps) | from the dead time |
|------|-------------|--------------------|
| summer (×2) | 10 | 300 ns |
| multiplier | 10; a new pair every 4 steps | 300 ns; 100 ns loading cycle |
| divider | 34 | 1000 ns |
| function table | 5 | 150 ns |
| PS / WS read | 2 / 7 | 50 / 200 ns |
| interval, comparator, superfast, stack | 0, read the next step | 30 ns |

Until the new result arrives, a unit's output register keeps the old one.
Assertions in `md1_au` and `md1_multiplier` report a program that reads a
unit too early, loads the multiplier too fast or loses a product. An input
register is free as soon as it has latched, so a summer can be reloaded
while it is still adding.

The **multiplier** is a conveyor. Products leave it in order, and the output
register always holds the oldest product not yet read. Reading it moves the
next product in. Products that finish while the register is occupied wait
in a 4-entry queue.

## Function table

For sqrt, sin, cos and arcsin the unit looks up the interval that holds |x|.
Each function's range is split into 64 intervals. On three successive reads
the unit returns f at the interval start, f at the interval end, and the
offset x − start. The program finishes the job with a summer and the
multiplier: f ≈ f0 + (f1 − f0)·offset/h. The end-to-end test contains such a
subroutine. The ranges and steps are:

| function | range | step h |
|----------|-------|--------|
| sqrt     | [0, 1] | 1/64 |
| sin, cos | [0, 2] rad | 1/32 |
| arcsin   | [0, 0.75) / [0.75, 0.875) / [0.875, 1] | 1/32 / 1/64 / 1/256 |

The finer arcsin steps near 1 keep the linear interpolation accurate where
the slope grows. The table `rtl/md1_functab.hex` holds f_k(a_i) for
function k at the 65 interval ends a_i above, converted to the 24-bit format
by truncation. Entry k·128 + i holds f_k(a_i), and entries 65..127 of each
block are zero. The program has to scale arguments outside the range, for
example by powers of 4 for sqrt, and supply the sign for odd functions.

## Arrays of unknown length: stack and absence unit

The 20-entry stack returns an all-low word when it is read empty. The
absence unit watches the bus in every step. When it is asked (as the source),
it places on the sign line whether the previous step's bus word was all low.
A loop can therefore pop, ask, and leave with `JS`. Note that a stored zero
also reads as "no number".

## Host side

The processor talks to the outside world through plain ports. There is a
program-store write port (16,000 words), a PS load port (constants), a WS
read/write port (event data in, results out), and `start`/`start_addr` →
`running`/`done`/`steps`. PS is the permanent storage, so programs only read
it. WS is also written from the bus. The original machine's front end, which grouped
fired wires into track centres, and its link to the computer are not
specified closely enough to build, so these ports stand in for them.

## Modules

| file | contents |
|------|----------|
| `md1_pkg.sv` | number format, control-word structs, arithmetic functions |
| `md1_summer.sv`, `md1_multiplier.sv`, `md1_divider.sv` | arithmetic units |
| `md1_functab.sv` + `md1_functab.hex` | function table |
| `md1_interval.sv`, `md1_comparator.sv` | test units with sign-line results |
| `md1_storage.sv` | 1K-word storage, used for PS (2-step, host-loaded) and WS (7-step, writable) |
| `md1_superfast.sv`, `md1_stack.sv`, `md1_absence.sv` | small storages and the absence detector |
| `md1_unibus.sv` | the bus: OR of the gated output registers |
| `md1_au.sv` | all units on the bus, control-word decoding, timing assertions |
| `md1_cu.sv` | program store and sequencer |
| `md1_processor.sv` | top: CU + AU |

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. They use `tb/md1_tb_pkg.sv`, which holds
real ↔ 24-bit conversions, tolerances and a small label-resolving assembler
(`md1_asm`). Run them from the repository root, because the function table
is read from `rtl/md1_functab.hex`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/md1_pkg.sv tb/md1_tb_pkg.sv tb/tb_md1_processor.sv \
  --top-module tb_md1_processor -o sim && ./obj_dir/sim
```

`tb_md1_processor` runs a 100-word program on the default-size processor
(386 steps). The program searches an 8-number event through the stack for
its maximum, counting the numbers inside an interval with conditional jumps.
It computes sqrt(x²+y²) with two products queued in the multiplier and a
function-table interpolation subroutine, computes y/x, and runs a counted
loop that keeps both summers busy at once. It checks the results against
real arithmetic and checks that every one of those mechanisms actually
occurred. The unit testbenches also check each unit's latency to the step.

`tb_md1_circle` runs the core of a helix reconstruction on three events.
From three points it computes the centre and radius of the circle through
them, then the arc length from the first to the third point,
2r·arcsin(chord/2r), and the dip slope dz/dL from the z coordinates. Last,
it tests with the interval unit whether a fourth point lies on that circle,
and records the answer with a conditional jump. The arcsin step h depends on
the argument, so the program picks 1/h with the comparator and two
conditional jumps; the three events use all three steps. A small scheduler
in the testbench inserts the WAITs so that each result is read exactly when
its dead time ends. The 427-word program takes about 1,510 steps (45 µs) per
track. It does one thing at a time, so hand scheduling that overlaps the
units would shorten it.

## How far to trust it

The structure follows the original design closely: the units, the 24-bit
format, the 40 drive lines, the 30 ns step, the unit latencies, the 16,000-step
program store, the stack of 20, 1K storages, 8 superfast registers and 64
table intervals. The original does not give the following, and they are
choices made here:

* the bit allocation of the control word and its encoded source field;
* the control-instruction set and encoding;
* the sign-line polarities;
* the table ranges;
* the start rules of the units (a unit starts when its 2nd operand loads);
* the multiplier queue;
* truncating arithmetic;
* the host ports.

The arithmetic units compute their result in one combinational block and
hold it for the dead time. The result and the timing are those of the
original units, but the circuits are not the original ECL circuits.
Programs written for the original machine would need to be re-encoded for
this control word.
