# A state machine plus a memory: a tune player and a tiny computer

This is SystemVerilog RTL for two small FPGA designs with one shared idea. A
finite-state machine becomes much more capable when it reads a list of steps
from a memory and carries them out one by one.

* **The music machine.** An 8-state FSM reads (duration, half-period) pairs
  from a 256-word ROM. For each pair it toggles a speaker pin at the given
  half-period until the duration has passed. A zero duration means GOTO, and
  a zero half-period means a rest. A second version runs two of these
  machines at once, one per hand of a two-part piece.
* **The computer.** A 14-state FSM fetches 16-bit instructions from a
  256-word RAM and runs them on a 16-bit accumulator. The instruction set is
  LOAD, STORE, ADD, SUB, MUL, four jumps and OUT. Its RAM powers up with a
  program that prints the prime numbers from 2 to 9973. It comes in two
  versions. The plain board runs free. The other adds a front-panel
  controller for breakpoints, single-stepping and hand editing of the RAM.

Both follow the FPGA lab design they come from (University of Pennsylvania,
Physics 364, Lab 27, fall 2014). They target a small board with four push
buttons, eight slide switches, eight LEDs and a 4-digit multiplexed 7-segment
display. The places where this RTL makes its own choices are listed in
[Departures and own choices](#departures-and-own-choices).

## Module map

| module | what it is |
|---|---|
| `lab27_pkg` | state enums of both FSMs, opcodes, debug-mode enum |
| `tune_rom` | 256 x 16 tune ROM (combinational case table) |
| `pulse_1khz` | 1 ms enable pulse from the 1 MHz clock |
| `playerpiano` | the music FSM with its address, note registers and counters |
| `display_digits` | 4-digit multiplexed 7-segment driver (hex digits and dots) |
| `piano_board` | one music machine wired to the board |
| `piano_duet` | two music machines playing together |
| `simple_cpu` | the accumulator CPU |
| `ram256x16` | 256 x 16 RAM, async read, sync write, loaded from `rtl/prime_asm.hex` |
| `cpu_debug` | front panel: four modes, breakpoints, stepping, memory editor |
| `basic_cpu_board` | CPU + RAM + display: the plain, free-running computer |
| `cpu_board` | CPU + RAM + front panel + display |
| `lab27_top` | the four board designs side by side, sharing nothing |

Every file in `rtl/` and `tb/` starts with a comment giving the interface and
timing of what it holds.

## The music machine

### Tune format

A note is two consecutive ROM words. The word at the even address is the
duration in milliseconds. The word at the next, odd address is the
half-period in microseconds, which is 1/(2f). Two values are special:

| duration | half-period | meaning |
|---|---|---|
| > 0 | > 0 | play the tone |
| > 0 | 0 | rest: silence for the duration |
| 0 | n | GOTO: continue reading at address n[7:0] |

Unused words are 0, so an unused pair reads as "GOTO 0". `tune_rom` holds
three tunes:

* Addresses 0–29: *Mary Had a Little Lamb* in 1 s notes, with a 1.5 s G at
  the end, then a 1 s rest and GOTO 0.
* Addresses 64–91: the Greenwich time signal. A 1 s rest, then five 100 ms
  pips at 1 kHz, one second apart, then a 500 ms pip, a 4.5 s pause and
  GOTO 64.
* Addresses 96–111: the first bars of the right hand of Bach's Invention 13,
  then GOTO 96.

The white keys from middle C have half-periods of 1911, 1703, 1517, 1432,
1276, 1136, 1012 and 956 µs.

### The FSM

State numbers are shown on the display, so they are fixed:
START=0, FETCHDURA=1, FETCHPITCH=2, GOTO=3, WIGGLE0=4, WIGGLE1=5,
NOTEDONE=6, NOTEGAP=7.

```
START ─► FETCHDURA ─► FETCHPITCH ─┬─(duration==0)─► GOTO ─► FETCHDURA
              ▲                   └─► WIGGLE0 ⇄ WIGGLE1   (toggle when the µs count == half-period;
              │                          │   │             a rest stays in WIGGLE0)
              │                          ▼   ▼ (ms count == duration)
              └──(ms count == 25)─ NOTEGAP ◄─ NOTEDONE
```

* The ROM address register does the sequencing. START clears it. FETCHDURA
  and FETCHPITCH each latch the ROM word into their register and step the
  address by one. GOTO loads the address from the latched half-period.
  Because the ROM is combinational, the word a state latches is the one at
  the address the previous state left behind.
* The speaker pin is high exactly in WIGGLE1.
* Two 16-bit counters run on the one 1 MHz clock:
  * The microsecond counter counts every clock. FETCHPITCH clears it, and so
    does its own match with the half-period.
  * The millisecond counter counts only on clocks where `pulse_1kHz` is high.
    FETCHPITCH and NOTEDONE clear it.

  Using the pulse as a clock enable, not as a second clock, keeps the whole
  machine synchronous.
* NOTEGAP puts 25 ms of silence between notes (`GAP_MS`). Without it, two
  equal notes in a row would sound like one long note.
* `reset` or `stopthenoise` forces START. While `gotobutton` is held, the
  address is loaded from the switches and the FSM waits in FETCHDURA.

**Exact timing.** The microsecond counter restarts on the clock where it
matches, so each half-period lasts *half-period + 1* clocks. For example, A
at 1136 µs gives 2274 µs per cycle, about 439.8 Hz. A note lasts exactly
*duration* ticks of the 1 ms pulse, counted from FETCHPITCH, which is between
duration−1 and duration ms. The gap is exactly 25 ticks. The last half-cycle
of a note is cut short when the duration runs out.

### On the board (`piano_board`, `piano_duet`)

**Single voice (`piano_board`).**

| control | action |
|---|---|
| btn[0] | reset: play from address 0 |
| btn[1] held | load the address from sw[7:0]; play resumes from there on release |
| sw[0] up | silence: hold the machine in START |

The speaker goes between `jc[1]` and ground. `jd[4:1]` brings out the clock,
the 1 ms pulse and two bits of the millisecond counter, for a scope. The
LEDs show the low byte of the half-period. The display shows, from left to
right:

* two digits of ROM address;
* the state number;
* the time left in the note, in units of 128 ms.

While btn[1] is held, the display shows the ROM word at the switch address
instead, so the ROM can be read by hand.

**Two voices (`piano_duet`).** Two `playerpiano` instances share the clock,
the 1 ms pulse and the controls. Each reads its own `tune_rom`. The
right-hand voice is on `jc[1]` and the left-hand voice on `jd[1]`. The
display shows the left address on digits 3–2 and the right address on
digits 1–0. The two pins are mixed off chip, with an op-amp summer or simply
two speakers.

## The computer

### Instruction set

An instruction is one 16-bit word. Bits [15:8] are the opcode and bits [7:0]
are the argument, `a`: a RAM address, or the jump target for jumps. All
arithmetic is 16-bit two's complement.

| opcode | name | effect | clocks |
|---|---|---|---|
| 00 | LOAD a | AC := mem[a] | 3 |
| 01 | STORE a | mem[a] := AC | 4 |
| 02 | JUMP a | PC := a | 3 |
| 03 | JUMPZ a | if AC == 0: PC := a | 3 |
| 04 | JUMPN a | if AC[15]: PC := a | 3 |
| 05 | ADD a | AC := AC + mem[a] | 3 |
| 06 | SUB a | AC := AC − mem[a] | 3 |
| 07 | MUL a | AC := AC × mem[a], or FFFF if the product exceeds 16 bits | 3 |
| 08 | OUT | OUT := AC (shown on the display) | 3 |
| 09 | JUMPNZ a | if AC != 0: PC := a | 3 |
| other | — | no operation | 2 |

### How an instruction runs

State numbers are again fixed, because the display can show them: RESET=0,
FETCH=1, DECODE=2, LOAD=3, STORE=4, STORE2=5, JUMP=6, JUMPZ=7, JUMPN=8,
ADD=9, SUB=10, MUL=11, OUT=12, JUMPNZ=13.

1. **FETCH.** The RAM address is PC. IR latches the word and PC increments.
2. **DECODE.** IR[15:8] picks the execute state.
3. **Execute.** The RAM address is now IR[7:0], so `memory_dataout` already
   holds the operand. The execute state updates AC, PC or OUT on its one
   clock. STORE raises `memory_write` and then spends one more clock in
   STORE2.
4. Every execute state returns to FETCH.

The RAM read is combinational, so no state waits for memory. MUL is one
clock of combinational 16 × 16 multiplication, followed by a compare and
clamp to FFFF. That clamp is the machine's only overflow handling.

`run` is a clock enable on every CPU register. Holding it low freezes the
machine in any state, and this is how the front panel pauses it. `reset` is
synchronous. It puts the FSM in RESET, and the next enabled clock clears AC
and PC. `memory_write` is held low while `reset` is high, so whatever state
the FSM powers up in cannot write the RAM before reset takes effect.

### The plain board (`basic_cpu_board`)

This is the computer with nothing added:

* sw[0] up pauses it, because `run` = !sw[0];
* holding btn[1] resets it;
* the LEDs show PC;
* the display shows the OUT register.

It has no power-on reset input. Hold btn[1] for a clock or more to start
it cleanly in simulation. On an FPGA the flip-flops configure to zero,
which is the RESET state.

### The prime-number program (`rtl/prime_asm.hex`)

The RAM powers up with the prime program. `$readmemh` reads the file with
the path `rtl/prime_asm.hex`, relative to the directory the simulator runs
in. The program tests each i from 2 to 9999 with the slowest possible
method. For every j from 2 to i−1 it tries each k from j upwards. It stops
when j·k reaches or passes i. If j·k equals i, then i is not prime. If no
pair matches, i is prime.

For each prime, the program does three things:

1. It converts i to four BCD digits. It repeatedly subtracts 1000, 100 and 10
   and adds 0x1000, 0x100 and 0x10.
2. It waits in a nested delay loop of `Jdelay` × `Kdelay` = 0x1000 × 0x300
   passes.
3. It executes OUT, so the display shows the prime in decimal.

| address | contents |
|---|---|
| 00–1F | main loops: i, j, k, the multiply and the compares |
| 20–4C | BCD conversion, delay loop, OUT, jump back to the i loop |
| 5C | `done`: jump to start |
| 5D–70 | constants and variables: zero, one, i, j, k, prod, outnum, remain, hdigit, h1000, h100, h10, d10000, d1000, d100, d10, d9999, istart, Jdelay (6F), Kdelay (70) |

The delay takes 7 + 4096 × (20 + 13 × 768) = 40,976,391 clocks per prime.
The top-level test measures the first prime at 40,976,499 clocks after power
on. To see primes quickly, use the memory editor to set `Jdelay` and
`Kdelay` to 1.

To run another program, point `cpu_board`'s `INIT_FILE` parameter at a
file of 256 hex words, one per line. `tb/count_asm.hex` is an example. It
counts up from 1, OUTputs each value, and waits 23 + 13 × Kdelay clocks
between counts.

### The front panel (`cpu_debug`)

This is the subtlest part of the design. The panel never touches CPU state
directly. It acts only through the CPU's `run` enable and by taking over the
RAM port. btn[3] steps through four modes, and the lit decimal point shows
which one is active: dot 0 for RUN through dot 3 for MEMORY.

| mode | CPU | btn[0] | btn[1] | btn[2] |
|---|---|---|---|---|
| 0 RUN | runs; sw[0] up pauses it | — | reset CPU | useraddr := sw |
| 1 BREAK | runs; pauses after each OUT and when PC == useraddr | continue | reset CPU | useraddr := sw |
| 2 STEP | pauses in every DECODE; with sw[0] up, on every clock | one instruction (one clock) | reset CPU | useraddr := sw |
| 3 MEMORY | stopped; the panel owns the RAM | useraddr += 1 if sw == 0, else useraddr := sw | mem[useraddr][7:0] := sw | mem[useraddr][15:8] := sw |

Pausing is built from two signals:

```
run = base && (!brk || go)
```

* `base` is the mode's free-run condition.
* `brk` is the mode's pause condition for the CPU's present state:
  * BREAK: FETCH right after an executed OUT, or FETCH with PC == useraddr.
  * STEP: DECODE, or any state when sw[0] is up.
* `go` is set by a btn[0] press while the CPU is paused. It is cleared by the
  one enabled clock it lets through.

So each press releases exactly one clock out of the pause state, and the FSM
then runs until it next meets a pause condition. In BREAK mode the pause
comes after the OUT has executed, so the new value is already on the
display. A breakpoint pauses before the instruction at `useraddr` is
fetched.

In MEMORY mode the RAM address is `useraddr` and its read data is shown on
the display. A byte write is a read-modify-write within one clock. The panel
merges the switch byte with the word being read and pulses the write enable
for that one clock.

The buttons are assumed to be debounced. Each passes a 2-flop synchronizer
and acts on its rising edge, so a press takes effect three clocks after the
pin rises. `por` is the board's power-on reset. It does three things:

* sets mode RUN and clears useraddr;
* resets the CPU;
* blocks RAM writes from the panel while it is high.

**Display selection** (`cpu_board`), in order of priority:

1. MEMORY mode: mem[useraddr], or useraddr while btn[0] is held.
2. sw[7]: {PC, RAM address}.
3. sw[6]: IR.
4. sw[5]: RAM data.
5. sw[4]: AC.
6. sw[3]: state.
7. Otherwise: the OUT register.

The LEDs show PC, or useraddr in MEMORY mode. `display_value` brings the
shown 16-bit value out as a port.

## 7-segment driver

`display_digits` scans a common-anode display. Each digit is lit for
2^`SCAN_BITS` clocks in turn. Segments, decimal points and digit enables are
all active low, with `seg[0]` = a … `seg[6]` = g. Values are shown as hex
digits.

## Simulating

Run from the repository root so that `rtl/prime_asm.hex` is found. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/lab27_pkg.sv tb/lab27_top_tb.sv --top-module lab27_top_tb -o sim
obj_dir/sim
```

Any other testbench builds the same way. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

Two helpers in `tb/` are shared by several testbenches. `tone_meter`
measures the half-periods on a speaker pin. `seg_reader` decodes the
multiplexed 7-segment display back into a 4-digit hex value.

| testbench | checks |
|---|---|
| `simple_cpu_tb` | Random programs, including undefined opcodes and random pauses, against an instruction-level reference model. Compares PC, AC, OUT and the clock count of every instruction, then the final RAM image. Directed tests cover MUL saturation and the jump conditions. |
| `ram256x16_tb` | Power-up words of the prime program; random reads and writes. |
| `tune_rom_tb` | Walks all three tunes, including their GOTOs, against a note list. |
| `pulse_1khz_tb` | Period of 1000 clocks and width of one clock. |
| `playerpiano_tb` | Fetch addresses, including GOTO, the go-to button and stop. Every half-cycle length. Note and gap lengths, counted in ms ticks. Silent rests. |
| `display_digits_tb` | Segment patterns, decoded with its own table, and scan dwell time. |
| `piano_board_tb` | Pitch and length of every note of the first tune, the rest, the repeat, the pips and the stop switch. |
| `piano_duet_tb` | Both pins play together; go-to moves both voices; display. |
| `cpu_debug_tb` | All four modes against a stand-in CPU. |
| `basic_cpu_board_tb` | Reads the plain board's 7-segment display with its own decoder. Checks the first 30 primes with the delay cut to 1, the sw[0] pause and the btn[1] restart. |
| `cpu_board_tb` | Patches the delay through MEMORY mode, checks the first 12 primes in BCD, the display selections, BREAK holding and STEP. |
| `count_program_tb` | Runs a small counting program (`tb/count_asm.hex`) on `cpu_board`. Checks the count, the 23 + 13 × Kdelay clocks between counts, BREAK holds, and a Kdelay patch in MEMORY mode. |
| `lab27_top_tb` | All defaults, about 46 M clocks, about 40 s. Checks the full first tune at 1 µs per clock, and the duet and pips. On both computers it checks the first prime at the computed clock count. On the plain board that includes a 5000-clock pause, read off the segments. On the panel board it then checks faster primes after MEMORY-mode patching, and BREAK. |

## Departures and own choices

These parts follow the original lab design:

* both FSMs, with their state numbers, transitions and register update rules;
* the tune word format and the listed tune words;
* the instruction set and its encoding;
* the listed parts of the prime program;
* the front-panel behaviour;
* the board wiring.

The following are this implementation's own:

* **Prime program, 0x20–0x4C.** The BCD conversion, delay loop and OUT
  section is new code, written to the same memory map and constants.
* **Tune ROM gaps.**
  * The GOTO that closes *Mary Had a Little Lamb* (addresses 28–29).
  * The rest word at address 65.
  * The GOTO at 110–111 that loops the Invention opening. Only its first
    seven notes are present.
* **Duet ROMs.** Both voices of `piano_duet` read the same `tune_rom`
  table, so as delivered they play in unison. To play a real duet, give the
  left voice its own ROM contents.
* **Resets.**
  * Synchronous resets throughout.
  * IR and OUT cleared on CPU reset.
  * The music machine's address and note registers cleared on reset.
  * `por` on the panel board resets the panel and the CPU.
  * RAM writes are blocked during reset.
* **Front panel.**
  * Button synchronizers and edge detection.
  * The exact pause points in BREAK mode.
  * btn[1] is not a CPU reset in MEMORY mode, where it writes the low byte.
* **Display.**
  * Digit 0 of `piano_board` shows bits [10:7] of the time left.
  * The scan rate (`SCAN_BITS`), polarity and segment order of
    `display_digits`.
  * The `display_value` port.
* **Top level.** `lab27_top` is a side-by-side container for simulation.
  On hardware each of the four designs is its own bitstream.
* **Clocks.** No clock generation is included. The music designs expect
  1 MHz (`CLKS_PER_MS` = 1000). The computer runs at any clock rate, and the
  delay constants set how long each prime stays on the display.
