# A multi-purpose interpolator for numerically controlled machine tools

A contouring machine tool needs a stream of tool positions, one every few
milliseconds, computed from a short description of the path (straight
segments, arcs) read from punched tape. The usual answer is a special-purpose
"interpolator" built for one machine, one number of axes and one kind of path.
This design takes another route. The interpolator is a very small decimal
computer. A program held in read-only memory turns it into the interpolator for
a given machine. Changing the ROM changes the application; the hardware stays
the same.

The machine is built around what interpolation algorithms need:

* **Few operands.** A 64-word read-write memory (RWM) is enough. It is small,
  so it can be fast enough to do arithmetic one decimal digit at a time, which
  keeps the arithmetic unit down to a 4-bit adder.
* **Mostly additions.** Multiplication and division occur only by powers of
  ten, so digit shifts replace them. A three-address format does `C = A + B`
  in one instruction.
* **Branches on sign and zero.** There are conditional jumps on zero, on
  sign and on single-bit indicators.
* **BCD in and out.** Data are 8-digit decimal numbers, which gives 1 µm
  resolution. They are held in excess-3 code, so no binary conversion is
  needed.

The SystemVerilog in `rtl/` implements the complete computer: the control unit,
the operative portion, the input buffers, the output channels, the indicators
and the 6 ms time base. It also contains the micro-program that executes the
16 instructions. Every block has a self-checking testbench in `tb/`. Two
testbenches run programs on the whole machine. One covers every instruction.
The other is a two-axis linear interpolation paced by the time base.

## Structure: two automata

```
            conditioning variables (16, one chosen by CD)
     +------------------------------------------------------+
     |                                                      |
 +---v-------------------+   commands (CV, 33 bits)   +-----+---------------------------+
 | CONTROL UNIT          |--------------------------->| OPERATIVE PORTION               |
 |  uaddr (6 bits)       |                            |  IAR (12) -> program ROM 4096x22|
 |  micro-order ROM      |<-- op code (ROM output) ---|  RWM 512 x 4-bit cells         |
 |  64 x 44 bits         |                            |  arithmetic unit (A, adder,     |
 +-----------------------+                            |   carry, overflow, zero)        |
                                                      |  DC digit counter, JR staging   |
                                                      +--+---------------------------+--+
                                              input bus  |                           | output bus
                                      input_buffer x N_IN                 output_channel x N_OUT
                                      indicator_unit, time_base
```

The whole machine runs on one clock, and every register changes on its rising
edge. The two memories read combinationally: the ROM has no output register
and the RWM acts like a bank of addressable registers. So one clock can read a
cell, pass the digit through the adder and load a register. Each clock runs
exactly one micro-order.

The **control unit** (`control_unit`, `micro_rom`) is a 6-bit micro-order
address register in front of a 64-word ROM. Each micro-order is 44 bits:

| CV (33) | CD (4) | B (1) | AD (6) |
|---|---|---|---|
| commands for this clock | which conditioning variable to test | end-of-instruction bit | jump address |

The next address is chosen by one rule. If the selected conditioning
variable is 0, the next address is AD. If it is 1, the next address is the
following word when B = 0, and the fetch micro-order (address 0) when B = 1. A
micro-order's commands never depend on a condition; only its successor does.
The fetch micro-order carries the *dispatch* command. It loads the address
register with 16 + the op code of the instruction on the ROM output, so the
entry of op code *n* is micro-address 16 + *n*.

The **operative portion** (`operative_portion`) holds the following:

* the instruction address register (IAR);
* the program ROM (`program_rom`);
* the RWM (`rwm`);
* the arithmetic unit (`arith_unit`);
* the 3-bit digit counter DC, which walks through the cells of a word;
* an 8-bit register JR, used only by indirect jumps.

The CV commands drive its switches. They select the RWM word (field L1, L2, L3
of the instruction, or the fixed ADS location) and the digit (DC, DC+1, DC-1 or
the sign digit 7). They also select what is written (register A, constant 0 or
9, a nibble of the STO constant, or the converted input digit) and what the
arithmetic unit does.

Since the ROM has no output register, the instruction is read straight from
the ROM while IAR holds its address. The micro-program therefore changes IAR
only in the last micro-order of an instruction. An indirect jump reads its
12-bit target one cell at a time, so the first two cells wait in JR and IAR
is loaded in one step with the third.

## Numbers and the decimal adder

A word is 8 cells of 4 bits. Each cell holds one decimal digit in excess-3 code
(digit + 3). Cell 0 is the least significant digit. Cell 7 is a **sign
digit**, 0 for positive and 9 for negative. Negative numbers are in 10's
complement, so a word holds −10,000,000 … 9,999,999. For example, −1 is
`99999999` and −9,998,766 is `90001234`.

Excess-3 makes a decimal adder out of a 4-bit binary adder:

* Adding two excess-3 digits and a carry gives a 5-bit binary sum. This sum
  exceeds 15 exactly when the decimal sum exceeds 9.
* If it does, the decimal carry is 1 and the digit is the low 4 bits + 3.
* Otherwise the carry is 0 and the digit is the low 4 bits − 3.
* Inverting the 4 bits of an excess-3 digit gives its 9's complement. So
  `Y − X` is `Y + ~X` with the carry flip-flop preset to 1.

An 8-digit operation takes three clocks per digit:

1. `A ← L1[i]`
2. `A ← A (+/−) L2[i] + C`, and `C ← carry out`
3. `L3[i] ← A`, and `DC ← DC + 1`

At the sign digit the result must again be 0 or 9. Anything else sets the
sticky overflow flip-flop, which the program reads as indicator 9. A zero
flip-flop, ANDed over the eight cells, serves TZE.

The arithmetic unit also stands between the RWM and the external buses. An
input digit arrives in BCD and is turned into excess-3 (+3) on its way to the
RWM; a digit leaving for an output channel is turned back into BCD (−3).

## Instructions

An instruction is 22 bits: a 4-bit op code and an 18-bit address field.
Instructions that use three words take them in the order L1, L2, L3, with 6
bits each. Jumps carry a 6-bit operand (L1 or indicator S) and a 12-bit ROM
address F. STO carries a 6-bit word and a 12-bit constant C.

```
 21   18 17     12 11      6 5       0
+-------+---------+---------+---------+
|  op   | L1 / S  |   L2    |   L3    |
+-------+---------+---------+---------+
|  op   | L1 / S  |     F  or  C      |
+-------+---------+-------------------+
```

| op | name | operation | clocks |
|---|---|---|---|
| 0 | ADD L1 L2 L3 | (L3) ← (L2) + (L1) | 26 |
| 1 | SUB L1 L2 L3 | (L3) ← (L2) − (L1) | 27 |
| 2 | ADS L1 L2 L3 | ADD if word 63 ≥ 0, else SUB | 28 / 30 |
| 3 | MOD L1 L2 L3 | sign digit of L3 ← 9 if the signs of L1 and L2 differ, else 0 | 4 |
| 4 | ABS L1 L2 | (L2) ← \|(L1)\| | 20 / 28 |
| 5 | SHF L1 d L3 | (L3) ← (L1) × 10 (d = 0) or ÷ 10 (d = 1), sign kept | 17 |
| 6 | MOV L1 L2 | (L2) ← (L1) | 18 |
| 7 | STO C L1 | cells 0..2 of L1 ← C, cells 3..7 ← 0 | 11 |
| 8 | JMP F | jump | 2 |
| 9 | JMI L1 | jump to the 12 bits in cells 2,1,0 of L1 | 4 |
| 10 | TZE F L1 | jump if (L1) = 0 | 12 |
| 11 | TPL F L1 | jump if (L1) ≥ 0 | 4 |
| 12 | TRS F S | jump if indicator S = 1 | 4 |
| 13 | INP L1 ch n | n+1 low digits (n in L3[2:0]) of input channel ch (in L2) → L1, BCD → excess-3 | n + 4 |
| 14 | OUT L1 ch n | n+1 low digits of L1 → output channel ch, excess-3 → BCD | n + 4 |
| 15 | SRI S v | set (v = 1, in L3[0]) or reset indicator S | 2 |

The clock counts include the fetch micro-order. STO and JMI together make
subroutines: the caller uses STO to put its return address in a word and
jumps, and the subroutine returns with JMI through that word. A right shift
rounds towards minus infinity. A left shift loses digit 6 without setting
overflow.

## The micro-program

The micro-program is built by the function `micro_program()` in
`rtl/interp_pkg.sv` and placed in `micro_rom` at elaboration. It uses 62 of
the 64 words. Reading it is the quickest way to understand the timing.

* Between instructions, DC = 0 and the carry is 0. Every closing micro-order
  restores this.
* An entry word (16 + op) must jump with AD, because the word after it is the
  entry of the next op code.
* Loops count with DC. The test "DC = k" takes k from the micro-order. The
  test "DC = n" takes n from the I/O instruction.
* Every loop leaves through the word right after it. That word increments IAR
  and returns to fetch.
* ADS reads the sign of word 63 and continues in the ADD or SUB routine. ABS
  of a positive number reuses the MOV loop. TZE, TPL and TRS end in a local
  copy of "IAR ← F" or in the shared "IAR + 1" word.

Of the 33 CV bits, 29 carry commands and 4 are reserved. The field list is the
`cv_t` struct in the package.

## Input, output, indicators and the time base

**Input buffers** (`input_buffer`, `N_IN` = 2). Each input device, typically a
tape reader, fills a one-word buffer on its own. It offers BCD digits with
`dev_valid` while `dev_run` is high, and each new digit shifts in at cell 0.
After eight digits the buffer raises its flag and drops `dev_run`, so the
device stops. The program waits for the flag with TRS and copies the word with
INP. It then resets the flag with `SRI S 0`, which restarts the device. While
the machine works on one path element, the buffer can already be filling with
the next one.

**Output channels** (`output_channel`, `N_OUT` = 4). OUT writes digits into a
staging register. Its last micro-order copies the whole word to `out_q[ch]`
and pulses `out_strobe[ch]` for one clock, so a D/A converter never sees a
half-written position.

**Indicators** (`indicator_unit`). These are 64 single-bit conditions,
addressed by S:

| S | indicator | SRI S 1 | SRI S 0 |
|---|---|---|---|
| 0, 1 | input buffer full | – | clear the flag, start the device |
| 8 | time base elapsed | start a 6 ms period | stop |
| 9 | overflow | – | clear |
| 16–31 | console signals `console[15:0]` | – | – |
| 32–63 | program flags | set | reset |

**Time base** (`time_base`). `SRI 8 1` starts a period of `TB_PERIOD` clocks.
The default is 60,000 clocks, which is 6 ms at 10 MHz. Indicator 8 reads 1
once the period has elapsed and stays 1 until the next start. A program paces
its output by waiting on it with TRS and then restarting it at once.

## Examples: linear and circular interpolation

`tb/tb_linear_interp.sv` contains a 35-word program and shows how the machine
is meant to be used. It reads an end point (X, Y) from tape. It then makes X
steps of a digital differential analyser, one per 6 ms period:

1. x ← x + 1
2. e ← e + Y
3. if e − X ≥ 0, then y ← y + 1 and e ← e − X
4. wait for the time base, restart it, and send x and y to channels 0 and 1

A step takes about 200 clocks of computation.

`tb/tb_circular_interp.sv` (34 words) moves the tool over a quarter circle of
radius R, from (R, 0) to (0, R), in 2R unit steps. It needs no
multiplication: it keeps F = x² + y² − R² up to date with additions alone.

1. if F ≥ 0 (on or outside the circle): F ← F − 2x + 1 and x ← x − 1
2. otherwise: F ← F + 2y + 1 and y ← y + 1
3. wait for the time base, restart it, and send x and y to channels 0 and 1

Here too a step takes under 200 clocks. Most of each 60,000-clock period is
therefore spent polling the time base. A real program would use that spare
time for speed control and tool offset.

## Simulating

Every module's parameters have defaults, so any testbench builds as it is with
Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/interp_pkg.sv tb/tb_interpolator_top.sv \
          --top-module tb_interpolator_top -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

Add `--assert` to turn on the built-in checks of the RTL: DC is 0 at every
fetch, the reserved command bits stay 0, a full input buffer keeps its device
stopped, and the ROM size is a multiple of 64 words.

| testbench | what it shows |
|---|---|
| `tb_interpolator_top` | The full machine at default sizes, running a program that uses all 16 instructions on random 8-digit numbers. It checks every output word against an integer model. It also counts each mechanism (both outcomes of every conditional jump, both ways of ADS, ABS negation, overflow, the device stopping, the indirect return, the time base period) and fails if one never happened. About 1 M clocks. |
| `tb_linear_interp` | Three random lines. It checks each position against the ideal line, the end point, and the 6 ms step interval. |
| `tb_circular_interp` | Three quarter circles of random radius. It checks each position against the same rule computed in integers, that it stays within one unit of the circle, the end point, and the 6 ms step interval. |
| `tb_operative_portion` | The datapath under a behavioural sequencer that follows the micro-order table. It checks results and the clock count of each instruction. |
| `tb_control_unit`, `tb_micro_rom` | The next-address rule on random inputs; the micro-order layout and the rules the micro-program must obey. |
| `tb_arith_unit`, `tb_rwm`, `tb_program_rom`, `tb_input_buffer`, `tb_output_channel`, `tb_time_base`, `tb_indicator_unit` | Unit checks against independent models. |

To run your own program, write 22-bit words into the ROM through `ld_we`,
`ld_addr` and `ld_data` while `rst_n` is low. Then release reset, and execution
starts at address 0. The assembler helpers `i3()` and `ij()` in the top-level
testbench show the encoding.

## What follows the source design and what is this design's own

These points are taken from the published description:

* 8-digit excess-3 decimal words with 10's complement negatives;
* a RWM of 512 four-bit cells in 8-cell words, with non-destructive read;
* a ROM of up to 4096 words of 22 bits, without an output register;
* a 4-bit op code and an 18-bit three-address field, with 6-bit RWM
  addresses and 12-bit ROM addresses;
* the instruction repertoire: ADS, MOD, ABS, digit shifts, direct and
  indirect jumps, TZE, TPL, TRS, STO with its 12-bit constant, multi-digit
  BCD input and output, transfers, and set/reset of indicators;
* one-word self-stopping input buffers with flags;
* the 6 ms time base used as an indicator;
* an arithmetic unit made of a 4-bit register, a 4-bit adder, switches,
  and carry and overflow flip-flops;
* a micro-programmed control unit with the 44-bit micro-order format and the
  AD / next / fetch selection rule above.

These are choices made here, because the description does not give them:

* the op-code numbers and the field placement;
* set and reset sharing one op code, and left and right shift sharing one;
* the sign-digit convention and the overflow rule;
* word 63 as the ADS sign location;
* STO clearing the upper five cells;
* the encoding of the 33 command bits and the whole micro-program;
* dispatch to 16 + op code;
* the JR staging register;
* the indicator map;
* the number of input and output channels;
* the device handshake;
* the double-buffered output channels;
* the clock frequency (10 MHz, used only to turn 6 ms into 60,000 clocks).

The departures a user should know about:

* The program ROM is written through a load port. In the original, plug-in
  ROM packages hold the program.
* TRS tests indicators only, and TZE and TPL test RWM words. The original
  lets one 6-bit conditioning address name either an indicator or a RWM word.
* Shifts move one digit per instruction.
* Nothing models the analog side: the D/A converters and the servos.
* Nothing models the external devices either: the tape reader and the
  console.
