# 8-bit thin-film microprocessor with a print-programmable instruction ROM

This is RTL for a small two-chip microprocessor meant for thin-film
(oxide/organic) transistor technology on plastic-compatible processes. Its
main idea: the program is not stored in a writable memory, and it is not
hard-wired into the chip either. It is **printed**. The instruction generator
chip carries a 16-line read-only array in which every possible bit position is
an open connection. After fabrication, an inkjet printer closes the
connections that should read as 1. One chip design therefore runs any
16-instruction program. The second chip is an 8-bit accumulator processor core.
It executes the word the instruction generator hands it each clock cycle.

```
           instruction generator (P2ROM chip)                  processor core chip
 +----------------------------------------------------+   +--------------------------------+
 |  4b PC --> 4-to-16 line --> 16 x 9 printable  --> 9b|   | opcode[5:0]  regsel[1:0]       |
 |  (+1 per    decoder         NOR ROM (WORM)     instr|==>|  decoder -> ALU -> accumulator  |
 |   cycle)                                       reg  |   |  3 C-registers + constant 1     |
 +----------------------------------------------------+   |  input bus -> ... -> output reg |
                                                           +--------------------------------+
```

There are no jumps. The program counter steps through lines 0..15 and wraps,
so the program runs as an endless loop of exactly 16 cycles. A line with
nothing printed on it reads as all zeros, and all zeros is a NOOP.

## The instruction word

Each ROM line is 9 bits. The core uses 8 of them: 6 opcode bits and 2
register-select bits. The ninth column is read and registered like the others,
but the core does not use it. It comes out of the top as `spare`.

No bit-level encoding is published for this processor, so the one below is
this design's own. It was chosen so that every function fits in 6 bits and so
that an unprinted line is a NOOP.

| bits  | field       | values |
|-------|-------------|--------|
| 8     | `spare`     | unused by the core |
| 7:6   | `regsel`    | 0 = C1, 1 = C2, 2 = C3, 3 = constant 1 |
| 5:3   | `fn`        | 0 PASS_B, 1 AND, 2 OR, 3 NOT, 4 ADD, 5 SUB, 6 LSR, 7 LSL |
| 2     | `b_from_in` | 0: B = selected C-register, 1: B = input bus |
| 1:0   | `dest`      | 0 none (NOOP), 1 accumulator, 2 C-register, 3 output register |

Rules that follow from the encoding (`rtl/mp_pkg.sv`, `rtl/core_decoder.sv`):

* The ALU's A operand is always the accumulator. NOT, LSR and LSL act on A
  alone. PASS_B loads B. This is how the input bus or a C-register gets into
  the accumulator.
* `dest = accumulator` writes the ALU result.
* `dest = C-register` and `dest = output register` write the **accumulator**
  and ignore `fn`. A store therefore takes one instruction of its own.
* INC and DEC are not separate functions. They are ADD and SUB with
  `regsel = 3`. That register is a constant 1, which is the reason the fourth
  C-register exists. Writing to it has no effect.
* No flags are kept. The adder's carry out is computed but not stored, since
  nothing could branch on it.

`mp_pkg::mk(fn, b_from_in, dest, regsel)` builds a word, so you can write a
program without looking up bits.

## Timing

Everything is clocked on the rising edge of one shared clock.

* Cycle *n*: the PC holds *n* mod 16, the decoder selects that line, and the
  ROM column outputs settle.
* Edge at the end of cycle *n*: the instruction register captures line *n*
  and the PC moves on.
* Cycle *n*+1: the core executes line *n* combinationally: decode, operand
  select, ALU. At the next edge it writes the accumulator, a C-register or the
  output register.

An instruction therefore reaches the core one cycle after its line is
selected. Its result is visible one cycle after that. The core completes one
instruction per clock, so it runs at one instruction per cycle. `out_strobe`
is high during the cycle whose closing edge writes the output register. It
marks each new output value.

The asynchronous active-low reset `rst_n` clears the PC, the instruction
register (which gives a NOOP), the accumulator, C1..C3 and the output
register. The reset is this design's addition.

## The carry chain: mirror adders with alternating polarity

ADD and SUB share one 8-bit ripple-carry adder (`rtl/ripple_carry_adder.sv`).
SUB adds `~B` with a carry in of 1. Ripple carry is slow, because the carry
passes through all eight bits, and in this technology gates are slow. The
adder is therefore built from **mirror adder** cells (`rtl/mirror_adder.sv`).
The cell computes the inverted carry with one complex gate:

```
co_n = ~(a&b | ci&(a|b))
s_n  = ~(a&b&ci | co_n&(a|b|ci))
```

It reuses `co_n` for the sum and has no output inverters. A full adder is
self-dual: inverting all of its inputs inverts both of its outputs. So the
chain need not restore the carry polarity at every bit:

* Even bits take `a`, `b` and the true carry. They pass on an inverted carry,
  and their sum is `~s_n`.
* Odd bits take `~a`, `~b` and that inverted carry. They pass on a true carry,
  and their `s_n` output already is the true sum.

The operand inverters sit off the carry path. The carry crosses exactly one
complex gate per bit. For odd widths the final carry is inverted once at the
end. The RTL keeps this cell structure, but a synthesis tool will
re-optimise it. The structure documents the intended circuit; it does not
guarantee its timing.

## The printable ROM (WORM memory)

`rtl/worm_memory.sv` models a 16 x 9 write-once array. Each column is a
unipolar NOR gate. One select transistor per line can be printed onto the
column, and a printed transistor on the selected line makes the column read 1.
Logically, column *c* is

```
data[c] = OR over lines r of ( sel[r] AND printed[r][c] )
```

with `sel` the one-hot output of `rtl/line_decoder.sv`. An immediate
assertion in the array flags any cycle with more than one line selected. The print pattern is
the parameter `PROGRAM` (`[line][bit]`, bit set = connection printed). It
passes unchanged through `p2rom_instruction_generator` and `microprocessor`,
so programming the processor means overriding one parameter.

In silicon, each column can also receive up to five extra printed load
transistors. These keep the NOR output levels valid when many select
transistors are printed on one column. They only affect analogue levels and
have no counterpart in the RTL. The same holds for the transistor sizing of
the array. The full array offers 16 x 9 = 144 select positions plus 9 x 5 = 45
load positions, 189 printable transistors in all.

## The default program: a running averager

The default `PROGRAM` (`mp_pkg::AVERAGER`) filters a 6-bit input *in* into a
running average *x* (held in C1). It updates *x* twice per output value:
once with rounding, `x = (in + x + 1) >> 1`, and once, after storing
`in + x` as the output, with plain truncation, `x = (in + x) >> 1`:

| line | word  | operation                     |
|------|-------|-------------------------------|
| 0    | 0x005 | ACC <- IN                     |
| 1    | 0x021 | ACC <- ACC + C1               |
| 2    | 0x0E1 | ACC <- ACC + 1 (round)        |
| 3    | 0x031 | ACC <- ACC >> 1               |
| 4    | 0x002 | C1 <- ACC                     |
| 5    | 0x005 | ACC <- IN                     |
| 6    | 0x021 | ACC <- ACC + C1               |
| 7    | 0x003 | OUT <- ACC  (out_strobe)      |
| 8    | 0x031 | ACC <- ACC >> 1               |
| 9    | 0x002 | C1 <- ACC                     |
| 10-15| 0x000 | NOOP (unprinted)              |

The second pass stores `in + x` into the output register **before** the final
halving. The output thus keeps one more bit than the input: a 7-bit code,
twice the average. One output value appears every 16 cycles. The input is read
in both passes (lines 0 and 5). Suppose the input steps from 0 to 7 between
those two reads, with the filter at rest. The output then reads 7, C, E, E, …
(hexadecimal), settling at E = 2 x 7. `tb/tb_microprocessor.sv` reproduces
this sequence.

## Where this RTL departs from the published design, or guesses

* **Instruction encoding.** The encoding is invented, as described above. The
  published averager occupies 12 printed lines and prints 37 transistors (select
  and load transistors together). With this encoding the same algorithm needs
  10 lines and 23 select transistors. Any program or waveform taken from the
  original chips therefore has to be re-encoded.
* **Ninth ROM column.** The original register is 9 bits wide, but the core's
  control needs only 8 bits. The ninth bit is passed out as `spare`.
* **Clocking and reset.** The design uses one clock shared by both chips and an
  asynchronous reset. Neither is specified for the original.
* **Shifts** fill with 0. **Stores** take the accumulator. **Carry** is not
  kept. All three are choices made here.
* **Not modelled:** the transistor-level standard cells (inverter, NAND, NOR,
  the x2/x3/x4/x9 buffers), the printable NOR loads, and all analogue
  behaviour. That includes the measured speeds (about 2.1 kHz for the core,
  650 Hz for the ROM chip and 500 Hz for the pair) and the supply-voltage
  limits. The RTL describes logic and cycle behaviour only.

## Files

| file | content |
|------|---------|
| `rtl/mp_pkg.sv` | instruction types, `mk()`, the averager print pattern |
| `rtl/microprocessor.sv` | top: instruction generator + core |
| `rtl/p2rom_instruction_generator.sv` | PC, line decoder, WORM array, instruction register |
| `rtl/program_counter.sv`, `rtl/line_decoder.sv`, `rtl/worm_memory.sv`, `rtl/instruction_register.sv` | its parts |
| `rtl/processor_core.sv` | core: decoder, C-registers, ALU, accumulator, output register |
| `rtl/core_decoder.sv`, `rtl/c_registers.sv`, `rtl/data_register.sv`, `rtl/alu.sv` | its parts |
| `rtl/ripple_carry_adder.sv`, `rtl/mirror_adder.sv` | the adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_microprocessor_general.sv` | whole design with a test program that uses every function |

Top-level parameters: `W` (data width, 8), `ROWS` (ROM lines, 16), `IW` (word
width, 9) and `PROGRAM` (print pattern). The core's decoding assumes
`IW >= 9` and a 6 + 2 bit control field.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself.
A watchdog counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/mp_pkg.sv \
          tb/tb_microprocessor.sv --top-module tb_microprocessor -o sim
./obj_dir/sim
```

Substitute any other `tb_*` name. The two whole-design tests:

* `tb_microprocessor`: default parameters and the averager program. It checks
  the 0 -> 7 step response (7, C, E, E, E), then 200 rounds of random 6-bit
  inputs against the recurrence `s1 = in + x; x1 = (s1+1)>>1; out = in + x1;
  x = out>>1`. It also checks that the output stays within 7 bits and that
  exactly 16 cycles separate output writes.
* `tb_microprocessor_general`: a 16-line test program with every function
  (load input, ADD with input, AND, OR, NOT, ADD, SUB, INC, DEC, LSL, LSR,
  stores to C1/C2/C3 and the output, NOOP with the spare bit printed). It uses
  a new random input every cycle. After every edge it checks the instruction
  register against the printed line and the registers against a reference
  model. It counts each mechanism and fails if one never happened.

The block tests are exhaustive where that is cheap (mirror adder, 8-bit and
5-bit adders, line decoder, decoder opcodes). Otherwise they are randomised
against reference models written independently of the RTL (ALU, C-registers,
core).
