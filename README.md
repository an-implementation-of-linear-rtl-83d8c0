# Half-precision linear regression: a floating-point engine and a 16-bit microcomputer

This design fits a straight line, y = a2 + a1·x, to a stream of (x, y) samples
by ordinary least squares. All numbers are IEEE 754 half precision (binary16).
It does this in two independent ways that sit side by side in one top level:

1. **`lr_fp16`**: a small dedicated floating-point engine. It takes one sample
   at a time and, after every sample, returns the coefficients for all samples
   seen so far.
2. **`bzk_microcomputer`**: the BZK.SAU.FPGA teaching microcomputer, a 16-bit
   accumulator CPU with an integer-only ALU and 64 KB of RAM. It runs the same
   computation as an assembly program, on top of a half-precision library built
   from integer instructions.

The interest of the design is the comparison. The second way gets the same
regression out of a plain integer teaching CPU, with software floating point
that truncates instead of rounding. It lands close to the dedicated hardware:
over the sixteen coefficients of an eight-point data set, the mean square
difference is 2.0·10⁻⁵.

## The arithmetic

For a 2-parameter line, the normal equations (XᵀX)·a = XᵀY have a closed-form
solution. Both ways keep four running sums, Sx = Σx, Sxx = Σx², Sy = Σy and
Sxy = Σxy, plus a count N, and compute

```
den = N·Sxx − Sx²
a1  = (1/den) · (N·Sxy − Sx·Sy)
a2  = (1/den) · (Sxx·Sy − Sx·Sxy)
```

The reciprocal of the determinant is formed once and then multiplied into both
numerators, so each fit needs one division.

**What N is.** N is an input, not a counter inside the hardware, and the choice
matters:

- **Running count.** With N = 1, 2, 3, … the result after n samples is the
  exact least-squares line through those n samples.
- **Fixed size.** The reference results this design is compared with hold N at
  the size of the whole data set (8) while the sums grow sample by sample. That
  is the mode used for the evaluation below, and it reproduces those results to
  about 0.01.

**Singular case.** When N·Sxx = Sx², `den` is zero and the system has no unique
solution. This happens after one sample when N = 1, or at the end of a data set
whose x values are all equal. Both implementations then fall back to a line
through the origin: a1 = Sxy/Sxx and a2 = 0. The zero test ignores the sign
bit.

## The floating-point engine (`lr_fp16`)

### Operators

`fp16_addsub`, `fp16_mul` and `fp16_div` are combinational binary16 operators
with these properties:

- They round to nearest, ties to even, through one shared back end,
  `fp16_round_pack` in `fp16_pkg`. It takes a 14-bit significand made of the
  hidden bit, 10 fraction bits, and guard, round and sticky bits.
- Subnormal inputs count as zero, and results below 2⁻¹⁴ flush to a signed
  zero. This keeps the operators small. The regression data never comes close
  to that range.
- Infinities behave as IEEE 754 specifies.
- Every NaN result is the quiet NaN `7E00`.

How each operator works:

- **Adder:** swaps the operands so the larger magnitude comes first, then aligns
  the smaller one with a sticky shift. It adds or subtracts with three extra
  bits and renormalises using a leading-zero count.
- **Multiplier:** forms the 22-bit significand product. It normalises by at most
  one place.
- **Divider:** divides `{1,fa,14'b0}` by `{1,fb}` with an integer divide. A
  non-zero remainder becomes the sticky bit.

### Schedule

The engine has one adder, one multiplier and one divider. They are shared by a
register file with 12 entries, plus constant 1.0 and 0.0 sources. A step table
issues one operation per clock, reads two registers, and writes the selected
unit's result back:

| step | operation | step | operation |
|---|---|---|---|
| 0 | T0 = x·x | 9 | INV = 1 / T0 |
| 1 | Sx += x | 10 | T0 = N·Sxy |
| 2 | Sxx += T0 | 11 | T1 = Sx·Sy |
| 3 | T0 = x·y | 12 | T0 = T0 − T1 |
| 4 | Sy += y | 13 | A1 = INV·T0 |
| 5 | Sxy += T0 | 14 | T0 = Sxx·Sy |
| 6 | T0 = N·Sxx | 15 | T1 = Sx·Sxy |
| 7 | T1 = Sx·Sx | 16 | T0 = T0 − T1 |
| 8 | T0 = T0 − T1 (den) | 17 | A2 = INV·T0 |

At step 8, a zero determinant redirects the sequence to two extra steps:
A1 = Sxy / Sxx, then A2 = 0. This singular-case path is this design's own
addition.

### Interface and timing

- **Input:** valid/ready. A sample `(n_in, x_in, y_in)` is taken on a clock edge
  where `in_valid && in_ready`. `n_in` is N as a binary16 number
  (for example 8.0 for every sample of an eight-point set, or the running count
  1.0, 2.0, …).
- **Busy:** `in_ready` stays low while the step table runs. A sample offered
  then waits.
- **Output:** `out_valid` pulses for one cycle, 18 cycles after acceptance, or
  11 cycles when the determinant is zero. `a1` and `a2` hold their values until the
  next result.
- **Clear:** `clear`, sampled while the engine is idle, zeroes the four sums.
- **Reset:** synchronous and active low.

An assertion checks that `out_valid` never rises while the engine is busy.

## The BZK.SAU.FPGA microcomputer

### Datapath (`bzk_cpu`)

A 16-bit, non-pipelined accumulator machine built around one common bus.

**Registers:**

| Register | Role |
|---|---|
| AC | accumulator |
| DR | data register; the ALU's second operand |
| AR | address register; always addresses memory |
| PC | program counter |
| IR | instruction register |
| SP | stack pointer |
| IX | index register |
| TR | temporary register |
| CCR | condition codes V, C, N, Z |

**Bus sources:** any of these drives the bus in a given cycle: AC, DR, PC, SP,
IX, TR, memory, the effective address (EA), the immediate, or SP+2.

**ALU (`bzk_alu`):** takes AC and DR and writes back to AC.

- MUL also writes the high half of the signed 32-bit product into TR.
- DIV also writes the remainder into TR.
- A division by zero returns `FFFF` and sets V.

**Effective address (`bzk_ea_unit`):** adds the sign-extended 10-bit word
offset, doubled, to PC or to IX. PC already points past the current
instruction.

**Memory (`bzk_memory`):** 32 K × 16 words of 64 KB byte-addressed, big-endian
RAM. Reads are synchronous, and a read during a write returns the old word.
Address bit 0 is ignored, because every access is a word access.

**Reset:** PC = 0 and SP = `FFFE`. The stack grows down by 2 bytes per entry.

### Instruction encoding

The format is `[15:11]` opcode, `[10]` X (0 = PC-relative, 1 = IX-relative),
and `[9:0]` a signed word offset. `LDI` instead uses `[10:0]` as a signed
literal.

| op | mnem. | effect | op | mnem. | effect |
|---|---|---|---|---|---|
| 00 | NOP | – | 10 | BZR | PC ← EA if Z |
| 01 | LDA | AC ← M[EA] | 11 | BMI | PC ← EA if N |
| 02 | STA | M[EA] ← AC | 12 | JMP | M[SP] ← PC, SP −= 2, PC ← EA |
| 03 | LDD | DR ← M[EA] | 13 | RTS | SP += 2, PC ← M[SP] |
| 04 | ADD | AC ← AC + DR | 14 | LDI | AC ← literal |
| 05 | SUB | AC ← AC − DR | 15 | TDR | DR ← AC |
| 06 | AND | AC ← AC & DR | 16 | TRA | AC ← TR |
| 07 | OR | AC ← AC \| DR | 17 | TAX | IX ← AC |
| 08 | XOR | AC ← AC ^ DR | 18 | TXA | AC ← IX |
| 09 | SHR | AC ← AC >> 1 (logical) | 19 | TAS | SP ← AC |
| 0A | SHL | AC ← AC << 1 | 1F | HLT | stop |
| 0B | INC | AC ← AC + 1 | | | |
| 0C | NEG | AC ← −AC | | | |
| 0D | MUL | {TR,AC} ← AC·DR | | | |
| 0E | DIV | AC ← AC / DR, TR ← rest | | | |
| 0F | BRA | PC ← EA | | | |

### Control timing (`bzk_control`)

A hardwired state machine issues one control word per cycle:

```
FETCH_A  AR ← PC
FETCH_R  memory read
DECODE   IR ← M[AR], PC ← PC + 2
EXEC     ALU / register / branch done here; memory instructions set AR
MEM_R    memory read                (LDA, LDD, RTS)
MEM_WB   AC / DR / PC ← M[AR]       (LDA, LDD, RTS)
MEM_W    M[AR] ← AC or PC           (STA, JMP)
```

- **Cycles per instruction:**
  - 4 for register, ALU and branch instructions.
  - 5 for STA and JMP.
  - 6 for LDA, LDD and RTS.
- **JMP:** in EXEC it points AR at the stack. In MEM_W it pushes the return
  address, decrements SP and loads PC with EA, all in the same cycle.
- **RTS:** increments SP and AR together in EXEC, then reads the return address.
- **Flags:**
  - Every load of AC updates Z and N.
  - ALU operations also update C and V.
- **Assertions:**
  - at most one PC update source per cycle;
  - the ALU and the bus never load AC together;
  - memory is written only in MEM_W.

### The microcomputer wrapper (`bzk_microcomputer`)

This module connects the CPU to the RAM and adds a loader port:

- **Loading:** while `load_en` is high, the CPU is held in reset and
  `load_we`/`load_addr`/`load_data` write RAM.
- **Reading back:** after the CPU halts, the same port reads results through
  `load_rdata`, one cycle after the address.
- **Starting:** when `load_en` drops, the CPU starts at address 0.

### The regression program and its floating-point library

The program is built by a small two-pass assembler written as a SystemVerilog
class (`tb/bzk_asm_pkg.sv`). The program itself is in `tb/bzk_lr_prog_pkg.sv`:
497 words, or 994 bytes at address 0, counting code and its constants. Its data lives at `FC00`
and is reached through IX: scalar variables, constants, and arrays for x, y,
a1 and a2 with room for 32 samples.

The library routines take their operands in two memory cells and return the
result in AC:

- **FADD / FSUB:**
  - unpacks with AND and DIV by powers of two, since there is no barrel
    shifter;
  - aligns in a shift loop that gathers a sticky bit;
  - adds or subtracts significands that carry three extra bits;
  - renormalises in a loop.
- **FMUL:** a signed 16×16 MUL into {TR, AC}. The significand product is then
  cut out of the two halves with DIV and MUL by powers of two.
- **FDIV:** long division in three base-16 digits, each found with DIV and
  continued from the remainder in TR.
- **PACK:** the common exit. It checks the exponent range and assembles the
  result.

All library results are **truncated** toward zero. Zero results are +0, tiny
results flush to +0, and overflow gives a signed infinity.

The main loop reads each sample and updates the sums. It then stores a1[i] and
a2[i] with the same closed form and the same singular-case rule as the engine.
N is written into memory with the data as the binary16 size of the data set.

## Results on the eight-point training set

The data set is:

```
x = -1.1  0.1  1.2  2.3  3.1  4.1  4.8  5.7
y = -1.7  2.4  5.0  7.3 10.9 12.5 16.2 19.7
```

Both ways were run on it after conversion to binary16 with round-to-nearest,
with N = 8 at every step. The engine values are bit-exact against an IEEE
round-to-nearest model. The microcomputer values are bit-exact against a model
of the library's truncating operations.

| n | engine a1 | engine a2 | microcomputer a1 | microcomputer a2 |
|---|---|---|---|---|
| 1 | 1.5459 | 0 | 1.5449 | 0 |
| 2 | 2.0078 | 0.3384 | 2.0039 | 0.3376 |
| 3 | 3.0000 | 0.6377 | 2.9980 | 0.6372 |
| 4 | 2.9062 | 0.7153 | 2.9023 | 0.7158 |
| 5 | 3.0742 | 0.8340 | 3.0742 | 0.8345 |
| 6 | 2.9121 | 1.0166 | 2.9121 | 1.0176 |
| 7 | 2.9648 | 1.2041 | 2.9668 | 1.1875 |
| 8 | 3.0215 | 1.4160 | 3.0195 | 1.4141 |

Throughput and agreement:

- **Engine:** 144 busy cycles for all eight samples (8 × 18).
- **Microcomputer:** 78,012 cycles and 15,423 instructions.
- **Agreement:** the mean square difference between the two columns is 2.0·10⁻⁵.

Row 1 has a2 = 0 without any special case, because Sxx·Sy − Sx·Sxy = x²y − x·xy
cancels exactly for one sample. Row 8 is the ordinary least-squares line through
all eight points.

### How this compares with the published results

The architecture's authors published per-iteration coefficients for both ways
on this data set.

**Where they match:** every one of their values lies within 0.011 of the
corresponding column above, for example:

- 1.546 / 0 and 2.01 / 0.3384 for the first two iterations of the
  floating-point way;
- 3.012 / 1.41 for the final microcomputer fit.

The end-to-end testbench checks all of them to within 0.015.

**Where they do not match:** one published value does not fit. The
floating-point way's a2 at iteration 7 is printed as 1.305, while the closed
form gives 1.204 and the published microcomputer result is 1.195. This one entry
accounts for almost all of the published mean square difference between the
two ways, 7.7·10⁻⁴. This design's two ways differ by 2.0·10⁻⁵.

## Where the design departs from or goes beyond the source description

- **Floating-point engine.** The original uses vendor floating-point operator
  cores. Here it is a single shared-unit datapath with a step table. The
  operators, the schedule, the register file and the valid/ready handshake are
  all this design's.
- **Instruction encoding.** The opcode values and field layout are invented;
  only mnemonics and register transfers were given. Instructions beyond the
  published list were added so the program can run: LDD, LDI, the register
  transfers, NOP and HLT.
- **INC and NEG.** The published summaries of INC and NEG look swapped. INC is
  built as AC + 1 and NEG as the two's complement.
- **BMI.** BMI is described as a branch on the zero flag with the note
  "(negative)". It is built as a branch on N.
- **JMP.** JMP is described as pushing an address and jumping. It is built as a
  subroutine call that pushes the return PC, the counterpart of RTS.
- **Left out of the microcomputer:**
  - the 4 MB ROM, the keyboard and the text/graphics display, whose interfaces
    are not described;
  - the 16-register file the architecture summary mentions. The datapath has
    the nine registers of the block diagram.

  The loader port stands in for the missing program-loading path.
- **Singular case.** The line-through-the-origin fallback for a zero
  determinant is not in the source; without it, such a fit would come out as
  infinity or NaN.
- **Library rounding.** The half-precision library on the microcomputer
  truncates, while the engine rounds to nearest. This accounts for the
  difference between the two ways.
- **Subnormals.** Neither way supports subnormal numbers.

## Files

| file | contents |
|---|---|
| `rtl/fp16_pkg.sv` | binary16 type, constants, shared rounding/packing |
| `rtl/fp16_addsub.sv`, `fp16_mul.sv`, `fp16_div.sv` | combinational operators |
| `rtl/lr_fp16.sv` | regression engine |
| `rtl/bzk_pkg.sv` | opcodes, control word, states, flags |
| `rtl/bzk_alu.sv`, `bzk_ea_unit.sv`, `bzk_memory.sv`, `bzk_control.sv` | CPU parts |
| `rtl/bzk_cpu.sv` | CPU datapath |
| `rtl/bzk_microcomputer.sv` | CPU + RAM + loader port |
| `rtl/lr_system.sv` | top level: both ways side by side |
| `tb/fp16_ref_pkg.sv` | real-number reference for rounding and truncating binary16 arithmetic |
| `tb/bzk_asm_pkg.sv` | two-pass assembler class |
| `tb/bzk_lr_prog_pkg.sv` | regression program and library, and its data loader |
| `tb/tb_<block>.sv` | a self-checking testbench per block |

The top level has no parameters. `bzk_memory` and `bzk_microcomputer` take
`ADDR_W` (default 16, giving 64 KB).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. A
watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/fp16_pkg.sv rtl/bzk_pkg.sv \
  tb/fp16_ref_pkg.sv tb/bzk_asm_pkg.sv tb/bzk_lr_prog_pkg.sv \
  rtl/*.sv tb/tb_lr_system.sv --top-module tb_lr_system -o sim
./obj_dir/sim
```

`tb_lr_system` runs the whole design at its default size, which takes well
under a second after compilation. It prints the table above and counts each
mechanism, and it fails if any of them never occurs:

- zero-determinant fits;
- regular fits;
- input stalls;
- clears;
- subroutine calls;
- taken branches;
- the halt.

Other tests:

- **One block:** list its testbench instead, with `--top-module tb_<block>`.
  The packages it imports must come first.
- **Another data set:** `tb_lr_system` builds its memory image with
  `bzk_lr_prog_pkg::build()`. Any set of up to 32 points can be passed there,
  and the program uses the set's size as N.
