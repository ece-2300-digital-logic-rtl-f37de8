# A single-cycle 8-bit processor driven by control words

This is a small teaching processor. In each clock cycle it executes one
**control word**: a wide instruction that names every select line and enable
in the datapath. The word reads two registers, runs one ALU operation, may
touch memory, and writes one result back, all in the same cycle. There are no
instruction decoding, pipelining or multi-cycle operations.

The design has two ways of producing those control words:

* **Hardwired control.** A ten-state machine issues the control words of one
  fixed algorithm: shift-and-add multiplication.
* **Programmable control.** A program counter (PC) steps through a ROM of
  control words. Conditional branches test the ALU condition codes. The same
  multiplication becomes an 11-word program, and changing the ROM changes
  what the machine does.

Both versions use the same datapath. The top level, `sc_top`, holds one of
each, side by side. Each computes `M[2] = M[0] * M[1]` in its own data memory.

## The datapath in one cycle

```
            +------+ DataA                      +-----+  M_address  +-----+
  SA,SB,DR->|  RF  |--------------------------->|     |------------>|     |
            |8 x 8 |      DataB    +------+     | ALU |             | RAM |---+
            |      |-------+------>|0 MB  |---->|  FS |        +--->|     |   |
            +------+       |  SE --|1 mux |     +-----+        |    +-----+   |
               ^           | (IMM) +------+      V C Z N       | Data_in      |
               |           +----------------------------------+    MW        |
               |                                                              |
               +---------------- MD mux (0: ALU result, 1: RAM read) <--------+
```

The control word is applied at the start of a cycle. Everything up to the
clock edge is combinational:

1. The register file puts `R[SA]` on DataA and `R[SB]` on DataB.
2. The B multiplexer passes DataB (`MB = 0`) or the 4-bit immediate,
   sign-extended to 8 bits (`MB = 1`).
3. The ALU computes `Y = A op B` and the condition codes V, C, Z and N.
4. `Y` is also the memory address. The memory reads `M[Y]` combinationally.
5. The write-back multiplexer picks `Y` (`MD = 0`) or `M[Y]` (`MD = 1`).

At the rising edge, `R[DR]` takes the write-back value if `LD = 1`, and
`M[Y]` takes DataB if `MW = 1`. So a load is `R[DR] <= M[R[SA] + SE(IMM)]`
and a store is `M[R[SA] + SE(IMM)] <= R[SB]`. Both take one cycle, because
the memory is read combinationally.

Sizes: 8-bit data, 8 registers (`R0`..`R7`), a 4-bit signed immediate
(-8..7), and 256 words of data memory, one for every value of the 8-bit ALU
result.

### ALU functions and condition codes

| FS | name | Y | C | V |
|----|------|---|---|---|
| 0 | ADD | A + B | carry out | signed overflow |
| 1 | SUB | A - B, computed as A + ~B + 1 | carry out of that sum (1 = no borrow) | signed overflow |
| 2 | AND | A & B | 0 | 0 |
| 3 | SLL | A shifted left one bit, 0 into bit 0 | 0 | 0 |
| 4 | SRL | A shifted right one bit, 0 into bit 7 | 0 | 0 |

For every function, Z = (Y == 0) and N = Y[7]. The shifts ignore B. FS codes
5..15 give Y = 0.

## The control word

`sc_pkg::ctrl_word_t` is 28 bits wide. Its fields, in order:

| field | bits | meaning |
|-------|------|---------|
| DR  | 3 | destination register |
| SA  | 3 | source register for operand A |
| SB  | 3 | source register for operand B and for store data |
| IMM | 4 | immediate (signed), used when MB = 1 |
| MB  | 1 | B operand: 0 = R[SB], 1 = SE(IMM) |
| FS  | 4 | ALU function (table above) |
| MD  | 1 | write-back: 0 = ALU result, 1 = memory read data |
| LD  | 1 | write R[DR] |
| MW  | 1 | write memory |
| BS  | 3 | branch condition (programmable control only) |
| OFF | 4 | signed branch offset (programmable control only) |

`sc_pkg::make_cw()` builds a word field by field. `CW_NOP` changes nothing.

## Condition codes steer the control unit in the same cycle

This is the part that needs the most care. The control unit reads the
condition codes of the control word being executed **now**, not of the
previous one. Both control units rely on this:

* The hardwired unit's state S5 writes `R4 <= R2 & 1`. Its next state
  depends on whether that new value is zero, and the ALU's Z flag says so
  before the edge. State S8 writes `R2 <= SRL(R2)` and decides the loop the
  same way.
* In the ROM program, a branch word does its own comparison. Word 5 computes
  `R4 - 0` with LD = MW = 0, so it only sets the flags, and in the same word
  `BS = Z` decides whether to jump.

So a compare-and-branch costs one cycle, and no flag register is needed.

### Branch select

`branch_select` is an 8-to-1 multiplexer that turns BS into the branch
signal MP:

| BS | MP | branch |
|----|----|--------|
| 000 | 0  | never |
| 001 | 1  | always |
| 010 | Z  | if zero |
| 011 | Z' | if not zero |
| 100 | N  | if negative |
| 101 | N' | if zero or positive |
| 110 | C  | if carry out |
| 111 | V  | if overflow |

### Program counter

`pc_unit` loads a new value on every rising edge:

* `PC <= PC + 1` when MP = 0.
* `PC <= PC + SE(OFF)` when MP = 1.

The offset is relative to the branch word itself, not to the word after it.
Word 5 with OFF = 2 goes to word 7. Word 9 with OFF = -5 (`1011`) goes to
word 4. The PC is 4 bits wide and wraps from 15 to 0. Reset sets it to 0.

## Hardwired multiplier (`mult_fsm_cu`, `fsm_cpu`)

| state | operation | DR SA SB IMM MB FS MD LD MW |
|-------|-----------|-----------------------------|
| 0 (idle) | nothing; wait for `start` | LD = MW = 0 |
| S1 | R0 <= R0 - R0 | 0 0 0 - 0 SUB 0 1 0 |
| S2 | R1 <= M[R0]       (A) | 1 0 - 0 1 ADD 1 1 0 |
| S3 | R2 <= M[R0 + 1]   (B) | 2 0 - 1 1 ADD 1 1 0 |
| S4 | R3 <= R3 - R3     (P = 0) | 3 3 3 - 0 SUB 0 1 0 |
| S5 | R4 <= R2 & 1 | 4 2 - 1 1 AND 0 1 0 |
| S6 | R3 <= R3 + R1 | 3 3 1 - 0 ADD 0 1 0 |
| S7 | R1 <= SLL(R1) | 1 1 - - - SLL 0 1 0 |
| S8 | R2 <= SRL(R2) | 2 2 - - - SRL 0 1 0 |
| S9 | M[R0 + 2] <= R3 | - 0 3 2 1 ADD - 0 1 |

Transitions:

* idle -> S1 when `start` is high.
* S5 -> S7 when Z = 1, i.e. the multiplier bit is 0 and the add is skipped.
  Otherwise S5 -> S6.
* S8 -> S5 when Z = 0, i.e. bits of B remain. Otherwise S8 -> S9.
* S9 -> idle.
* Every other state goes to the next one.

`busy` is high in every state except idle.

**Latency.** Let p be the number of loop passes: the position of B's
highest 1 bit plus one, or 1 when B = 0. Counting from the cycle after
`start` is sampled until `busy` falls, a multiplication takes
`4 + sum over the p passes of (3 + b_i) + 1` cycles. For example, 5 x 3 takes
4 + (3+1) + (3+1) + 1 = 13 cycles. `tb/fsm_cpu_tb.sv` checks this count.

## Programmable control unit (`pc_unit`, `control_rom`, `branch_select`, `prog_cpu`)

With the default `PROGRAM = PROG_MULT`, the ROM holds:

```
 0: R0 <= R0 - R0
 1: R1 <= M[R0]
 2: R2 <= M[R0+1]
 3: R3 <= R3 - R3
 4: R4 <= R2 & 1
 5: R4 - 0,  branch if Z  by +2    -> 7   (skip the add when the bit is 0)
 6: R3 <= R3 + R1
 7: R1 <= SLL(R1)
 8: R2 <= SRL(R2)
 9: R2 - 0,  branch if Z' by -5    -> 4   (loop while B != 0)
10: M[R0+2] <= R3
11..15: no-ops
```

The product is in `M[2]` once the PC reaches 11, after
`4 + sum over the p passes of (5 + b_i) + 1` cycles from the release of
reset. 5 x 3 takes 4 + 6 + 6 + 1 = 17 cycles. There is no halt. The PC runs
through the no-ops, wraps to 0 and runs the program again. This recomputes
the same product, because `M[0]` and `M[1]` are not changed.

`PROGRAM = PROG_EXAMPLE` loads a four-word demonstration instead:
`R2 <= R0 + R1`, `R1 <= M[R2]`, `M[R2] <= R0`, `R3 <= R0 + 3`.

To add a program, give it a number in `sc_pkg` and a `case` branch in
`sc_pkg::rom_word()`. The ROM is built from that function, so no data file is
needed.

## Using the top level

`sc_top` has one clock and two independent groups of ports:

* `p_*` for the programmable processor: reset, PC, the current control word,
  MP, the flags, and a memory host port.
* `f_*` for the hardwired multiplier: reset, start, busy, the current control
  word, and a memory host port.

Each data memory has a **host port** (`*_host_we`, `*_host_addr`,
`*_host_wdata`, `*_host_rdata`). Through it a test bench or a surrounding
system loads operands and reads results. Host reads are combinational.
Host writes land at the clock edge. If both ports write the same word in one
cycle, the processor's write wins.

To multiply on the programmable processor:

1. Hold `p_rst` high.
2. Write A to address 0 and B to address 1.
3. Release `p_rst`.
4. Wait until `p_pc == 11`, then read address 2.

To multiply on the hardwired unit:

1. Write A and B the same way.
2. Pulse `f_start` for one cycle while `f_busy` is low.
3. Wait for `f_busy` to fall, then read address 2.

Products are modulo 256.

Resets are synchronous and active high. Reset clears the registers and, in
the programmable processor, sets the PC to 0. It does not clear memory.
While `p_rst` is held, the programmable datapath keeps executing word 0,
which writes no memory.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sc_pkg.sv tb/sc_top_tb.sv --top-module sc_top_tb
./obj_dir/Vsc_top_tb
```

Use the same command with a different `tb/*_tb.sv` file and `--top-module`
for the others.

| testbench | what it checks |
|-----------|----------------|
| `sc_top_tb` | Both processors on 44 operand pairs, run at their default sizes. It also runs past the PC wrap. It counts loads, stores, taken and untaken Z and Z' branches, PC wraps, idle waits, adds, skipped adds and loop-backs, and fails if any of them never happens. |
| `prog_cpu_tb` | Product, cycle count and the full PC trace for 66 operand pairs, plus the four-word example program. |
| `fsm_cpu_tb` | Product, cycle count and untouched operands for 66 operand pairs. |
| `mult_fsm_cu_tb` | Every state's control word and random Z inputs against a state model. |
| `datapath_tb` | The four-word sequence, then 3000 random control words against a register and memory model. |
| `instr_examples_tb` | ADD, SUB, ADDI (including a negative immediate), LOAD with offset 4, and STORE. |
| `alu_tb` | Exhaustive over all operands and functions. |
| `reg_file_tb`, `data_ram_tb`, `sign_extend_tb`, `branch_select_tb`, `pc_unit_tb`, `control_rom_tb` | Unit checks. |

## Files

| file | contents |
|------|----------|
| `rtl/sc_pkg.sv` | Widths, the FS and BS encodings, the control word, the flags, and the ROM programs. |
| `rtl/reg_file.sv` | Register file: decoder write enable, two combinational read ports. |
| `rtl/alu.sv` | ALU and condition codes. |
| `rtl/sign_extend.sv` | Sign extension, for IMM and OFF. |
| `rtl/data_ram.sv` | Data memory with its host port. |
| `rtl/datapath.sv` | The one-cycle datapath. |
| `rtl/mult_fsm_cu.sv`, `rtl/fsm_cpu.sv` | The hardwired multiplier. |
| `rtl/pc_unit.sv`, `rtl/control_rom.sv`, `rtl/branch_select.sv`, `rtl/prog_cpu.sv` | The programmable processor. |
| `rtl/sc_top.sv` | Both processors side by side. |

## What comes from the source lecture and what was chosen here

**Taken from the course lecture this design follows:**

* the datapath structure and its control signals;
* 8-bit data and the 4-bit sign-extended immediate;
* 3-bit register fields;
* the five ALU functions and the four condition codes;
* the multiplier's nine working states, their control words and their two
  conditional transitions;
* the PC with its +1 and +offset paths;
* the BS table;
* the 11-word multiplication program and the four-word example.

**Chosen for this design:**

* Eight registers. The lecture's drawings show four, but its programs need
  five.
* The FS encoding and its 4-bit width.
* C = V = 0 for AND and the shifts.
* 4-bit OFF and PC fields and a 16-word ROM, with no-op padding and PC
  wrap-around.
* A 256-word memory.
* Combinational memory reads.
* The synchronous resets.
* The idle state's do-nothing word and the `busy` output.
* Using the Z flag of the current word, rather than a register's stored
  value, in the hardwired unit's two decisions.
* The memory host ports.
* Zeros in the fields the lecture leaves as don't-care.

**Not built:** a halt or stop word, and ALU functions beyond the five the
programs use. Neither is part of the lecture's design.

**Known limit:** products wider than 8 bits are truncated. The lecture's own
example multiplies 3-bit numbers, whose product fits.
