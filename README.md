# A 16-bit single-cycle processor with branches and jumps

This is a small teaching processor. It has 16-bit words, eight registers and
16-bit instructions, and it executes one instruction per clock cycle. The
datapath combines the ALU and load/store instructions with a program counter
that can branch and jump. Two combinational circuits drive the datapath:

- a **control unit** turns the instruction into every control line;
- an **immediate circuit** turns the instruction's 6-, 8- or 12-bit constant
  into a 16-bit operand.

Instruction and data memories are separate (Harvard organisation). Both are
addressed in 16-bit words, so the PC advances by 1.

## Instruction set

The major opcode is in bits 15..13. Register fields are 3 bits wide. Their
position depends on the format. In the table, `imm6s` means a 6-bit field,
sign-extended. `imm8u` means an 8-bit field, zero-extended.

| opcode | bits 12..0 | instructions | effect |
|---|---|---|---|
| `000` | `fn[12:9] rd[8:6] rs[5:3] rt[2:0]` | zero (fn 0000) | rd := 0 |
| `001` | same, rt unused | not, inv, sll, srl, sla, sra, inc, dec, cp | rd := f(rs, 1) |
| `010` | same | and, or, add, sub, lt, gt, eq, neq | rd := f(rs, rt) |
| `011` | `s[12] rd[11:9] rs[8:6] imm6s[5:0]` | lw (s=0), sw (s=1) | rd := MEM[rs+imm] / MEM[rs+imm] := rd |
| `100` | `k[12:11] rd[10:8] imm8u[7:0]` | ori, lui, addi, subi (k = 0..3) | rd := rd \| imm, imm << 8, rd + imm, rd − imm |
| `101` | `l[12] rd[11:9] rs[8:6] imm6s[5:0]` | beq (l=0), blt (l=1) | if rd == rs (rd < rs): pc := pc + 1 + imm |
| `110` | `00 rd[10:8] imm8s[7:0]` | jr | pc := rd + imm |
| `111` | `l[12] target[11:0]` | j (l=0), jal (l=1) | pc := target; jal also sets r7 := pc + 1 |

ALU function codes (bits 12..9):

| fn | op | result | fn | op | result |
|---|---|---|---|---|---|
| 0000 | zero | 0 | 1000 | eq | a == b |
| 0001 | not | ~a (bitwise) | 1001 | neq | a != b |
| 0010 | and | a & b | 1010 | inv | −a |
| 0011 | or | a \| b | 1011 | sll | a << 2 |
| 0100 | add / inc | a + b | 1100 | srl | a >> 2 (logical) |
| 0101 | sub / dec | a − b | 1101 | sla | a << 1 (a · 2) |
| 0110 | lt | a < b (signed) | 1110 | sra | a >>> 1 (a / 2, arithmetic) |
| 0111 | gt | a > b (signed) | 1111 | cp | a |

Each compare returns 1 or 0. The unary instructions (opcode `001`) get the
constant 1 as operand b. That is why `inc` and `dec` share function codes with
`add` and `sub`. The logical shifts move by two places and the arithmetic
shifts by one, as the instruction definitions specify. Register r7 is the link
register of `jal`. Return from a call with `jr r7, 0`.

## How one cycle works

```
            +--------+ instr +--------------+ ctrl (ra1, ra2, wa, we, alu_op, b_sel, mem_we, wb_sel, pc_sel)
  pc ------>| instr  |------>| control_unit |--------------------------------------------+
  |         | _mem   |   |   +--------------+                                            |
  |         +--------+   +-->| imm_gen      |--- imm ----+-----------------+             |
  |                          +--------------+            |                 |             |
  |   +---------+ rd1 ----------------------> a  +-----+ |  alu_y  +------+------+      |
  |   | regfile | rd2 --+-> [rd2|imm|1] ----> b  | alu |-+-------->| data_mem    |      |
  |   +---------+       |                        +-----+ |         +-------------+      |
  |        ^ wd         +------------------------------- | -- store data               |
  |        +-- [alu_y | mem | pc+1 | imm] <--------------+                              |
  +-- program_counter: [pc+1 | pc+1+imm if alu_y[0] | alu_y | imm] <--------------------+
```

Everything between two rising clock edges is combinational:

1. Instruction memory is read at `pc`.
2. `control_unit` and `imm_gen` decode the instruction.
3. `regfile` is read at `ra1` and `ra2`.
4. The `alu` combines port 1 with one of port 2, the immediate or 1.
5. `data_mem` is read at the ALU result.
6. The write-back multiplexer chooses among the ALU result, the memory word,
   `pc + 1` (for `jal`) and the immediate (for `lui`).

At the rising edge, three things update together: the register file (if
`reg_we`), the data memory (if `mem_we`) and the PC.

**Register addressing.** The register fields sit at different bit positions
in the different formats. For that reason the control unit outputs the
register addresses itself, and the register file needs no address multiplexers.
Port usage per instruction:

| instruction | read port 1 | read port 2 | ALU | write |
|---|---|---|---|---|
| ALU class | rs | rt (unused by unary) | fn | rd ← ALU |
| lw | rs | – | rs + imm | rd ← memory |
| sw | rs | rd (store data) | rs + imm | memory ← rd |
| ori/addi/subi | rd | – | rd op imm | rd ← ALU |
| lui | – | – | – | rd ← imm (already shifted) |
| beq/blt | rd | rs | eq / lt | – |
| jr | rd | – | rd + imm | – (PC ← ALU) |
| j/jal | – | – | – | jal: r7 ← pc + 1 |

**Branches.** A branch reuses the ALU. `beq` and `blt` set the ALU to `eq` or
`lt`, and the PC unit checks bit 0 of the result. `jr` uses the ALU as the
address adder. `j` and `jal` take the 12-bit target from the immediate
circuit, zero-extended.

**Immediates** (`imm_gen`):

- lw, sw, beq, blt: bits 5..0, sign-extended;
- ori, addi, subi: bits 7..0, zero-extended;
- lui: bits 7..0, shifted left by 8;
- jr: bits 7..0, sign-extended;
- j, jal: bits 11..0, zero-extended.

## Interface of `cpu_top` and timing

| port | dir | width | use |
|---|---|---|---|
| `clk` | in | 1 | one instruction per rising edge |
| `rst_n` | in | 1 | synchronous, active low. Sets PC and all registers to 0. Blocks stores |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, `IMEM_AW`, 16 | write one instruction word per clock |
| `pc`, `instr` | out | 16, 16 | the instruction now executing |
| `dbg_reg_addr` → `dbg_reg_data` | in → out | 3 → 16 | read any register, combinationally |
| `dbg_mem_addr` → `dbg_mem_data` | in → out | `DMEM_AW` → 16 | read any data word, combinationally |

Parameters: `IMEM_AW = 12` and `DMEM_AW = 12` set the memory sizes (4096 words
each). Only the low address bits are used, so larger addresses wrap.

Typical use:

1. Hold `rst_n` low.
2. Write the program through the `prog_*` port.
3. Release reset. The first instruction runs from address 0 in the next cycle.

The instruction set has no halt instruction. By convention a program ends in
a jump to itself (`j .`). When `instr == {3'b111, 1'b0, pc[11:0]}`, the program
has finished. Its results can then be read through the debug ports.

## Choices beyond the instruction definitions

The instruction table fixes the encodings and what each instruction does. The
following points are this implementation's own choices:

- **Organisation.** The datapath is single-cycle, with combinational reads of
  the instruction memory, data memory and register file.
- **Memories.** Each holds 4096 words. The size matches the reach of the 12-bit
  jump target.
- **Loading and reset.** The program-load port, the debug ports and the reset
  behaviour are additions. Data memory is not cleared by reset.
- **rt field.** The second source register `rt` of binary ALU instructions is
  in bits 2..0.
- **r0.** r0 is an ordinary register, not a constant zero. Use `zero rd` to
  clear a register.
- **Signedness.** `lt`, `gt` and `blt` compare as signed two's complement.
  `not` is bitwise. `sra` rounds toward minus infinity (for example, −55 / 2
  gives −28).
- **Undefined encodings.**
  - Opcode `000` with a nonzero function field executes that function like
    `010` does.
  - Opcode `110` with bits 12..11 not `00` still acts as `jr`.
  - Nothing traps.

## Files

RTL (`rtl/`), bottom-up:

| file | contents |
|---|---|
| `cpu_pkg.sv` | widths, opcode and ALU-function enums, select enums, the `ctrl_t` control struct |
| `alu.sv` | 16-function ALU |
| `imm_gen.sv` | immediate circuit |
| `control_unit.sv` | main decoder |
| `regfile.sv` | 8 × 16 registers: 2 read ports, 1 write port, 1 debug read port |
| `program_counter.sv` | PC register and next-PC selection |
| `instr_mem.sv`, `data_mem.sv` | word-addressed memories (arrays; synthesis infers memories) |
| `cpu_top.sv` | the datapath |

Testbenches (`tb/`), all self-checking. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_alu` | all 16 functions on corner and random operands, against an integer model |
| `tb_imm_gen` | every opcode, directed and random |
| `tb_control_unit` | every instruction kind, with random fields |
| `tb_regfile` | reset, write timing, all read ports |
| `tb_program_counter` | reset and all next-PC sources, against integer arithmetic |
| `tb_instr_mem`, `tb_data_mem` | load, read, write enable and address wrap, at reduced size |
| `tb_cpu_top` | the whole processor at default size (see below) |

`tb_cpu_top` contains an assembler (one encoder function per format) and an
independent instruction-set model. It runs two kinds of program:

- **A hand-checked program.** It covers a `blt` loop summing 1..10 with a
  store per iteration, a load, a not-taken and a taken `beq`, a `jal`
  subroutine returning through `jr r7`, `lui`/`ori`/`subi`, and
  `inv`/`sra`/`srl`/`lt`. It must finish in exactly 60 cycles with known
  register and memory contents.
- **40 random programs** of about 180 instructions each. They use all ALU
  functions, immediates, loads, stores and forward branches and jumps. Each
  must match the model in final registers, memory and cycle count.

The testbench counts every mechanism (each ALU function, branch taken and not
taken, j, jal, jr, lw, sw, ori, lui, addi, subi). It fails if any of them never
occurred.

## Simulating

With Verilator 5 (the package is read first; `-y` finds the other modules):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpu_top \
    -y rtl -y tb +libext+.sv rtl/cpu_pkg.sv tb/tb_cpu_top.sv -o sim
./obj_dir/sim
```

Replace `tb_cpu_top` with any other testbench name to run it. To write your
own program, follow `build_directed` in `tb_cpu_top.sv`:

- fill `prog[]` using the `enc_*` functions;
- end the program with `enc_j(0, <its own address>)`;
- call `load_and_run`.
