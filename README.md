# A single-cycle processor for a seven-instruction MIPS subset

This processor runs each instruction in exactly one clock cycle. One long
combinational path does all the work of an instruction between two rising
clock edges: fetching it, decoding it, reading registers, running the ALU and
accessing memory. At the edge that ends the cycle, the PC, the register file
and the data memory all take their new values together. There is no pipeline,
no stall and no forwarding. The clock period has to cover the slowest
instruction, which is the load.

The design has two parts. The **datapath** is a small set of standard
components: a register file, an immediate extender, an ALU, two memories, a
PC with two adders, and four 2:1 multiplexers. The **controller** is a purely
combinational decoder. It looks at the opcode and function fields and sets
the multiplexers and write enables for the instruction.

## Instruction subset and encoding

| instruction | format | op (31..26) | funct (5..0) | register transfer |
|---|---|---|---|---|
| `add rd, rs, rt` | R | `000000` | `100000` | R[rd] = R[rs] + R[rt] |
| `sub rd, rs, rt` | R | `000000` | `100010` | R[rd] = R[rs] - R[rt] |
| `ori rt, rs, imm16` | I | `001101` | - | R[rt] = R[rs] OR ZeroExt(imm16) |
| `lw rt, imm16(rs)` | I | `100011` | - | R[rt] = Mem[R[rs] + SignExt(imm16)] |
| `sw rt, imm16(rs)` | I | `101011` | - | Mem[R[rs] + SignExt(imm16)] = R[rt] |
| `beq rs, rt, imm16` | I | `000100` | - | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)*4 |
| `j target` | J | `000010` | - | PC = {PC[31:28], target, 00} |

Fields: op = 31..26, rs = 25..21, rt = 20..16, rd = 15..11, shamt = 10..6
(unused), funct = 5..0, imm16 = 15..0, target = 25..0. Every instruction not
listed here changes no state, and the PC steps by 4.

Arithmetic wraps modulo 2^32 and never traps, so `add`/`sub` behave like MIPS
`addu`/`subu`. Register 0 always reads as zero. Memory accesses are 32-bit
words, and address bits 1..0 are ignored.

## The datapath, one cycle at a time

```
           +-------------- fetch unit ---------------+
           | PC --> +4 adder --+--> branch mux --> jump mux --> PC (at edge)
           |        PC Ext --> adder --^      ^          ^
           +------------------------------ nPC_sel&Equal  Jump
   PC --> instruction memory --> instr[31:0]
             rs,rt --> register file --> busA ---------------> ALU --> result --+--> data memory Adr
                                  \--> busB --+--> ALUSrc mux -^   \--> Equal   |      Data In <-- busB
             imm16 --> extender (ExtOp) ------/                                 v
             RegDst mux (rt/rd) --> Rw        busW <-- MemtoReg mux <-- {result, memory data}
```

In order, during a single cycle:

1. The PC addresses the instruction memory. The memory is read
   combinationally, so the instruction word appears in the same cycle.
2. The register file reads R[rs] onto busA and R[rt] onto busB. Both reads
   are combinational.
3. The extender widens imm16. ExtOp selects zero fill (for `ori`) or sign
   fill (for `lw` and `sw`).
4. The ALUSrc mux gives the ALU either busB (0) or the extended immediate
   (1). The ALU adds, subtracts or ORs. Its `equal` output is high when the
   result is zero. For `beq`, the ALU is set to subtract, so this output
   means R[rs] == R[rt].
5. The ALU result is the data-memory address. busB, which holds R[rt], is
   the store data.
6. The MemtoReg mux picks the ALU result (0) or the loaded word (1) to drive
   busW. The RegDst mux picks the destination register: rt (0) or rd (1).
7. At the rising edge, three things happen. The register file writes busW
   into Rw if RegWr is high. The data memory writes if MemWr is high. The PC
   loads its next value.

A register written by one instruction can be read by the next one without
any help. The write happens at the edge, and the next instruction only
starts reading after that edge.

## Next-PC selection

The fetch unit always computes two addresses in parallel. The first is
PC + 4. The second is the branch target, PC + 4 + (SignExt(imm16) << 2). The
"PC Ext" block does the sign extension and the shift by two; the second
adder adds its output to PC + 4. The branch mux does not use nPC_sel
directly as its select. nPC_sel only says "this is a branch instruction",
and the select signal is:

| nPC_sel | Equal | mux |
|---|---|---|
| 0 | x | PC + 4 |
| 1 | 0 | PC + 4 |
| 1 | 1 | branch target |

That table is an AND gate. A second mux follows, controlled by Jump. It
replaces the result with {PC[31:28], target, 00}. This means the value of
nPC_sel and Equal has no effect during a jump. The ALU output is meaningless
during a jump, and Equal may well be high, but Jump overrides it.

The PC is always word aligned. Only bits 31..2 are stored, and bits 1..0 are
constant zeros.

Note that the jump keeps the top four bits of the **current** PC. Standard
MIPS takes them from PC + 4. The two differ only for a jump placed in the
last word of a 256 MB region.

## Controller

The decoder is built as two planes. An "AND" plane matches the opcode
against each instruction. For R-type instructions it also matches funct. It
produces one line per instruction: add, sub, ori, lw, sw, beq and jump. An
"OR" plane then combines those lines into the control signals:

| signal | meaning | equation |
|---|---|---|
| RegDst | 1: write rd, 0: write rt | add + sub |
| ALUSrc | 1: immediate, 0: busB | ori + lw + sw |
| MemtoReg | 1: memory, 0: ALU | lw |
| RegWr | register write | add + sub + ori + lw |
| MemWr | memory write | sw |
| nPC_sel | branch instruction | beq |
| Jump | jump instruction | jump |
| ExtOp | 1: sign, 0: zero | lw + sw |
| ALUctr[1:0] | 00 add, 01 sub, 10 or | [0] = sub + beq, [1] = ori |

Some signals don't matter for some instructions, for example RegDst for a
store. These don't-care entries come out as 0, simply because the equations
produce 0 there. An undecoded instruction raises no line, so it behaves as a
no-op.

## Timing

Single-cycle operation means CPI = 1. The price is that the period is set by
the longest path. For `lw` that path runs through instruction memory, the
register read, the extender, the ALU, the data-memory read, the MemtoReg mux
and the register-file set-up. The next-PC path is much shorter: one adder
and two muxes after the instruction is decoded. No instruction can finish
early, even one that does not use memory.

## Module map and interfaces

Each file begins with a comment describing its ports and timing.

| module | role |
|---|---|
| `mips_pkg` | opcodes, funct codes, `aluctr_e`, `extop_e`, the `ctrl_t` control word, R/I/J instruction-format structs |
| `regfile` | 32 x 32 registers, 2 combinational read ports, 1 write port at the clock edge, r0 = 0, synchronous reset clears all |
| `alu` | ADD/SUB/OR, `equal` = (result == 0) |
| `extender` | 16 to 32 bit, zero or sign |
| `inst_fetch_unit` | PC register, +4 and branch adders, branch and jump muxes |
| `control` | AND/OR-plane decoder |
| `inst_memory` | 1024-word instruction memory, combinational read, load port for programs |
| `data_memory` | 1024-word data memory, combinational read, write at the edge |
| `datapath` | register file, extender, ALU, fetch unit and the four muxes |
| `single_cycle_cpu` | top: control + datapath + both memories |

Top-level ports of `single_cycle_cpu`:

- `clk` is the clock. `rst` is a synchronous, active-high reset: it sets
  PC = `RESET_PC`, clears the registers and blocks memory writes.
- `imem_load_we/addr/data` write a program into instruction memory. Use this
  port while `rst` is held.
- `pc` and `instr` show the instruction being executed.
- `reg_wr`, `reg_waddr` and `reg_wdata` show the register write that commits
  at the coming edge.
- `mem_wr`, `mem_addr` and `mem_wdata` show the store that commits at the
  coming edge.
- `branch_taken` and `jump_taken` show the next-PC choice.

Parameters: `IMEM_DEPTH` = 1024, `DMEM_DEPTH` = 1024 (words, powers of two),
`RESET_PC` = 0. Addresses outside a memory wrap around within it.

## Where this design makes its own choices

The following follow the reference organisation this design is built from:
the datapath, the instruction encodings, the control equations, the
nPC_sel/Equal branch rule and the jump formula. The following are this
design's own:

- **Memory depth, contents and loading.** Both memories are 1024 words. The
  instruction memory has a load port. Neither memory is reset.
- **Reset.** Reset is synchronous. It sets PC = 0 and clears all registers.
- **Register 0** is hard-wired to zero.
- **ALUctr.** The code is two bits wide. Code 11 is unused and gives 0.
- **Arithmetic** wraps; there are no overflow exceptions.
- **Jump mux.** It is placed after the branch mux. The jump keeps
  PC[31:28] of the current instruction (see above).
- **Unsupported encodings** execute as no-ops.
- **Don't-care control values** are driven to 0.
- **Extra top-level outputs.** The observation outputs on the top are for
  verification only.

Not provided: byte and halfword memory access, any other MIPS instruction,
exceptions and interrupts, and any real memory macro. The memories are
plain arrays, and synthesis maps them to whatever RAM the target offers.

## Verification

Each module has a self-checking bench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`.

- `alu_tb`, `extender_tb`, `control_tb`: exhaustive or random input checks
  against values computed in the bench. Every supported op/funct pair is
  checked, and random unsupported encodings must produce a zero control word.
- `regfile_tb`, `data_memory_tb`, `inst_memory_tb`: checked against shadow
  arrays. The benches confirm that a write lands only at the edge and that
  reads are combinational.
- `inst_fetch_unit_tb`: random nPC_sel/Equal/Jump/offset stimulus against a
  reference PC. It counts sequential steps, taken, untaken and backward
  branches, and jumps.
- `datapath_tb`: a random program run on the datapath alone. Control words
  come from an independent table, and memories are modelled in the bench.
- `single_cycle_cpu_tb` runs the full processor at its default sizes. Each
  cycle it compares the PC, the register write, the store and the next-PC
  choice with an instruction-level model (`tb/mips_isa_pkg.sv`). It runs
  three programs:
  - a swap of two adjacent array words (`lw`, `lw`, `sw`, `sw`), followed by
    loads that read the swapped values back;
  - a loop summing 1..25, which must finish in exactly 4N + 6 = 106 cycles
    and so confirms CPI = 1;
  - a 700-instruction random program covering every instruction, taken and
    untaken branches, negative offsets, `ori` with immediate bit 15 set,
    writes to r0, and undecoded words.

  The bench counts each of these events and fails if one never occurs.

Every bench runs in well under a second.

## Simulating with Verilator

From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module single_cycle_cpu_tb rtl/mips_pkg.sv tb/mips_isa_pkg.sv \
    tb/single_cycle_cpu_tb.sv -o sim
./obj_dir/sim
```

For another bench, change `--top-module` and the last file. Only the
datapath and top-level benches need `tb/mips_isa_pkg.sv`. To lint a module
on its own:
`verilator --lint-only -Wall -Irtl rtl/mips_pkg.sv rtl/<module>.sv`.

To add an instruction, you need three changes. Add its opcode to `mips_pkg`.
Add an AND-plane line and its OR-plane terms in `control`. If it needs a new
datapath function, such as another ALU operation or another next-PC source,
extend `aluctr_e` and `alu`, or the muxes in `inst_fetch_unit`. Then add the
instruction to `isa_model` and to `gen_random` in `tb/mips_isa_pkg.sv` so
that the benches cover it.
