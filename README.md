# A single-cycle RV32I processor, and a 2-bit counter

This is a teaching-sized RISC-V processor that runs every instruction to
completion in one clock cycle. The instruction is fetched at the program counter
and decoded, the register file is read, and the ALU computes. The data memory is
then read or written, and the result goes back into the register file, all
before the next rising clock edge. That edge commits the register or memory
write and loads the next PC. There is no pipeline, so there are no hazards,
stalls or forwarding. The cost is a long clock period: one cycle must cover an
instruction-memory read, a register read, an ALU operation, a data-memory read
and the register-file setup. That makes the design easy to follow but slow.

The processor follows a textbook single-cycle datapath split into IF / ID / EX /
MA / WB regions, with eleven numbered units, m1 to m11. The module and signal
names in the RTL are the names of that drawing.

A second, unrelated circuit sits beside the processor: a free-running 2-bit
counter used as a first example of a sequential circuit. The top module
`lecture_top` holds both. They have separate clocks and share nothing.

## The datapath

Signal by signal, one cycle of the datapath is:

```
IF   w_ir   = imem[r_pc]                          (m3)
     w_npc  = r_pc + 4                            (m2)
ID   w_r1   = x[w_ir[19:15]]   w_r2 = x[w_ir[24:20]]   (m5)
     w_imm, {r,i,s,b,u,j,ld} = gen_imm(w_ir)      (m4)
     w_tpc  = r_pc + w_imm                        (m6)
     w_s2   = (r | b) ? w_r2 : w_imm              (m7)
EX   w_alu, w_tkn = alu(w_r1, w_s2)               (m8)
MA   w_ldd  = dmem[w_alu];  if s: dmem[w_alu] <= w_r2 at the edge   (m9)
WB   w_rt   = ld ? w_ldd : w_alu                  (m10)
     if !s & !b: x[w_ir[11:7]] <= w_rt at the edge (x0 excepted)
     w_pcin = (b & w_tkn) ? w_tpc : w_npc;  r_pc <= w_pcin at the edge   (m11, m1)
```

| unit | module | job |
|------|--------|-----|
| m1 | `pc_reg` | `r_pc`, loads `w_pcin` every cycle |
| m2 | `adder` | `w_npc = pc + 4` |
| m3 | `am_imem` | instruction memory, read without a clock |
| m4 | `gen_imm` | immediate `w_imm` and the class flags r, i, s, b, u, j, ld |
| m5 | `regfile` | x0..x31, two read ports, one write port, x0 = 0 |
| m6 | `adder` | branch target `w_tpc = pc + w_imm` |
| m7 | `mux2` | second ALU operand `w_s2`: rs2 or immediate |
| m8 | `alu` | `w_alu` and the branch condition `w_tkn` |
| m9 | `am_dmem` | data memory, combinational read, clocked write |
| m10 | `mux2` | write-back value `w_rt`: `w_alu` or loaded `w_ldd` |
| m11 | `mux2` | next PC: `w_npc`, or `w_tpc` for a taken branch |

The control is a handful of gates on the class flags. There is no separate
control unit.

* Register write enable: `!s & !b`. Stores and branches write no register.
  Everything else writes `rd`, and a write to x0 is dropped inside the
  register file.
* Data-memory write enable: `s`.
* Write-back select (m10): `ld`.
* Next-PC select (m11): `b & w_tkn`.
* Second operand (m7): register rs2 for R-type instructions and branches,
  the immediate for everything else.

### Second-operand select: a departure from the drawing

The reference drawing labels the m7 select `!r`. Read literally, a branch would
then feed its own offset, not rs2, into the ALU comparator, and no branch
condition could be evaluated. Here "r" is taken to mean "the second operand
is a register": the select is `!(r | b)`. This is the only point where the RTL
departs from the drawing's wiring. It is marked in `single_cycle_proc.sv`.

### How the ALU serves three purposes

The ALU (m8) computes the result of R-type and register-immediate operations.
Those two classes use `funct3` to choose ADD, SLL, SLT, SLTU, XOR, SRL/SRA, OR
or AND. Instruction bit 30 picks SUB for a register-register add, and
arithmetic right shift for SRA/SRAI. ADDI ignores bit 30, because there it is
only an immediate bit. For every other instruction the ALU simply adds. That
gives the load/store address `rs1 + offset`. Beside the result the ALU always
evaluates the branch condition `w_tkn` from `funct3`: BEQ, BNE, BLT, BGE
(signed), BLTU and BGEU (unsigned). The datapath uses `w_tkn` only when the
instruction is a branch.

### Immediates

`gen_imm` rebuilds the sign-extended 32-bit immediate from the scattered
instruction bits of each format:

| format | immediate bits ← instruction bits |
|--------|-----------------------------------|
| I | imm[11:0] ← ir[31:20] |
| S | imm[11:5] ← ir[31:25], imm[4:0] ← ir[11:7] |
| B | imm[12] ← ir[31], imm[11] ← ir[7], imm[10:5] ← ir[30:25], imm[4:1] ← ir[11:8], imm[0] = 0 |
| U | imm[31:12] ← ir[31:12], imm[11:0] = 0 |
| J | imm[20] ← ir[31], imm[19:12] ← ir[19:12], imm[11] ← ir[20], imm[10:1] ← ir[30:21], imm[0] = 0 |

The flags are decoded from the major opcode. `i` covers every I-format
instruction (register-immediate ALU, loads, JALR), `ld` marks loads, `u` marks
LUI/AUIPC and `j` marks JAL. The flags travel as the packed struct
`rv_pkg::itype_t`.

## What it executes, and what it does not

Executed correctly:

* ADD, SUB, SLL, SLT, SLTU, XOR, SRL, SRA, OR, AND
* ADDI, SLTI, SLTIU, XORI, ORI, ANDI, SLLI, SRLI, SRAI
* LW, SW
* BEQ, BNE, BLT, BGE, BLTU, BGEU

Not executed correctly, because the datapath has no path for them:

* **LUI, AUIPC, JAL, JALR.** The write-back mux offers only the ALU result and
  the loaded word, so there is no `pc + 4` link value and no `pc + imm`
  result. The next-PC mux offers only `pc + 4` and the branch target. These
  instructions are still classified, and their immediates are built. They
  execute as "rd ← (register named by bits 19:15) + immediate" and then go on
  to `pc + 4`. To build a 32-bit constant, use `addi` and `slli`: the
  testbenches make 0x12000000 this way.
* **LB, LH, LBU, LHU, SB, SH.** Memory is word-wide. These act as LW and SW,
  and `funct3` is ignored.
* **FENCE, ECALL, EBREAK.** Like the unsupported group above, they perform an
  add into `rd`. There are no traps, CSRs or interrupts.

Add those paths (a third write-back source, a JALR target, byte lanes) to extend
the machine. Each one is local to `single_cycle_proc.sv`.

## Memories and addressing

Both memories are arrays of 32-bit words, 1024 words by default
(`IMEM_WORDS`, `DMEM_WORDS`). Each is indexed by the word address, byte
address bits `[log2(WORDS)+1:2]`. The two low bits and all bits above the
index are ignored, so memory repeats every 4 KiB. An array placed at
0x12000000, as in the course examples, lands at word 0. Both memories read
combinationally, because a single-cycle machine must see the instruction and
the load data within the same cycle. The data memory writes on the rising
edge. This suits simulation and FPGA distributed RAM. An ASIC SRAM macro with a
registered read would not fit this timing without a second clock phase or a
pipeline stage.

The instruction memory has no write port. Its contents come from `IMEM_FILE`
(a hex file, one word per line, read with `$readmemh`), or a testbench writes
into `m3.mem` directly. With no file, synthesis sees an empty ROM and removes
the processor logic behind it. Give a file when synthesizing.

## Reset and timing

`rst_n` is active low and asynchronous. It sets the PC to `RESET_PC` (default
0) and clears x1..x31. Memories are not cleared. After reset is released,
instruction k of a straight-line program executes in cycle k. Its register or
memory write and the new PC take effect at the end of that cycle, so the cycle
count of any program equals the number of instructions it executes.

The counter has no reset. It powers up at 0 (a declaration initialiser) and
counts 0, 1, 2, 3, 0, … on each rising edge of `cnt_clk`. Its width is the
parameter `CNT_W` (default 2).

## Top-level ports (`lecture_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | processor clock |
| rst_n | in | 1 | processor reset, active low |
| pc | out | 32 | PC of the instruction executing now |
| ir | out | 32 | that instruction |
| dmem_we | out | 1 | this instruction is a store |
| dmem_adr | out | 32 | data-memory byte address (ALU result) |
| dmem_wd | out | 32 | store data (rs2) |
| cnt_clk | in | 1 | counter clock |
| cnt | out | CNT_W | counter value |

The processor's outputs are for observation only. Nothing outside the top needs
to drive the memories.

## Files

`rtl/` holds one unit per file. `rv_pkg.sv` holds the shared types: `word_t`,
the opcodes, the `funct3` enums and `itype_t`. `single_cycle_proc.sv` wires
m1–m11, and `lecture_top.sv` places the processor beside the counter.

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`. `rv_asm_pkg.sv` is a tiny assembler: one
function per instruction returns its machine word. The testbenches use it to
write programs in readable form.

* `tb_lecture_top` runs the top at its default sizes. One program chains four
  small course examples: (g+h)−(i+j), g = h + A[2], A[1] = h + A[2], and the
  sum of 1..10 in a bne loop. It then takes every branch type both ways and
  tries a write to x0. The test checks the results, the store traffic on the
  ports and the cycle count (62 cycles for 62 executed instructions). It counts
  each datapath mechanism and fails if one never occurred.
* `tb_single_cycle_proc` runs the same examples with small memories, checking
  the cycle count of each. It also runs 20 random 60-instruction programs (ALU
  operations, LW, SW, all six branches) in lockstep with an instruction-level
  reference model inside the testbench. The PC and the store port are compared
  every cycle, and all registers at the end.
* The unit testbenches compare against independently computed values: 64-bit
  sums, a reference ALU, a model register array, encoded-then-decoded
  immediates, and the counter's edge count modulo 4.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/tb_lecture_top.sv --top-module tb_lecture_top
./obj_dir/Vtb_lecture_top
```

Replace `tb_lecture_top` with any other testbench name. `tb_am_imem` reads
`tb/imem_test.hex` by a path relative to the repository root, so run it from
there.

## How far to trust it

* All RTL lints with Verilator (`-Wall`) and elaborates with the slang front
  end of Yosys. The remaining lint warnings are unused opcode constants,
  address bits the memories ignore, and the counter's intended power-up value.
* Every testbench passes. Each one also fails when its module is replaced by a
  copy with one deliberate bug, for example an inverted mux select, a logical
  instead of an arithmetic shift, or branches writing the register file.
* `single_cycle_proc` asserts, in simulation with assertions on, that the PC
  stays word-aligned and that no instruction falls in two classes. A branch to
  a half-word target trips the first; the hardware itself does not trap.
* The drawing shows the datapath but not the ALU's control inputs, the memory
  sizes, the reset, or exactly what each class flag covers. Those are this
  design's choices, as described above. Where the drawing and a working
  processor disagree (the m7 select), the working processor wins.
