# RV32I single-cycle and five-stage pipelined processors

This is a small RV32I integer processor in SystemVerilog, built in two
organizations that share the same datapath blocks:

* a **single-cycle** processor. Each instruction is fetched, decoded, executed,
  given its memory access and written back within one clock period, so CPI = 1.
  Its clock period must cover the slowest instruction, a load, which passes
  through instruction memory, register read, ALU, data memory and register write.
* a **five-stage pipelined** processor. Pipeline registers cut the same
  datapath into Fetch (F), Decode/register read (D), Execute (X), Memory (M) and
  Write-back (W). A new instruction enters on every clock. The clock period now
  only has to cover the slowest stage, so throughput rises while each
  instruction's latency stays at five cycles.

The single-cycle controller comes in two realizations that behave identically:
a set of logic equations, and a ROM, which is an address decoder driving a table
of control words. The top level `cs61c_top` places three independent processors
side by side: single-cycle with the logic controller, single-cycle with the ROM
controller, and the pipeline.

## The single-cycle datapath

```
          +----------------------- alu ------------------------------+
          v                                                          |
 PCSel -> [mux] -> PC -> IMEM -> inst --+-> Reg[] (A=rs1, B=rs2) --+-> Branch Comp -> BrEq, BrLT
          ^        |                    |     ^ DataD = wb           |
          +-- +4 --+                    +-> Imm.Gen -> imm           +-> ASel(0 rs1 / 1 pc) -+
                                                                     +-> BSel(0 rs2 / 1 imm)-+-> ALU -> alu
                 alu -> DMEM.Addr, rs2 -> DMEM.DataW, DMEM.DataR -> mem
                 WBSel: 0 = mem, 1 = alu, 2 = pc+4  -> wb -> Reg[inst[11:7]]
```

All of this is combinational between two clock edges. On the rising edge the
PC, the register file and the data memory update together. The instruction
memory and the data-memory read are combinational. The register file reads
combinationally and writes on the clock edge. x0 always reads zero.

Module: `riscv_sc_cpu` (parameter `CTRL_ROM` chooses the controller). Its parts
are `pc_reg` (PC, +4 and the PCSel multiplexer), `imem`, `regfile`,
`imm_gen`, `branch_comp`, `alu`, `dmem`, and `control_logic` or `control_rom`.

## The controller

The controller looks at only 11 bits: nine instruction bits
`{inst[30], inst[14:12], inst[6:2]}` and the two comparator flags BrEq and BrLT.
It produces a 15-bit control word (`rv_pkg::ctrl_t`):

| field  | bits | meaning |
|--------|------|---------|
| PCSel  | 1 | 0 = pc+4, 1 = ALU result (taken branch, jal, jalr) |
| ImmSel | 3 | I=0, S=1, B=2, U=3, J=4 |
| BrUn   | 1 | 1 = comparator compares unsigned (bltu, bgeu) |
| ASel   | 1 | 0 = Reg[rs1], 1 = PC |
| BSel   | 1 | 0 = Reg[rs2], 1 = immediate |
| ALUSel | 4 | `{inst[30], funct3}` for register ops; 1111 = pass B (lui) |
| MemRW  | 1 | 1 = store |
| RegWEn | 1 | 1 = write rd |
| WBSel  | 2 | 0 = memory, 1 = ALU, 2 = pc+4 |

The control words per instruction class:

| instruction | PCSel | ImmSel | BrUn | ASel | BSel | ALUSel | MemRW | RegWEn | WBSel |
|---|---|---|---|---|---|---|---|---|---|
| R-type (add, sub, ...) | +4 | – | – | Reg | Reg | op | 0 | 1 | ALU |
| I-type ALU (addi, ..., srai) | +4 | I | – | Reg | Imm | op | 0 | 1 | ALU |
| loads | +4 | I | – | Reg | Imm | add | 0 | 1 | Mem |
| stores | +4 | S | – | Reg | Imm | add | 1 | 0 | – |
| beq/bne/blt/bge | taken ? ALU : +4 | B | 0 | PC | Imm | add | 0 | 0 | – |
| bltu/bgeu | taken ? ALU : +4 | B | 1 | PC | Imm | add | 0 | 0 | – |
| jalr | ALU | I | – | Reg | Imm | add | 0 | 1 | PC+4 |
| jal | ALU | J | – | PC | Imm | add | 0 | 1 | PC+4 |
| auipc | +4 | U | – | PC | Imm | add | 0 | 1 | ALU |
| lui | +4 | U | – | – | Imm | pass B | 0 | 1 | ALU |

"taken" is BrEq for beq, !BrEq for bne, BrLT for blt and bltu, and !BrLT for
bge and bgeu. In an I-type instruction, inst[30] is an immediate bit, and the
controller uses it only to tell srai from srli. fence, ecall, ebreak and the
CSR instructions are treated as no-ops: the PC advances and nothing is written.

**`control_logic`** computes each field as a short equation over shared
opcode-decode terms, as a synthesis tool would build it from the truth table.

**`control_rom`** is organized as a control ROM. A `casez` address decoder
raises one word line per instruction, two for a conditional branch (taken and
not taken). Address bits that an instruction does not depend on are wildcards.
The word line selects one of 43 rows of control words. Any address that matches
no line reads the all-zero word, which is a no-op.

One detail is not obvious. BrUn sets how the comparator works, and the
comparator's flags form part of the ROM address. A ROM read at the full address
would therefore make a combinational loop. So the BrUn column is read at the
word line decoded with both flags at zero. A branch's taken and not-taken rows
share the same BrUn bit, so the output does not change.

Memory access size is not part of the 15-bit word. The data memory takes
`inst[14:12]` directly, which gives LB/LH/LW/LBU/LHU and SB/SH/SW.

## The pipeline

```
 F            | D                 | X                        | M                    | W
 pc_F -> IMEM | Reg[] read        | Imm.Gen, Branch Comp,    | DMEM, pc_M + 4,      | Reg[] write
              |                   | ASel/BSel, ALU           | WBSel mux            |
   pc_D, inst_D   pc_X, rs1_X,        pc_M, alu_M, rs2_M,        wb_W, inst_W
                  rs2_X, inst_X       inst_M
```

Module `riscv_pipe_cpu`. Each stage carries its own copy of the instruction and
decodes what it needs with the same `control_logic` block:

* X decodes PCSel, ImmSel, BrUn, ASel, BSel and ALUSel.
* M decodes MemRW and WBSel.
* W decodes RegWEn.

Branches and jumps resolve in X. `alu_X` feeds straight back to the PC
multiplexer. Only the PC travels down the pipeline. PC+4 for jal/jalr is
recomputed in M from `pc_M`, so there is no separate pc+4 register. The
write-back multiplexer sits at the end of M, and its output is registered
(`wb_W`) before it reaches the register file's write port.

Timing: instruction k after reset enters F in cycle k. Its PC redirect, if any,
happens in cycle k+2. Its store happens in cycle k+3. Its register write is
visible at the end of cycle k+4. From then on, one instruction completes every
cycle.

### What the pipeline does not do: hazards

This pipeline has **no hazard handling**: no forwarding, no stalls and no
branch flush. Software must follow two rules.

1. **Data dependences.** A register written by one instruction can be read
   only by an instruction fetched at least four slots later. Put three
   independent instructions or nops between them. A read in D during the same
   cycle as the write in W returns the old value.
2. **Control flow.** When a branch or jump is taken, the two instructions after
   it have already been fetched, and they execute. These are two delay slots.
   Fill them with nops or with useful work.

For example, `add t0,t1,t2; or t3,t4,t5; slt t6,t0,t3` runs correctly on the
single-cycle processor. On this pipeline it needs three nops between `or` and
`slt`.

Reset fills every stage with `addi x0,x0,0`.

## Performance model

The design is built around a per-phase delay budget:

| phase | IF (I-MEM) | ID (Reg read) | EX (ALU) | MEM (D-MEM) | WB (Reg write) | total |
|---|---|---|---|---|---|---|
| delay | 200 ps | 100 ps | 200 ps | 200 ps | 100 ps | 800 ps |

With this budget, the single-cycle clock is 800 ps (1.25 GHz). A pipeline stage
must fit the slowest phase, 200 ps (5 GHz). An instruction therefore takes
1000 ps in the pipeline instead of 800 ps. Throughput is four times higher,
because a new instruction starts every 200 ps instead of every 800 ps. The RTL
has no delays; the testbenches check the cycle-level version of these claims
(CPI = 1, five-cycle latency, one completion per cycle).

## Interfaces added for use and test

Both processors have:

* an instruction-memory load port (`load_we`, `load_addr` as a word index,
  `load_data`). Load while holding reset.
* trace outputs (`commit_*`, bundled as `rv_pkg::trace_t` at the top). They
  show the register write, the store and PCSel of the instruction in the
  relevant stage.

Reset is synchronous and active low. It sets the PC to `RESET_PC` (0) and
clears the register file. Memories are 1024 words (4 KiB) each by default
(`IMEM_WORDS`, `DMEM_WORDS`). Addresses wrap modulo the size, and misaligned
accesses are not supported.

## Where this departs from, or adds to, the reference design

* ImmSel and ALUSel codes, the lui pass-B operation, and the no-op treatment of
  fence/system/CSR instructions are this design's own choices.
* The ROM controller reads its BrUn column with the flags masked (see above).
* The reference material draws the immediate generator in the decode stage in
  one view and in X in the detailed pipelined datapath. The detailed version
  (X) is built.
* Hazard handling is absent (see above).
* Load port, trace outputs, reset behaviour and memory sizes are additions.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_alu`, `tb_branch_comp`, `tb_imm_gen` compare with independently written
  reference calculations (bitwise shifts, sign/magnitude compares, encode-then-
  decode immediates).
* `tb_regfile`, `tb_pc_reg`, `tb_imem`, `tb_dmem` compare with array models.
* `tb_control_logic`, `tb_control_rom` try all 2048 controller inputs against a
  truth table that has a care mask (`tb_ctrl_ref_pkg`).
* `tb_riscv_sc_cpu` runs random programs on both controller variants. It
  compares PC, register writes, stores and PCSel every cycle with an
  instruction-set model (`tb_rv_pkg::rv_iss`).
* `tb_riscv_pipe_cpu` does the same for the pipeline. Its programs are
  scheduled for the hazard rules, and the model runs with two delay slots.
  Writes are checked exactly four cycles after fetch. A directed program also
  checks the hazard rules themselves: too-early reads see the old value, and
  both delay-slot instructions execute.
* `tb_cs61c_top` runs the top at default sizes: the pipelining example sequence
  and four random programs on all three processors. It counts taken and
  untaken branches, jal, jalr, loads, stores, five-deep pipeline overlap,
  delay-slot execution and both controllers, and fails if any never occurs.

The random program generator (`tb_rv_pkg::prog_gen`) initializes registers and
a 128-byte data region. It then emits a loop body of random ALU, lui/auipc,
load and store instructions and forward branches/jumps (all six branch
conditions, jal, auipc+jalr). The loop closes with a counted backward `bne`,
and the program ends in a `jal x0,0` self-loop.

## Simulating

With Verilator 5 (`rv_pkg` first, then any testbench packages), for example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rv_pkg.sv tb/tb_rv_pkg.sv tb/tb_cs61c_top.sv --top-module tb_cs61c_top
./obj_dir/Vtb_cs61c_top
```

Unit testbenches that use the controller reference also need
`tb/tb_ctrl_ref_pkg.sv`. To run your own program, drive a processor's load port
with reset low, then release reset and watch its trace outputs.

## Files

`rtl/`: `rv_pkg` (types, control word, trace), `alu`, `regfile`, `imm_gen`,
`branch_comp`, `pc_reg`, `imem`, `dmem`, `control_logic`, `control_rom`,
`riscv_sc_cpu`, `riscv_pipe_cpu`, `cs61c_top`.
`tb/`: one `tb_<block>.sv` per block, plus `tb_rv_pkg` (encoders, instruction-set
model, program generator) and `tb_ctrl_ref_pkg` (controller truth table).
