# Five-stage pipelined MIPS-like RISC processor

A 32-bit RISC processor that overlaps the execution of up to five instructions.
Each instruction passes through instruction fetch (IF), decode and register read
(ID), execute (EX), memory access (MEM) and write-back (WB), one clock cycle per
stage, so that in steady state one instruction completes every cycle. Four
pipeline buffers (IF_ID, ID_EX, EX_MEM, MEM_WB) hold each instruction's state
between stages. Instruction and data memories are separate (Harvard
organisation), so a fetch and a load or store never compete for one memory.

The RTL follows a published MIPS-based teaching design: its block diagram, its
buffer contents, the machine code of its two example programs and the results
those programs produce. That description is brief about hazards: it says
only that the processor uses forwarding and stalling, and that writes are
suppressed when a hazard is found. The hazard logic here is therefore a
conventional design of its own, described in detail below.

## Instruction set

Three formats, all 32 bits:

| format | fields |
|---|---|
| R | `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]` |
| I | `op[31:26] rs[25:21] rt[20:16] imm[15:0]` |
| J | `op[31:26] target[25:0]` |

The opcode alone selects the operation; `funct` is ignored. The opcodes are
those of the example programs' machine code. Where an operation has no code in
those programs, the code was assigned here (marked *assigned*).

| opcode | mnemonic | type | effect |
|---|---|---|---|
| 000000 | ADD rd,rs,rt | 0 RR_ALU | rd = rs + rt |
| 000001 | SUB | 0 | rd = rs - rt |
| 000010 | AND | 0 | rd = rs & rt |
| 000011 | OR | 0 | rd = rs \| rt (`OR R20,R20,R20` serves as a no-op) |
| 000101 | MUL | 0 | rd = low 32 bits of rs * rt |
| 000110 | NOR (*assigned*) | 0 | rd = ~(rs \| rt) |
| 000111 | XOR (*assigned*) | 0 | rd = rs ^ rt |
| 010000 | SLL rd,rs,shamt (*assigned*) | 0 | rd = rs << shamt |
| 010001 | SRL (*assigned*) | 0 | logical right shift |
| 010010 | SRA (*assigned*) | 0 | arithmetic right shift |
| 001010 | ADDI rt,rs,imm | 1 RM_ALU | rt = rs + sext(imm) |
| 001011 | SUBI | 1 | rt = rs - sext(imm) |
| 001000 | LW rt,imm(rs) | 2 LOAD | rt = DM[rs + sext(imm)] |
| 001001 | SW rt,imm(rs) | 3 STORE | DM[rs + sext(imm)] = rt |
| 001101 | BNEQZ rs,imm | 4 BRANCH | if rs != 0: PC = PC + 1 + sext(imm) |
| 001110 | BEQZ rs,imm | 4 | if rs == 0: PC = PC + 1 + sext(imm) |
| 010100 | J target (*assigned*) | 6 JUMP | PC = {(PC+1)[31:26], target} |
| 111111 | HLT | 5 HALT | stop |

Any other opcode is a no-op. Addresses are word addresses: the PC steps by one,
and a load or store address counts 32-bit words. Register 0 always reads as
zero. The 3-bit type number travels down the pipeline with the instruction.

Standard MIPS32 uses different codes: for example, ADD is opcode 0 with
funct 100000, ADDI is 001000 and J is 000010. This processor does not run
standard MIPS binaries. The codes above were taken from the example programs
because those are what this processor actually executed. The original
design's J format is absolute, so J here takes a 26-bit absolute word target.

## Datapath, stage by stage

```
 IF : PC ──► IM ──► IR ─┐        NPC = PC + 1
                        ▼
 ID : control_unit(op) · register_bank(rs, rt) → A, B · sign_extend(imm) → Imm
                        ▼  ID_EX {ctrl, NPC, IR, A, B, Imm, rs, rt, dest}
 EX : forwarding muxes on A/B → ALU(A|NPC, B|Imm|shamt) → ALUOut ; "=0"(A) → cond
                        ▼  EX_MEM {type, ALUOut, B, cond, dest, IR}
 MEM: DM[ALUOut] read → LMD, or DM[ALUOut] = B ; cond → PC = ALUOut
                        ▼  MEM_WB {type, ALUOut, LMD, dest, IR}
 WB : Reg[dest] = load ? LMD : ALUOut
```

- For a branch, the ALU computes the target `NPC + Imm`. For J, the target is
  put together from the NPC and the 26-bit field.
- `dest` is rd for R-type instructions and rt for I-type ones.
- The register bank writes in WB and reads in ID in the same cycle. A read of
  the register being written returns the new value (write-through).

## Hazards: the part to understand first

Three mechanisms keep the overlapped instructions correct. All three are
driven by `hazard_unit` and `forwarding_unit`.

**Forwarding (data hazards between ALU instructions).** An instruction in EX
may need a register that one of the two instructions ahead of it has not yet
written back. The forwarding unit compares the EX instruction's rs and rt
with the destinations in EX_MEM and MEM_WB:

- The nearer producer wins: EX_MEM's ALUOut first, then MEM_WB's write-back
  value.
- Both ALU operands, the store data and the branch zero test use the
  forwarded values.
- An instruction three ahead is covered by the register bank's write-through.

Dependent instructions therefore run back to back. The no-op `OR`
instructions in the example programs are harmless but no longer needed.

**Load-use stall.** A loaded word exists only after MEM. If the instruction
right after a LW reads the loaded register, there is a one-cycle stall:

- The PC and IF_ID hold.
- A bubble enters ID_EX.
- In the next cycle the word is forwarded from MEM_WB.

A load to R0 never stalls.

**Taken branches and jumps: squash.** The branch condition is computed in EX
and registered as EX_MEM `cond`. The redirect happens when the branch is in
MEM, which is where the block diagram takes the PC multiplexer's select and
target. By then three younger instructions have entered the pipeline:

- the one in EX is replaced by a bubble on its way into EX_MEM;
- ID_EX and IF_ID are flushed.

A bubble has its valid bit clear, so it writes neither the register bank nor
the data memory. A redirect overrides a stall or a halt in the same cycle,
because the instruction causing that stall or halt is one of the squashed
ones.

**Halt.** When HLT is decoded, fetching stops: the PC holds, and only bubbles
enter IF_ID. The older instructions drain. `halted_o` rises when HLT leaves WB
and stays high until reset. An HLT fetched behind a taken branch is squashed
like any other instruction.

**Timing.** Count cycles from the first clock edge after reset is released to
the edge after which `halted_o` is 1. The count is

    executed instructions (including HLT) + 4 + load-use stalls + 3 × taken branches/jumps

The end-to-end testbench checks this formula exactly for every program it
runs.

## Interface of `mips_pipeline`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | rising-edge clock, synchronous active-high reset |
| imem_we, imem_waddr, imem_wdata | in | 1/32/32 | write one instruction word (use while rst is high) |
| dmem_host_we/addr/wdata, dmem_host_rdata | in/out | 32 | host port of the data memory: preload data, read results at any time |
| dbg_reg_addr, dbg_reg_data | in/out | 5/32 | read any register |
| halted_o | out | 1 | HLT has completed |
| pc_o | out | 32 | current fetch address |
| ev_stall_o, ev_squash_o, ev_fwd_ex_mem_o, ev_fwd_mem_wb_o, ev_retire_o | out | 1 | one-cycle event pulses for performance counting |

Reset clears the PC (to word 0), the registers and the pipeline buffers, but
not the memories. The usual sequence is:

1. Hold rst high.
2. Load the program and data.
3. Release rst.
4. Wait for `halted_o`.
5. Read the results.

Parameters: `IMEM_DEPTH` and `DMEM_DEPTH`, both 1024 words by default. Only
the low log2(depth) address bits are used.

## Files

| file | content |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, instruction types, ALU commands, buffer structs |
| `rtl/mips_pipeline.sv` | top: the stages, operand and write-back multiplexers, halt flag |
| `rtl/fetch_unit.sv` | PC, +1 adder, next-PC multiplexer |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | the two memories |
| `rtl/pipe_reg.sv` | a pipeline buffer with hold and flush (used four times) |
| `rtl/control_unit.sv` | opcode decoder |
| `rtl/register_bank.sv` | 32 × 32 register file |
| `rtl/sign_extend.sv` | 16 → 32-bit sign extension |
| `rtl/alu.sv` | ALU |
| `rtl/branch_cond.sv` | the "=0" branch test |
| `rtl/forwarding_unit.sv`, `rtl/hazard_unit.sv` | hazard logic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/mips_tb_pkg.sv` | instruction encoders and an instruction-level reference model |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert --top-module tb_mips_pipeline \
  rtl/mips_pkg.sv tb/mips_tb_pkg.sv rtl/*.sv tb/tb_mips_pipeline.sv
./obj_dir/Vtb_mips_pipeline
```

For a unit testbench, give `rtl/mips_pkg.sv`, the module and `tb/tb_<module>.sv`.

`tb_mips_pipeline` runs at the default sizes and covers the following
programs:

- **Register-manipulation example.** The original machine code
  `2801000a 28020014 28030019 0ce73800 00222000 00832800 fc000000` must give
  R1 = 10, R2 = 20, R3 = 25, R4 = 30 and R5 = 55. It takes 11 cycles.
- **Factorial example.** The original machine code, with its no-ops, reads
  N = 7 from word 200 and must store 5040 at word 198. It takes 57 cycles.
  R2 must pass through exactly the partial products 1, 7, 42, 210, 840, 2520
  and 5040.
- **Factorial without no-ops.** N = 10. This version forces forwarding and a
  load-use stall.
- **Jump and branch test.** A jump, a taken BEQZ, a not-taken BEQZ, the
  shifts, NOR and XOR.
- **40 random programs.** These use forward branches and jumps.

Every program is also run on the instruction-level model in `mips_tb_pkg`.
All 32 registers, the first 256 data words and the cycle count must match
that model. The test fails if any hazard mechanism was never exercised.

## Where this RTL departs from the original description, and how far to trust it

- **Clocking.** The original simulations use two clock phases, with the
  register file written in one and read in the other. Here there is a single
  clock edge, and a write-through register file gives the same effect.
- **Hazard logic is this design's own.** This covers the forwarding paths,
  the load-use stall, the three-slot squash and the halt sequence. The
  original only names forwarding, stalling and write suppression on a hazard.
- **Instruction codes.** Codes for NOR, XOR, the three shifts and J were
  assigned here. SUB, AND and BEQZ use codes from the same opcode family, but
  the example programs do not exercise them.
- **Operations.** MUL is included because the factorial example needs it. The
  "I/O type" instructions that the original mentions are not implemented,
  because no definition of them exists to build from.
- **Additions.** The memory sizes, reset behaviour, host and debug ports and
  event outputs are additions of this design.
- **Verification.** Every module has a unit testbench. Each testbench has
  been shown to catch a deliberately broken version of its module. The
  processor as a whole is checked against the independent reference model on
  the programs listed above. There is no formal verification and no timing
  analysis. The ALU's single-cycle 32 × 32 multiplier is likely to set the
  clock period.
