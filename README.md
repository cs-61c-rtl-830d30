# A single-cycle and a five-stage pipelined MIPS-subset processor

This RTL builds the same small MIPS instruction set twice:

* **A single-cycle processor.** Each instruction is fetched, decoded, executed and
  written back in one clock cycle. The clock period must cover the slowest
  instruction.
* **A five-stage pipelined processor.** The same work is split into IF, ID, EX, MEM
  and WB, with a register between each pair of stages. Up to five instructions are
  in flight. Once the pipeline is full, one instruction completes every cycle, and
  the clock only has to cover the slowest stage.

Both processors are built from the same parts: a two-plane controller, a 32 × 32
register file, an extender, a three-function ALU, and instruction and data
memories. The top level, `cs61c_top`, places the two processors side by side. They
share only the clock and the reset.

## Instruction subset

| instr | format | op (31:26) | funct (5:0) | effect |
|-------|--------|-----------|-------------|--------|
| add   | R | 000000 | 100000 | R[rd] ← R[rs] + R[rt] |
| sub   | R | 000000 | 100010 | R[rd] ← R[rs] − R[rt] |
| ori   | I | 001101 | – | R[rt] ← R[rs] \| zero_ext(imm16) |
| lw    | I | 100011 | – | R[rt] ← MEM[R[rs] + sign_ext(imm16)] |
| sw    | I | 101011 | – | MEM[R[rs] + sign_ext(imm16)] ← R[rt] |
| beq   | I | 000100 | – | if R[rs] = R[rt]: PC ← PC+4 + (sign_ext(imm16) << 2) |
| j     | J | 000010 | – | PC ← {PC+4[31:28], target, 00} (single-cycle processor only) |

Fields: op 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0, imm16 15:0,
target 25:0. The encoding 0x00000000 is not in the subset. It decodes as an
instruction that does nothing, so it serves as the NOP. Register 0 always reads as
zero. Memory accesses move whole, aligned 32-bit words.

## Control: an AND plane and an OR plane (`controller`)

The controller is two layers of logic, `ctrl_and_plane` followed by `ctrl_or_plane`:

1. **AND plane.** Each instruction gets one line, which is the product term of its
   opcode bits; add and sub also include their funct bits.
2. **OR plane.** Each control signal is the OR of the instruction lines that
   assert it.

| signal | = | meaning |
|--------|---|---------|
| RegDst | add + sub | write rd (1) or rt (0) |
| ALUSrc | ori + lw + sw | ALU B input is the immediate (1) or busB (0) |
| MemtoReg | lw | write back memory data (1) or the ALU result (0) |
| RegWrite | add + sub + ori + lw | write the register file |
| MemWrite | sw | write data memory |
| nPCsel | beq | branch if Equal |
| Jump | jump | jump |
| ExtOp | lw + sw | sign-extend (1) or zero-extend (0) imm16 |
| ALUctr[0] | sub + beq | ALU code: 00 ADD, 01 SUB, 10 OR |
| ALUctr[1] | ori | |

Entries that a control table would mark "don't care" come out as 0 here. This has
one consequence: ExtOp is 0 for beq. Both processors therefore sign-extend the
branch offset in a separate path and never pass it through the extender. An opcode
outside the subset raises no line, so it does nothing. The controller also outputs
the decoded lines (`lines`) so they can be observed.

## Single-cycle datapath (`single_cycle_cpu`, `next_pc`)

* The PC addresses the instruction memory.
* rs and rt read busA and busB.
* The RegDst mux chooses the destination register.
* The extender produces the immediate.
* The ALUSrc mux chooses between busB and the immediate.
* The ALU result is both the write-back value and the data-memory address.
* busB is the data-memory write data.
* The MemtoReg mux chooses what goes onto busW.

`next_pc` contains the PC register, a +4 adder and a second adder. The second adder
adds PC+4 and the offset shifted left by two ("PC Ext"). A mux takes that branch
target when `nPCsel & Equal`. Equal is the ALU's Zero output, since beq makes the
ALU subtract. The jump path has priority over the branch path. The register file,
the data memory and the PC all update at the same rising edge. The memories read
combinationally, as a single-cycle design requires.

## Pipelined datapath (`pipelined_cpu`, `pipe_reg`)

Each pipeline register is a `pipe_reg` that holds a packed struct (`cpu_pkg`):

| register | holds |
|----------|-------|
| IF/ID  | PC+4, instruction |
| ID/EX  | RegWrite, MemtoReg, MemWrite, Branch, ALUSrc, ALUctr; PC+4; read data 1 and 2; extended immediate; destination register number |
| EX/MEM | RegWrite, MemtoReg, MemWrite, Branch; Zero; branch target; ALU result; store data; destination register number |
| MEM/WB | RegWrite, MemtoReg; memory read data; ALU result; destination register number |

What each stage does:

* **IF** fetches the instruction and forms PC+4.
* **ID** decodes the instruction, reads the registers and extends the immediate. It
  also picks the destination register number, rd or rt.
* **EX** runs the ALU. A separate adder computes PC+4 + (offset << 2).
* **MEM** accesses the data memory. If the instruction is a beq and Zero is set,
  MEM drives `branch_taken` (PCSrc), and the PC loads the branch target at the next
  edge.
* **WB** writes the memory data or the ALU result to the register number that
  travelled down the pipeline with the instruction.

Two points need care:

* **The destination register number travels with the instruction.** The register
  file is written with the number held in MEM/WB, not with the rt/rd field of the
  instruction in ID. Using the ID field would write a load's result into a register
  named by a different instruction.
* **The register file writes before it reads.** When WB writes a register that ID
  reads in the same cycle, ID gets the new value (`regfile` with
  `WRITE_FIRST=1`). On real hardware this corresponds to writing in the first half
  of the cycle and reading in the second half. In this RTL it is a bypass from the
  write port to the read ports. The single-cycle processor uses `WRITE_FIRST=0`,
  because there busW depends on busA through the ALU, and the bypass would close a
  combinational loop.

### What the pipeline does not do

The pipeline has no hazard logic: no forwarding, no stalls and no flushes. Software
has to follow two rules:

* **Data.** An instruction may use a register written by an instruction at least
  three slots before it. It may not use one written by either of the two
  instructions just before it. Because of write-before-read, a distance of exactly
  three is allowed. `lw` follows the same rule: its value is available three slots
  later.
* **Branches.** A beq is resolved in MEM. The three instructions fetched after it
  therefore always execute, whether or not the branch is taken. Put NOPs or useful
  independent work there.

`j` is not implemented in the pipeline. It decodes but does nothing, because there
is no jump path in this datapath.

### Timing

* An instruction fetched in cycle *c* writes memory in cycle *c*+3 and writes its
  register in cycle *c*+4. The latency is five cycles.
* After the first four cycles, one instruction completes per cycle.
* A taken beq fetched in cycle *c* redirects the fetch in cycle *c*+4.

Take stage delays of 200 ps for fetch, ALU and memory, and 100 ps for a register
read or write. A single-cycle lw then needs 800 ps. Five pipeline stages, each
padded to the slowest stage, need a 200 ps cycle. The throughput gain is 4×, not 5×,
because the stages are unbalanced, and the latency of one instruction does not
improve. With a 30 ps clock-to-Q delay and a 20 ps setup time, the pipelined cycle
becomes 250 ps, or 4 GHz.

## Sizes and parameters

| parameter | default | where |
|-----------|---------|-------|
| `IMEM_AW`, `DMEM_AW` | 8 (256 words = 1 KiB each) | processors, top |
| `regfile` `NREGS`/`WIDTH` | 32 / 32 | |
| `regfile` `WRITE_FIRST` | 0 (set to 1 by the pipeline) | |
| `next_pc` `RESET_PC` | 0 | |

Reset is synchronous and active high. It sets the PC to 0, fills the pipeline
registers with bubbles (all zero), and clears the register file and the data
memory. The instruction memory is not cleared. It is loaded through
`imem_load_en/addr/data`, one word per clock, while `rst` is held.

## Where this design fills gaps or departs

The following are choices of this RTL where the usual description of these two
processors is silent or inconsistent:

* The memory sizes, the combinational memory reads and the instruction-memory load
  port.
* Register 0 reading as zero, and reset clearing all state.
* The jump target rule, the MIPS J-type rule, in the single-cycle processor.
* sw stores R[rt] (busB), as the datapath wiring implies.
* ori performs a bitwise OR, as its ALU control says.
* The branch target is PC+4 + (offset << 2), as the next-PC adders are wired.
* For the pipeline:
  * Control signals travel in the pipeline registers.
  * The RegDst choice is made in ID.
  * ExtOp applies to the ALU immediate, which ori needs. The branch offset is
    always sign-extended.
  * No hazard handling and no jump.
* The ALU treats the unused code 11 as OR.

The input and output units of a complete computer are not part of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/cpu_pkg.sv` | opcodes, ALU codes, control struct, instruction and pipeline-register structs |
| `rtl/controller.sv`, `rtl/ctrl_and_plane.sv`, `rtl/ctrl_or_plane.sv` | main control and its two planes |
| `rtl/alu.sv`, `rtl/extender.sv`, `rtl/regfile.sv` | datapath units |
| `rtl/instruction_memory.sv`, `rtl/data_memory.sv` | memories |
| `rtl/next_pc.sv` | single-cycle PC and next-PC logic |
| `rtl/pipe_reg.sv` | pipeline register |
| `rtl/single_cycle_cpu.sv`, `rtl/pipelined_cpu.sv` | the two processors |
| `rtl/cs61c_top.sv` | both processors side by side |
| `tb/mips_tb_pkg.sv` | instruction encoder, reference model, program generators, workload programs |
| `tb/sc_checker.sv`, `tb/pl_checker.sv` | cycle-by-cycle checkers for each processor |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The leaf testbenches check the
ALU, extender, register file, memories, pipeline register, controller and next-PC
unit against values the testbench computes itself. The controller testbench covers
every opcode and funct combination against the control table.

The processor testbenches run programs and compare every cycle with an
instruction-set model (`mips_tb_pkg::mips_model`):

* For the **single-cycle processor**, the model executes one instruction per cycle.
  The checker compares the PC, the fetched word and every register and memory
  write.
* For the **pipeline**, the checker replays the fetch stream on the model. It
  checks memory writes and branch decisions against the instruction fetched three
  cycles earlier, register writes against the one fetched four cycles earlier, and
  every fetch address.

The programs are:

* a directed program with taken and untaken branches, a loop, a jump (single-cycle
  only) and negative offsets;
* the array-element swap (`lw, lw, sw, sw`);
* three independent loads from byte addresses 100, 200 and 300;
* random programs.

For programs without branches, `cs61c_top_tb` runs both processors on the same
code. It checks that their sequences of architectural writes are identical. It also
checks the cycle counts (for example, the nine-instruction load program makes its
last register write in cycle 12 on the pipeline and reaches its halt loop in cycle 9
on the single-cycle processor) and counts every mechanism: each instruction kind, taken and untaken
branches, full-pipeline cycles, and same-cycle write/read.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module cs61c_top_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cpu_pkg.sv tb/mips_tb_pkg.sv tb/cs61c_top_tb.sv
./obj_dir/Vcs61c_top_tb
```

For another testbench, change the top module and the file name. Leaf testbenches
need only `rtl/cpu_pkg.sv` and their own file (with `-y rtl`). `cs61c_top_tb` runs the design at
its default sizes in a few seconds.

To write a program, use the encoder functions in `mips_tb_pkg` (`i_add`, `i_lw`,
`i_beq`, …) and call `to_image` to build the memory image. For the pipeline,
`pad_hazards` inserts the NOPs that a branch-free program needs.
