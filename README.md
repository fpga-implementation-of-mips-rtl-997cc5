# 8-bit four-stage pipelined RISC processor

A small MIPS-style processor: 8-bit data, 24-bit instructions, eight 8-bit registers,
a 256-word code memory and a 256-byte data RAM. Instructions flow through four
pipeline stages: fetch, decode/operand fetch, execute and write back. One instruction
enters the pipeline per clock. Dependencies between neighbouring instructions are
resolved by forwarding and a write-through register file, never by stalling. Branches are
decided in decode and redirect the fetch of the same cycle, so a taken branch costs
nothing. In the spirit of the original MIPS ("without interlocked pipeline stages"), the
single hazard the hardware leaves open is a software rule (see *Hazards*).

The design follows a published description of an FPGA prototype of this processor on a
Xilinx Virtex-5 board. The block structure, widths, memory sizes, instruction format and
the opcodes of ADD, SUB, MUL and load-immediate come from that description. The rest of
the instruction set, the control encoding and the memory timing are this design's own.
*Departures* lists where this RTL had to choose.

## Instruction format

```
 23        16 15  13 12  10 9  8 7          0
+------------+------+------+----+------------+
|   opcode   |  rA  |  rB  | -- |  addr/imm  |
+------------+------+------+----+------------+
```

`rA` is the first source and also the destination. The address field is 10 bits wide,
but only its low 8 bits are used; bits 9:8 are reserved. PC, code memory and data RAM all
have 256 entries.

| opcode | mnemonic | effect | flags |
|---|---|---|---|
| 00 | NOP | none | - |
| 01 | ADD rA,rB | rA = rA + rB | Z C N |
| 05 | SUB rA,rB | rA = rA - rB | Z C N (C = borrow) |
| 09 | MUL rA,rB | rA = low byte of rA * rB | Z C N (C = high byte non-zero) |
| 0D | AND rA,rB | rA = rA & rB | Z N, C = 0 |
| 15 | OR rA,rB | rA = rA \| rB | Z N, C = 0 |
| 19 | XOR rA,rB | rA = rA ^ rB | Z N, C = 0 |
| 1D | NOT rA | rA = ~rA | Z N, C = 0 |
| 21 | SHL rA | rA = rA << 1 | C = old bit 7 |
| 25 | SHR rA | rA = rA >> 1 | C = old bit 0 |
| 29 | MOV rA,rB | rA = rB | - |
| 2D | CMP rA,rB | flags of rA - rB | Z C N |
| 31 | ADDI rA,imm | rA = rA + imm | Z C N |
| 11 | LDI rA,imm | rA = imm | - |
| 02 | LD rA,[addr] | rA = RAM[addr] | - |
| 06 | ST rA,[addr] | RAM[addr] = rA | - |
| 03 | JMP addr | PC = addr | - |
| 07 / 0B | JZ / JNZ addr | branch if Z / not Z | - |
| 0F / 13 | JC / JNC addr | branch if C / not C | - |
| 17 | JN addr | branch if N | - |

Only ADD, SUB, MUL and LDI (and NOP as all zeros) come from the source. The other codes
follow the same pattern: bits 1:0 give the class (01 ALU, 10 memory, 11 branch) and bits
7:2 the operation. Any unlisted opcode executes as a NOP. The PSW is `{N, C, Z}`.

## The pipeline, cycle by cycle

```
          edge n          n+1              n+2              n+3
 fetch    Stage I <= IM[fetch address]
 decode                   decode, read regs,
                          Stage II <= ...
 execute                                   ALU, RAM, PSW;
                                           Stage III <= ...
 write                                                      register file
 back                                                       written
```

* **Fetch** (`mips_fetch`, `mips_imem`): the fetch address is the branch target if the
  decoder reports a taken branch, and the PC otherwise. It reads the code memory
  combinationally. On the clock edge the word is loaded into the Stage-I instruction
  register and the PC becomes fetch address + 1.
* **Decode** (`mips_decode` = `mips_control` + `mips_regfile`): splits the instruction,
  reads rA and rB, and replaces rB with the immediate for LDI/ADDI. It decides branches
  from the PSW. Everything the later stages need goes into the 47-bit Stage-II register:
  the 20-bit control word, both operands, the address and the destination.
* **Execute** (`mips_execute` = muxes + `mips_alu` + `mips_psw` + `mips_dmem`): there are
  four multiplexers. Two forward the write-back value into A or B. One selects the RAM
  word as B for a load. One sets the carry-in to 1 for subtract/compare. The ALU's 12-bit
  control word holds a one-hot operation, an invert-B bit and a flag-update bit. On the
  edge, stores write the RAM and flag-setting instructions write the PSW.
* **Write back** (`mips_writeback`): the 12-bit Stage-III register holds write enable,
  destination and result. It drives the register file's write port.

So an instruction loaded into Stage I at edge *n* shows its result on `alu_out` after
edge *n*+1. The result is in the register file after edge *n*+3. With the power-up program,
the five instructions are complete eight edges after reset is released. In steady state
the pipeline completes one instruction per clock.

## Hazards

No stage ever stalls. Each case is covered as follows.

* **Result used by the next instruction.** When an instruction is decoded, the decoder
  compares its source registers with the destination of the instruction in Stage II. On
  a match it sets `fwd_a`/`fwd_b`. One cycle later that older result sits in Stage III,
  and the execute stage's forward multiplexers take it from there. This covers loads
  too: a load reads the RAM in execute, so its value is forwarded like any ALU result.
* **Result used two instructions later.** That result is being written to the register
  file in the same cycle the consumer reads it. The register file returns the value being
  written (write-through).
* **Branches.** A branch is decided while it sits in Stage I. The fetch of that same
  cycle already uses the target, so nothing has to be cancelled and no cycle is lost.
* **Flags (the software rule).** Conditional branches test the *stored* PSW. An
  instruction's flags reach the PSW at the end of its execute cycle, and that is the
  same cycle in which the instruction right after it is decoded. **A conditional branch
  must therefore not immediately follow the instruction whose flags it tests.** Put one
  other instruction (a NOP, or anything that leaves the flags alone) between them. The
  hardware does not detect a violation. The branch then simply sees the older flags.
* **Store then load** of the same address in consecutive instructions works. The store
  writes the RAM at the end of its execute cycle, before the load reads it.

## Files

| file | content |
|---|---|
| `rtl/mips_pkg.sv` | widths, opcodes, instruction/PSW/control/stage structs, demo program |
| `rtl/mips_top.sv` | the processor |
| `rtl/mips_fetch.sv` | PC, incrementer, next-address mux, Stage I |
| `rtl/mips_imem.sv` | 256 x 24 code memory (power-up program plus load port) |
| `rtl/mips_decode.sv` | decode stage, immediate mux, Stage II |
| `rtl/mips_control.sv` | instruction decoder / control unit |
| `rtl/mips_regfile.sv` | 8 x 8 register file, 2 read + 1 write, write-through |
| `rtl/mips_execute.sv` | execute stage muxes, ALU, PSW, data RAM |
| `rtl/mips_alu.sv` | ALU |
| `rtl/mips_psw.sv` | 3-bit PSW register |
| `rtl/mips_dmem.sv` | 256 x 8 data RAM |
| `rtl/mips_writeback.sv` | 12-bit Stage III |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports: `clk`, and `rst` (synchronous, active high: clears PC, the stage
registers, PSW and all registers). `prog_we/prog_addr/prog_data` write the code memory.
The outputs are for observation only: `pc`, `instr` (Stage I), `alu_out`, `psw`, `regs`
(all eight registers), and `wb_we/wb_dest/wb_data`. The code memory powers up holding the
demonstration program: `LDI R1,5; LDI R2,6; ADD R1,R2; SUB R1,R2; MUL R1,R2`, then NOPs.
`alu_out` then shows 05, 06, 0B, 05, 1E, and R1 ends at 1E.

The data RAM and code memory use initial values and have no reset. Code memory
contents can be changed only through the load port, and only while the processor is held
in reset if the result is to be predictable.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. A watchdog
ends it with a failure if it hangs. To run the end-to-end test:

```
verilator --binary --timing -y rtl +libext+.sv rtl/mips_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

Replace `mips_top` with any other module name to run that module's testbench.
`tb_mips_top` uses the processor at its default size and runs in well under a second.
It has three parts:

1. the power-up program, with `alu_out`, R1 and R2 checked at every edge;
2. a loop that multiplies 5 x 6 by repeated addition, with a backward conditional
   branch, then store, load, logic, shift, compare and a taken forward branch;
3. forty random 64-instruction programs with forward branches.

Parts 2 and 3 are checked against an instruction-at-a-time reference model in the
testbench. The check covers the exact order of register writes, the final registers, the
PSW and the whole data RAM. The testbench also counts A-forwarding, B-forwarding,
write-through, taken and not-taken branches, loads, stores and flag updates. It fails if
any of them never occurred.

A generic synthesis of `mips_top` gives 60 flip-flop bits plus 8,256 memory bits
(code memory 6,144, data RAM 2,048, register file 64).

## Departures and open points

* **Branch resolution.** Here branches are resolved in decode from the stored PSW, as the
  block diagram draws the PSW feeding the decoder. The source text also says the execute
  unit computes the branch target. Resolving in decode gives zero-penalty branches, but
  it also creates the flag rule above.
* **Store timing.** Stores write the data RAM in execute. The source places the data
  memory in the execution unit, but it also sketches a write-back path into the memory.
  There is no write-back multiplexer: the memory-or-ALU choice is made by the RAM-data
  operand multiplexer in execute.
* **Addressing.** Loads and stores use only the 8-bit address field of the instruction
  (direct addressing). The source also says the ALU result can address the data memory.
  Register-indirect addressing is not built, because no instruction for it is described.
* **Program counter width.** The PC is 8 bits, matching the 256-word code memory and the
  8-bit PC path in the block diagrams. The source also mentions a 10-bit address bus and
  a 10-bit PC adder. The two spare address bits are reserved.
* **Clocking.** One clock and one edge are used throughout. The prototype's schematic
  contains an inverted clock. Its role is taken here by the write-through register file.
* **Control word.** The prototype's decoder drives a 48-bit control bundle whose bit
  meanings are not given. This decoder drives a 20-bit control word of its own design.
  The widths of the ALU control (12 bits), Stage II (47 bits) and Stage III (12 bits) do
  match the prototype.
* **Not built.** These are not part of this RTL:
  * the external 8-bit bidirectional data bus (named but not described);
  * the FPGA board I/O;
  * the single-cycle variant of the processor, which was the baseline the pipeline was
    compared with.
* **Not comparable.** The prototype's reported figures (about 419 LUTs, 397 registers,
  1 block RAM and 100 MHz on Virtex-5) depend on vendor tools and were not reproduced.
