# RV32M single-cycle processor

A 32-bit RISC-V processor that runs the base integer instructions and the
M extension (multiply, divide, remainder), with every instruction fetched,
decoded, executed and written back in a single clock cycle. There is no
pipeline, so there are no hazards, stalls or forwarding paths: the PC, the
register file and the data memory all update on the same rising edge, and
everything between two edges is one combinational path. The result is easy
to follow and to extend, and a good base for a later pipelined version. The
price is a long clock period: the critical path runs through a combinational
32-bit divider.

Instruction and data memories are separate (Harvard organisation). Data
memory is reached only through loads and stores.

## One clock cycle, step by step

```
 PC ──► instruction ROM ──► decoder ──► control unit ──► ALU control
  ▲                            │             │                │
  │                     immediate gen.   control signals      │ op code
  │                            │             │                ▼
  │      register file ──rs1──►[A mux: rs1 | PC | 0]───► ALU ──► result / flags
  │          ▲       ──rs2──►[B mux: rs2 | imm]──────►  │
  │          │                                          ├──► data memory address
  │          │                               rs2 ───────┼──► data memory write data
  │          └──[WB mux: ALU | memory | PC+4]◄──────────┘
  │
  └──[PC mux: PC+4 | PC+imm | (rs1+imm)&~1]◄── next-PC logic (branch flags)
```

1. **Fetch.** `program_counter` holds the PC; `instruction_memory` returns
   the word at `PC[9:2]` combinationally.
2. **Decode.** `instruction_decoder` cuts out opcode, rd, funct3, rs1, rs2,
   funct7 and works out the format (R, I, S, B, U, J).
   `immediate_generator` assembles the sign-extended immediate of that
   format. `control_unit` turns the opcode into the control signals, and
   `register_file` reads rs1 and rs2.
3. **Execute.** The A multiplexer picks rs1, the PC (auipc) or zero (lui).
   The B multiplexer (ALUSrc) picks rs2 or the immediate. `alu_control`
   maps ALUOp, funct7 and funct3 to an operation code, and `alu` computes it.
   The ALU also compares its operands and reports three flags: zero,
   signed less-than and unsigned less-than.
4. **Memory.** For lw/sw the ALU result is the byte address. A store
   writes rs2 at the clock edge. A load's data appears in the same cycle.
5. **Write-back and next PC.** The write-back multiplexer picks the ALU
   result, the loaded word (MemtoReg) or PC+4 (jal/jalr). `next_pc_logic`
   picks the next PC:
   - PC+4;
   - PC+immediate, for a taken branch or jal;
   - the ALU result with bit 0 cleared, for jalr.

   All state changes at the rising edge.

## Control

### Main control (`control_unit`)

| instruction | RegWrite | ALUSrc | MemRead | MemWrite | MemtoReg | Branch | Jump | ALUOp | A operand |
|---|---|---|---|---|---|---|---|---|---|
| R-type (incl. M) | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 10 | rs1 |
| I-type ALU       | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 11 | rs1 |
| lw               | 1 | 1 | 1 | 0 | 1 | 0 | 0 | 00 | rs1 |
| sw               | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 00 | rs1 |
| branches         | 0 | 0 | 0 | 0 | 0 | 1 | 0 | 01 | rs1 |
| jal              | 1 | 0 | 0 | 0 | 0 | 0 | 1 | 00 | rs1 |
| jalr             | 1 | 1 | 0 | 0 | 0 | 0 | 1 (+jalr) | 00 | rs1 |
| lui              | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 00 | zero |
| auipc            | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 00 | PC |

RegWrite, ALUSrc, MemRead, MemWrite, MemtoReg, Branch and ALUOp 00/01/10
follow the control-signal definitions of the source design. The following
are additions of this implementation, for instructions those signals do not
cover:

- ALUOp 11 (immediate ALU instructions);
- the Jump and jalr signals;
- the operand-A select.

### ALU control (`alu_control`) and operation codes

The source design's ALU-control table uses a 4-bit code. Its eight values
are kept unchanged, as the low four bits of a 5-bit code:

| code | op | code | op | code | op |
|---|---|---|---|---|---|
| 00000 | add | 00110 | and | 01100 | slt |
| 00001 | sub | 00111 | or | 01101 | sltu |
| 00010 | mul | 01000 | xor | 01110 | mulhsu |
| 00011 | mulh | 01001 | sll | 01111 | mulhu |
| 00100 | div | 01010 | srl | 10000 | divu |
| 00101 | rem | 01011 | sra | 10001 | remu |

Add, sub, mul, div, rem, and, or and xor are the source design's codes. The others
are this design's choice, added because four bits cannot hold all 18
RV32I/RV32M operations. ALUOp selects how the code is found:

- 00 gives add, for addresses.
- 01 gives sub, for branch compares.
- 10 decodes funct7 and funct3. funct7 0000000 selects the base
  operations, 0100000 selects sub and sra, and 0000001 selects the M
  extension.
- 11 decodes funct3 only, except that the shift-immediate instructions also
  check funct7.

### M-extension corner cases

Multiply and divide are fully combinational. They finish in the same cycle
as every other instruction. Results follow the RISC-V specification:

- Division by zero gives a quotient of all ones. The remainder is the
  dividend.
- −2³¹ / −1 gives −2³¹, with remainder 0.
- mulh, mulhsu and mulhu return the upper 32 bits of the 64-bit product.
  mulh treats both operands as signed, mulhsu treats rs1 as signed and
  rs2 as unsigned, and mulhu treats both as unsigned.

## Supported instructions

- **Register–register:** add, sub, sll, slt, sltu, xor, srl, sra, or, and.
- **M extension:** mul, mulh, mulhsu, mulhu, div, divu, rem, remu.
- **Register–immediate:** addi, slti, sltiu, xori, ori, andi, slli, srli,
  srai.
- **Memory:** lw, sw (word accesses only).
- **Branches:** beq, bne, blt, bge, bltu, bgeu.
- **Jumps:** jal, jalr.
- **Upper immediate:** lui, auipc.

Branches compare rs1 − rs2 in the ALU. beq and bne use the zero flag; the
other four use the less-than flags.

Any other encoding raises `illegal_instr` and executes as a no-op: nothing
is written and the PC advances by 4. This covers byte and halfword loads
and stores, fence, ecall/ebreak, CSR instructions, and unused funct values.
There are no traps or exceptions.

## Memories, reset and timing

- **Instruction memory:** a ROM of `IMEM_DEPTH` = 256 words, read
  combinationally. With `IMEM_INIT_FILE` empty (the default) it holds a
  built-in demonstration program followed by NOPs, so the default design
  synthesises with real contents. A non-empty `IMEM_INIT_FILE` names a hex
  file (one word per line) that is loaded with `$readmemh` over a ROM of
  NOPs. The path is relative to the simulator's working directory.
- **Data memory:** `DMEM_DEPTH` = 256 words (1 KiB). It is written at the
  clock edge and read combinationally. Read data is 0 while MemRead is low.
  Contents start at zero.
- **Addressing:** in both memories, address bits [1:0] and the bits above
  the memory size are ignored. Accesses are word accesses and the address
  space wraps around.
- **Register file:** 32 × 32 bits, with two combinational read ports and
  one write port. x0 always reads zero.
- **Reset:** `rst` is synchronous and active-high. It sets the PC to 0 and
  clears all registers. It does not clear the data memory.
- **Rate:** one instruction per clock, with no exceptions. The clock
  period must cover the slowest path. That path runs from the PC through
  the ROM, decode and the register file, then through the divider and the
  data memory, to the write-back multiplexer.

The memory sizes, the combinational memory reads and the reset behaviour are
choices made for this implementation.

## Top-level ports (`rv32m_top`)

`clk` and `rst` are the only inputs. Every other port is an observation
output of the datapath, so a simulation can watch the processor without
hierarchical references:

- `pc_address`, `instruction`, `next_pc`;
- `operand_a` and `operand_b_mux` (the two ALU inputs), `alu_result`;
- `data_write` and `read_data` (data-memory write and read data);
- `write_data` (register write-back value);
- `mem_read`, `mem_write`, `reg_write`, `illegal_instr`.

## Files

| file | contents |
|---|---|
| `rtl/rv32m_pkg.sv` | opcodes, format/ALU/select enums, decoded-instruction and control structs |
| `rtl/rv32m_top.sv` | the processor |
| `rtl/program_counter.sv` | PC register |
| `rtl/next_pc_logic.sv` | PC+4 and branch adders, branch decision, PC multiplexer |
| `rtl/instruction_memory.sv` | instruction ROM |
| `rtl/instruction_decoder.sv` | field extraction and format classification |
| `rtl/immediate_generator.sv` | I/S/B/U/J immediates |
| `rtl/control_unit.sv` | main control |
| `rtl/alu_control.sv` | ALU operation decode |
| `rtl/register_file.sv` | 32 × 32 register file |
| `rtl/alu.sv` | ALU with multiply/divide |
| `rtl/data_memory.sv` | data RAM |
| `rtl/datapath_mux.sv` | N-input multiplexer used for the four datapath selections |

### The default program

The built-in program in `instruction_memory` sets x1 = 4 and x2 = 8. It
then runs the following on them, and ends in a jump to itself:

- add, sub, mulh, mul, div and rem;
- a store and a load;
- and, or and xor;
- sll, srl and sra.

## Simulating

Every testbench in `tb/` checks its own results. It prints one line,
`TB_RESULT checks=N failures=M`, and stops itself with a watchdog if it
hangs. Run from the repository root. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/rv32m_pkg.sv tb/tb_rv32m_top.sv -y rtl --top-module tb_rv32m_top
./obj_dir/Vtb_rv32m_top
```

Replace `tb_rv32m_top` with the name of any other testbench.

- **`tb_rv32m_top`** is the end-to-end test. It runs at the default
  parameters and takes a few seconds. It generates 40 random programs of
  240 instructions each and writes each one into the ROM through a
  hierarchical reference. It runs them against a reference instruction-set
  model kept in the testbench. Before every clock edge it compares the PC,
  next PC, register write and memory access with the model, and after each
  program it compares all registers and the whole data memory. It counts
  how often each mechanism happened, and fails if one never did:
  - taken and not-taken branches;
  - jal and jalr;
  - loads and stores;
  - multiplies and divides, including division by zero;
  - writes to x0;
  - unsupported encodings;
  - lui and auipc;
  - immediate ALU operations and shifts.
- **`tb_rv32m_demo`** runs the default program. It checks one instruction
  per cycle, every write-back value, and that the store and the load are
  the only memory accesses.
- **`tb_<module>`** is the unit test of each module. Results are compared
  with models written independently in the testbench, or with exhaustive
  tables.

## Relation to the source design

This RTL implements the single-cycle RV32M processor described in "Design
and Implementation of RISC-V 32M Using Verilog HDL". The following are
taken from that description:

- the block structure: PC, instruction ROM, decoder, control unit,
  32 × 32 register file with x0 tied to zero, immediate generator, ALU,
  data memory, and the operand and write-back multiplexers;
- the one-instruction-per-cycle timing;
- the control signals RegWrite, ALUSrc, PCSrc, MemRead, MemWrite and
  MemtoReg;
- ALUOp 00/01/10 and the ALU codes for add, sub, mul, div, rem, and, or
  and xor;
- the instruction formats;
- the demonstration program and the names of the observation ports.

The source names only add, sub, mul, div, rem, and, or, xor, load/store,
beq, "branch/jump" and "shifting operations". It does not describe
anything beyond that. The following are this implementation's own choices:

- the remaining RV32I ALU, branch, jump and upper-immediate instructions,
  and the other M operations;
- the 5-bit operation code;
- the operand-A select;
- the jalr path in the PC multiplexer;
- the handling of unsupported encodings;
- the memory sizes and word-only accesses;
- the combinational memory reads;
- the reset behaviour;
- the division-by-zero results, which follow the RISC-V specification.

The load/store rows of the source's ALU-control table name the doubleword
instructions ld/sd. On this 32-bit processor they are implemented as lw/sw.

## What to watch when changing it

- Adding an ALU operation needs changes in three places: a code in
  `alu_ctrl_e` (package), a decode in `alu_control`, and a case in `alu`.
  The 5-bit code has 14 free values.
- Byte and halfword loads and stores would need byte enables in
  `data_memory` and load extension on the write-back path. At present
  `control_unit` rejects any load or store whose funct3 is not 010.
- Moving to a pipeline means cutting the datapath after fetch, decode,
  execute and memory. The decoded fields (`decoded_t`) and the control
  bundle (`ctrl_t`) are already structs, so they can be registered as a
  unit.
