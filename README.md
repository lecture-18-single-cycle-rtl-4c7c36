# Single-cycle processor for a seven-instruction MIPS subset

This is a processor that runs each instruction in exactly one clock cycle. It
supports `add`, `sub`, `ori`, `lw`, `sw`, `beq` and `j`. In one cycle it fetches
the instruction, decodes it, reads registers, computes in the ALU, accesses data
memory and writes back. The PC, the destination register and, for a store, the
data memory all change together at the next rising clock edge.

Everything except the state elements is combinational. So the design is mostly
about *control*: the value each control point must take for each instruction,
and how the next PC is chosen. The datapath is fixed. A decoder (`main_control`)
turns the 6-bit opcode and function code into nine control signals, and those
signals steer the multiplexers, the extender, the ALU and the write enables.

## Instruction set

| Instr. | Format | op (31:26) | funct (5:0) | Effect |
|---|---|---|---|---|
| add rd, rs, rt | R | 000000 | 100000 | R[rd] = R[rs] + R[rt] |
| sub rd, rs, rt | R | 000000 | 100010 | R[rd] = R[rs] - R[rt] |
| ori rt, rs, imm | I | 001101 | – | R[rt] = R[rs] OR ZeroExt(imm16) |
| lw rt, imm(rs) | I | 100011 | – | R[rt] = MEM[R[rs] + SignExt(imm16)] |
| sw rt, imm(rs) | I | 101011 | – | MEM[R[rs] + SignExt(imm16)] = R[rt] |
| beq rs, rt, imm | I | 000100 | – | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4 |
| j target | J | 000010 | – | PC = {PC[31:28], target, 00} |

All other instructions go to PC + 4 and change nothing else.

Field positions:

- R-type: op 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0.
- I-type: op, rs, rt, then imm16 in 15:0.
- J-type: op, then a 26-bit target in 25:0.

Arithmetic wraps modulo 2^32. There are no overflow traps and no exceptions of
any kind.

## Control: the heart of the design

`main_control` is a pure truth table. Entries shown as `-` are don't-cares. In
this RTL every don't-care is 0, which means zero-extension for ExtOp and add
for ALUctr.

|            | add | sub | ori | lw | sw | beq | j |
|---|---|---|---|---|---|---|---|
| RegDst (1 = rd, 0 = rt) | 1 | 1 | 0 | 0 | - | - | - |
| ALUSrc (1 = immediate, 0 = busB) | 0 | 0 | 1 | 1 | 1 | 0 | - |
| MemtoReg (1 = memory, 0 = ALU) | 0 | 0 | 0 | 1 | - | - | - |
| RegWr | 1 | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWr | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| nPC_sel (branch) | 0 | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump | 0 | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp | - | - | zero | sign | sign | - | - |
| ALUctr | add | sub | or | add | add | sub | - |

Some patterns worth noticing:

- Only `add` and `sub` write `rd`. Every I-type instruction that writes a
  register writes `rt`. That is the reason for the RegDst multiplexer.
- `ori` must zero-extend. `lw` and `sw` must sign-extend, so that negative
  offsets work. A single ExtOp bit covers both cases.
- A don't-care is safe wherever nothing is written. For `sw`, `beq` and `j`,
  RegDst and MemtoReg do not matter because RegWr is 0.

The ALUctr binary codes are a choice of this design, because the instruction
set does not fix them: add = `010`, sub = `110`, or = `001` (`cpu_pkg::alu_ctr_e`).
All control points travel together as the packed struct `cpu_pkg::ctrl_t`.

## Choosing the next PC

This is the part that takes the most care. The PC register holds only bits
31:2. The two low bits are always `00`, so every instruction address is word
aligned. In each cycle `ifu` builds three candidate next PCs:

1. **PC + 4**, from a dedicated adder. The main ALU is busy with the
   instruction itself, so it cannot be used for this.
2. **Branch target**, PC + 4 + {SignExt(imm16), 00}. A second adder adds the
   shifted, sign-extended offset to the PC + 4 value.
3. **Jump target**, {PC[31:28], target, 00}. The top four bits come from the
   current PC, so a jump stays inside the current 256 MB region.

The control does not drive the branch multiplexer directly. Instead it emits
"this is a branch" (`nPC_sel`), and the select is formed from that signal and
the ALU's `Zero` flag. For `beq` the ALU computes R[rs] − R[rt], so Zero = 1
exactly when the two registers are equal:

| nPC_sel | Zero | branch mux select |
|---|---|---|
| 0 | - | 0 (PC + 4) |
| 1 | 0 | 0 (PC + 4) |
| 1 | 1 | 1 (branch target) |

The RTL implements this table as `nPC_sel & Zero`. After the branch mux comes a
second multiplexer, steered by `Jump`. When Jump is 1 it replaces the result
with the jump target. For a `j` the ALU still computes something, and Zero may
be 1. That does not matter: the jump multiplexer wins, and nPC_sel is 0 anyway.

## Datapath

`datapath` holds the register file, the extender, the ALU, the data memory and
three 2-to-1 multiplexers. It works like this:

- `Rw = RegDst ? rd : rt`. The register file reads `busA = R[rs]` and `busB = R[rt]`.
- The ALU's second operand is `ALUSrc ? Ext(imm16) : busB`.
- The ALU result goes to the data memory address and to the write-back multiplexer.
- `busB` is the store data ("Data In").
- `busW = MemtoReg ? DataOut : ALUresult` is written into `Rw` when RegWr is 1.

The register file has 32 registers of 32 bits. It has two combinational read
ports and one write port that is written at the clock edge. Register 0 always
reads as 0 and ignores writes, as in the MIPS instruction set.

## Timing

There is one clock and one rising edge per instruction, so CPI is 1. The clock
period must cover the slowest instruction, which is a load. Its path is:

1. PC clock-to-output
2. instruction memory access
3. register file read
4. 32-bit add in the ALU
5. data memory read
6. register file setup time

Every other instruction uses a subset of this path. Both memories are "ideal":
reads are combinational and writes happen at the clock edge. This suits
simulation and small register-array memories. A synchronous SRAM would need
its read to be moved to the previous edge, and that would no longer be a
single-cycle design.

No timing numbers are built in or checked.

## Interface of `single_cycle_cpu`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst | in | 1 | synchronous reset: PC = 0 |
| imem_we, imem_waddr, imem_wdata | in | 1, 32, 32 | program-load port of the instruction memory (byte address, word data) |
| pc, instr | out | 32, 32 | current PC and the instruction being executed |
| reg_we, reg_waddr, reg_wdata | out | 1, 5, 32 | this cycle's register write (RegWr, Rw, busW) |
| mem_we, mem_addr, mem_wdata | out | 1, 32, 32 | this cycle's data-memory write (MemWr, address, data) |

Parameters `IMEM_WORDS` and `DMEM_WORDS` set the memory sizes. Both default to
256 words and must be powers of two. Addresses wrap at the memory size, and
address bits 1:0 are ignored.

To use the processor:

1. Hold `rst` high.
2. Write the program word by word through the load port.
3. Release `rst`. Execution starts at address 0.

Registers and data memory are not reset. A program must write a location
before it reads it.

## Origin, and where this RTL departs from it

The design follows the single-cycle processor of the Berkeley CS61C lecture
"Single Cycle CPU Control" (Fall 2005). The RTL takes these from the lecture:

- the instruction subset and its encodings;
- the control table, including its don't-cares;
- the names of the control points;
- the next-PC structure: the PC + 4 adder, the branch adder, the branch mux
  driven by the nPC_sel/Zero table, the jump mux, and the PC with fixed `00`
  bits;
- the datapath wiring.

In a few places the lecture's one-line summaries disagree with its detailed
slides. The RTL follows the detailed slides and drawings each time:

- **Stores.** One summary says a store writes R[rs]. The RTL stores R[rt],
  and busB drives the memory's data input.
- **ori.** One summary says `ori` adds. The RTL ORs, as ALUctr = or implies.
- **beq.** One summary adds the branch offset to PC. The RTL adds it to PC + 4.
- **Field labels.** Some drawings pair the field label rt with bits 25:21.
  The RTL uses the instruction-format table: rs is 25:21 and rt is 20:16.

The lecture leaves open which gate turns nPC_sel and Zero into the mux select.
Here it is an AND, which satisfies the lecture's truth table.

## Choices made here that the lecture leaves open

- Memory sizes (256 words each), the program-load port, and the observation outputs.
- A synchronous reset to PC = 0. Registers and memories are not cleared.
- The ALUctr encoding, the don't-cares set to 0, and unknown opcodes treated as no-ops.
- Register 0 hard-wired to zero.
- The rising clock edge is used throughout.
- An assertion in `main_control` checks one rule: at most one of RegWr,
  MemWr, nPC_sel and Jump is set for any instruction.

## Files

| File | Contents |
|---|---|
| `rtl/cpu_pkg.sv` | opcodes, funct codes, ALUctr and ExtOp enums, `ctrl_t`, field helpers |
| `rtl/single_cycle_cpu.sv` | top: `ifu` + `main_control` + `datapath` |
| `rtl/ifu.sv` | PC register, PC + 4 and branch adders, branch and jump muxes, instruction memory |
| `rtl/inst_mem.sv` | instruction memory with load port |
| `rtl/main_control.sv` | the control truth table |
| `rtl/datapath.sv` | RegDst/ALUSrc/MemtoReg muxes around the blocks below |
| `rtl/regfile.sv`, `rtl/extender.sv`, `rtl/alu.sv`, `rtl/data_mem.sv` | datapath blocks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test:

```
verilator --binary --timing -y rtl -Irtl rtl/cpu_pkg.sv \
  tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu -o sim
./obj_dir/sim
```

Replace `tb_single_cycle_cpu` with any other testbench to run it.

## What the tests cover

- **End to end** (`tb_single_cycle_cpu`, default sizes).
  - *Program.* The testbench generates a program. It gives every register a
    value with `ori` and fills a window of data memory with `sw`. A directed
    stretch follows: a write to register 0, a negative-offset store/load pair,
    an untaken and a taken `beq`, and a `j`. Then about 170 random
    instructions run, with forward branches and jumps only, ending in a `j .`.
  - *Reference model.* An instruction-level model runs the same program.
    Every cycle the testbench compares PC, instruction, register write and
    memory write against the model, so it also checks that one instruction
    retires per clock.
  - *Coverage.* It counts each instruction kind, taken and untaken branches,
    jumps, negative sign-extended offsets, `ori` with imm16[15] = 1 and
    ignored writes to register 0. It fails if any count is zero.
- **Per block.** Each block has its own testbench: the decoder against the
  table above, including unknown codes; the ALU and extender against reference
  arithmetic; the fetch unit under random nPC_sel/Zero/Jump with a reference
  PC; the datapath against shadow registers and memory; and the register file
  and both memories against shadow arrays.

## Limits

- Only the seven instructions above are supported. Anything else is a no-op.
- There are no byte or halfword accesses, no interrupts, exceptions or
  overflow detection, and no I/O devices.
- Misaligned addresses are silently truncated to word addresses.
