// single_cycle_cpu: a single-cycle processor for the MIPS subset
// add, sub, ori, lw, sw, beq and j.
//
// Each clock cycle executes one whole instruction: the fetch unit presents
// Instruction = MEM[PC], main_control decodes its op and funct fields into
// the control points, the datapath reads registers, computes in the ALU,
// reads or writes the data memory and forms busW, and at the next rising
// clock edge the PC, the destination register and (for sw) the data memory
// are all updated together. The ALU's Zero flag returns to the fetch unit to
// decide beq. The clock period must cover the longest of these chains, a
// load: PC clock-to-out + instruction memory + register read + 32-bit add
// + data memory + register file setup.
//
// Interface: clk, synchronous rst (PC <- 0), a load port that writes the
// instruction memory (hold rst while loading), and observation outputs
// giving the PC, the instruction and this cycle's register and memory
// writes. Memory sizes are parameters (this design's choice: 256 words each).
// The split into fetch unit, control and datapath, and the instruction
// subset, follow the Berkeley CS61C lecture "Single Cycle CPU Control"
// (2005); reset, program loading, the observation ports and the sizes are
// this design's additions.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);
  ctrl_t  ctrl;
  instr_t ins;
  logic  zero;

  assign ins = instr;

  ifu #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk       (clk),
    .rst       (rst),
    .npc_sel   (ctrl.npc_sel),
    .zero      (zero),
    .jump      (ctrl.jump),
    .imem_we   (imem_we),
    .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata),
    .pc        (pc),
    .instr     (instr)
  );

  main_control u_ctrl (
    .op   (ins.op),
    .funct(ins.funct),
    .ctrl (ctrl)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk      (clk),
    .instr    (instr),
    .ctrl     (ctrl),
    .zero     (zero),
    .reg_we   (reg_we),
    .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata),
    .mem_we   (mem_we),
    .mem_addr (mem_addr),
    .mem_wdata(mem_wdata)
  );
endmodule
