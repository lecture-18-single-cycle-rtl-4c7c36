// datapath: the execute, memory and write-back part of the single-cycle
// processor, steered by the control points in ctrl.
//
//   Rw   = RegDst   ? rd : rt                 (destination register mux)
//   busA = R[rs], busB = R[rt]                (register file reads)
//   imm  = ExtOp-extended imm16               (extender)
//   B    = ALUSrc   ? imm : busB              (ALU source mux)
//   res  = ALU(busA, B, ALUctr), Zero = (res == 0)
//   Data memory: Adr = res, Data In = busB, WrEn = MemWr
//   busW = MemtoReg ? Data Out : res          (write-back mux)
//
// Everything between the register file reads and busW is combinational; the
// register file and the data memory are written at the same rising clock
// edge that loads the next PC. Zero goes back to the fetch unit for beq.
// The write-back and store signals are also brought out so that a
// surrounding testbench can watch each instruction's architectural effect.
// The blocks and the three muxes, with their 0/1 input assignments, follow
// the lecture's single-cycle datapath; where the lecture's summary table says
// a store writes R[rs], the detailed store slides and the wiring (busB to
// Data In) are followed and R[rt] is stored.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic        zero,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);
  instr_t      ins;
  logic [4:0]  rw;
  logic [31:0] busa, busb, busw;
  logic [31:0] imm32, alu_b, alu_res, mem_out;

  assign ins = instr;
  assign rw  = ctrl.reg_dst ? ins.rd : ins.rt;

  regfile u_rf (
    .clk   (clk),
    .reg_wr(ctrl.reg_wr),
    .rw    (rw),
    .busw  (busw),
    .ra    (ins.rs),
    .rb    (ins.rt),
    .busa  (busa),
    .busb  (busb)
  );

  extender u_ext (
    .imm16 (instr[15:0]),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  assign alu_b = ctrl.alu_src ? imm32 : busb;

  alu u_alu (
    .a      (busa),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_res),
    .zero   (zero)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .wr_en   (ctrl.mem_wr),
    .adr     (alu_res),
    .data_in (busb),
    .data_out(mem_out)
  );

  assign busw = ctrl.mem_to_reg ? mem_out : alu_res;

  assign reg_we    = ctrl.reg_wr;
  assign reg_waddr = rw;
  assign reg_wdata = busw;
  assign mem_we    = ctrl.mem_wr;
  assign mem_addr  = alu_res;
  assign mem_wdata = busb;
endmodule
