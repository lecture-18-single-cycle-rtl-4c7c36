// main_control: decodes an instruction into the control points of the
// single-cycle datapath and fetch unit.
//
// It is the combinational truth table of the seven instructions:
//
//            add  sub  ori  lw   sw   beq  j
//   RegDst    1    1    0    0    -    -    -
//   ALUSrc    0    0    1    1    1    0    -
//   MemtoReg  0    0    0    1    -    -    -
//   RegWr     1    1    1    1    0    0    0
//   MemWr     0    0    0    0    1    0    0
//   nPC_sel   0    0    0    0    0    1    0
//   Jump      0    0    0    0    0    0    1
//   ExtOp     -    -    zero sign sign -    -
//   ALUctr   add  sub   or  add  add  sub   -
//
// add and sub share op 000000 and are told apart by funct. This design sets
// every don't-care ("-") to 0 / zero-extension / add, and treats any other
// op or funct as a no-operation: no register or memory write, PC <- PC + 4.
// The table itself, including which entries are don't-cares, is the one of
// the Berkeley CS61C lecture "Single Cycle CPU Control"; the lecture's op
// and funct codes are the MIPS ones.
module main_control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
             mem_wr: 1'b0, npc_sel: 1'b0, jump: 1'b0, ext_op: EXT_ZERO,
             alu_ctr: ALU_ADD};
    case (op)
      OP_RTYPE: begin
        if (funct == FUNCT_ADD || funct == FUNCT_SUB) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FUNCT_SUB) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = EXT_ZERO;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = EXT_SIGN;
        ctrl.alu_ctr    = ALU_ADD;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.ext_op  = EXT_SIGN;
        ctrl.alu_ctr = ALU_ADD;
      end
      OP_BEQ: begin
        ctrl.npc_sel = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end

  // Each instruction changes at most one kind of state besides the PC, and
  // a branch is never also a jump.
  always_comb begin
    assert ($countones({ctrl.reg_wr, ctrl.mem_wr, ctrl.npc_sel, ctrl.jump}) <= 1)
      else $error("main_control: conflicting control points for op %b", op);
  end
endmodule
