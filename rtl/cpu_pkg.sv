// cpu_pkg: types and constants shared by the single-cycle MIPS-subset
// processor.
//
// The instruction formats (R-type op/rs/rt/rd/shamt/funct, I-type op/rs/rt/
// immediate, J-type op/target) and the op and funct codes of the seven
// instructions (add, sub, ori, lw, sw, beq, j) are the MIPS ones. The
// encoding of the 3-bit ALUctr field is not fixed by the instruction set;
// the codes below are this design's choice. The seven instructions, their
// codes and the control points follow the Berkeley CS61C lecture "Single
// Cycle CPU Control" (2005).
package cpu_pkg;

  // Primary opcodes, instruction bits <31:26>.
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b00_0000,
    OP_J     = 6'b00_0010,
    OP_BEQ   = 6'b00_0100,
    OP_ORI   = 6'b00_1101,
    OP_LW    = 6'b10_0011,
    OP_SW    = 6'b10_1011
  } opcode_e;

  // R-type function codes, instruction bits <5:0>.
  typedef enum logic [5:0] {
    FUNCT_ADD = 6'b10_0000,
    FUNCT_SUB = 6'b10_0010
  } funct_e;

  // ALUctr<2:0>.
  typedef enum logic [2:0] {
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_OR  = 3'b001
  } alu_ctr_e;

  // ExtOp: zero or sign extension of imm16.
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_e;

  // Control points of the datapath and the fetch unit.
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: ALU B = busB, 1: ALU B = extended immediate
    logic     mem_to_reg; // 0: busW = ALU result, 1: busW = data memory
    logic     reg_wr;     // write the register file
    logic     mem_wr;     // write the data memory
    logic     npc_sel;    // 1: branch instruction (taken when Zero)
    logic     jump;       // 1: jump instruction
    ext_op_e  ext_op;     // immediate extension
    alu_ctr_e alu_ctr;    // ALU operation
  } ctrl_t;

  // Instruction fields, viewed as an R-type word. I-type instructions use
  // rd/shamt/funct together as imm16; J-type uses rs..funct as the target.
  typedef struct packed {
    logic [5:0] op;     // 31:26
    logic [4:0] rs;     // 25:21
    logic [4:0] rt;     // 20:16
    logic [4:0] rd;     // 15:11
    logic [4:0] shamt;  // 10:6
    logic [5:0] funct;  // 5:0
  } instr_t;

endpackage
