// ifu: instruction fetch unit. Holds the PC, reads Instruction = MEM[PC]
// from the instruction memory and computes the next PC.
//
// The PC register stores only bits 31:2; its two low bits are always 00, so
// every instruction address is word aligned. Next-PC logic:
//   - an adder forms PC + 4;
//   - a second adder forms PC + 4 + {SignExt(imm16), 00} (the branch target);
//   - nPC_MUX_sel chooses between them. It is 1 only when nPC_sel = 1
//     (a beq) and Zero = 1 (the ALU found R[rs] - R[rt] == 0):
//         nPC_sel Zero | nPC_MUX_sel
//            0     -   |     0
//            1     0   |     0
//            1     1   |     1
//   - a final mux, steered by Jump, replaces that with
//     {PC[31:28], target, 00} for j.
// The new PC is loaded at the rising clock edge; a synchronous reset (rst)
// loads 0, this design's choice of start address. The instruction memory
// load port passes straight through to inst_mem.
// The two adders, the branch mux with its nPC_sel/Zero table, the jump mux
// and the PC with its fixed 00 bits follow the lecture's fetch-unit
// drawings; the lecture leaves the gate for the table open, and the choice
// of an AND here is this design's.
module ifu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);
  logic [29:0] pc_q;        // PC<31:2>
  logic [31:0] pc_plus4;
  logic [31:0] br_target;
  logic [31:0] pc_ext;      // {SignExt(imm16), 00}
  logic        npc_mux_sel;
  logic [31:0] npc_seq;     // output of the branch mux
  logic [31:0] npc;         // output of the jump mux

  assign pc = {pc_q, 2'b00};

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk      (clk),
    .load_we  (imem_we),
    .load_addr(imem_waddr),
    .load_data(imem_wdata),
    .adr      (pc),
    .instr    (instr)
  );

  assign pc_plus4    = pc + 32'd4;
  assign pc_ext      = {{14{instr[15]}}, instr[15:0], 2'b00};
  assign br_target   = pc_plus4 + pc_ext;
  assign npc_mux_sel = npc_sel & zero;
  assign npc_seq     = npc_mux_sel ? br_target : pc_plus4;
  assign npc         = jump ? {pc[31:28], instr[25:0], 2'b00} : npc_seq;

  always_ff @(posedge clk) begin
    if (rst) pc_q <= '0;
    else     pc_q <= npc[31:2];
  end
endmodule
