// regfile: 32 registers of 32 bits with two read ports and one write port.
//
// Ra and Rb select the registers driven on busA and busB; reads are
// combinational. When RegWr is 1, busW is written into register Rw at the
// rising clock edge, so a value written in one instruction is read by the
// next. Register 0 always reads as zero and ignores writes, as in the MIPS
// instruction set (this design's choice). The registers are not reset.
// The 32 x 32-bit organisation with ports Ra, Rb, Rw, busA, busB, busW and
// RegWr follows the lecture's datapath drawing.
module regfile (
  input  logic        clk,
  input  logic        reg_wr,
  input  logic [4:0]  rw,
  input  logic [31:0] busw,
  input  logic [4:0]  ra,
  input  logic [4:0]  rb,
  output logic [31:0] busa,
  output logic [31:0] busb
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (reg_wr && rw != 5'd0) regs[rw] <= busw;
  end

  assign busa = (ra == 5'd0) ? 32'h0 : regs[ra];
  assign busb = (rb == 5'd0) ? 32'h0 : regs[rb];
endmodule
