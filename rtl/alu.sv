// alu: the 32-bit arithmetic-logic unit of the single-cycle datapath.
//
// ALUctr selects add, subtract or bitwise or of A and B. The Zero output is 1
// when the result is all zeros; with ALUctr = subtract it tells beq whether
// R[rs] == R[rt]. Purely combinational: the result settles within the cycle.
// Any ALUctr code other than the three used ones gives the sum (this
// design's choice; the control never produces such a code). The three
// operations, the 3-bit ALUctr and the Zero flag follow the lecture; the
// binary ALUctr codes are this design's (see cpu_pkg).
module alu
  import cpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctr_e    alu_ctr,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = a + b;
    endcase
  end
  assign zero = (result == 32'h0);
endmodule
