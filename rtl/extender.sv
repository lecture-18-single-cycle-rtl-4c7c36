// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp = EXT_ZERO fills the upper half with zeros (used by ori); ExtOp =
// EXT_SIGN copies imm16[15] into it (used by lw, sw). Purely combinational.
// The ExtOp meanings follow the lecture; the encoding 0 = zero, 1 = sign
// matches the ExtOp column of its control table.
module extender
  import cpu_pkg::*;
(
  input  logic [15:0] imm16,
  input  ext_op_e     ext_op,
  output logic [31:0] imm32
);
  always_comb begin
    if (ext_op == EXT_SIGN) imm32 = {{16{imm16[15]}}, imm16};
    else                    imm32 = {16'h0000, imm16};
  end
endmodule
