// tb_extender: checks zero and sign extension of imm16 against an
// arithmetic reference (sign extension as value - 65536 for negative
// immediates) over edge cases and random values.
module tb_extender;
  import cpu_pkg::*;
  logic [15:0] imm16;
  ext_op_e     ext_op;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  task automatic check(input logic [15:0] v);
    int signed sval;
    imm16 = v;
    ext_op = EXT_ZERO;
    #1;
    checks++;
    if (imm32 != 32'(int'(v))) begin
      failures++; $display("FAIL zero-ext %h -> %h", v, imm32);
    end
    ext_op = EXT_SIGN;
    #1;
    sval = (v >= 16'h8000) ? int'(v) - 65536 : int'(v);
    checks++;
    if (imm32 != 32'(sval)) begin
      failures++; $display("FAIL sign-ext %h -> %h", v, imm32);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000); check(16'h0001); check(16'h7FFF); check(16'h8000);
    check(16'hFFFF); check(16'hFFFC);
    repeat (200) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
