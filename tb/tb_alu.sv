// tb_alu: checks add, subtract and or, and the Zero flag, against 64-bit
// reference arithmetic truncated to 32 bits, on edge cases and random
// operands (equal operands included so that Zero is exercised both ways).
module tb_alu;
  import cpu_pkg::*;
  logic [31:0] a, b, result;
  alu_ctr_e    alu_ctr;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(alu_ctr), .result(result), .zero(zero));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    longint unsigned ref_v;
    for (int op = 0; op < 3; op++) begin
      a = x; b = y;
      case (op)
        0: begin alu_ctr = ALU_ADD; ref_v = longint'(x) + longint'(y); end
        1: begin alu_ctr = ALU_SUB; ref_v = longint'(x) - longint'(y); end
        default: begin alu_ctr = ALU_OR; ref_v = longint'(x | y); end
      endcase
      #1;
      checks++;
      if (result != ref_v[31:0] || zero != (ref_v[31:0] == 0)) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h res=%h zero=%b", op, x, y, result, zero);
      end
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
    logic [31:0] r;
    check(0, 0); check(32'hFFFF_FFFF, 1); check(32'h8000_0000, 32'h8000_0000);
    check(5, 7); check(7, 5); check(32'h1234_5678, 32'h1234_5678);
    repeat (300) begin
      r = $urandom;
      check(r, ($urandom_range(0, 3) == 0) ? r : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
