// tb_main_control: checks the decoder against the control table of the
// seven instructions, written out here as strings with '-' for don't care
// (which is not checked), and checks that unknown op or funct codes write
// nothing and do not branch or jump.
module tb_main_control;
  import cpu_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .funct(funct), .ctrl(ctrl));

  // Columns: RegDst ALUSrc MemtoReg RegWr MemWr nPC_sel Jump ExtOp(z/s) ALUctr(a/s/o)
  task automatic expect_row(input string name, input logic [5:0] o, input logic [5:0] f,
                            input string row);
    logic [6:0] got;
    op = o; funct = f;
    #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_wr,
           ctrl.mem_wr, ctrl.npc_sel, ctrl.jump};
    for (int k = 0; k < 7; k++) begin
      if (row[k] != "-") begin
        checks++;
        if (got[6-k] != (row[k] == "1")) begin
          failures++; $display("FAIL %s column %0d got %b", name, k, got[6-k]);
        end
      end
    end
    if (row[7] != "-") begin
      checks++;
      if (ctrl.ext_op != ((row[7] == "s") ? EXT_SIGN : EXT_ZERO)) begin
        failures++; $display("FAIL %s ExtOp", name);
      end
    end
    if (row[8] != "-") begin
      checks++;
      if (ctrl.alu_ctr != ((row[8] == "a") ? ALU_ADD : (row[8] == "s") ? ALU_SUB : ALU_OR)) begin
        failures++; $display("FAIL %s ALUctr %b", name, ctrl.alu_ctr);
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
    logic [5:0] rnd;
    expect_row("add", 6'b000000, 6'b100000, "1001000-a");
    expect_row("sub", 6'b000000, 6'b100010, "1001000-s");
    expect_row("sw-funct-free", 6'b101011, 6'b100010, "-1-0100sa");
    repeat (20) begin
      rnd = 6'($urandom);
      expect_row("ori", 6'b001101, rnd, "0101000zo");
      expect_row("lw",  6'b100011, rnd, "0111000sa");
      expect_row("sw",  6'b101011, rnd, "-1-0100sa");
      expect_row("beq", 6'b000100, rnd, "-0-0010-s");
      expect_row("j",   6'b000010, rnd, "---0001--");
    end
    // Unknown codes: no state change, sequential PC.
    repeat (200) begin
      op = 6'($urandom); funct = 6'($urandom);
      if (op inside {6'b000010, 6'b000100, 6'b001101, 6'b100011, 6'b101011}) continue;
      if (op == 6'b000000 && funct inside {6'b100000, 6'b100010}) continue;
      expect_row("unknown", op, funct, "---0000--");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
