// tb_inst_mem: loads random words through the load port and reads them
// back on the fetch address, checking word addressing (Adr[1:0] ignored).
module tb_inst_mem;
  localparam int W = 64;
  logic        clk = 0;
  logic        load_we;
  logic [31:0] load_addr, load_data, adr, instr;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  inst_mem #(.WORDS(W)) dut (.clk(clk), .load_we(load_we), .load_addr(load_addr),
                             .load_data(load_data), .adr(adr), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; adr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 32'(i * 4); load_data = $urandom;
      shadow[i] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    repeat (500) begin
      int i;
      i = $urandom_range(0, W - 1);
      adr = {22'h0, 8'(i), 2'($urandom)};
      #1;
      checks++;
      if (instr != shadow[i]) begin
        failures++; $display("FAIL adr=%h instr=%h exp %h", adr, instr, shadow[i]);
      end
    end
    // Overwrite some words and read them again.
    repeat (100) begin
      int i;
      @(negedge clk);
      i = $urandom_range(0, W - 1);
      load_we = 1; load_addr = 32'(i * 4); load_data = $urandom;
      shadow[i] = load_data;
      @(negedge clk);
      load_we = 0;
      adr = 32'(i * 4);
      #1;
      checks++;
      if (instr != shadow[i]) begin
        failures++; $display("FAIL after rewrite adr=%h instr=%h exp %h", adr, instr, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
