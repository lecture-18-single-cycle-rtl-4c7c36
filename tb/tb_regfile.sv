// tb_regfile: writes random values to random registers with random RegWr
// and checks both read ports against a shadow copy, including that a write
// is visible only after the clock edge and that register 0 stays zero.
module tb_regfile;
  logic        clk = 0;
  logic        reg_wr;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .reg_wr(reg_wr), .rw(rw), .busw(busw),
               .ra(ra), .rb(rb), .busa(busa), .busb(busb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input logic [4:0] x, input logic [4:0] y);
    ra = x; rb = y;
    #1;
    checks++;
    if (busa != shadow[x] || busb != shadow[y]) begin
      failures++;
      $display("FAIL ra=%0d busa=%h exp %h  rb=%0d busb=%h exp %h",
               x, busa, shadow[x], y, busb, shadow[y]);
    end
  endtask

  initial begin
    reg_wr = 0; rw = 0; busw = 0; ra = 0; rb = 0;
    // Fill every register so that the shadow copy is known.
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      reg_wr = 1; rw = 5'(i); busw = $urandom;
      shadow[i] = (i == 0) ? 32'h0 : busw;
    end
    @(negedge clk);
    reg_wr = 0;
    for (int i = 0; i < 32; i++) read_check(5'(i), 5'(31 - i));
    repeat (1000) begin
      @(negedge clk);
      reg_wr = 1'($urandom);
      rw = 5'($urandom);
      busw = $urandom;
      // Before the edge the old value must still be read.
      read_check(rw, 5'($urandom));
      @(posedge clk);
      if (reg_wr && rw != 0) shadow[rw] = busw;
      #1;
      read_check(rw, 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
