// tb_data_mem: random writes and reads against a shadow array; checks that
// a read is combinational, that a write lands only at the clock edge and
// only when WrEn is 1.
module tb_data_mem;
  localparam int W = 64;
  logic        clk = 0;
  logic        wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(W)) dut (.clk(clk), .wr_en(wr_en), .adr(adr),
                             .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(input int i);
    adr = 32'(i * 4);
    #1;
    checks++;
    if (data_out != shadow[i]) begin
      failures++; $display("FAIL word %0d: %h exp %h", i, data_out, shadow[i]);
    end
  endtask

  initial begin
    wr_en = 0; adr = 0; data_in = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      wr_en = 1; adr = 32'(i * 4); data_in = $urandom;
      shadow[i] = data_in;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < W; i++) rd_check(i);
    repeat (1000) begin
      int i;
      @(negedge clk);
      i = $urandom_range(0, W - 1);
      wr_en = 1'($urandom);
      data_in = $urandom;
      adr = 32'(i * 4);
      #1;
      checks++;   // old contents until the edge
      if (data_out != shadow[i]) begin
        failures++; $display("FAIL pre-edge word %0d", i);
      end
      @(posedge clk);
      if (wr_en) shadow[i] = data_in;
      #1;
      wr_en = 0;
      rd_check(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
