// tb_ifu: fills the instruction memory with random words, then drives
// nPC_sel, Zero and Jump at random for many cycles. A reference PC is
// advanced by the rules PC+4 / PC+4+SignExt(imm16)*4 / {PC[31:28],target,00}
// and compared with the unit's PC and fetched instruction every cycle.
// Counts each kind of next-PC and fails if one never occurred.
module tb_ifu;
  localparam int W = 64;
  logic        clk = 0, rst;
  logic        npc_sel, zero, jump;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata, pc, instr;
  logic [31:0] image [W];
  logic [31:0] ref_pc;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br = 0, n_br_nt = 0, n_jump = 0;

  ifu #(.IMEM_WORDS(W)) dut (
    .clk(clk), .rst(rst), .npc_sel(npc_sel), .zero(zero), .jump(jump),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] i_word, nxt;
    rst = 1; npc_sel = 0; zero = 0; jump = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 32'(i * 4); imem_wdata = $urandom;
      image[i] = imem_wdata;
    end
    @(negedge clk);
    imem_we = 0;
    @(negedge clk);
    rst = 0;
    ref_pc = 0;
    repeat (2000) begin
      // Inputs for this cycle.
      npc_sel = ($urandom_range(0, 2) == 0);
      zero    = 1'($urandom);
      jump    = ($urandom_range(0, 5) == 0);
      #1;
      checks++;
      i_word = image[ref_pc[7:2]];
      if (pc != ref_pc || instr != i_word) begin
        failures++;
        $display("FAIL pc=%h exp %h instr=%h exp %h", pc, ref_pc, instr, i_word);
      end
      if (jump) begin
        nxt = {ref_pc[31:28], i_word[25:0], 2'b00};
        n_jump++;
      end else if (npc_sel && zero) begin
        nxt = ref_pc + 4 + {{14{i_word[15]}}, i_word[15:0], 2'b00};
        n_br++;
      end else begin
        nxt = ref_pc + 4;
        if (npc_sel) n_br_nt++; else n_seq++;
      end
      @(negedge clk);
      ref_pc = nxt;
    end
    // Reset returns the PC to 0.
    rst = 1;
    @(negedge clk);
    rst = 0;
    checks++;
    if (pc != 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    if (n_seq == 0 || n_br == 0 || n_br_nt == 0 || n_jump == 0) begin
      failures++; $display("FAIL some next-PC case never occurred");
    end
    $display("next-PC cases: +4=%0d branch-taken=%0d branch-not-taken=%0d jump=%0d",
             n_seq, n_br, n_br_nt, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
