// tb_datapath: drives the datapath with instruction words and the control
// points of add, sub, ori, lw, sw and beq (set here from the instruction
// kind, independent of main_control), and compares Zero, the register write
// (RegWr, Rw, busW) and the memory write (MemWr, Adr, Data In) of every
// cycle with a shadow register file and shadow memory. Registers and memory
// are first filled with known values through ori and sw.
module tb_datapath;
  import cpu_pkg::*;
  localparam int W = 64;
  logic        clk = 0;
  logic [31:0] instr;
  ctrl_t       ctrl;
  logic        zero, reg_we, mem_we;
  logic [4:0]  reg_waddr;
  logic [31:0] reg_wdata, mem_addr, mem_wdata;
  logic [31:0] r [32];
  logic [31:0] m [W];
  int checks = 0, failures = 0;
  int n_kind [6];

  datapath #(.DMEM_WORDS(W)) dut (
    .clk(clk), .instr(instr), .ctrl(ctrl), .zero(zero),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 add, 1 sub, 2 ori, 3 lw, 4 sw, 5 beq
  task automatic run(input int kind, input logic [4:0] rs, input logic [4:0] rt,
                     input logic [4:0] rd, input logic [15:0] imm);
    logic [31:0] a, b, sext, zext, res, exp_w;
    logic        exp_we, exp_mwe;
    logic [4:0]  exp_rw;
    a = r[rs]; b = r[rt];
    sext = {{16{imm[15]}}, imm};
    zext = {16'h0, imm};
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
             mem_wr: 1'b0, npc_sel: 1'b0, jump: 1'b0, ext_op: EXT_ZERO, alu_ctr: ALU_ADD};
    exp_we = 0; exp_mwe = 0; exp_rw = rt; exp_w = 0;
    case (kind)
      0, 1: begin
        instr = {6'b000000, rs, rt, rd, 5'd0, (kind == 0) ? 6'b100000 : 6'b100010};
        ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = (kind == 0) ? ALU_ADD : ALU_SUB;
        res = (kind == 0) ? a + b : a - b;
        exp_we = 1; exp_rw = rd; exp_w = res;
      end
      2: begin
        instr = {6'b001101, rs, rt, imm};
        ctrl.alu_src = 1; ctrl.reg_wr = 1; ctrl.ext_op = EXT_ZERO; ctrl.alu_ctr = ALU_OR;
        res = a | zext;
        exp_we = 1; exp_w = res;
      end
      3: begin
        instr = {6'b100011, rs, rt, imm};
        ctrl.alu_src = 1; ctrl.mem_to_reg = 1; ctrl.reg_wr = 1; ctrl.ext_op = EXT_SIGN;
        res = a + sext;
        exp_we = 1; exp_w = m[res[7:2]];
      end
      4: begin
        instr = {6'b101011, rs, rt, imm};
        ctrl.alu_src = 1; ctrl.mem_wr = 1; ctrl.ext_op = EXT_SIGN;
        res = a + sext;
        exp_mwe = 1;
      end
      default: begin
        instr = {6'b000100, rs, rt, imm};
        ctrl.npc_sel = 1; ctrl.alu_ctr = ALU_SUB;
        res = a - b;
      end
    endcase
    n_kind[kind]++;
    @(negedge clk);
    #1;
    checks++;
    if (zero != (res == 0) || reg_we != exp_we || mem_we != exp_mwe ||
        (exp_we && (reg_waddr != exp_rw || reg_wdata != exp_w)) ||
        (exp_mwe && (mem_addr != res || mem_wdata != b))) begin
      failures++;
      $display("FAIL kind=%0d instr=%h zero=%b rwe=%b rw=%0d busW=%h (exp %0d %h) mwe=%b adr=%h din=%h",
               kind, instr, zero, reg_we, reg_waddr, reg_wdata, exp_rw, exp_w, mem_we, mem_addr, mem_wdata);
    end
    @(posedge clk);
    #1;
    if (exp_we && exp_rw != 0) r[exp_rw] = exp_w;
    if (exp_mwe) m[res[7:2]] = b;
  endtask

  initial begin
    int k;
    logic [4:0] rs, rt;
    r[0] = 0;
    // ori rX, $0, imm: every register gets a known value.
    for (int i = 1; i < 32; i++) run(2, 5'd0, 5'(i), 5'd0, 16'($urandom));
    // sw rX, 4*i($0): every memory word gets a known value.
    for (int i = 0; i < W; i++) run(4, 5'd0, 5'($urandom), 5'd0, 16'(i * 4));
    repeat (3000) begin
      k = $urandom_range(0, 5);
      rs = 5'($urandom);
      rt = 5'($urandom);
      if (k == 5 && $urandom_range(0, 2) == 0) rt = rs;   // equal operands: Zero = 1
      run(k, rs, rt, 5'($urandom), 16'($urandom));
    end
    $display("kinds: add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
