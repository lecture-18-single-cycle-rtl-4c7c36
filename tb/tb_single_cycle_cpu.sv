// tb_single_cycle_cpu: end-to-end test of the processor at its default
// sizes. A program is generated here: ori instructions give every register a
// known value, sw instructions fill a window of data memory around a base
// register (r28 = 0x200), then a random mix of add, sub, ori, lw, sw, beq
// (forward targets, taken and not taken) and j (forward) runs until a final
// self-loop "j ." is reached. The program is written through the load port
// while rst is held.
//
// An instruction-level reference model executes the same program. Every
// cycle the processor's PC, fetched instruction, register write (RegWr, Rw,
// busW) and memory write (MemWr, address, data) are compared with the model:
// one instruction must retire per clock. Each instruction kind and each
// mechanism (taken and untaken branch, jump, sign- and zero-extension of a
// negative-looking immediate, an ignored write to register 0) is counted and
// a failure is counted for any that never happened.
module tb_single_cycle_cpu;
  localparam int IW     = 256;          // default instruction memory words
  localparam int DW     = 256;          // default data memory words
  localparam int END    = 254;          // word index of the final "j ."
  localparam logic [4:0] BASE = 5'd28;  // data-window base register

  logic        clk = 0, rst;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  logic [31:0] prog [IW];
  logic [31:0] mr [32];
  logic [31:0] mm [DW];
  logic [31:0] mpc;
  int checks = 0, failures = 0, cycles = 0;
  int n_add, n_sub, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_j, n_sext_neg, n_zext_hi, n_r0;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .pc(pc), .instr(instr), .reg_we(reg_we),
    .reg_waddr(reg_waddr), .reg_wdata(reg_wdata), .mem_we(mem_we),
    .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] enc_r(input logic [4:0] rs, rt, rd, input logic [5:0] fn);
    return {6'b000000, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rs, rt,
                                        input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  // Destination register for random instructions: never the base register;
  // register 0 now and then.
  function automatic logic [4:0] rand_dst();
    logic [4:0] d;
    do d = 5'($urandom_range(0, 31)); while (d == BASE);
    return d;
  endfunction

  task automatic build_program();
    int p = 0;
    for (int i = 1; i < 32; i++)
      prog[p++] = enc_i(6'b001101, 5'd0, 5'(i), (i == BASE) ? 16'h0200 : 16'($urandom));
    // Fill data words 0x180..0x21C (offsets -128..+28 from r28).
    for (int off = -128; off <= 28; off += 4)
      prog[p++] = enc_i(6'b101011, BASE, 5'($urandom), 16'(off));
    // A directed stretch so that every mechanism occurs whatever the seed.
    prog[p++] = enc_r(5'd1, 5'd2, 5'd0, 6'b100000);            // add  $0, r1, r2 (dropped)
    prog[p++] = enc_r(5'd3, 5'd4, 5'd5, 6'b100010);            // sub  r5, r3, r4
    prog[p++] = enc_i(6'b001101, 5'd6, 5'd7, 16'hF00F);        // ori  r7, r6, 0xF00F
    prog[p++] = enc_i(6'b101011, BASE, 5'd7, 16'hFFF0);        // sw   r7, -16(r28)
    prog[p++] = enc_i(6'b100011, BASE, 5'd8, 16'hFFF0);        // lw   r8, -16(r28)
    prog[p++] = enc_i(6'b000100, 5'd0, BASE, 16'd1);           // beq  $0, r28 (not taken)
    prog[p++] = enc_i(6'b000100, 5'd8, 5'd7, 16'd1);           // beq  r8, r7 (taken, skips 1)
    prog[p++] = enc_r(5'd1, 5'd1, 5'd9, 6'b100000);            // skipped
    prog[p] = {6'b000010, 26'(p + 2)}; p++;                    // j    over the next one
    prog[p++] = enc_r(5'd1, 5'd1, 5'd10, 6'b100000);           // skipped
    while (p < END) begin
      int k, room;
      k = $urandom_range(0, 7);
      room = END - p - 1;   // instructions between this one and END
      case (k)
        0: prog[p] = enc_r(5'($urandom), 5'($urandom), rand_dst(), 6'b100000);
        1: prog[p] = enc_r(5'($urandom), 5'($urandom), rand_dst(), 6'b100010);
        2: prog[p] = enc_i(6'b001101, 5'($urandom), rand_dst(), 16'($urandom));
        3: prog[p] = enc_i(6'b100011, BASE, rand_dst(), 16'(4 * $urandom_range(0, 39) - 128));
        4: prog[p] = enc_i(6'b101011, BASE, 5'($urandom), 16'(4 * $urandom_range(0, 39) - 128));
        5, 6: begin
          logic [4:0] a, b;
          a = 5'($urandom);
          b = ($urandom_range(0, 1) == 0) ? a : 5'($urandom);
          prog[p] = enc_i(6'b000100, a, b, 16'($urandom_range(0, (room < 3) ? room : 3)));
        end
        default: prog[p] = {6'b000010, 26'(p + 1 + $urandom_range(0, (room < 3) ? room : 3))};
      endcase
      p++;
    end
    prog[END] = {6'b000010, 26'(END)};
    prog[END + 1] = 32'h0;
  endtask

  // Execute one instruction in the reference model and compare it with what
  // the processor shows in this cycle.
  task automatic step_and_check();
    logic [31:0] i, a, b, sext, zext, res, npc;
    logic        we, mwe;
    logic [4:0]  rw;
    logic [31:0] wd;
    i = prog[mpc[9:2]];
    a = mr[i[25:21]]; b = mr[i[20:16]];
    sext = {{16{i[15]}}, i[15:0]};
    zext = {16'h0, i[15:0]};
    npc = mpc + 4;
    we = 0; mwe = 0; rw = 0; wd = 0; res = 0;
    case (i[31:26])
      6'b000000: begin
        we = 1; rw = i[15:11];
        wd = (i[5:0] == 6'b100010) ? a - b : a + b;
        if (i[5:0] == 6'b100010) n_sub++; else n_add++;
      end
      6'b001101: begin
        we = 1; rw = i[20:16]; wd = a | zext; n_ori++;
        if (i[15]) n_zext_hi++;
      end
      6'b100011: begin
        res = a + sext; we = 1; rw = i[20:16]; wd = mm[res[9:2]]; n_lw++;
        if (i[15]) n_sext_neg++;
      end
      6'b101011: begin
        res = a + sext; mwe = 1; n_sw++;
        if (i[15]) n_sext_neg++;
      end
      6'b000100: begin
        if (a == b) begin npc = mpc + 4 + {sext[29:0], 2'b00}; n_beq_t++; end
        else n_beq_nt++;
      end
      6'b000010: begin
        npc = {mpc[31:28], i[25:0], 2'b00};
        if (npc != mpc) n_j++;
      end
      default: ;
    endcase
    if (we && rw == 0) n_r0++;
    checks++;
    if (pc != mpc || instr != i || reg_we != we || mem_we != mwe ||
        (we && (reg_waddr != rw || reg_wdata != wd)) ||
        (mwe && (mem_addr != res || mem_wdata != b))) begin
      failures++;
      $display("FAIL pc=%h (exp %h) instr=%h rwe=%b rw=%0d busW=%h (exp %b %0d %h) mwe=%b adr=%h din=%h (exp %b %h %h)",
               pc, mpc, instr, reg_we, reg_waddr, reg_wdata, we, rw, wd,
               mem_we, mem_addr, mem_wdata, mwe, res, b);
    end
    if (we && rw != 0) mr[rw] = wd;
    if (mwe) mm[res[9:2]] = b;
    mpc = npc;
  endtask

  initial begin
    n_add = 0; n_sub = 0; n_ori = 0; n_lw = 0; n_sw = 0; n_beq_t = 0; n_beq_nt = 0;
    n_j = 0; n_sext_neg = 0; n_zext_hi = 0; n_r0 = 0;
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    build_program();
    for (int k = 0; k < 32; k++) mr[k] = 0;
    for (int w = 0; w < IW; w++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 32'(w * 4); imem_wdata = (w <= END + 1) ? prog[w] : 32'h0;
    end
    @(negedge clk);
    imem_we = 0;
    @(negedge clk);
    rst = 0;
    mpc = 0;
    // One instruction per cycle until the model reaches the final loop,
    // then a few more cycles to see the processor stay there.
    while (mpc != END * 4) begin
      #1;
      step_and_check();
      cycles++;
      @(negedge clk);
    end
    repeat (3) begin
      #1;
      step_and_check();
      @(negedge clk);
    end
    $display("cycles=%0d add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d j=%0d",
             cycles, n_add, n_sub, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_j);
    $display("negative sign-extended offsets=%0d ori with imm16[15]=1=%0d writes to r0=%0d",
             n_sext_neg, n_zext_hi, n_r0);
    if (n_add == 0 || n_sub == 0 || n_ori == 0 || n_lw == 0 || n_sw == 0 || n_beq_t == 0 ||
        n_beq_nt == 0 || n_j == 0 || n_sext_neg == 0 || n_zext_hi == 0 || n_r0 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
