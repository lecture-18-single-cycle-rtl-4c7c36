// inst_mem: the "ideal" instruction memory, WORDS words of 32 bits.
//
// Instruction = MEM[Adr] is read combinationally from the byte address Adr
// (Adr[1:0] is ignored, Adr above the memory wraps). Being ideal, it answers
// within the cycle. A program is placed in it through the load port: when
// load_we is 1, load_data is written at byte address load_addr at the
// rising clock edge. The load port and the size are this design's choices;
// the lecture only calls it an ideal memory addressed by the PC.
module inst_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [31:0] adr,
  output logic [31:0] instr
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  assign instr = mem[adr[AW+1:2]];
endmodule
