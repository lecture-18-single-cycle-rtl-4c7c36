// data_mem: the "ideal" data memory, WORDS words of 32 bits.
//
// Data Out = MEM[Adr] is read combinationally, so a load completes in the
// cycle it is issued. When WrEn (MemWr) is 1, Data In is written at Adr at
// the rising clock edge. Adr is a byte address of a word: Adr[1:0] is
// ignored and addresses above the memory wrap. The size is this design's
// choice; the contents are not reset. The ports WrEn, Adr and Data In
// follow the lecture's "ideal" data memory.
module data_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[adr[AW+1:2]] <= data_in;
  end

  assign data_out = mem[adr[AW+1:2]];
endmodule
