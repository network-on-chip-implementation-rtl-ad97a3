// line_memory: the on-chip test memory behind the memory controller.
//
// A single-port synchronous RAM of 32-bit words. A write (we) stores wdata
// at addr at the clock edge; a read (re) puts the word at addr on rdata at
// the clock edge, so it is seen one cycle later; rdata holds its value
// otherwise. Addresses wrap modulo WORDS. Read and write in the same cycle
// at the same address return the old word.
//
// The protocol only needs a memory that can be read and written one 32-bit
// word per cycle at a word address; the size and the one-cycle read are
// this design's choices. The contents start at zero; rdata is undefined
// until the first read.
module line_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        re,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] a;
  assign a = addr[AW-1:0];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wdata;
    if (re) rdata <= mem[a];
  end

endmodule
