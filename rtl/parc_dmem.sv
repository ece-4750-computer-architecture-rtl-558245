// parc_dmem: data memory of the B pipe.
//
// The course notes assume combinational memories: a load issued to the data
// memory in B1 has its data at the end of that same stage, and a store writes
// it. This memory reads a word combinationally at addr and writes a word at
// the rising clock edge when wen is set. Only whole, aligned words are
// accessed (PARCv1 has lw and sw only); bits 1:0 of the address are ignored
// and the address is taken modulo the size. The size (WORDS) is this design's
// choice.
//
// Interface: addr (byte address), rdata (combinational), wen, wdata.
module parc_dmem
  import parc_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic  clk,
  input  word_t addr,
  output word_t rdata,
  input  logic  wen,
  input  word_t wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  logic [AW-1:0] a;
  assign a     = addr[AW+1:2];
  assign rdata = mem[a];

  always_ff @(posedge clk)
    if (wen) mem[a] <= wdata;

endmodule
