// parc_imem: instruction memory that returns one aligned fetch block.
//
// The course notes treat the instruction cache as a combinational memory and
// fetch an aligned block of two instructions at once; the blocks of a cache
// line of four instructions never straddle a line, which is why aligned fetch
// is cheap. This memory is a word array read at the block address: inst0 is
// the word at the 8-byte aligned address, inst1 the next one. The address is
// taken modulo the memory size. The size (WORDS) and the write port, which
// loads a program word by word before the processor runs, are this design's
// choices; the notes give neither.
//
// Interface: blk_addr (byte address, bits 2:0 ignored) in, inst0/inst1 out,
// combinational. wen/waddr (byte address)/wdata write one word at the rising
// clock edge.
module parc_imem
  import parc_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic  clk,
  input  word_t blk_addr,
  output word_t inst0,
  output word_t inst1,
  input  logic  wen,
  input  word_t waddr,
  input  word_t wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  logic [AW-1:0] ra0, ra1, wa;
  assign ra0 = {blk_addr[AW+1:3], 1'b0};
  assign ra1 = {blk_addr[AW+1:3], 1'b1};
  assign wa  = waddr[AW+1:2];

  assign inst0 = mem[ra0];
  assign inst1 = mem[ra1];

  always_ff @(posedge clk)
    if (wen) mem[wa] <= wdata;

endmodule
