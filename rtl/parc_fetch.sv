// parc_fetch: F stage program counter and aligned fetch-block selection.
//
// The processor fetches two instructions at once. Following the course notes
// it only fetches aligned fetch blocks: the block address is the PC with bits
// 2:0 cleared, and when the PC points at the second word of a block (for
// example the target of a jump to 0x204) the first instruction of the block
// is fetched but discarded (slot_valid[0] = 0). After that the next block is
// always PC+8 rounded down, so the stream is back in step.
//
// Redirects, highest priority first: an exception committing in A1/B1 (to
// the handler), a taken branch resolved in A0, a jump resolved in D. Without
// a redirect, stall holds the PC. The reset PC is a parameter and its value
// is this design's choice.
//
// Interface: pc and blk_addr out to the instruction memory, slot_valid tells
// which words of the block are wanted. Timing: the PC register updates at the
// rising clock edge; outputs are from the register.
module parc_fetch
  import parc_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       stall,
  input  logic       exc_redirect,
  input  word_t      exc_pc,
  input  logic       br_redirect,
  input  word_t      br_pc,
  input  logic       jmp_redirect,
  input  word_t      jmp_pc,
  output word_t      pc,
  output word_t      blk_addr,
  output logic [1:0] slot_valid
);

  word_t pc_next;

  assign blk_addr   = {pc[31:3], 3'b000};
  assign slot_valid = {1'b1, ~pc[2]};

  always_comb begin
    if      (exc_redirect) pc_next = exc_pc;
    else if (br_redirect)  pc_next = br_pc;
    else if (jmp_redirect) pc_next = jmp_pc;
    else if (stall)        pc_next = pc;
    else                   pc_next = blk_addr + 32'd8;
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= {pc_next[31:2], 2'b00};
  end

endmodule
