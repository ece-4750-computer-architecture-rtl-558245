// parc_dual_top: dual-issue in-order PARCv1 processor with its memories.
//
// Connects the pipeline (parc_dual_core) to a combinational instruction
// memory that returns an aligned two-instruction fetch block and to a
// combinational-read data memory used by the B pipe, the "1-cycle
// combinational caches" the course notes assume. A program is written into
// the instruction memory through imem_w* while rst is held; the processor
// starts at RESET_PC when rst falls.
//
// Interface: clk, rst (synchronous, active high); imem_wen/imem_waddr/
// imem_wdata load the program (one word per cycle); commit_valid/commit_pc
// report instructions leaving W (index 0: A pipe, 1: B pipe); epc holds the
// PC of the last instruction that raised an illegal-instruction exception;
// ev gives per-cycle event flags. Memory sizes and the vectors are this
// design's choices.
module parc_dual_top
  import parc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 4096,
  parameter int unsigned DMEM_WORDS  = 4096,
  parameter word_t       RESET_PC    = 32'h0000_0000,
  parameter word_t       EXC_VECTOR  = 32'h0000_3000,
  parameter bit          FULL_BYPASS = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       imem_wen,
  input  word_t      imem_waddr,
  input  word_t      imem_wdata,
  output logic [1:0] commit_valid,
  output word_t      commit_pc [2],
  output word_t      epc,
  output events_t    ev
);

  word_t imem_addr, imem_inst0, imem_inst1;
  word_t dmem_addr, dmem_rdata, dmem_wdata;
  logic  dmem_wen;

  parc_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .blk_addr (imem_addr),
    .inst0    (imem_inst0),
    .inst1    (imem_inst1),
    .wen      (imem_wen),
    .waddr    (imem_waddr),
    .wdata    (imem_wdata)
  );

  parc_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .addr  (dmem_addr),
    .rdata (dmem_rdata),
    .wen   (dmem_wen),
    .wdata (dmem_wdata)
  );

  parc_dual_core #(
    .RESET_PC    (RESET_PC),
    .EXC_VECTOR  (EXC_VECTOR),
    .FULL_BYPASS (FULL_BYPASS)
  ) u_core (
    .clk, .rst,
    .imem_addr, .imem_inst0, .imem_inst1,
    .dmem_addr, .dmem_rdata, .dmem_wen, .dmem_wdata,
    .commit_valid, .commit_pc, .epc, .ev
  );

endmodule
