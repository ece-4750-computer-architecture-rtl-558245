// parc_decode: decodes one PARCv1 instruction word.
//
// The D stage holds two of these, one per slot of the fetch block. The
// decoder is purely combinational. Besides the register fields and the
// immediate it reports which execution pipes may take the instruction, as
// in the course notes' pipe table: addu, addiu, j, jal and jr go to either
// pipe, mul and bne only to the A pipe, lw and sw only to the B pipe.
// Words outside the subset are flagged illegal so that the pipeline can raise
// a precise exception. An illegal instruction is marked as able to use either
// pipe; it writes nothing. jal writes r31. The MIPS32 encodings and the
// treatment of the all-zero word as a no-op are this design's choices.
//
// Interface: inst (32-bit word) in, d (dinst_t) out. No clock.
module parc_decode
  import parc_pkg::*;
(
  input  word_t  inst,
  output dinst_t d
);

  logic [5:0] opc, fn;
  reg_idx_t   rs, rt, rd;

  assign opc = inst[31:26];
  assign fn  = inst[5:0];
  assign rs  = inst[25:21];
  assign rt  = inst[20:16];
  assign rd  = inst[15:11];

  always_comb begin
    d           = '0;
    d.op        = UOP_ILLEGAL;
    d.rs        = rs;
    d.rt        = rt;
    d.imm       = {{16{inst[15]}}, inst[15:0]};
    d.jidx      = inst[25:0];
    d.pipe_a    = 1'b1;
    d.pipe_b    = 1'b1;
    d.illegal   = 1'b1;

    unique case (opc)
      OP_SPECIAL: begin
        if (inst == '0) begin
          d.op = UOP_NOP; d.illegal = 1'b0;
        end else if (fn == FN_ADDU && inst[10:6] == 5'd0) begin
          d.op = UOP_ADDU; d.illegal = 1'b0;
          d.rs_en = 1'b1; d.rt_en = 1'b1; d.dst = rd;
        end else if (fn == FN_JR && inst[20:6] == '0) begin
          d.op = UOP_JR; d.illegal = 1'b0;
          d.rs_en = 1'b1; d.is_jump = 1'b1;
        end
      end
      OP_SPECIAL2: begin
        if (fn == FN_MUL && inst[10:6] == 5'd0) begin
          d.op = UOP_MUL; d.illegal = 1'b0;
          d.rs_en = 1'b1; d.rt_en = 1'b1; d.dst = rd;
          d.pipe_b = 1'b0;
        end
      end
      OP_ADDIU: begin
        d.op = UOP_ADDIU; d.illegal = 1'b0;
        d.rs_en = 1'b1; d.dst = rt;
      end
      OP_LW: begin
        d.op = UOP_LW; d.illegal = 1'b0;
        d.rs_en = 1'b1; d.dst = rt; d.is_load = 1'b1;
        d.pipe_a = 1'b0;
      end
      OP_SW: begin
        d.op = UOP_SW; d.illegal = 1'b0;
        d.rs_en = 1'b1; d.rt_en = 1'b1; d.is_store = 1'b1;
        d.pipe_a = 1'b0;
      end
      OP_J: begin
        d.op = UOP_J; d.illegal = 1'b0; d.is_jump = 1'b1;
      end
      OP_JAL: begin
        d.op = UOP_JAL; d.illegal = 1'b0; d.is_jump = 1'b1;
        d.dst = LINK_REG;
      end
      OP_BNE: begin
        d.op = UOP_BNE; d.illegal = 1'b0; d.is_branch = 1'b1;
        d.rs_en = 1'b1; d.rt_en = 1'b1;
        d.pipe_b = 1'b0;
      end
      default: ;
    endcase

    // Reads of r0 never cause a hazard, writes to r0 are dropped
    if (d.rs == '0) d.rs_en = 1'b0;
    if (d.rt == '0) d.rt_en = 1'b0;
    d.wen = (d.dst != '0);
  end

endmodule
