// parc_alu_a: execute unit of the A pipe (A0 stage).
//
// The A pipe handles integer operations, multiplication and branches. This
// unit computes addu, addiu and mul (low 32 bits of the product), the link
// value pc+4 of jal, and resolves bne: it compares the two operands and
// forms the target pc+4+(imm<<2). The course notes resolve branches in A0,
// so br_taken and br_target leave the pipe in the same cycle. A single-cycle
// combinational multiplier is this design's choice; the notes do not give the
// multiplier's structure. Jumps (j, jr) produce no result here because they
// have been resolved in D.
//
// Interface: op, pc, op1 (rs), op2 (rt), imm in; result, br_taken, br_target
// out. Combinational.
module parc_alu_a
  import parc_pkg::*;
(
  input  uop_e  op,
  input  word_t pc,
  input  word_t op1,
  input  word_t op2,
  input  word_t imm,
  output word_t result,
  output logic  br_taken,
  output word_t br_target
);

  always_comb begin
    unique case (op)
      UOP_ADDU:  result = op1 + op2;
      UOP_ADDIU: result = op1 + imm;
      UOP_MUL:   result = op1 * op2;
      UOP_JAL:   result = pc + 32'd4;
      default:   result = '0;
    endcase
    br_taken  = (op == UOP_BNE) && (op1 != op2);
    br_target = pc + 32'd4 + {imm[29:0], 2'b00};
  end

endmodule
