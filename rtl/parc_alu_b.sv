// parc_alu_b: execute unit of the B pipe (B0 stage).
//
// The B pipe handles integer operations and memory operations. This unit
// computes addu and addiu, the link value pc+4 of jal, and the effective
// address rs+imm of lw and sw, which the data memory uses in B1. It has no
// multiplier and no branch comparator: mul and bne are A-pipe only, as in
// the course notes' pipe table.
//
// Interface: op, pc, op1 (rs), op2 (rt), imm in; result (sum or address) out.
// Combinational.
module parc_alu_b
  import parc_pkg::*;
(
  input  uop_e  op,
  input  word_t pc,
  input  word_t op1,
  input  word_t op2,
  input  word_t imm,
  output word_t result
);

  always_comb begin
    unique case (op)
      UOP_ADDU:          result = op1 + op2;
      UOP_ADDIU,
      UOP_LW, UOP_SW:    result = op1 + imm;
      UOP_JAL:           result = pc + 32'd4;
      default:           result = '0;
    endcase
  end

endmodule
