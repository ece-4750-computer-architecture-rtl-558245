// tb_parc_decode: checks the instruction decoder.
//
// Every instruction of the subset is decoded with random register fields and
// immediates and the decoded fields are compared with values written out
// here from the instruction format: operation, sources read, destination,
// sign-extended immediate and the pipes allowed by the course notes' table
// (addu/addiu/j/jal/jr both, mul/bne A only, lw/sw B only). Words outside
// the subset must be flagged illegal; r0 is never a hazard or a destination.
module tb_parc_decode;
  import parc_pkg::*;
  import parc_asm_pkg::*;

  word_t  inst;
  dinst_t d;
  int checks = 0, failures = 0;

  parc_decode dut (.inst, .d);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_d(string what, uop_e op, logic rs_en, logic rt_en, int dst,
                          logic pa, logic pb, logic jmp, logic brn, logic ill);
    checks++;
    if (d.op != op || d.rs_en != rs_en || d.rt_en != rt_en ||
        d.wen != (dst != 0) || (dst != 0 && d.dst != 5'(dst)) ||
        d.pipe_a != pa || d.pipe_b != pb || d.is_jump != jmp ||
        d.is_branch != brn || d.illegal != ill) begin
      failures++;
      $display("FAIL %s: inst=%h op=%s rs_en=%b rt_en=%b wen=%b dst=%0d a=%b b=%b j=%b br=%b ill=%b",
               what, inst, d.op.name(), d.rs_en, d.rt_en, d.wen, d.dst, d.pipe_a, d.pipe_b,
               d.is_jump, d.is_branch, d.illegal);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic int rs = $urandom_range(1, 31), rt = $urandom_range(1, 31), rd = $urandom_range(0, 31);
      automatic int imm = $urandom_range(0, 65535);
      inst = i_addu(rd, rs, rt);   #1; expect_d("addu",  UOP_ADDU,  1, 1, rd, 1, 1, 0, 0, 0);
      inst = i_mul(rd, rs, rt);    #1; expect_d("mul",   UOP_MUL,   1, 1, rd, 1, 0, 0, 0, 0);
      inst = i_addiu(rd, rs, imm); #1; expect_d("addiu", UOP_ADDIU, 1, 0, rd, 1, 1, 0, 0, 0);
      checks++;
      if (d.imm != {{16{imm[15]}}, imm[15:0]}) begin
        failures++; $display("FAIL imm %h -> %h", imm, d.imm);
      end
      inst = i_lw(rd, imm, rs);    #1; expect_d("lw",    UOP_LW,    1, 0, rd, 0, 1, 0, 0, 0);
      checks++; if (!d.is_load) begin failures++; $display("FAIL lw is_load"); end
      inst = i_sw(rt, imm, rs);    #1; expect_d("sw",    UOP_SW,    1, 1, 0,  0, 1, 0, 0, 0);
      checks++; if (!d.is_store) begin failures++; $display("FAIL sw is_store"); end
      inst = i_bne(rs, rt, imm);   #1; expect_d("bne",   UOP_BNE,   1, 1, 0,  1, 0, 0, 1, 0);
      inst = i_j(word_t'(imm) << 2);   #1; expect_d("j",   UOP_J,   0, 0, 0,  1, 1, 1, 0, 0);
      checks++; if (d.jidx != 26'(imm)) begin failures++; $display("FAIL j index"); end
      inst = i_jal(word_t'(imm) << 2); #1; expect_d("jal", UOP_JAL, 0, 0, 31, 1, 1, 1, 0, 0);
      inst = i_jr(rs);             #1; expect_d("jr",    UOP_JR,    1, 0, 0,  1, 1, 1, 0, 0);
      // r0 as a source is never a hazard
      inst = i_addu(rd, 0, 0);     #1; expect_d("addu r0", UOP_ADDU, 0, 0, rd, 1, 1, 0, 0, 0);
    end
    inst = i_nop();     #1; expect_d("nop",     UOP_NOP,     0, 0, 0, 1, 1, 0, 0, 0);
    inst = i_illegal(); #1; expect_d("illegal", UOP_ILLEGAL, 0, 0, 0, 1, 1, 0, 0, 1);
    inst = 32'h0000_0025; #1; expect_d("or",    UOP_ILLEGAL, 0, 0, 0, 1, 1, 0, 0, 1);
    inst = 32'h7000_0003; #1; expect_d("spc2",  UOP_ILLEGAL, 0, 0, 0, 1, 1, 0, 0, 1);
    inst = 32'h1000_0001; #1; expect_d("beq",   UOP_ILLEGAL, 0, 0, 0, 1, 1, 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
