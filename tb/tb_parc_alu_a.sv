// tb_parc_alu_a: checks the A-pipe execute unit against arithmetic done here:
// addu, addiu, mul (low product bits), the jal link value and the bne
// decision and target, for random operands; equal operands must not branch.
module tb_parc_alu_a;
  import parc_pkg::*;

  uop_e  op;
  word_t pc, op1, op2, imm, result, br_target;
  logic  br_taken;
  int checks = 0, failures = 0;

  parc_alu_a dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint unsigned p;
      pc = $urandom & ~32'h3; op1 = $urandom; op2 = (t % 7 == 0) ? op1 : $urandom;
      imm = {{16{1'($urandom)}}, 16'($urandom)};
      p = longint'(op1) * longint'(op2);
      op = UOP_ADDU;  #1; chk("addu", result, op1 + op2);
      op = UOP_ADDIU; #1; chk("addiu", result, op1 + imm);
      op = UOP_MUL;   #1; chk("mul", result, p[31:0]);
      op = UOP_JAL;   #1; chk("jal", result, pc + 4);
      op = UOP_BNE;   #1; chk("bne taken", word_t'(br_taken), word_t'(op1 != op2));
      chk("bne target", br_target, pc + 4 + imm * 4);
      op = UOP_ADDU;  #1; chk("addu no branch", word_t'(br_taken), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
