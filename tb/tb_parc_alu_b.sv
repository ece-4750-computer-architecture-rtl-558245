// tb_parc_alu_b: checks the B-pipe execute unit against arithmetic done here:
// addu, addiu, the effective address of lw and sw, and the jal link value.
module tb_parc_alu_b;
  import parc_pkg::*;

  uop_e  op;
  word_t pc, op1, op2, imm, result;
  int checks = 0, failures = 0;

  parc_alu_b dut (.*);

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
      pc = $urandom & ~32'h3; op1 = $urandom; op2 = $urandom;
      imm = {{16{1'($urandom)}}, 16'($urandom)};
      op = UOP_ADDU;  #1; chk("addu", result, op1 + op2);
      op = UOP_ADDIU; #1; chk("addiu", result, op1 + imm);
      op = UOP_LW;    #1; chk("lw address", result, op1 + imm);
      op = UOP_SW;    #1; chk("sw address", result, op1 + imm);
      op = UOP_JAL;   #1; chk("jal", result, pc + 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
