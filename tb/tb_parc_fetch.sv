// tb_parc_fetch: checks the F-stage program counter.
//
// Random stalls and redirects (exception, branch, jump, any combination) are
// applied and the PC, block address and slot-valid bits compared with a
// model: redirects win in the order exception, branch, jump; stall holds the
// PC; otherwise the next aligned block follows. A redirect to the second word
// of a block must mark the first word invalid.
module tb_parc_fetch;
  import parc_pkg::*;

  logic       clk = 0, rst = 1;
  logic       stall = 0, exc_redirect = 0, br_redirect = 0, jmp_redirect = 0;
  word_t      exc_pc = '0, br_pc = '0, jmp_pc = '0;
  word_t      pc, blk_addr;
  logic [1:0] slot_valid;
  word_t      m_pc;
  int checks = 0, failures = 0, n_odd = 0;

  parc_fetch #(.RESET_PC(32'h0000_0000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (pc != m_pc || blk_addr != {m_pc[31:3], 3'b0} || slot_valid != {1'b1, ~m_pc[2]}) begin
      failures++;
      $display("FAIL pc %h blk %h slots %b, expected pc %h", pc, blk_addr, slot_valid, m_pc);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    m_pc = '0;
    compare();
    for (int t = 0; t < 20000; t++) begin
      stall        = $urandom_range(0, 3) == 0;
      exc_redirect = $urandom_range(0, 15) == 0;
      br_redirect  = $urandom_range(0, 7) == 0;
      jmp_redirect = $urandom_range(0, 5) == 0;
      exc_pc = $urandom & ~32'h3; br_pc = $urandom & ~32'h3; jmp_pc = $urandom & ~32'h3;
      @(posedge clk);
      if      (exc_redirect) m_pc = exc_pc;
      else if (br_redirect)  m_pc = br_pc;
      else if (jmp_redirect) m_pc = jmp_pc;
      else if (!stall)       m_pc = {m_pc[31:3], 3'b0} + 8;
      @(negedge clk);
      if (m_pc[2]) n_odd++;
      compare();
    end
    checks++;
    if (n_odd == 0) begin failures++; $display("FAIL no unaligned target seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
