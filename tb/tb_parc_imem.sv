// tb_parc_imem: checks the fetch-block instruction memory.
//
// Random words are written through the load port and kept in a model; random
// block addresses (including ones with bits 2:0 set, which must be ignored)
// must then return the two words of the aligned block, combinationally.
module tb_parc_imem;
  import parc_pkg::*;

  localparam int unsigned W = 4096;
  logic  clk = 0, wen = 0;
  word_t blk_addr = '0, inst0, inst1, waddr = '0, wdata = '0;
  word_t model [W];
  int checks = 0, failures = 0;

  parc_imem #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      wen = 1; waddr = word_t'(i) << 2; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    wen = 0;
    for (int t = 0; t < 5000; t++) begin
      automatic int b = $urandom_range(0, W / 2 - 1);
      blk_addr = (word_t'(b) << 3) | word_t'($urandom_range(0, 7));
      #1;
      checks++;
      if (inst0 != model[2 * b] || inst1 != model[2 * b + 1]) begin
        failures++;
        $display("FAIL block %h: %h %h expected %h %h", blk_addr, inst0, inst1, model[2*b], model[2*b+1]);
      end
      if (t % 10 == 0) begin        // rewrite one word
        @(negedge clk);
        wen = 1; waddr = word_t'(2 * b + 1) << 2; wdata = $urandom; model[2 * b + 1] = wdata;
        @(negedge clk);
        wen = 0;
        #1;
        checks++;
        if (inst1 != model[2 * b + 1]) begin failures++; $display("FAIL rewrite"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
