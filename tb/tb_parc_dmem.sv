// tb_parc_dmem: checks the data memory: random word stores and loads are
// compared with a model array; a read is combinational and sees a store only
// after the clock edge that performs it.
module tb_parc_dmem;
  import parc_pkg::*;

  localparam int unsigned W = 4096;
  logic  clk = 0, wen = 0;
  word_t addr = '0, rdata, wdata = '0;
  word_t model [W];
  bit    known [W];
  int checks = 0, failures = 0;

  parc_dmem #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) known[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      automatic int a = $urandom_range(0, 255);
      @(negedge clk);
      addr = (word_t'(a) << 2) | word_t'($urandom_range(0, 3));
      wen = $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      if (known[a]) begin
        checks++;
        if (rdata != model[a]) begin failures++; $display("FAIL load %h: %h expected %h", addr, rdata, model[a]); end
      end
      @(posedge clk);
      if (wen) begin model[a] = wdata; known[a] = 1; end
      #1;
      if (wen) begin
        checks++;
        if (rdata != wdata) begin failures++; $display("FAIL store %h not visible", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
