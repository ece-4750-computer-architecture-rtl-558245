// tb_parc_regfile: checks the 4-read, 2-write register file.
//
// Random writes on both ports (never to the same register in one cycle) and
// random reads on all four ports are compared with a model array kept here.
// Reads must see a write of the same cycle, r0 must stay zero, and reset
// must clear every register.
module tb_parc_regfile;
  import parc_pkg::*;

  logic     clk = 0, rst = 1;
  reg_idx_t raddr [4];
  word_t    rdata [4];
  logic     wen   [2];
  reg_idx_t waddr [2];
  word_t    wdata [2];
  // stimulus in packed form, copied to the port arrays
  reg_idx_t [3:0] ra;
  logic     [1:0] we;
  reg_idx_t [1:0] wa;
  word_t    [1:0] wd;

  for (genvar r = 0; r < 4; r++) begin : g_r
    assign raddr[r] = ra[r];
  end
  for (genvar w = 0; w < 2; w++) begin : g_w
    assign wen[w] = we[w];
    assign waddr[w] = wa[w];
    assign wdata[w] = wd[w];
  end
  word_t    model [32];
  int checks = 0, failures = 0;

  parc_regfile dut (.clk, .rst, .raddr, .rdata, .wen, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int w = 0; w < 2; w++) begin we[w] = 0; wa[w] = '0; wd[w] = '0; end
    for (int r = 0; r < 4; r++) ra[r] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra[0] = 5'(i); #1;
      checks++; if (rdata[0] != 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we[0] = $urandom_range(0, 1); wa[0] = 5'($urandom); wd[0] = $urandom;
      we[1] = $urandom_range(0, 1); wa[1] = 5'($urandom); wd[1] = $urandom;
      if (wa[1] == wa[0]) wa[1] = wa[0] + 1;
      for (int r = 0; r < 4; r++) ra[r] = (r == 3) ? wa[$urandom_range(0, 1)] : 5'($urandom);
      #1;
      for (int r = 0; r < 4; r++) begin
        automatic word_t e = model[ra[r]];
        for (int w = 0; w < 2; w++) if (we[w] && wa[w] == ra[r]) e = wd[w];
        if (ra[r] == 0) e = '0;
        checks++;
        if (rdata[r] != e) begin
          failures++;
          $display("FAIL port %0d r%0d = %h, expected %h", r, ra[r], rdata[r], e);
        end
      end
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w] && wa[w] != 0) model[wa[w]] = wd[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
