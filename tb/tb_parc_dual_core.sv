// tb_parc_dual_core: checks the pipeline on its own, with memories modelled
// in the testbench, in both RAW-hazard configurations of the course notes.
//
// Two cores run the same program: one fully bypassed (FULL_BYPASS = 1) and
// one that resolves RAW hazards only by stalling (FULL_BYPASS = 0). The
// program is the RAW sequence of the notes followed by a load, a store and an
// illegal instruction. For each core the commit cycle of every instruction is
// compared with the timing worked out by hand for this pipeline, then the
// final registers, the stored word and EPC with values computed here.
module tb_parc_dual_core;
  import parc_pkg::*;
  import parc_asm_pkg::*;

  localparam word_t EXCV = 32'h0000_0400;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  longint cycle = 0;

  word_t imem [1024];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- two cores with their own memories
  word_t      ia [2], i0 [2], i1 [2], da [2], dr [2], dw [2];
  logic       dwe [2];
  logic [1:0] cv [2];
  word_t      cpc [2][2];
  word_t      epc [2];
  events_t    ev [2];
  word_t      dmem [2][256];

  parc_dual_core #(.EXC_VECTOR(EXCV), .FULL_BYPASS(1'b1)) u_full (
    .clk, .rst, .imem_addr(ia[0]), .imem_inst0(i0[0]), .imem_inst1(i1[0]),
    .dmem_addr(da[0]), .dmem_rdata(dr[0]), .dmem_wen(dwe[0]), .dmem_wdata(dw[0]),
    .commit_valid(cv[0]), .commit_pc(cpc[0]), .epc(epc[0]), .ev(ev[0]));

  parc_dual_core #(.EXC_VECTOR(EXCV), .FULL_BYPASS(1'b0)) u_stall (
    .clk, .rst, .imem_addr(ia[1]), .imem_inst0(i0[1]), .imem_inst1(i1[1]),
    .dmem_addr(da[1]), .dmem_rdata(dr[1]), .dmem_wen(dwe[1]), .dmem_wdata(dw[1]),
    .commit_valid(cv[1]), .commit_pc(cpc[1]), .epc(epc[1]), .ev(ev[1]));

  for (genvar c = 0; c < 2; c++) begin : g_mem
    assign i0[c] = imem[{ia[c][11:3], 1'b0}];
    assign i1[c] = imem[{ia[c][11:3], 1'b1}];
    assign dr[c] = dmem[c][da[c][9:2]];
    always @(posedge clk) if (dwe[c]) dmem[c][da[c][9:2]] <= dw[c];
  end

  // ---- commit times
  longint first [2][256];
  always @(posedge clk) if (!rst) begin
    #1;
    for (int c = 0; c < 2; c++)
      for (int p = 0; p < 2; p++)
        if (cv[c][p] && first[c][cpc[c][p][9:2]] < 0) first[c][cpc[c][p][9:2]] = cycle;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rel(int c, int addr, int ref_addr, int d);
    longint a = first[c][addr >> 2], r = first[c][ref_addr >> 2];
    chk(a >= 0 && r >= 0 && a - r == d,
        $sformatf("core %0d: %h commits %0d after %h, expected %0d", c, addr, a - r, ref_addr, d));
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) imem[i] = i_nop();
    for (int c = 0; c < 2; c++) for (int i = 0; i < 256; i++) begin
      dmem[c][i] = '0; first[c][i] = -1;
    end
    dmem[0][8] = 32'd1000; dmem[1][8] = 32'd1000;
    // seeds
    imem[0] = i_addiu(2, 0, 20);  imem[1] = i_addiu(4, 0, 40);
    imem[2] = i_addiu(8, 0, 80);  imem[3] = i_addiu(10, 0, 32);
    imem[4] = i_nop();            imem[5] = i_nop();
    imem[6] = i_nop();            imem[7] = i_nop();
    // RAW sequence of the notes, at 0x20
    imem[8]  = i_addiu(1, 2, 1);
    imem[9]  = i_addiu(3, 4, 1);
    imem[10] = i_addu(5, 1, 3);
    imem[11] = i_addiu(6, 5, 1);
    imem[12] = i_addiu(7, 8, 1);
    imem[13] = i_addiu(9, 8, 1);
    // memory and exception, at 0x38
    imem[14] = i_lw(11, 0, 10);     // r11 = mem[32] = 1000
    imem[15] = i_nop();
    imem[16] = i_sw(6, 4, 10);      // mem[36] = r6
    imem[17] = i_illegal();
    imem[18] = i_addiu(12, 0, 1);   // squashed
    imem[19] = i_addiu(13, 0, 1);
    imem[EXCV >> 2]       = i_addiu(14, 11, 1);
    imem[(EXCV >> 2) + 1] = i_j(EXCV + 4);
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (60) @(negedge clk);

    // full bypassing: 0x20/0x24 at t, addu t+1, addiu r6 t+2, 0x30/0x34 t+3
    rel(0, 'h24, 'h20, 0);
    rel(0, 'h28, 'h20, 1);
    rel(0, 'h2c, 'h20, 2);
    rel(0, 'h30, 'h20, 3);
    rel(0, 'h34, 'h20, 3);
    // stalling only: consumers wait until the producer reaches W
    rel(1, 'h24, 'h20, 0);
    rel(1, 'h28, 'h20, 3);
    rel(1, 'h2c, 'h20, 6);
    rel(1, 'h30, 'h20, 7);
    rel(1, 'h34, 'h20, 7);
    for (int c = 0; c < 2; c++) begin
      chk(c == 0 ? u_full.u_rf.regs[5] == 62 : u_stall.u_rf.regs[5] == 62, $sformatf("core %0d r5", c));
      chk(c == 0 ? u_full.u_rf.regs[6] == 63 : u_stall.u_rf.regs[6] == 63, $sformatf("core %0d r6", c));
      chk(c == 0 ? u_full.u_rf.regs[9] == 81 : u_stall.u_rf.regs[9] == 81, $sformatf("core %0d r9", c));
      chk(c == 0 ? u_full.u_rf.regs[11] == 1000 : u_stall.u_rf.regs[11] == 1000, $sformatf("core %0d r11", c));
      chk(c == 0 ? u_full.u_rf.regs[12] == 0 : u_stall.u_rf.regs[12] == 0, $sformatf("core %0d r12 squashed", c));
      chk(c == 0 ? u_full.u_rf.regs[14] == 1001 : u_stall.u_rf.regs[14] == 1001, $sformatf("core %0d handler", c));
      chk(dmem[c][9] == 63, $sformatf("core %0d store", c));
      chk(epc[c] == 32'h44, $sformatf("core %0d epc %h", c, epc[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
