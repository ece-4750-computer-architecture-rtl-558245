// tb_parc_dual_top: end-to-end test of the dual-issue PARCv1 processor.
//
// Runs programs on parc_dual_top at its default parameters and compares the
// final architectural state (registers, data memory, EPC) and the number of
// committed instructions with a sequential instruction-set model in this
// testbench. Two groups of programs are run:
//   * the instruction sequences of the course notes (independent dual issue,
//     RAW with full bypassing, the load-use activity, jump and taken-branch
//     sequences, the aligned fetch-block example, a precise exception, the
//     structural, WAW and WAR cases), each also checked cycle by cycle
//     against the commit timing worked out by hand for this pipeline;
//   * random programs mixing every instruction with forward branches and
//     jumps, so that hazards of every kind occur many times; one in three
//     also holds an illegal instruction whose handler ends the program.
// Every mechanism the pipeline has (dual issue, swizzle, RAW stall, intra-
// block RAW/WAW/structural splits, bypass, jump, taken branch, squash of a
// young partner, aligned-fetch discard, exception) must be seen at least once.
// A program ends at a "j ." loop whose address is known to the testbench.
module tb_parc_dual_top;
  import parc_pkg::*;
  import parc_asm_pkg::*;

  localparam int unsigned IW   = 4096;     // default memory sizes of the top
  localparam int unsigned DW   = 4096;
  localparam word_t       EXCV = 32'h0000_3000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       imem_wen = 1'b0;
  word_t      imem_waddr = '0, imem_wdata = '0;
  logic [1:0] commit_valid;
  word_t      commit_pc [2];
  word_t      epc;
  events_t    ev;

  parc_dual_top dut (
    .clk, .rst, .imem_wen, .imem_waddr, .imem_wdata,
    .commit_valid, .commit_pc, .epc, .ev
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  word_t prog [IW];
  word_t prev [IW];     // what the instruction memory holds
  bit    loaded [IW];
  word_t halt_pc;

  task automatic clear_prog();
    for (int i = 0; i < IW; i++) prog[i] = i_nop();
  endtask

  function automatic void put(word_t addr, word_t inst);
    prog[addr[13:2]] = inst;
  endfunction

  // ---------------------------------------------------------------- ISS
  word_t   iss_r [32];
  word_t   iss_m [DW];
  word_t   iss_epc;
  int      iss_n;

  task automatic iss_run();
    word_t pc, inst, a, b, npc;
    logic [5:0] opc, fn;
    int rs, rt, rd;
    word_t simm;
    int steps = 0;
    for (int i = 0; i < 32; i++) iss_r[i] = '0;
    for (int i = 0; i < DW; i++) iss_m[i] = dut.u_dmem.mem[i];
    iss_epc = '0;
    iss_n = 0;
    pc = '0;
    while (pc != halt_pc && steps < 100000) begin
      steps++;
      inst = prog[pc[13:2]];
      opc = inst[31:26]; fn = inst[5:0];
      rs = inst[25:21]; rt = inst[20:16]; rd = inst[15:11];
      simm = {{16{inst[15]}}, inst[15:0]};
      a = iss_r[rs]; b = iss_r[rt];
      npc = pc + 4;
      iss_n++;
      if (inst == 32'h0) begin
      end else if (opc == 6'h00 && fn == 6'h21) begin
        iss_r[rd] = a + b;
      end else if (opc == 6'h00 && fn == 6'h08) begin
        npc = a;
      end else if (opc == 6'h1c && fn == 6'h02) begin
        iss_r[rd] = a * b;
      end else if (opc == 6'h09) begin
        iss_r[rt] = a + simm;
      end else if (opc == 6'h23) begin
        iss_r[rt] = iss_m[(a + simm) >> 2 & (DW - 1)];
      end else if (opc == 6'h2b) begin
        iss_m[(a + simm) >> 2 & (DW - 1)] = b;
      end else if (opc == 6'h02) begin
        npc = {npc[31:28], inst[25:0], 2'b00};
      end else if (opc == 6'h03) begin
        iss_r[31] = pc + 4;
        npc = {npc[31:28], inst[25:0], 2'b00};
      end else if (opc == 6'h05) begin
        if (a != b) npc = pc + 4 + (simm << 2);
      end else begin
        iss_epc = pc;
        iss_n--;            // the excepting instruction does not commit
        npc = EXCV;
      end
      iss_r[0] = '0;
      pc = npc;
    end
  endtask

  // ---------------------------------------------------------------- DUT run
  longint first_commit [IW];   // cycle of first commit of each word, -1 if none
  longint t0;
  int     dut_n;
  bit     halted;

  // event totals
  int n_dual, n_swz, n_raw, n_rawi, n_waw, n_str, n_byp, n_jmp, n_br, n_sq, n_aln, n_exc;

  always @(posedge clk) if (!rst) begin
    n_dual += int'(ev.dual_issue);   n_swz += int'(ev.swizzle);
    n_raw  += int'(ev.raw_stall);    n_rawi += int'(ev.raw_intra);
    n_waw  += int'(ev.waw_split);    n_str += int'(ev.struct_split);
    n_byp  += int'(ev.bypass);       n_jmp += int'(ev.jump);
    n_br   += int'(ev.branch_taken); n_sq  += int'(ev.squash_young);
    n_aln  += int'(ev.align_discard); n_exc += int'(ev.exception);
  end

  task automatic run_prog(string name, int max_cycles = 20000);
    // load the program while the processor is held in reset
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) if (!loaded[i] || prog[i] != prev[i]) begin
      imem_wen = 1'b1; imem_waddr = word_t'(i) << 2; imem_wdata = prog[i];
      prev[i] = prog[i];
      loaded[i] = 1;
      @(negedge clk);
    end
    imem_wen = 1'b0;
    for (int i = 0; i < IW; i++) first_commit[i] = -1;
    iss_run();
    @(negedge clk);
    rst = 1'b0;
    t0 = cycle;
    dut_n = 0;
    halted = 0;
    while (!halted && cycle - t0 < max_cycles) begin
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) if (commit_valid[p]) begin
        if (commit_pc[p] == halt_pc) halted = 1;
        else begin
          dut_n++;
          if (first_commit[commit_pc[p][13:2]] < 0)
            first_commit[commit_pc[p][13:2]] = cycle - t0;
        end
      end
    end
    repeat (2) @(negedge clk);
    check(halted, $sformatf("%s: reached the halt loop", name));
    check(dut_n == iss_n, $sformatf("%s: committed %0d instructions, expected %0d",
                                    name, dut_n, iss_n));
    for (int i = 0; i < 32; i++)
      check(dut.u_core.u_rf.regs[i] == iss_r[i],
            $sformatf("%s: r%0d = %h, expected %h", name, i, dut.u_core.u_rf.regs[i], iss_r[i]));
    begin
      int bad = 0;
      for (int i = 0; i < DW; i++) if (dut.u_dmem.mem[i] != iss_m[i]) bad++;
      check(bad == 0, $sformatf("%s: %0d data memory words differ", name, bad));
    end
    check(epc == iss_epc, $sformatf("%s: epc = %h, expected %h", name, epc, iss_epc));
  endtask

  // commit cycle of the instruction at addr relative to the one at ref_addr
  task automatic check_rel(string name, word_t addr, word_t ref_addr, int expect_d);
    longint ta = first_commit[addr[13:2]], tr = first_commit[ref_addr[13:2]];
    check(ta >= 0 && tr >= 0 && ta - tr == expect_d,
          $sformatf("%s: %h commits %0d cycles after %h, expected %0d",
                    name, addr, ta - tr, ref_addr, expect_d));
  endtask

  task automatic finish_at(word_t addr);
    halt_pc = addr;
    put(addr, i_j(addr));
  endtask

  // seed registers r1..r15 with distinct values, starting at 0x000
  // (8 instructions, 4 fetch blocks); returns the next free address
  function automatic word_t seed_regs();
    for (int i = 1; i <= 8; i++) put(word_t'((i - 1) * 4), i_addiu(i, 0, 100 * i + 3));
    return 32'h20;
  endfunction

  // ---------------------------------------------------------------- random
  // Control transfers only go forward. A jr is preceded by the addiu that
  // sets its register; no branch or jump may land on the jr itself (it
  // would use a stale, possibly backward, address), so such targets are
  // moved one instruction on in a second pass.
  task automatic gen_random(int len, bit with_exc);
    int  k = 0;
    word_t a;
    bit  is_jr [IW];
    clear_prog();
    for (int i = 0; i < IW; i++) is_jr[i] = 0;
    while (k < len) begin
      int r = $urandom_range(0, 99);
      int rd = $urandom_range(1, 8), rs = $urandom_range(0, 8), rt = $urandom_range(0, 8);
      a = word_t'(k * 4);
      if (r < 20)       put(a, i_addiu(rd, rs, $urandom_range(0, 200) - 100));
      else if (r < 38)  put(a, i_addu(rd, rs, rt));
      else if (r < 48)  put(a, i_mul(rd, rs, rt));
      else if (r < 60)  put(a, i_lw(rd, 4 * $urandom_range(0, 63), 0));
      else if (r < 70)  put(a, i_sw(rt, 4 * $urandom_range(0, 63), 0));
      else if (r < 80)  put(a, i_bne(rs, rt, $urandom_range(0, 5)));
      else if (r < 85)  put(a, i_j(a + 4 * $urandom_range(1, 6)));
      else if (r < 89)  put(a, i_jal(a + 4 * $urandom_range(1, 6)));
      else if (r < 93 && k + 1 < len) begin
        // computed jump forward through a register
        put(a, i_addiu(9, 0, int'(a) + 8 + 4 * $urandom_range(0, 4)));
        k++;
        put(word_t'(k * 4), i_jr(9));
        is_jr[k] = 1;
      end else if (r < 97) put(a, i_nop());
      else               put(a, i_addu(rd, 31, rs));   // use the link register
      k++;
    end
    for (int i = 0; i < len; i++) begin
      word_t w = prog[i];
      if (w[31:26] == 6'h05 && is_jr[i + 1 + int'(w[15:0])]) begin
        w[15:0] = w[15:0] + 16'd1;
        prog[i] = w;
      end else if ((w[31:26] == 6'h02 || w[31:26] == 6'h03) && is_jr[w[11:0]]) begin
        w[25:0] = w[25:0] + 26'd1;
        prog[i] = w;
      end else if (w[31:26] == 6'h09 && w[20:16] == 5'd9 && is_jr[w[13:2]]) begin
        w[15:0] = w[15:0] + 16'd4;
        prog[i] = w;
      end
    end
    // forward targets may run past the end: nops lead to the halt loop
    finish_at(word_t'((len + 8) * 4));
    // optionally one illegal instruction; the handler ends the program
    if (with_exc) begin
      put(word_t'($urandom_range(0, len - 1) * 4), i_illegal());
      put(EXCV,     i_sw(1, 4 * $urandom_range(0, 63), 0));
      put(EXCV + 4, i_addiu(20, 1, 1));
      put(EXCV + 8, i_j(halt_pc));
    end
  endtask

  // ---------------------------------------------------------------- tests
  initial begin
    word_t a;
    for (int i = 0; i < IW; i++) loaded[i] = 0;
    n_dual = 0; n_swz = 0; n_raw = 0; n_rawi = 0; n_waw = 0; n_str = 0;
    n_byp = 0; n_jmp = 0; n_br = 0; n_sq = 0; n_aln = 0; n_exc = 0;
    repeat (3) @(posedge clk);

    // 1. Independent instructions (Section 1 example): two per cycle
    clear_prog();
    a = seed_regs();
    put(a + 'h00, i_addiu(1, 2, 1));
    put(a + 'h04, i_addiu(3, 4, 1));
    put(a + 'h08, i_addiu(5, 6, 1));
    put(a + 'h0c, i_mul(7, 8, 9));
    put(a + 'h10, i_mul(10, 11, 12));
    put(a + 'h14, i_addiu(13, 14, 1));
    finish_at(a + 'h18);
    run_prog("dual-issue");
    check_rel("dual-issue", a + 'h04, a, 0);
    check_rel("dual-issue", a + 'h08, a, 1);
    check_rel("dual-issue", a + 'h0c, a, 1);
    check_rel("dual-issue", a + 'h10, a, 2);
    check_rel("dual-issue", a + 'h14, a, 2);

    // 2. RAW hazards with full bypassing (Section 2.1)
    clear_prog();
    a = seed_regs();
    put(a + 'h00, i_addiu(1, 2, 1));
    put(a + 'h04, i_addiu(3, 4, 1));
    put(a + 'h08, i_addu(5, 1, 3));
    put(a + 'h0c, i_addiu(6, 5, 1));
    put(a + 'h10, i_addiu(7, 8, 1));
    put(a + 'h14, i_addiu(9, 8, 1));
    finish_at(a + 'h18);
    run_prog("raw-bypass");
    check_rel("raw-bypass", a + 'h04, a, 0);
    check_rel("raw-bypass", a + 'h08, a, 1);
    check_rel("raw-bypass", a + 'h0c, a, 2);
    check_rel("raw-bypass", a + 'h10, a, 3);
    check_rel("raw-bypass", a + 'h14, a, 3);

    // 3. Load-use activity (Section 2.1)
    clear_prog();
    a = seed_regs();
    put(a - 'h04, i_addiu(4, 0, 'h40));           // r4 points at a pointer
    put(a + 'h00, i_addiu(1, 2, 1));
    put(a + 'h04, i_lw(3, 0, 4));
    put(a + 'h08, i_lw(5, 0, 3));
    put(a + 'h0c, i_addiu(6, 7, 1));
    put(a + 'h10, i_addiu(8, 5, 1));
    put(a + 'h14, i_addiu(9, 8, 1));
    finish_at(a + 'h18);
    dut.u_dmem.mem['h40 >> 2] = 32'h80;
    dut.u_dmem.mem['h80 >> 2] = 32'h1234_0000;
    run_prog("load-use");
    check_rel("load-use", a + 'h04, a, 0);
    check_rel("load-use", a + 'h08, a, 2);
    check_rel("load-use", a + 'h0c, a, 2);
    check_rel("load-use", a + 'h10, a, 4);
    check_rel("load-use", a + 'h14, a, 5);

    // 4. Jump resolved in D (Section 2.2, left sequence)
    clear_prog();
    put(32'h1000, i_addiu(1, 2, 1));
    put(32'h1004, i_j(32'h2000));
    put(32'h1008, i_addiu(20, 0, 99));           // must not execute
    put(32'h2000, i_addiu(3, 4, 1));
    put(32'h2004, i_addiu(5, 6, 1));
    put(32'h0000, i_j(32'h1000));
    finish_at(32'h2008);
    run_prog("jump");
    check_rel("jump", 32'h1004, 32'h1000, 0);
    check_rel("jump", 32'h2000, 32'h1000, 2);
    check_rel("jump", 32'h2004, 32'h1000, 2);

    // 5. Taken branch resolved in A0 (Section 2.2, right sequence)
    clear_prog();
    put(32'h0000, i_addiu(1, 0, 5));
    put(32'h0004, i_j(32'h1000));
    put(32'h1000, i_bne(1, 2, (32'h2000 - 32'h1004) >> 2));
    put(32'h1004, i_addiu(21, 0, 77));           // younger partner, squashed
    put(32'h1008, i_addiu(22, 0, 77));
    put(32'h2000, i_addiu(3, 4, 1));
    put(32'h2004, i_addiu(5, 6, 1));
    finish_at(32'h2008);
    run_prog("branch");
    check_rel("branch", 32'h2000, 32'h1000, 3);
    check_rel("branch", 32'h2004, 32'h1000, 3);

    // 6. Aligned fetch blocks (Section 2.2)
    clear_prog();
    put(32'h000, i_addiu(1, 0, 1));               // opA
    put(32'h004, i_addiu(2, 0, 2));               // opB
    put(32'h008, i_addiu(3, 0, 3));               // opC
    put(32'h00c, i_j(32'h100));
    put(32'h100, i_addiu(4, 0, 4));               // opD
    put(32'h104, i_j(32'h204));
    put(32'h200, i_addiu(23, 0, 1));              // discarded
    put(32'h204, i_addiu(5, 0, 5));               // opE
    put(32'h208, i_j(32'h30c));
    put(32'h20c, i_addiu(24, 0, 1));              // discarded
    put(32'h308, i_addiu(25, 0, 1));              // discarded
    put(32'h30c, i_addiu(6, 0, 6));               // opF
    put(32'h310, i_addiu(7, 0, 7));               // opG
    put(32'h314, i_addiu(8, 0, 8));               // opH
    finish_at(32'h318);
    run_prog("aligned-fetch");
    check_rel("aligned-fetch", 32'h004, 32'h000, 0);
    check_rel("aligned-fetch", 32'h008, 32'h000, 1);
    check_rel("aligned-fetch", 32'h00c, 32'h000, 1);
    check_rel("aligned-fetch", 32'h100, 32'h000, 3);
    check_rel("aligned-fetch", 32'h204, 32'h000, 5);
    check_rel("aligned-fetch", 32'h208, 32'h000, 6);
    check_rel("aligned-fetch", 32'h30c, 32'h000, 8);
    check_rel("aligned-fetch", 32'h310, 32'h000, 9);
    check_rel("aligned-fetch", 32'h314, 32'h000, 9);

    // 7. Precise exception (Section 2.2)
    clear_prog();
    a = seed_regs();
    put(a + 'h00, i_addu(1, 2, 3));
    put(a + 'h04, i_illegal());
    put(a + 'h08, i_addiu(4, 5, 1));              // younger: must not write
    put(a + 'h0c, i_addiu(6, 7, 1));
    put(EXCV + 'h0, i_addiu(10, 0, 10));          // handler opX, opY, opZ
    put(EXCV + 'h4, i_addiu(11, 0, 11));
    put(EXCV + 'h8, i_addiu(12, 0, 12));
    finish_at(EXCV + 'hc);
    run_prog("exception");
    check(epc == a + 'h04, "exception: epc names the illegal instruction");
    check(first_commit[(a + 'h08) >> 2] < 0, "exception: younger instruction squashed");

    // 8. Structural hazards (Section 2.3)
    clear_prog();
    a = seed_regs();
    put(a + 'h00, i_mul(1, 2, 3));
    put(a + 'h04, i_mul(4, 5, 6));
    put(a + 'h08, i_lw(7, 0, 8));
    put(a + 'h0c, i_sw(9, 0, 10));
    finish_at(a + 'h10);
    run_prog("structural");
    check_rel("structural", a + 'h04, a, 1);
    check_rel("structural", a + 'h08, a, 2);
    check_rel("structural", a + 'h0c, a, 3);

    // 9. WAW and WAR name hazards (Section 2.4)
    clear_prog();
    a = seed_regs();
    put(a + 'h00, i_addiu(1, 2, 1));
    put(a + 'h04, i_addiu(1, 3, 1));
    put(a + 'h08, i_addiu(1, 2, 1));
    put(a + 'h0c, i_addiu(2, 3, 1));
    finish_at(a + 'h10);
    run_prog("waw-war");
    check_rel("waw-war", a + 'h04, a, 1);
    check_rel("waw-war", a + 'h08, a, 2);
    check_rel("waw-war", a + 'h0c, a, 2);

    // 10. jal / jr
    clear_prog();
    put(32'h000, i_addiu(1, 0, 7));
    put(32'h004, i_jal(32'h100));
    put(32'h008, i_addiu(2, 1, 1));
    put(32'h00c, i_j(32'h200));
    put(32'h100, i_addiu(1, 1, 10));
    put(32'h104, i_jr(31));
    finish_at(32'h200);
    run_prog("jal-jr");

    // 11. Random programs
    for (int t = 0; t < 200; t++) begin
      gen_random(400, t % 3 == 2);
      for (int i = 0; i < 64; i++) dut.u_dmem.mem[i] = $urandom;
      run_prog($sformatf("random%0d", t));
    end

    // every mechanism must have happened
    check(n_dual > 0, "dual issue never happened");
    check(n_swz  > 0, "swizzle never happened");
    check(n_raw  > 0, "RAW stall never happened");
    check(n_rawi > 0, "intra-block RAW split never happened");
    check(n_waw  > 0, "WAW split never happened");
    check(n_str  > 0, "structural split never happened");
    check(n_byp  > 0, "bypass never happened");
    check(n_jmp  > 0, "jump never happened");
    check(n_br   > 0, "taken branch never happened");
    check(n_sq   > 0, "young-partner squash never happened");
    check(n_aln  > 0, "aligned-fetch discard never happened");
    check(n_exc  > 0, "exception never happened");
    $display("events: dual=%0d swizzle=%0d raw_stall=%0d raw_intra=%0d waw=%0d struct=%0d bypass=%0d jump=%0d branch=%0d squash=%0d align=%0d exc=%0d",
             n_dual, n_swz, n_raw, n_rawi, n_waw, n_str, n_byp, n_jmp, n_br, n_sq, n_aln, n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
