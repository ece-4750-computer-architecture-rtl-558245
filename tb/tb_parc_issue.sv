// tb_parc_issue: checks the issue and swizzle logic.
//
// Decoded instructions are built here from a table of the nine operations
// and the pipes each may use, with small random register numbers so that
// intra-block RAW and WAW conflicts are frequent. The expected decision is
// worked out in this testbench: the older slot issues unless stalled; the
// younger one joins it only without RAW, WAW or structural conflict, behind
// neither a jump (which discards it) nor an illegal instruction, and when
// its own operands are ready. A pair goes older-to-A/younger-to-B when it
// can, else swapped; a lone instruction goes to A when it may. A few
// directed cases from the course notes are checked by name.
module tb_parc_issue;
  import parc_pkg::*;

  logic   v0, v1, stall0, stall1;
  dinst_t d0, d1;
  logic   iss0, iss1, kill1, a_valid, a_slot, a_young, b_valid, b_slot, b_young;
  logic   ev_raw_intra, ev_waw, ev_struct;
  int checks = 0, failures = 0;

  parc_issue dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dinst_t mk(uop_e op, int dst, int rs, int rt);
    dinst_t d = '0;
    d.op = op;
    d.rs = 5'(rs); d.rt = 5'(rt);
    case (op)
      UOP_ADDU:    begin d.rs_en = 1; d.rt_en = 1; d.dst = 5'(dst); d.pipe_a = 1; d.pipe_b = 1; end
      UOP_ADDIU:   begin d.rs_en = 1;              d.dst = 5'(dst); d.pipe_a = 1; d.pipe_b = 1; end
      UOP_MUL:     begin d.rs_en = 1; d.rt_en = 1; d.dst = 5'(dst); d.pipe_a = 1; end
      UOP_LW:      begin d.rs_en = 1; d.dst = 5'(dst); d.pipe_b = 1; d.is_load = 1; end
      UOP_SW:      begin d.rs_en = 1; d.rt_en = 1; d.pipe_b = 1; d.is_store = 1; end
      UOP_J:       begin d.pipe_a = 1; d.pipe_b = 1; d.is_jump = 1; end
      UOP_JAL:     begin d.dst = 5'd31; d.pipe_a = 1; d.pipe_b = 1; d.is_jump = 1; end
      UOP_JR:      begin d.rs_en = 1; d.pipe_a = 1; d.pipe_b = 1; d.is_jump = 1; end
      UOP_BNE:     begin d.rs_en = 1; d.rt_en = 1; d.pipe_a = 1; d.is_branch = 1; end
      UOP_ILLEGAL: begin d.pipe_a = 1; d.pipe_b = 1; d.illegal = 1; end
      default:     begin d.pipe_a = 1; d.pipe_b = 1; end
    endcase
    if (d.rs == 0) d.rs_en = 0;
    if (d.rt == 0) d.rt_en = 0;
    d.wen = d.dst != 0;
    return d;
  endfunction

  task automatic check_now(string what);
    logic e0, e1, ek, eav, eas, eay, ebv, ebs, eby, raw, waw, fits;
    raw  = d0.wen && ((d1.rs_en && d1.rs == d0.dst) || (d1.rt_en && d1.rt == d0.dst));
    waw  = d0.wen && d1.wen && d0.dst == d1.dst;
    fits = (d0.pipe_a && d1.pipe_b) || (d0.pipe_b && d1.pipe_a);
    e0 = 0; e1 = 0; ek = 0;
    if (v0) begin
      e0 = !stall0;
      ek = e0 && v1 && d0.is_jump;
      e1 = e0 && v1 && !d0.is_jump && !d0.illegal && !raw && !waw && fits && !stall1;
    end else begin
      e1 = v1 && !stall1;
    end
    eav = 0; eas = 0; eay = 0; ebv = 0; ebs = 0; eby = 0;
    if (e0 && e1) begin
      eav = 1; ebv = 1;
      if (d0.pipe_a && d1.pipe_b) begin eas = 0; ebs = 1; eby = 1; end
      else                        begin eas = 1; ebs = 0; eay = 1; end
    end else if (e0 || e1) begin
      if ((e0 ? d0.pipe_a : d1.pipe_a)) begin eav = 1; eas = e1; end
      else                               begin ebv = 1; ebs = e1; end
    end
    checks++;
    if (iss0 != e0 || iss1 != e1 || kill1 != ek || a_valid != eav || b_valid != ebv ||
        (eav && (a_slot != eas || a_young != eay)) || (ebv && (b_slot != ebs || b_young != eby))) begin
      failures++;
      $display("FAIL %s: %s/%s v=%b%b st=%b%b got iss=%b%b k=%b A=%b.%b.%b B=%b.%b.%b exp iss=%b%b k=%b A=%b.%b.%b B=%b.%b.%b",
               what, d0.op.name(), d1.op.name(), v0, v1, stall0, stall1,
               iss0, iss1, kill1, a_valid, a_slot, a_young, b_valid, b_slot, b_young,
               e0, e1, ek, eav, eas, eay, ebv, ebs, eby);
    end
  endtask

  uop_e ops [10] = '{UOP_ADDU, UOP_ADDIU, UOP_MUL, UOP_LW, UOP_SW, UOP_J, UOP_JAL, UOP_JR,
                     UOP_BNE, UOP_ILLEGAL};

  initial begin
    // directed: the notes' structural, WAW, WAR and RAW pairs
    v0 = 1; v1 = 1; stall0 = 0; stall1 = 0;
    d0 = mk(UOP_MUL, 1, 2, 3);   d1 = mk(UOP_MUL, 4, 5, 6);   #1; check_now("mul,mul");
    checks++; if (iss1 || !ev_struct) begin failures++; $display("FAIL mul,mul pairs"); end
    d0 = mk(UOP_LW, 7, 8, 0);    d1 = mk(UOP_SW, 0, 10, 9);   #1; check_now("lw,sw");
    checks++; if (iss1 || !ev_struct) begin failures++; $display("FAIL lw,sw pairs"); end
    d0 = mk(UOP_ADDIU, 1, 2, 0); d1 = mk(UOP_ADDIU, 1, 3, 0); #1; check_now("waw");
    checks++; if (iss1 || !ev_waw) begin failures++; $display("FAIL waw pairs"); end
    d0 = mk(UOP_ADDIU, 1, 2, 0); d1 = mk(UOP_ADDIU, 2, 3, 0); #1; check_now("war");
    checks++; if (!iss1) begin failures++; $display("FAIL war does not pair"); end
    d0 = mk(UOP_ADDIU, 5, 1, 0); d1 = mk(UOP_ADDIU, 6, 5, 0); #1; check_now("raw");
    checks++; if (iss1 || !ev_raw_intra) begin failures++; $display("FAIL raw pairs"); end
    d0 = mk(UOP_ADDIU, 5, 6, 0); d1 = mk(UOP_MUL, 7, 8, 9);   #1; check_now("swizzle");
    checks++; if (!(iss1 && a_slot == 1 && b_slot == 0)) begin failures++; $display("FAIL swizzle"); end
    // random
    for (int t = 0; t < 20000; t++) begin
      v0 = $urandom_range(0, 3) != 0; v1 = $urandom_range(0, 3) != 0;
      stall0 = $urandom_range(0, 4) == 0; stall1 = $urandom_range(0, 4) == 0;
      d0 = mk(ops[$urandom_range(0, 9)], $urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 3));
      d1 = mk(ops[$urandom_range(0, 9)], $urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 3));
      #1;
      check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
