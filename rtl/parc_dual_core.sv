// parc_dual_core: in-order dual-issue PARCv1 pipeline.
//
// Stages: F fetches an aligned block of two instructions; D decodes both,
// reads four register operands, bypasses in-flight results and issues zero,
// one or two instructions, steering each to the pipe that can run it; the A
// pipe (A0, A1) executes integer operations, mul and branches, the B pipe
// (B0, B1) integer operations, loads and stores; W writes back through two
// register-file write ports. Memories are combinational: the instruction
// memory is read in F, the data memory in B1.
//
// Hazards, as the course notes lay them out:
//   * RAW: operands are bypassed from A0, B0, A1 and B1 (full bypassing) and
//     from W through the register file. A load in B0 has no data yet, so a
//     consumer in D waits one cycle. With FULL_BYPASS = 0 every RAW hazard
//     is resolved by stalling instead.
//   * Inside a fetch block: RAW, WAW and structural conflicts let only the
//     older instruction issue; the younger one follows alone.
//   * Control: jumps (j, jal, jr) are resolved in D: the fetch block behind
//     is squashed and, if the jump is the older slot, so is its partner. A
//     taken bne is resolved in A0: D, F and a younger partner in B0 are
//     squashed. No branch prediction: fetch always continues at PC+8.
//   * Precise exceptions: an illegal instruction is detected in D, travels
//     down a pipe and is taken at the commit point A1/B1. It does not write,
//     everything younger (A0, B0, D, F) is squashed, EPC records its PC and
//     fetch restarts at EXC_VECTOR. An exception wins over a branch in A0.
// WAR hazards cannot occur: all operands are read in D, in order.
//
// Choices of this design, not given by the notes: MIPS32 encodings, the
// reset PC and exception vector, single-cycle mul in A0, the pipe a lone
// instruction goes to (A when possible), serialising the WAW case, nothing
// issuing behind an illegal instruction, and the EPC register as the only
// exception state.
//
// Interface: imem_addr/imem_inst0/imem_inst1 to a combinational instruction
// memory; dmem_* to a combinational-read data memory; commit_valid/commit_pc
// report the instructions leaving W each cycle (index 0: A pipe, 1: B pipe);
// epc is the PC of the last excepting instruction; ev carries per-cycle
// event flags. Synchronous active-high reset.
module parc_dual_core
  import parc_pkg::*;
#(
  parameter word_t RESET_PC    = 32'h0000_0000,
  parameter word_t EXC_VECTOR  = 32'h0000_3000,
  parameter bit    FULL_BYPASS = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  // instruction memory
  output word_t      imem_addr,
  input  word_t      imem_inst0,
  input  word_t      imem_inst1,
  // data memory
  output word_t      dmem_addr,
  input  word_t      dmem_rdata,
  output logic       dmem_wen,
  output word_t      dmem_wdata,
  // observation
  output logic [1:0] commit_valid,
  output word_t      commit_pc [2],
  output word_t      epc,
  output events_t    ev
);

  // ---------------------------------------------------------------- F stage
  word_t      f_pc, f_blk;
  logic [1:0] f_slotv;
  logic       f_stall;
  logic       exc, br, jmp;
  word_t      exc_pc, br_pc, jmp_pc;

  parc_fetch #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst,
    .stall        (f_stall),
    .exc_redirect (exc),
    .exc_pc       (EXC_VECTOR),
    .br_redirect  (br),
    .br_pc        (br_pc),
    .jmp_redirect (jmp),
    .jmp_pc       (jmp_pc),
    .pc           (f_pc),
    .blk_addr     (f_blk),
    .slot_valid   (f_slotv)
  );

  assign imem_addr = f_blk;

  // ---------------------------------------------------------------- D stage
  logic [1:0] d_v;
  word_t      d_pc;           // address of the fetch block
  word_t      d_inst [2];
  dinst_t     dec [2];

  parc_decode u_dec0 (.inst(d_inst[0]), .d(dec[0]));
  parc_decode u_dec1 (.inst(d_inst[1]), .d(dec[1]));

  reg_idx_t rf_raddr [4];
  word_t    rf_rdata [4];
  logic     rf_wen   [2];
  reg_idx_t rf_waddr [2];
  word_t    rf_wdata [2];

  assign rf_raddr[0] = dec[0].rs;
  assign rf_raddr[1] = dec[0].rt;
  assign rf_raddr[2] = dec[1].rs;
  assign rf_raddr[3] = dec[1].rt;

  parc_regfile u_rf (
    .clk, .rst,
    .raddr (rf_raddr), .rdata (rf_rdata),
    .wen   (rf_wen),   .waddr (rf_waddr), .wdata (rf_wdata)
  );

  // Pipe registers
  pipe_t a0, a1, b0, b1, wa, wb;
  word_t a0_result, b0_result, b1_result;
  logic  a0_br_taken;
  word_t a0_br_target;

  // In-flight results seen by the bypass network, youngest first
  byp_src_t byp [NBYP];
  always_comb begin
    byp[0] = '{wen: a0.valid && a0.wen, dst: a0.dst, ready: 1'b1,            data: a0_result};
    byp[1] = '{wen: b0.valid && b0.wen, dst: b0.dst, ready: b0.op != UOP_LW, data: b0_result};
    byp[2] = '{wen: a1.valid && a1.wen, dst: a1.dst, ready: 1'b1,            data: a1.result};
    byp[3] = '{wen: b1.valid && b1.wen, dst: b1.dst, ready: 1'b1,            data: b1_result};
  end

  word_t opnd     [4];
  logic  opnd_stl [4];
  logic  opnd_hit [4];
  logic  opnd_en  [4];

  assign opnd_en[0] = dec[0].rs_en;
  assign opnd_en[1] = dec[0].rt_en;
  assign opnd_en[2] = dec[1].rs_en;
  assign opnd_en[3] = dec[1].rt_en;

  for (genvar p = 0; p < 4; p++) begin : g_byp
    parc_bypass #(.FULL_BYPASS(FULL_BYPASS)) u_byp (
      .src     (rf_raddr[p]),
      .en      (opnd_en[p]),
      .rf_data (rf_rdata[p]),
      .srcs    (byp),
      .data    (opnd[p]),
      .stall   (opnd_stl[p]),
      .hit     (opnd_hit[p])
    );
  end

  logic stall0, stall1;
  assign stall0 = opnd_stl[0] || opnd_stl[1];
  assign stall1 = opnd_stl[2] || opnd_stl[3];

  logic iss0, iss1, kill1, a_valid, a_slot, a_young, b_valid, b_slot, b_young;
  logic ev_raw_intra, ev_waw, ev_struct;

  parc_issue u_issue (
    .v0 (d_v[0]), .v1 (d_v[1]), .d0 (dec[0]), .d1 (dec[1]),
    .stall0, .stall1,
    .iss0, .iss1, .kill1,
    .a_valid, .a_slot, .a_young, .b_valid, .b_slot, .b_young,
    .ev_raw_intra, .ev_waw, .ev_struct
  );

  // A taken branch or an exception squashes D: nothing issues from it
  logic flush_d;
  assign flush_d = exc || br;

  // Jump resolution in D
  logic  jslot;
  word_t jslot_pc4;
  always_comb begin
    jmp   = 1'b0;
    jslot = 1'b0;
    if (!flush_d) begin
      if (iss0 && dec[0].is_jump)      begin jmp = 1'b1; jslot = 1'b0; end
      else if (iss1 && dec[1].is_jump) begin jmp = 1'b1; jslot = 1'b1; end
    end
    jslot_pc4 = d_pc + {29'd0, jslot, 2'b00} + 32'd4;
    if (dec[jslot].op == UOP_JR) jmp_pc = opnd[{jslot, 1'b0}];
    else                         jmp_pc = {jslot_pc4[31:28], dec[jslot].jidx, 2'b00};
  end

  // Build the pipe register contents for an issued slot
  function automatic pipe_t mk_pipe(logic s, logic yng);
    pipe_t r;
    r.valid  = 1'b1;
    r.young  = yng;
    r.op     = dec[s].op;
    r.pc     = d_pc + {29'd0, s, 2'b00};
    r.dst    = dec[s].dst;
    r.wen    = dec[s].wen;
    r.op1    = opnd[{s, 1'b0}];
    r.op2    = opnd[{s, 1'b1}];
    r.imm    = dec[s].imm;
    r.result = '0;
    r.exc    = dec[s].illegal;
    return r;
  endfunction

  // Slots left in D after this cycle
  logic [1:0] d_left;
  assign d_left  = d_v & ~{iss1 || kill1, iss0};
  assign f_stall = (d_left != 2'b00);

  always_ff @(posedge clk) begin
    if (rst) begin
      d_v       <= '0;
      d_pc      <= '0;
      d_inst[0] <= '0;
      d_inst[1] <= '0;
    end else if (flush_d || jmp) begin
      d_v <= '0;                 // fetched block is on the wrong path
    end else if (d_left != 2'b00) begin
      d_v <= d_left;             // hold the rest of the block
    end else begin
      d_v       <= f_slotv;
      d_pc      <= f_blk;
      d_inst[0] <= imem_inst0;
      d_inst[1] <= imem_inst1;
    end
  end

  // ------------------------------------------------------ A0/B0: execute
  parc_alu_a u_alu_a (
    .op (a0.op), .pc (a0.pc), .op1 (a0.op1), .op2 (a0.op2), .imm (a0.imm),
    .result (a0_result), .br_taken (a0_br_taken), .br_target (a0_br_target)
  );

  parc_alu_b u_alu_b (
    .op (b0.op), .pc (b0.pc), .op1 (b0.op1), .op2 (b0.op2), .imm (b0.imm),
    .result (b0_result)
  );

  // ------------------------------------------- A1/B1: commit point, memory
  assign exc    = (a1.valid && a1.exc) || (b1.valid && b1.exc);
  assign exc_pc = (a1.valid && a1.exc) ? a1.pc : b1.pc;
  assign br     = !exc && a0.valid && a0_br_taken;
  assign br_pc  = a0_br_target;

  assign dmem_addr  = b1.result;
  assign dmem_wdata = b1.op2;
  assign dmem_wen   = b1.valid && b1.op == UOP_SW;
  assign b1_result  = (b1.op == UOP_LW) ? dmem_rdata : b1.result;

  always_ff @(posedge clk) begin
    if (rst) begin
      a0 <= '0; b0 <= '0; a1 <= '0; b1 <= '0; wa <= '0; wb <= '0;
      epc <= '0;
    end else begin
      // D -> A0/B0
      a0 <= '0;
      b0 <= '0;
      if (!flush_d) begin
        if (a_valid) a0 <= mk_pipe(a_slot, a_young);
        if (b_valid) b0 <= mk_pipe(b_slot, b_young);
      end
      // A0/B0 -> A1/B1
      a1        <= a0;
      a1.result <= a0_result;
      a1.valid  <= a0.valid && !exc;
      b1        <= b0;
      b1.result <= b0_result;
      b1.valid  <= b0.valid && !exc && !(br && b0.young);
      // A1/B1 -> W: an excepting instruction does not commit
      wa        <= a1;
      wa.valid  <= a1.valid && !a1.exc;
      wb        <= b1;
      wb.result <= b1_result;
      wb.valid  <= b1.valid && !b1.exc;
      if (exc) epc <= exc_pc;
    end
  end

  // ---------------------------------------------------------------- W stage
  assign rf_wen[0]   = wa.valid && wa.wen;
  assign rf_waddr[0] = wa.dst;
  assign rf_wdata[0] = wa.result;
  assign rf_wen[1]   = wb.valid && wb.wen;
  assign rf_waddr[1] = wb.dst;
  assign rf_wdata[1] = wb.result;

  assign commit_valid = {wb.valid, wa.valid};
  assign commit_pc[0] = wa.pc;
  assign commit_pc[1] = wb.pc;

  // ---------------------------------------------------------------- events
  always_comb begin
    ev               = '0;
    if (!flush_d) begin
      ev.dual_issue   = iss0 && iss1;
      ev.swizzle      = (a_valid && a_slot) || (b_valid && !b_slot);
      ev.raw_stall    = (d_v[0] && !iss0 && stall0) ||
                        (d_v[1] && !iss1 && !kill1 && stall1);
      ev.raw_intra    = ev_raw_intra;
      ev.waw_split    = ev_waw;
      ev.struct_split = ev_struct;
      ev.bypass       = (iss0 && (opnd_hit[0] || opnd_hit[1])) ||
                        (iss1 && (opnd_hit[2] || opnd_hit[3]));
      ev.jump         = jmp;
      ev.align_discard = !jmp && d_left == 2'b00 && !f_slotv[0];
    end
    ev.branch_taken = br;
    ev.squash_young = br && b0.valid && b0.young;
    ev.exception    = exc;
  end

  // Two instructions issued together never share a pipe
  assert property (@(posedge clk) disable iff (rst)
                   (a_valid && b_valid) |-> (a_slot != b_slot))
    else $error("parc_dual_core: both pipes given the same slot");

endmodule
