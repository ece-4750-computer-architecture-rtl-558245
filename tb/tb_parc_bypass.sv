// tb_parc_bypass: checks the operand bypass mux and its stall request.
//
// Random in-flight stages (A0, B0, A1, B1) with random destinations and
// readiness are presented together with a source register. The expected
// operand is found here by scanning the stages from youngest to oldest: the
// first match supplies the value if ready, or a stall if not; with no match
// the register-file value is used. A second instance with FULL_BYPASS = 0
// must stall on any match and never bypass.
module tb_parc_bypass;
  import parc_pkg::*;

  reg_idx_t src;
  logic     en;
  word_t    rf_data;
  byp_src_t srcs [NBYP];
  byp_src_t [NBYP-1:0] srcs_p;     // driven by the stimulus, copied to srcs

  for (genvar i = 0; i < NBYP; i++) begin : g_src
    assign srcs[i] = srcs_p[i];
  end
  word_t    data_f, data_s;
  logic     stall_f, stall_s, hit_f, hit_s;
  int checks = 0, failures = 0;

  parc_bypass #(.FULL_BYPASS(1'b1)) dut_full (
    .src, .en, .rf_data, .srcs, .data(data_f), .stall(stall_f), .hit(hit_f));
  parc_bypass #(.FULL_BYPASS(1'b0)) dut_stall (
    .src, .en, .rf_data, .srcs, .data(data_s), .stall(stall_s), .hit(hit_s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      automatic int    m = -1;
      automatic word_t e;
      src = 5'($urandom_range(1, 4));
      en  = ($urandom_range(0, 7) != 0);
      rf_data = $urandom;
      for (int i = 0; i < NBYP; i++) begin
        srcs_p[i].wen   = $urandom_range(0, 1);
        srcs_p[i].dst   = 5'($urandom_range(1, 4));
        srcs_p[i].ready = ($urandom_range(0, 3) != 0);
        srcs_p[i].data  = $urandom;
      end
      #1;
      for (int i = NBYP - 1; i >= 0; i--)
        if (en && srcs_p[i].wen && srcs_p[i].dst == src) m = i;
      e = (m >= 0) ? srcs_p[m].data : rf_data;
      checks++;
      if (m >= 0 && !srcs_p[m].ready) begin
        if (!stall_f) begin failures++; $display("FAIL: no stall on unready stage %0d", m); end
      end else if (stall_f || data_f !== e || hit_f != (m >= 0)) begin
        failures++;
        $display("FAIL: data %h expected %h (stall %b hit %b, match %0d)", data_f, e, stall_f, hit_f, m);
      end
      checks++;
      if (stall_s != (m >= 0) || hit_s || (m < 0 && data_s != rf_data)) begin
        failures++;
        $display("FAIL stall-only: stall %b hit %b, match %0d", stall_s, hit_s, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
