// parc_bypass: bypass mux and RAW-hazard detection for one source operand.
//
// The D stage has four of these, one per register-file read port. Each looks
// at the destination of every instruction in flight in A0, B0, A1 and B1
// (srcs[0..3], youngest first) and picks the newest value of the register it
// reads. With FULL_BYPASS set (the fully bypassed pipeline of the course
// notes) the operand is taken from the youngest matching stage if that stage
// has computed it; the only value not yet available is a load in B0, whose
// data arrives from the data memory in B1, and the operand then asks for a
// stall. With FULL_BYPASS clear the design resolves RAW hazards by stalling
// only: any match in A0..B1 stalls. The W stage needs no path here because
// the register file forwards a same-cycle write. A0 and B0 (and A1 and B1)
// never write the same register, since two instructions issued together never
// share a destination.
//
// Interface: src/en name the operand, rf_data is the register-file value,
// srcs the in-flight results; data is the operand, stall asks the D stage
// to hold and hit marks a bypassed value. Combinational.
module parc_bypass
  import parc_pkg::*;
#(
  parameter bit FULL_BYPASS = 1'b1
) (
  input  reg_idx_t src,
  input  logic     en,
  input  word_t    rf_data,
  input  byp_src_t srcs [NBYP],
  output word_t    data,
  output logic     stall,
  output logic     hit      // data came from an in-flight stage
);

  always_comb begin
    logic found;
    found = 1'b0;
    data  = rf_data;
    stall = 1'b0;
    hit   = 1'b0;
    for (int i = 0; i < NBYP; i++) begin
      if (!found && en && srcs[i].wen && srcs[i].dst == src) begin
        found = 1'b1;
        if (FULL_BYPASS && srcs[i].ready) begin
          data = srcs[i].data;
          hit  = 1'b1;
        end else begin
          stall = 1'b1;
        end
      end
    end
  end

endmodule
