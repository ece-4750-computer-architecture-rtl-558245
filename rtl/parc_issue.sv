// parc_issue: issue and swizzle logic of the D stage.
//
// The D stage holds one fetch block of up to two instructions, slot 0 being
// the older. Each cycle this block decides which of them issue and sends each
// issued instruction to the execution pipe that can run it, swapping the two
// when needed ("swizzle"): mul and bne need the A pipe, lw and sw need the B
// pipe, everything else may use either.
//
// The older instruction issues unless one of its operands is not yet
// available (stall0, from the bypass network). The younger one issues in the
// same cycle only if the older one issues too (or the older slot is empty)
// and none of these holds:
//   * RAW hazard inside the block: it reads the older one's destination;
//   * WAW name hazard inside the block: both write the same register;
//   * structural hazard: both need the same pipe;
//   * the older one is a jump (the younger one is then discarded: kill1) or
//     an illegal instruction (nothing issues behind an exception);
//   * its own operands are not available (stall1).
// A younger instruction that cannot issue waits in D and issues alone in a
// later cycle; WAR hazards cannot occur because operands are read in order in
// D. Resolving the WAW case by issuing one at a time, and steering a lone
// instruction to the A pipe whenever it can go there, are this design's
// choices. The notes leave both open.
//
// Interface: slot valid bits, decoded slots and per-slot operand stalls in;
// iss0/iss1 (slot issues), kill1, and for each pipe whether it receives an
// instruction, from which slot, and whether that one is the younger of an
// issue pair; event flags for statistics. Combinational.
module parc_issue
  import parc_pkg::*;
(
  input  logic   v0,
  input  logic   v1,
  input  dinst_t d0,
  input  dinst_t d1,
  input  logic   stall0,
  input  logic   stall1,
  output logic   iss0,
  output logic   iss1,
  output logic   kill1,
  output logic   a_valid,
  output logic   a_slot,
  output logic   a_young,
  output logic   b_valid,
  output logic   b_slot,
  output logic   b_young,
  // why the younger slot did not issue alongside the older one
  output logic   ev_raw_intra,
  output logic   ev_waw,
  output logic   ev_struct
);

  logic raw01, waw01, fit_ab, fit_ba, pair_ok;

  always_comb begin
    raw01  = d0.wen && ((d1.rs_en && d1.rs == d0.dst) || (d1.rt_en && d1.rt == d0.dst));
    waw01  = d0.wen && d1.wen && d0.dst == d1.dst;
    fit_ab = d0.pipe_a && d1.pipe_b;
    fit_ba = d0.pipe_b && d1.pipe_a;

    iss0 = 1'b0; iss1 = 1'b0; kill1 = 1'b0;
    a_valid = 1'b0; a_slot = 1'b0; a_young = 1'b0;
    b_valid = 1'b0; b_slot = 1'b0; b_young = 1'b0;
    ev_raw_intra = 1'b0; ev_waw = 1'b0; ev_struct = 1'b0;
    pair_ok = 1'b0;

    if (v0) begin
      iss0  = !stall0;
      kill1 = iss0 && v1 && d0.is_jump;
      if (iss0 && v1 && !d0.is_jump && !d0.illegal) begin
        ev_raw_intra = raw01;
        ev_waw       = !raw01 && waw01;
        ev_struct    = !raw01 && !waw01 && !(fit_ab || fit_ba);
        pair_ok      = !raw01 && !waw01 && (fit_ab || fit_ba) && !stall1;
      end
      iss1 = pair_ok;
      if (pair_ok) begin
        a_valid = 1'b1; b_valid = 1'b1;
        if (fit_ab) begin
          a_slot = 1'b0; b_slot = 1'b1; b_young = 1'b1;
        end else begin
          a_slot = 1'b1; b_slot = 1'b0; a_young = 1'b1;
        end
      end else if (iss0) begin
        if (d0.pipe_a) begin a_valid = 1'b1; a_slot = 1'b0; end
        else           begin b_valid = 1'b1; b_slot = 1'b0; end
      end
    end else if (v1) begin
      iss1 = !stall1;
      if (iss1) begin
        if (d1.pipe_a) begin a_valid = 1'b1; a_slot = 1'b1; end
        else           begin b_valid = 1'b1; b_slot = 1'b1; end
      end
    end
  end

endmodule
