// parc_asm_pkg: instruction encoders for the PARCv1 testbenches.
//
// Each function returns the 32-bit word of one instruction in the MIPS32
// encodings the processor decodes. Branch offsets are in instructions,
// relative to pc+4; jump targets are byte addresses.
package parc_asm_pkg;

  function automatic logic [31:0] i_addu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
  endfunction

  function automatic logic [31:0] i_mul(int rd, int rs, int rt);
    return {6'h1c, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h02};
  endfunction

  function automatic logic [31:0] i_addiu(int rt, int rs, int imm);
    return {6'h09, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] i_lw(int rt, int off, int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(off)};
  endfunction

  function automatic logic [31:0] i_sw(int rt, int off, int rs);
    return {6'h2b, 5'(rs), 5'(rt), 16'(off)};
  endfunction

  function automatic logic [31:0] i_bne(int rs, int rt, int off);
    return {6'h05, 5'(rs), 5'(rt), 16'(off)};
  endfunction

  function automatic logic [31:0] i_j(logic [31:0] target);
    return {6'h02, target[27:2]};
  endfunction

  function automatic logic [31:0] i_jal(logic [31:0] target);
    return {6'h03, target[27:2]};
  endfunction

  function automatic logic [31:0] i_jr(int rs);
    return {6'h00, 5'(rs), 15'd0, 6'h08};
  endfunction

  function automatic logic [31:0] i_nop();
    return 32'h0000_0000;
  endfunction

  // An opcode the processor does not implement (MIPS "lui")
  function automatic logic [31:0] i_illegal();
    return 32'h3c01_1234;
  endfunction

endpackage
