// parc_pkg: types and constants shared by the dual-issue PARCv1 processor.
//
// The processor executes the PARCv1 subset addu, addiu, mul, lw, sw, j, jal,
// jr and bne. Instructions use the MIPS32 encodings (R-type addu/jr, SPECIAL2
// mul, I-type addiu/lw/sw/bne, J-type j/jal); the all-zero word is accepted as
// a no-op. Any other word is an illegal instruction and raises a precise
// exception. The encodings are this design's choice: the instruction subset
// and which pipe may execute each instruction follow the course notes.
package parc_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Major opcodes (bits 31:26)
  localparam logic [5:0] OP_SPECIAL  = 6'h00;
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_JAL      = 6'h03;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_SPECIAL2 = 6'h1c;
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_SW       = 6'h2b;

  // Function codes (bits 5:0)
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_MUL  = 6'h02;  // under SPECIAL2

  localparam reg_idx_t LINK_REG = 5'd31;

  // Operation carried down an execution pipe
  typedef enum logic [3:0] {
    UOP_NOP,
    UOP_ADDU,
    UOP_ADDIU,
    UOP_MUL,
    UOP_LW,
    UOP_SW,
    UOP_J,
    UOP_JAL,
    UOP_JR,
    UOP_BNE,
    UOP_ILLEGAL
  } uop_e;

  // One decoded instruction
  typedef struct packed {
    uop_e     op;
    reg_idx_t rs;        // first source
    reg_idx_t rt;        // second source
    logic     rs_en;     // rs is read
    logic     rt_en;     // rt is read
    reg_idx_t dst;       // destination register
    logic     wen;       // writes dst (never set for dst = r0)
    word_t    imm;       // sign-extended immediate
    logic [25:0] jidx;   // j/jal target index
    logic     pipe_a;    // may execute in the A pipe
    logic     pipe_b;    // may execute in the B pipe
    logic     is_load;
    logic     is_store;
    logic     is_jump;   // j, jal, jr: resolved in D
    logic     is_branch; // bne: resolved in A0
    logic     illegal;
  } dinst_t;

  // Contents of an execution-pipe stage register (A0, A1, B0, B1, W)
  typedef struct packed {
    logic     valid;
    logic     young;     // younger of the two instructions issued together
    uop_e     op;
    word_t    pc;
    reg_idx_t dst;
    logic     wen;
    word_t    op1;       // bypassed rs value
    word_t    op2;       // bypassed rt value
    word_t    imm;
    word_t    result;    // valid from the end of stage 0 (B pipe: not for lw)
    logic     exc;       // carries an illegal-instruction exception
  } pipe_t;

  // One result source visible to the bypass network
  typedef struct packed {
    logic     wen;       // stage holds a valid instruction writing dst
    reg_idx_t dst;
    logic     ready;     // data is already computed
    word_t    data;
  } byp_src_t;

  localparam int unsigned NBYP = 4;  // A0, B0, A1, B1 (W is forwarded by the register file)

  // Per-cycle event flags, for performance counters and tests
  typedef struct packed {
    logic dual_issue;     // two instructions issued in one cycle
    logic swizzle;        // slot 0 went to the B pipe or slot 1 to the A pipe
    logic raw_stall;      // an operand was not ready (older slot held in D)
    logic raw_intra;      // younger slot held: reads the older one's result
    logic waw_split;      // younger slot held: same destination as the older
    logic struct_split;   // younger slot held: both need the same pipe
    logic bypass;         // an issued operand came from the bypass network
    logic jump;           // a jump redirected fetch from D
    logic branch_taken;   // a taken bne redirected fetch from A0
    logic squash_young;   // a taken branch squashed its partner in B0
    logic align_discard;  // the first word of a fetch block was discarded
    logic exception;      // an exception committed in A1/B1
  } events_t;

endpackage
