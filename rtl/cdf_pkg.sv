// cdf_pkg: types and constants shared by the CounterDataFlow (CDF) core.
//
// A CDF core moves two kinds of token through a ring of identical pipe
// stages: instruction tokens travel away from the reorder buffer (ROB), result
// (data) tokens travel towards it. Both are tagged with the ROB entry number
// of the instruction that produces the value, which gives renaming for free.
// The token contents (opcode, tag, valid bit, consumers and producers) follow
// the description of counterflow tokens; the field widths, the operation
// encodings and the micro-op format are this design's own choices, since the
// original core was defined on the SimpleScalar instruction set, which is not
// reproduced here.
package cdf_pkg;

  localparam int unsigned XLEN    = 32;   // data word width
  localparam int unsigned NREGS   = 64;   // 32 integer + 32 floating-point registers
  localparam int unsigned REG_W   = 6;
  localparam int unsigned TAG_W   = 7;    // ROB index; enough for the largest (128-entry) ROB
  localparam int unsigned STSEQ_W = 8;    // store sequence counter width

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [REG_W-1:0]   reg_t;
  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [STSEQ_W-1:0] stseq_t;

  // Instruction classes; each sidepanel accepts a set of them.
  typedef enum logic [2:0] {
    OC_ALU    = 3'd0,   // single-cycle integer
    OC_BRANCH = 3'd1,   // conditional branch
    OC_LOAD   = 3'd2,
    OC_STORE  = 3'd3,
    OC_MULDIV = 3'd4,   // multi-cycle integer
    OC_FPFAST = 3'd5,   // fast floating point
    OC_FPSLOW = 3'd6    // slow floating point
  } opclass_e;

  localparam int unsigned NOC = 7;
  typedef logic [NOC-1:0] ocmask_t;

  // Function codes, interpreted per class.
  localparam logic [3:0] FN_ADD  = 4'd0;
  localparam logic [3:0] FN_SUB  = 4'd1;
  localparam logic [3:0] FN_AND  = 4'd2;
  localparam logic [3:0] FN_OR   = 4'd3;
  localparam logic [3:0] FN_XOR  = 4'd4;
  localparam logic [3:0] FN_SLT  = 4'd5;
  localparam logic [3:0] FN_SLTU = 4'd6;
  localparam logic [3:0] FN_SLL  = 4'd7;
  localparam logic [3:0] FN_SRL  = 4'd8;
  localparam logic [3:0] FN_SRA  = 4'd9;
  localparam logic [3:0] FN_NOR  = 4'd10;

  localparam logic [3:0] FN_BEQ  = 4'd0;
  localparam logic [3:0] FN_BNE  = 4'd1;
  localparam logic [3:0] FN_BLT  = 4'd2;
  localparam logic [3:0] FN_BGE  = 4'd3;

  localparam logic [3:0] FN_MUL  = 4'd0;
  localparam logic [3:0] FN_DIV  = 4'd1;
  localparam logic [3:0] FN_DIVU = 4'd2;
  localparam logic [3:0] FN_REM  = 4'd3;
  localparam logic [3:0] FN_REMU = 4'd4;

  // Decoded micro-op delivered by the fetch unit.
  typedef struct packed {
    opclass_e   oc;
    logic [3:0] fn;
    logic       has_dst;     // writes dst
    reg_t       dst;
    reg_t       src1;        // register 0 reads as zero
    reg_t       src2;
    logic       use_imm;     // ALU/MULDIV/FP second operand is imm instead of src2
    word_t      imm;         // immediate, memory offset or branch displacement
    word_t      pc;          // word address of the instruction
    logic       pred_taken;  // fetch unit's prediction for a branch
  } uop_t;

  // A consumer of an instruction token: the operand it is waiting for.
  typedef struct packed {
    logic  rdy;   // value present
    tag_t  tag;   // producer's ROB entry when not ready
    reg_t  r;     // architectural register (to read the register file after the producer retires)
    word_t val;
  } cons_t;

  // Instruction token.
  typedef struct packed {
    logic       valid;
    tag_t       tag;       // own ROB entry = tag of the producer token it will create
    opclass_e   oc;
    logic [3:0] fn;
    logic       use_imm;
    word_t      imm;
    word_t      pc;
    logic       pred_taken;
    stseq_t     st_seq;    // number of older stores (loads wait until these have committed)
    cons_t      c1;
    cons_t      c2;
  } itok_t;

  // Result (data) token.
  typedef struct packed {
    logic  valid;
    tag_t  tag;       // producer's ROB entry
    word_t val;       // result, or store data
    word_t addr;      // store address, or corrected next pc of a mispredicted branch
    logic  misp;      // branch was mispredicted
    logic  pass_rob;  // must pass the ROB once more before finishing (half-circuit rule)
  } dtok_t;

  localparam itok_t ITOK_EMPTY = '0;
  localparam dtok_t DTOK_EMPTY = '0;

  function automatic logic oc_in(ocmask_t m, opclass_e oc);
    return m[oc];
  endfunction

endpackage
