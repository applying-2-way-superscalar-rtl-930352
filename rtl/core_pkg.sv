// Shared types and constants of the 2-way superscalar RISC core.
//
// The instruction format follows a MIPS-style 32-bit layout (op[31:26], rs[25:21],
// rt[20:16], rd[15:11], shamt[10:6], funct[5:0]); the opcode values below are this
// design's choice, since the instruction encodings themselves are not specified.
// Mnemonics follow the processor's own names where they exist (CLT for set-on-less-than,
// MFUP/MFLP for moves from the upper/lower product register). There is no branch delay
// slot. Sizes that come from the microarchitecture description (32-entry ROB, 10-entry
// instruction queue, 16-entry prediction queue, 8-entry return stack, 10-bit GHR) are
// the defaults here.
package core_pkg;

  localparam int XLEN      = 32;
  localparam int ROB_DEPTH = 32;
  localparam int ROB_W     = $clog2(ROB_DEPTH);
  localparam int PQ_DEPTH  = 16;
  localparam int PQ_W      = $clog2(PQ_DEPTH);
  localparam int GHR_W     = 10;
  localparam int NUM_CDB   = 6;   // result buses: ALU0, ALU1, LOAD, STORE, BR, MULT
  localparam int CDB_ALU0 = 0, CDB_ALU1 = 1, CDB_LOAD = 2, CDB_STORE = 3, CDB_BR = 4, CDB_MULT = 5;

  // Opcodes (instr[31:26])
  localparam logic [5:0] OP_SPECIAL = 6'h00, OP_J    = 6'h02, OP_JAL  = 6'h03,
                         OP_BEQ     = 6'h04, OP_BNE  = 6'h05, OP_ADDI = 6'h08,
                         OP_ADDIU   = 6'h09, OP_CLTI = 6'h0A, OP_CLTIU = 6'h0B,
                         OP_ANDI    = 6'h0C, OP_ORI  = 6'h0D, OP_XORI = 6'h0E,
                         OP_LUI     = 6'h0F, OP_COP0 = 6'h10,
                         OP_LB      = 6'h20, OP_LH   = 6'h21, OP_LW   = 6'h23,
                         OP_LBU     = 6'h24, OP_LHU  = 6'h25,
                         OP_SB      = 6'h28, OP_SH   = 6'h29, OP_SW   = 6'h2B;
  // Function codes for OP_SPECIAL (instr[5:0])
  localparam logic [5:0] FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
                         FN_JR   = 6'h08, FN_MFUP = 6'h10, FN_MFLP = 6'h12,
                         FN_MULT = 6'h18, FN_MULTU = 6'h19,
                         FN_ADD  = 6'h20, FN_ADDU = 6'h21, FN_SUB  = 6'h22,
                         FN_SUBU = 6'h23, FN_AND  = 6'h24, FN_OR   = 6'h25,
                         FN_XOR  = 6'h26, FN_NOR  = 6'h27, FN_CLT  = 6'h2A,
                         FN_CLTU = 6'h2B;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDU, ALU_SUB, ALU_SUBU, ALU_CLT, ALU_CLTU, ALU_AND, ALU_OR,
    ALU_XOR, ALU_NOR, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [2:0] {
    UNIT_NONE, UNIT_ALU, UNIT_LS, UNIT_BR, UNIT_MULT
  } unit_e;

  typedef enum logic [2:0] {
    BR_BEQ, BR_BNE, BR_J, BR_JAL, BR_JR
  } br_op_e;

  typedef enum logic [2:0] {
    MU_MULT, MU_MULTU, MU_MFUP, MU_MFLP, MU_MFC0
  } mult_op_e;

  // Memory access size/sign
  typedef enum logic [2:0] {
    LS_B, LS_BU, LS_H, LS_HU, LS_W
  } ls_size_e;

  // Decoded control signals of one instruction
  typedef struct packed {
    logic             valid;
    logic [31:0]      pc;
    unit_e            unit;
    alu_op_e          alu_op;
    br_op_e           br_op;
    mult_op_e         mult_op;
    ls_size_e         ls_size;
    logic             is_store;
    logic             use_rs;     // operand A comes from register rs
    logic             use_rt;     // operand B comes from register rt
    logic [4:0]       rs;
    logic [4:0]       rt;
    logic             has_dest;
    logic [4:0]       rd;         // destination register
    logic             use_imm;    // operand B is the immediate
    logic [31:0]      imm;        // sign/zero-extended immediate or shift amount
    logic [31:0]      jtarget;    // absolute target of J/JAL, pc+4+offset of BEQ/BNE
    logic             pred_taken; // fetch-stage prediction
    logic [31:0]      pred_target;
    logic [PQ_W-1:0]  pq_idx;     // prediction-queue entry of a branch
    logic             illegal;
  } uop_t;

  // Operand held in a reservation station: a value, or the ROB tag that will produce it
  typedef struct packed {
    logic             ready;
    logic [ROB_W-1:0] tag;
    logic [31:0]      value;
  } operand_t;

  // Entry of a reservation station / what it issues
  typedef struct packed {
    uop_t             uop;
    logic [ROB_W-1:0] rob_tag;
    operand_t         opa;
    operand_t         opb;
  } rs_entry_t;

  // A result bus (common data bus) carrying a finished instruction to the ROB and RSs
  typedef struct packed {
    logic             valid;
    logic [ROB_W-1:0] tag;
    logic [31:0]      value;
    logic             exception;   // arithmetic overflow
    logic             mispredict;  // branch went elsewhere than predicted
    logic             br_taken;    // actual branch direction
    logic [31:0]      next_pc;     // correct next pc of a branch
    logic             is_store;
    logic [31:0]      st_addr;
    logic [31:0]      st_data;     // store data already aligned to the byte lanes
    logic [3:0]       st_be;       // byte valid bits
  } cdb_t;

  // Instruction queue entry
  typedef struct packed {
    logic [31:0]     instr;
    logic [31:0]     pc;
    logic            pred_taken;
    logic [31:0]     pred_target;
    logic [PQ_W-1:0] pq_idx;
  } iq_entry_t;

  // Prediction queue entry, written at IF1, read at retirement to train the predictor
  typedef struct packed {
    logic [31:0]      pc;
    logic [1:0]       kind;        // 0 cond, 1 jump, 2 call, 3 return
    logic             pred_taken;
    logic [GHR_W-1:0] ghr;         // history the prediction was made with
    logic [11:0]      gidx;        // global-history counter index used
    logic [1:0]       gctr;        // global counter value read
    logic [1:0]       lctr;        // local counter value read
    logic             btb_hit;
    logic [1:0]       btb_way;
  } pq_entry_t;

  localparam logic [1:0] BK_COND = 2'd0, BK_JUMP = 2'd1, BK_CALL = 2'd2, BK_RET = 2'd3;

  // 2-bit saturating counter update
  function automatic logic [1:0] sat_update(input logic [1:0] c, input logic taken);
    if (taken) return (c == 2'b11) ? c : c + 2'd1;
    else       return (c == 2'b00) ? c : c - 2'd1;
  endfunction

endpackage
