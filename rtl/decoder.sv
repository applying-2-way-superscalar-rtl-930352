// Instruction decoder (Decode 0 / Decode 1; two instances work in parallel).
//
// Combinational. Identifies one 32-bit instruction and produces its control signals
// (uop_t): the execution unit class that selects its reservation station, the ALU,
// branch, multiply or load/store operation, source and destination registers and the
// extended immediate. BEQ/BNE targets are pc + 4 + (offset << 2); J/JAL take the
// 26-bit field as a word address inside the current 256 MB region. JAL writes r31.
// The prediction made at fetch is passed through. Unknown opcodes decode as a no-op
// flagged `illegal`. The MIPS-style field layout and opcode values are this design's
// choice (see core_pkg).
// Some output bits are constant by construction (fields an instruction class never
// uses are zero) or copied from the input (pc and prediction fields).
module decoder
  import core_pkg::*;
(
  input  logic             valid,
  input  iq_entry_t        in,
  output uop_t             uop
);
  logic [5:0]  op, fn;
  logic [31:0] simm, zimm;

  always_comb begin
    op   = in.instr[31:26];
    fn   = in.instr[5:0];
    simm = {{16{in.instr[15]}}, in.instr[15:0]};
    zimm = {16'd0, in.instr[15:0]};
    uop  = '0;
    uop.valid       = valid;
    uop.pc          = in.pc;
    uop.pred_taken  = in.pred_taken;
    uop.pred_target = in.pred_target;
    uop.pq_idx      = in.pq_idx;
    uop.rs          = in.instr[25:21];
    uop.rt          = in.instr[20:16];
    uop.jtarget     = in.pc + 32'd4 + {simm[29:0], 2'b00};
    uop.unit        = UNIT_ALU;
    uop.alu_op      = ALU_ADD;
    uop.br_op       = BR_BEQ;
    uop.mult_op     = MU_MULT;
    uop.ls_size     = LS_W;
    unique case (op)
      OP_SPECIAL: begin
        uop.use_rs = 1'b1; uop.use_rt = 1'b1;
        uop.has_dest = 1'b1; uop.rd = in.instr[15:11];
        unique case (fn)
          FN_SLL, FN_SRL, FN_SRA: begin
            // shift the rt register by shamt: rt is presented as operand A
            uop.use_imm = 1'b1; uop.imm = {27'd0, in.instr[10:6]};
            uop.rs = in.instr[20:16]; uop.use_rt = 1'b0;
            uop.alu_op = (fn == FN_SLL) ? ALU_SLL : (fn == FN_SRL) ? ALU_SRL : ALU_SRA;
          end
          FN_ADD:  uop.alu_op = ALU_ADD;
          FN_ADDU: uop.alu_op = ALU_ADDU;
          FN_SUB:  uop.alu_op = ALU_SUB;
          FN_SUBU: uop.alu_op = ALU_SUBU;
          FN_AND:  uop.alu_op = ALU_AND;
          FN_OR:   uop.alu_op = ALU_OR;
          FN_XOR:  uop.alu_op = ALU_XOR;
          FN_NOR:  uop.alu_op = ALU_NOR;
          FN_CLT:  uop.alu_op = ALU_CLT;
          FN_CLTU: uop.alu_op = ALU_CLTU;
          FN_JR: begin
            uop.unit = UNIT_BR; uop.br_op = BR_JR; uop.use_rt = 1'b0; uop.has_dest = 1'b0;
          end
          FN_MULT, FN_MULTU: begin
            uop.unit = UNIT_MULT; uop.has_dest = 1'b0;
            uop.mult_op = (fn == FN_MULT) ? MU_MULT : MU_MULTU;
          end
          FN_MFUP, FN_MFLP: begin
            uop.unit = UNIT_MULT; uop.use_rs = 1'b0; uop.use_rt = 1'b0;
            uop.mult_op = (fn == FN_MFUP) ? MU_MFUP : MU_MFLP;
          end
          default: begin uop.illegal = 1'b1; uop.has_dest = 1'b0; end
        endcase
      end
      OP_J, OP_JAL: begin
        uop.unit    = UNIT_BR;
        uop.br_op   = (op == OP_J) ? BR_J : BR_JAL;
        uop.jtarget = {in.pc[31:28], in.instr[25:0], 2'b00};
        uop.has_dest = (op == OP_JAL);
        uop.rd       = 5'd31;
      end
      OP_BEQ, OP_BNE: begin
        uop.unit = UNIT_BR; uop.use_rs = 1'b1; uop.use_rt = 1'b1;
        uop.br_op = (op == OP_BEQ) ? BR_BEQ : BR_BNE;
      end
      OP_ADDI, OP_ADDIU, OP_CLTI, OP_CLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        uop.use_rs = (op != OP_LUI); uop.use_imm = 1'b1;
        uop.has_dest = 1'b1; uop.rd = in.instr[20:16];
        uop.imm = (op == OP_ANDI || op == OP_ORI || op == OP_XORI) ? zimm : simm;
        unique case (op)
          OP_ADDI:  uop.alu_op = ALU_ADD;
          OP_ADDIU: uop.alu_op = ALU_ADDU;
          OP_CLTI:  uop.alu_op = ALU_CLT;
          OP_CLTIU: uop.alu_op = ALU_CLTU;
          OP_ANDI:  uop.alu_op = ALU_AND;
          OP_ORI:   uop.alu_op = ALU_OR;
          OP_XORI:  uop.alu_op = ALU_XOR;
          default:  uop.alu_op = ALU_LUI;
        endcase
      end
      OP_COP0: begin
        uop.unit = UNIT_MULT; uop.mult_op = MU_MFC0;
        uop.has_dest = 1'b1; uop.rd = in.instr[20:16];
        uop.imm = {27'd0, in.instr[15:11]};   // CP0 register number
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        uop.unit = UNIT_LS; uop.use_rs = 1'b1; uop.imm = simm;
        uop.has_dest = 1'b1; uop.rd = in.instr[20:16];
        uop.ls_size = (op == OP_LB) ? LS_B : (op == OP_LBU) ? LS_BU :
                      (op == OP_LH) ? LS_H : (op == OP_LHU) ? LS_HU : LS_W;
      end
      OP_SB, OP_SH, OP_SW: begin
        uop.unit = UNIT_LS; uop.use_rs = 1'b1; uop.use_rt = 1'b1; uop.imm = simm;
        uop.is_store = 1'b1;
        uop.ls_size = (op == OP_SB) ? LS_B : (op == OP_SH) ? LS_H : LS_W;
      end
      default: begin uop.illegal = 1'b1; uop.unit = UNIT_ALU; end
    endcase
    if (uop.rd == 5'd0) uop.has_dest = 1'b0;
    if (uop.illegal) uop.unit = UNIT_NONE;
  end
endmodule
