// Self-checking testbench of the instruction decoder. Random instructions of every
// class (and random bit patterns) are decoded and the unit, operation, register
// fields, immediate, destination, branch target and illegal flag are compared with an
// independent table-driven model written here.
module decoder_tb;
  import core_pkg::*;
  iq_entry_t in;
  logic      valid;
  uop_t      uop;
  int checks = 0, failures = 0;

  decoder dut (.valid, .in, .uop);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s instr=%08h", m, in.instr); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] ops [22] = '{6'h00, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h09, 6'h0A, 6'h0B,
                             6'h0C, 6'h0D, 6'h0E, 6'h0F, 6'h10, 6'h20, 6'h21, 6'h23, 6'h24,
                             6'h25, 6'h28, 6'h29, 6'h2B};
    logic [5:0] fns [18] = '{6'h00, 6'h02, 6'h03, 6'h08, 6'h10, 6'h12, 6'h18, 6'h19, 6'h20,
                             6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B};
    valid = 1; in = '0;
    for (int n = 0; n < 4000; n++) begin
      logic [5:0] op, fn;
      logic [4:0] rs, rt, rd;
      logic [31:0] simm;
      unit_e eu; logic edest; logic [4:0] erd; logic eill;
      in.instr = $urandom;
      in.pc    = {$urandom} & 32'hFFFF_FFFC;
      in.pred_taken = 1'($urandom); in.pred_target = $urandom; in.pq_idx = PQ_W'($urandom);
      if (n % 10 != 0) in.instr[31:26] = ops[$urandom_range(0, 21)];
      if (in.instr[31:26] == 0 && n % 10 != 1) in.instr[5:0] = fns[$urandom_range(0, 17)];
      #1;
      op = in.instr[31:26]; fn = in.instr[5:0];
      rs = in.instr[25:21]; rt = in.instr[20:16]; rd = in.instr[15:11];
      simm = {{16{in.instr[15]}}, in.instr[15:0]};
      eill = 0; edest = 0; erd = 0; eu = UNIT_ALU;
      case (op)
        6'h00: begin
          erd = rd; edest = 1;
          case (fn)
            6'h00, 6'h02, 6'h03: begin
              chk(uop.rs == rt && uop.use_rs && !uop.use_rt && uop.use_imm
                  && uop.imm == 32'(in.instr[10:6]), "shift operands");
              chk(uop.alu_op == ((fn == 0) ? ALU_SLL : (fn == 2) ? ALU_SRL : ALU_SRA), "shift op");
            end
            6'h08: begin eu = UNIT_BR; edest = 0; chk(uop.br_op == BR_JR && uop.use_rs, "jr"); end
            6'h10, 6'h12: begin eu = UNIT_MULT;
              chk(uop.mult_op == ((fn == 6'h10) ? MU_MFUP : MU_MFLP), "mf op"); end
            6'h18, 6'h19: begin eu = UNIT_MULT; edest = 0;
              chk(uop.mult_op == ((fn == 6'h18) ? MU_MULT : MU_MULTU) && uop.use_rs && uop.use_rt, "mult"); end
            6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2B: begin
              alu_op_e t [16];
              t[0] = ALU_ADD; t[1] = ALU_ADDU; t[2] = ALU_SUB; t[3] = ALU_SUBU; t[4] = ALU_AND;
              t[5] = ALU_OR; t[6] = ALU_XOR; t[7] = ALU_NOR; t[10] = ALU_CLT; t[11] = ALU_CLTU;
              chk(uop.alu_op == t[fn[3:0]] && uop.rs == rs && uop.rt == rt && uop.use_rs
                  && uop.use_rt && !uop.use_imm, "register alu op");
            end
            default: begin eill = 1; edest = 0; end
          endcase
        end
        6'h02, 6'h03: begin
          eu = UNIT_BR; edest = (op == 3); erd = 31;
          chk(uop.jtarget == {in.pc[31:28], in.instr[25:0], 2'b00}, "jump target");
          chk(uop.br_op == ((op == 2) ? BR_J : BR_JAL), "jump op");
        end
        6'h04, 6'h05: begin
          eu = UNIT_BR;
          chk(uop.jtarget == in.pc + 4 + (simm << 2), "branch target");
          chk(uop.br_op == ((op == 4) ? BR_BEQ : BR_BNE) && uop.rs == rs && uop.rt == rt, "branch op");
        end
        6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F: begin
          alu_op_e t [8] = '{ALU_ADD, ALU_ADDU, ALU_CLT, ALU_CLTU, ALU_AND, ALU_OR, ALU_XOR, ALU_LUI};
          erd = rt; edest = 1;
          chk(uop.alu_op == t[op[2:0]] && uop.use_imm, "immediate op");
          chk(uop.imm == ((op >= 6'h0C && op <= 6'h0E) ? {16'd0, in.instr[15:0]} : simm), "immediate");
        end
        6'h10: begin eu = UNIT_MULT; erd = rt; edest = 1;
          chk(uop.mult_op == MU_MFC0 && uop.imm == 32'(rd), "mfc0"); end
        6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
          ls_size_e t [8];
          t[0] = LS_B; t[1] = LS_H; t[3] = LS_W; t[4] = LS_BU; t[5] = LS_HU;
          eu = UNIT_LS; erd = rt; edest = 1;
          chk(uop.ls_size == t[op[2:0]] && !uop.is_store && uop.imm == simm && uop.rs == rs, "load");
        end
        6'h28, 6'h29, 6'h2B: begin
          eu = UNIT_LS;
          chk(uop.ls_size == ((op == 6'h28) ? LS_B : (op == 6'h29) ? LS_H : LS_W) && uop.is_store
              && uop.use_rt && uop.rt == rt && uop.imm == simm, "store");
        end
        default: eill = 1;
      endcase
      if (erd == 0) edest = 0;
      if (eill) eu = UNIT_NONE;
      chk(uop.illegal == eill, "illegal flag");
      chk(uop.unit == eu, "unit");
      chk(uop.has_dest == edest && (!edest || uop.rd == erd), "destination");
      chk(uop.valid && uop.pc == in.pc && uop.pred_taken == in.pred_taken
          && uop.pred_target == in.pred_target && uop.pq_idx == in.pq_idx, "pass-through fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
