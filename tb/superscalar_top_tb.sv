// End-to-end testbench of the superscalar processor, run with all parameters at their
// defaults.
//
// A small program (arithmetic with dependences, loads and stores of all sizes, a counted
// loop, CALL/RET pairs, signed and unsigned multiplies with MFUP/MFLP, a CP0 read, a
// full 64-byte line of stores, a burst of load misses and a final signed overflow that
// jumps to the exception vector) is placed in the AHB memory model. An instruction-set
// reference model, written independently of the RTL, runs the same program; after the
// processor reaches the halt loop every architectural register is compared with the
// model, and so is the memory line the store gathering buffer must have written.
// The testbench also counts how often each mechanism of the design occurred (dual
// dispatch and retirement, out-of-order issue, skid-buffer stall, taken predictions,
// mispredict flush, exception, IC miss, L2 hit, DL1 hit under miss, PB-full replay,
// store gathering full line and partial eviction, multiplier use, return-stack
// prediction) and counts a failure for any that never happened.
module superscalar_top_tb;
  import core_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] haddr, hwdata, hrdata, cp0_rdata, epc, dbg_rdata;
  logic [1:0]  htrans, retired;
  logic        hwrite, hready, exception;
  logic [2:0]  hsize, hburst;
  logic [3:0]  hwstrb;
  logic [4:0]  cp0_raddr, dbg_raddr;

  always #5 clk = ~clk;

  superscalar_top dut (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hwstrb,
    .hrdata, .hready, .cp0_raddr, .cp0_rdata, .exception, .epc, .retired,
    .dbg_raddr, .dbg_rdata
  );
  ahb_mem_model #(.WORDS(65536), .WAIT_STATES(2)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hwdata, .hwstrb, .hrdata, .hready
  );
  assign cp0_rdata = 32'hC0C0_0000 | 32'(cp0_raddr);

  int checks = 0, failures = 0;

  // ---------------- tiny assembler ----------------
  logic [31:0] prog [int];
  int          pcw;
  function automatic logic [31:0] R(input logic [5:0] fn, input int rs, rt, rd, sh = 0);
    return {OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] op, input int rs, rt, imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(input logic [5:0] op, input int target);
    return {op, 26'(target >> 2)};
  endfunction
  task automatic emit(input logic [31:0] w); prog[pcw] = w; pcw += 4; endtask
  // branch offset from the instruction at pcw to byte address t
  function automatic int boff(input int t); return (t - (pcw + 4)) / 4; endfunction

  localparam int HALT = 32'h0000_0400, FUNC = 32'h0000_0500, DATA = 32'h2000,
                 SGLINE = 32'h3000, MISS = 32'h4000;

  task automatic build_program();
    int loop, sg;
    pcw = 0;
    emit(I(OP_ADDI, 0, 1, 5));
    emit(I(OP_ADDI, 0, 2, 7));
    emit(R(FN_ADD, 1, 2, 3));            // r3 = 12   (dependent on both)
    emit(R(FN_SUB, 3, 1, 4));            // r4 = 7
    emit(I(OP_ORI, 0, 5, DATA));
    emit(R(FN_NOR, 1, 2, 6));
    emit(R(FN_SLL, 0, 1, 7, 4));         // r7 = 5 << 4
    emit(R(FN_CLT, 4, 3, 8));            // r8 = 1
    emit(I(OP_SW, 5, 3, 0));
    emit(I(OP_SW, 5, 4, 4));
    emit(I(OP_SB, 5, 6, 9));
    emit(I(OP_SH, 5, 7, 14));
    emit(I(OP_LW, 5, 9, 0));
    emit(I(OP_LW, 5, 10, 4));
    emit(I(OP_LB, 5, 11, 9));
    emit(I(OP_LBU, 5, 12, 9));
    emit(I(OP_LHU, 5, 13, 14));
    emit(R(FN_ADD, 9, 10, 14));          // r14 = 19
    // counted loop: r15 = 10+9+...+1
    emit(I(OP_ADDI, 0, 15, 0));
    emit(I(OP_ADDI, 0, 16, 10));
    loop = pcw;
    emit(R(FN_ADD, 15, 16, 15));
    emit(I(OP_ADDI, 16, 16, -1));
    emit(I(OP_BNE, 16, 0, boff(loop)));
    // CALL / RET
    emit(I(OP_ADDI, 0, 17, 0));
    emit(J(OP_JAL, FUNC));
    emit(I(OP_ADDI, 17, 18, 100));
    emit(J(OP_JAL, FUNC));
    emit(I(OP_ADDI, 17, 19, 200));
    emit(J(OP_JAL, FUNC));
    emit(I(OP_ADDI, 17, 19, 300));
    // multiply and move-from
    emit(I(OP_ADDI, 0, 20, -3));
    emit(I(OP_ADDI, 0, 21, 1000));
    emit(R(FN_MULT, 20, 21, 0));
    emit(R(FN_MFUP, 0, 0, 22));
    emit(R(FN_MFLP, 0, 0, 23));
    emit(R(FN_MULTU, 20, 21, 0));
    emit(R(FN_MFUP, 0, 0, 24));
    emit(R(FN_MFLP, 0, 0, 25));
    emit({OP_COP0, 5'd0, 5'd26, 5'd12, 11'd0});   // MFC0 r26, CP0 register 12
    // store 16 words to one 64-byte line: the SGB collects a whole line
    emit(I(OP_ORI, 0, 27, SGLINE));
    emit(I(OP_ADDI, 0, 28, 16));
    sg = pcw;
    emit(I(OP_SW, 27, 28, 0));
    emit(I(OP_ADDI, 27, 27, 4));
    emit(I(OP_ADDI, 28, 28, -1));
    emit(I(OP_BNE, 28, 0, boff(sg)));
    // four load misses to different lines: the 2-entry PB fills and a load is replayed
    emit(I(OP_ORI, 0, 27, MISS));
    emit(I(OP_LW, 27, 1, 0));
    emit(I(OP_LW, 27, 2, 32'h100));
    emit(I(OP_LW, 27, 3, 32'h200));
    emit(I(OP_LW, 27, 4, 32'h300));
    emit(I(OP_LW, 27, 6, 4));            // hits the line of the first miss
    emit(R(FN_ADDU, 1, 2, 7));
    emit(R(FN_ADDU, 3, 4, 8));
    emit(R(FN_XOR, 7, 8, 9));
    emit(I(OP_LH, 27, 10, 6));
    // signed overflow: exception, handler at the vector
    emit(I(OP_LUI, 0, 29, 32'h7FFF));
    ovf_pc = pcw;
    emit(R(FN_ADD, 29, 29, 30));
    emit(I(OP_ADDI, 0, 31, 1));          // never executed
    pcw = 32'h180;                       // exception vector
    emit(I(OP_ORI, 0, 30, 32'h0EEE));
    emit(J(OP_J, HALT));
    pcw = HALT;
    emit(J(OP_J, HALT));
    pcw = FUNC;
    emit(I(OP_ADDI, 17, 17, 3));
    emit(R(FN_JR, 31, 0, 0));
  endtask

  // ---------------- reference model ----------------
  logic [31:0] ref_mem [int];
  logic [31:0] ref_r [32];
  function automatic logic [31:0] rd32(input logic [31:0] a);
    return ref_mem.exists(a >> 2) ? ref_mem[a >> 2] : 32'd0;
  endfunction
  task automatic run_reference();
    logic [31:0] pc = 0, hi = 0, lo = 0;
    int steps = 0;
    for (int i = 0; i < 32; i++) ref_r[i] = 0;
    while (pc != HALT && steps < 10000) begin
      logic [31:0] in = rd32(pc), a, b, simm, zimm, npc, res, ea, w;
      logic [5:0] op = in[31:26], fn = in[5:0];
      logic [4:0] rs = in[25:21], rt = in[20:16], rdd = in[15:11];
      logic [63:0] p;
      int wr = -1;
      a = ref_r[rs]; b = ref_r[rt];
      simm = {{16{in[15]}}, in[15:0]}; zimm = {16'd0, in[15:0]};
      npc = pc + 4; steps++;
      ea = a + simm;
      case (op)
        OP_SPECIAL: case (fn)
          FN_ADD: begin res = a + b;
            if (a[31] == b[31] && res[31] != a[31]) npc = 32'h180; else wr = rdd; end
          FN_ADDU: begin res = a + b; wr = rdd; end
          FN_SUB:  begin res = a - b;
            if (a[31] != b[31] && res[31] != a[31]) npc = 32'h180; else wr = rdd; end
          FN_SUBU: begin res = a - b; wr = rdd; end
          FN_AND:  begin res = a & b; wr = rdd; end
          FN_OR:   begin res = a | b; wr = rdd; end
          FN_XOR:  begin res = a ^ b; wr = rdd; end
          FN_NOR:  begin res = ~(a | b); wr = rdd; end
          FN_CLT:  begin res = ($signed(a) < $signed(b)) ? 1 : 0; wr = rdd; end
          FN_CLTU: begin res = (a < b) ? 1 : 0; wr = rdd; end
          FN_SLL:  begin res = b << in[10:6]; wr = rdd; end
          FN_SRL:  begin res = b >> in[10:6]; wr = rdd; end
          FN_SRA:  begin res = $signed(b) >>> in[10:6]; wr = rdd; end
          FN_JR:   npc = a;
          FN_MULT: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); {hi, lo} = p; end
          FN_MULTU: begin p = {32'd0, a} * {32'd0, b}; {hi, lo} = p; end
          FN_MFUP: begin res = hi; wr = rdd; end
          FN_MFLP: begin res = lo; wr = rdd; end
          default: ;
        endcase
        OP_ADDI:  begin res = a + simm;
          if (a[31] == simm[31] && res[31] != a[31]) npc = 32'h180; else wr = rt; end
        OP_ADDIU: begin res = a + simm; wr = rt; end
        OP_ORI:   begin res = a | zimm; wr = rt; end
        OP_ANDI:  begin res = a & zimm; wr = rt; end
        OP_XORI:  begin res = a ^ zimm; wr = rt; end
        OP_LUI:   begin res = {in[15:0], 16'd0}; wr = rt; end
        OP_BEQ:   if (a == b) npc = pc + 4 + (simm << 2);
        OP_BNE:   if (a != b) npc = pc + 4 + (simm << 2);
        OP_J:     npc = {pc[31:28], in[25:0], 2'b00};
        OP_JAL:   begin npc = {pc[31:28], in[25:0], 2'b00}; res = pc + 4; wr = 31; end
        OP_COP0:  begin res = 32'hC0C0_0000 | 32'(rdd); wr = rt; end
        OP_LW:    begin res = rd32(ea); wr = rt; end
        OP_LB:    begin w = rd32(ea); res = {{24{w[ea[1:0]*8+7]}}, w[ea[1:0]*8 +: 8]}; wr = rt; end
        OP_LBU:   begin w = rd32(ea); res = {24'd0, w[ea[1:0]*8 +: 8]}; wr = rt; end
        OP_LH:    begin w = rd32(ea); res = {{16{w[ea[1]*16+15]}}, w[ea[1]*16 +: 16]}; wr = rt; end
        OP_LHU:   begin w = rd32(ea); res = {16'd0, w[ea[1]*16 +: 16]}; wr = rt; end
        OP_SW:    ref_mem[ea >> 2] = b;
        OP_SH:    begin w = rd32(ea); w[ea[1]*16 +: 16] = b[15:0]; ref_mem[ea >> 2] = w; end
        OP_SB:    begin w = rd32(ea); w[ea[1:0]*8 +: 8] = b[7:0]; ref_mem[ea >> 2] = w; end
        default: ;
      endcase
      if (wr > 0) ref_r[wr] = res;
      pc = npc;
    end
  endtask

  // ---------------- mechanism counters ----------------
  logic [31:0] exc_pc = '1, ovf_pc;
  int n_dual_dispatch, n_dual_retire, n_ooo_issue, n_skid_stall, n_pred_taken,
      n_mispredict, n_exception, n_ic_miss, n_l2_hit, n_hit_under_miss, n_replay,
      n_sgb_full, n_sgb_partial, n_mult, n_ret_pred, n_bypass_dp;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dp.alloc == 2'b11) n_dual_dispatch++;
    if (retired == 2'b11) n_dual_retire++;
    if ((dut.g_rs[0].u_rs.issue_valid && dut.g_rs[0].u_rs.sel != 0) ||
        (dut.g_rs[1].u_rs.issue_valid && dut.g_rs[1].u_rs.sel != 0)) n_ooo_issue++;
    if (dut.dec_stall) n_skid_stall++;
    if (dut.ev_pred_taken) n_pred_taken++;
    if (dut.flush && !exception) n_mispredict++;
    if (exception) begin n_exception++; exc_pc = epc; end
    if (dut.ev_ic_miss) n_ic_miss++;
    if (dut.u_ul2.state == dut.u_ul2.S_LOOKUP && dut.u_ul2.hit) n_l2_hit++;
    if (dut.u_dl1.m1_valid && dut.u_dl1.m1_hit && dut.u_dl1.pb_used != 0) n_hit_under_miss++;
    if (dut.ld_replay) n_replay++;
    if (dut.u_ul2.bus_wr_req && dut.u_biu.active == 1'b0 && &dut.u_ul2.bus_wr_be) n_sgb_full++;
    if (dut.u_ul2.bus_wr_req && dut.u_biu.active == 1'b0 && !(&dut.u_ul2.bus_wr_be)) n_sgb_partial++;
    if (dut.u_mult.start) n_mult++;
    if (dut.u_fetch.accept && dut.u_fetch.fb_found && dut.u_fetch.bkind == BK_RET) n_ret_pred++;
    if (dut.u_dp.alloc[1] && dut.u_dp.ent[1].opa.ready && dut.u_dp.map_busy[dut.u_dp.in_uop[1].rs] &&
        !dut.u_dp.ent_done[dut.u_dp.map_tag[dut.u_dp.in_uop[1].rs]]) n_bypass_dp++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic need(input int n, input string what);
    $display("  %-28s %0d", what, n);
    check(n > 0, {"mechanism never happened: ", what});
  endtask

  int cycles = 0, halt_cycle = -1, retired_total = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    retired_total += int'(retired[0]) + int'(retired[1]);
  end

  // optional trace: run with +trace
  always @(posedge clk) if (rst_n && $test$plusargs("trace") && cycles < 3000) begin
    if (retired[0]) $display("%0d retire pc=%08h %0d", cycles, dut.rob_pc, retired);
    if (dut.flush) $display("%0d flush -> %08h", cycles, dut.redirect_pc);
    for (int k = 0; k < 2; k++) if (dut.u_dp.alloc[k])
      $display("%0d   dispatch pc=%08h unit=%0d ill=%0d tag=%0d", cycles, dut.dp_uop[k].pc, dut.dp_uop[k].unit, dut.dp_uop[k].illegal, dut.u_dp.alloc_tag[k]);
    if (dut.cdb[4].valid) $display("%0d   br tag=%0d misp=%0d", cycles, dut.cdb[4].tag, dut.cdb[4].mispredict);
    if (dut.u_fetch.accept) $display("%0d fetch pc=%08h n=%0d", cycles, dut.u_fetch.pc, dut.u_fetch.n);
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_program();
    foreach (prog[a]) begin u_mem.mem[a >> 2] = prog[a]; ref_mem[a >> 2] = prog[a]; end
    for (int i = 0; i < 256; i++) begin
      u_mem.mem[(MISS >> 2) + i] = 32'h1000_0000 + 32'(i * 7);
      ref_mem[(MISS >> 2) + i]   = 32'h1000_0000 + 32'(i * 7);
    end
    run_reference();
    dbg_raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // wait until the halt loop retires
    while (halt_cycle < 0) begin
      @(posedge clk);
      if (retired[0] && dut.rob_pc == HALT) halt_cycle = cycles;
    end
    repeat (300) @(posedge clk);
    $display("halt reached after %0d cycles, %0d instructions retired", halt_cycle, retired_total);
    for (int r = 1; r < 32; r++) begin
      dbg_raddr = 5'(r);
      #1;
      check(dbg_rdata == ref_r[r], $sformatf("r%0d = %08h, expected %08h", r, dbg_rdata, ref_r[r]));
    end
    for (int i = 0; i < 16; i++)
      check(u_mem.mem[(SGLINE >> 2) + i] == ref_mem[(SGLINE >> 2) + i],
            $sformatf("memory word %08h = %08h, expected %08h", SGLINE + 4 * i,
                      u_mem.mem[(SGLINE >> 2) + i], ref_mem[(SGLINE >> 2) + i]));
    check(exc_pc == ovf_pc, $sformatf("exception PC %08h, expected %08h", exc_pc, ovf_pc));
    $display("mechanisms:");
    need(n_dual_dispatch, "dual dispatch");
    need(n_dual_retire, "dual retirement");
    need(n_ooo_issue, "out-of-order ALU issue");
    need(n_bypass_dp, "result bus bypass at dispatch");
    need(n_skid_stall, "skid buffer stall");
    need(n_pred_taken, "taken prediction");
    need(n_mispredict, "misprediction flush");
    need(n_exception, "overflow exception");
    need(n_ic_miss, "IL1 miss");
    need(n_l2_hit, "UL2 hit");
    need(n_hit_under_miss, "DL1 hit under miss");
    need(n_replay, "PB full load replay");
    need(n_sgb_full, "SGB full line write");
    need(n_sgb_partial, "SGB partial eviction");
    need(n_mult, "multiply");
    need(n_ret_pred, "return stack prediction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
