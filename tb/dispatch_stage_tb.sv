// Self-checking testbench of the dispatch stage (rename table, ROB, register file,
// Dispatch_PC). Pairs of ALU instructions with many register dependencies (and some
// branches) are dispatched; the testbench plays the reservation stations and execution
// units: it keeps every entry written to a station, wakes its operands from the result
// buses, and executes ready entries in random order with random delays (so producers
// finish before, during and after their consumers' dispatch). Some branches report a
// misprediction; the younger instructions are then dropped and dispatch restarts at the
// redirect address. Station free counts are sometimes too low, which must stall the pair.
// Checks: the final architectural registers equal an in-order execution of the
// instructions that were not flushed, Dispatch_PC always predicts the next pair's PC,
// and a pair is accepted only when every station has two free entries.
module dispatch_stage_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid, in_ready, older_store, st_valid, st_ready, br_valid, br_taken;
  logic             flush, exception, pc_mismatch;
  uop_t             in_uop [2];
  logic [2:0]       rs_free [5];
  logic [1:0]       rs_wr_valid [5], retired;
  rs_entry_t        rs_wr_entry [5][2];
  cdb_t             cdb [NUM_CDB];
  logic [ROB_W-1:0] rob_head_tag, query_tag;
  logic [31:0]      rob_pc, st_addr, st_data, br_target, redirect_pc, epc, dispatch_pc0, dispatch_pc1, dbg_rdata;
  logic [3:0]       st_be;
  logic [PQ_W-1:0]  br_pq_idx;
  logic [4:0]       dbg_raddr;

  dispatch_stage dut (.clk, .rst_n, .in_valid, .in_uop, .in_ready, .rs_free, .rs_wr_valid,
    .rs_wr_entry, .cdb, .rob_head_tag, .rob_pc, .query_tag, .older_store, .st_valid, .st_addr,
    .st_data, .st_be, .st_ready, .br_valid, .br_pq_idx, .br_taken, .br_target, .flush,
    .redirect_pc, .exception, .epc, .retired, .dispatch_pc0, .dispatch_pc1, .pc_mismatch,
    .dbg_raddr, .dbg_rdata);

  int checks = 0, failures = 0, flushes = 0, stalls = 0, waits = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // ---- the testbench's reservation stations / execution units ----
  rs_entry_t pend [$];
  always @(posedge clk) if (rst_n) begin
    if (flush) pend.delete();
    else begin
      for (int r = 0; r < 5; r++)
        for (int s = 0; s < 2; s++)
          if (rs_wr_valid[r][s]) begin
            pend.push_back(rs_wr_entry[r][s]);
            if (!rs_wr_entry[r][s].opa.ready || !rs_wr_entry[r][s].opb.ready) waits++;
          end
      foreach (pend[i])
        for (int k = 0; k < NUM_CDB; k++)
          if (cdb[k].valid) begin
            if (!pend[i].opa.ready && pend[i].opa.tag == cdb[k].tag) begin pend[i].opa.ready = 1; pend[i].opa.value = cdb[k].value; end
            if (!pend[i].opb.ready && pend[i].opb.tag == cdb[k].tag) begin pend[i].opb.ready = 1; pend[i].opb.value = cdb[k].value; end
          end
    end
  end

  // ---- program record: every dispatched instruction in order ----
  typedef struct { logic [31:0] pc; bit br; bit mis; logic [4:0] rd, rs, rt; bit dest, urs, urt, imm; logic [31:0] immv; } ins_t;
  ins_t prog [$];

  function automatic uop_t gen(input logic [31:0] pc);
    uop_t u = '0;
    u.valid = 1; u.pc = pc; u.unit = ($urandom_range(0, 7) == 0) ? UNIT_BR : UNIT_ALU;
    u.alu_op = ALU_ADD;
    u.rs = 5'($urandom_range(0, 7)); u.rt = 5'($urandom_range(0, 7));
    u.use_rs = 1'($urandom_range(0, 5) != 0);
    u.use_imm = 1'($urandom); u.use_rt = !u.use_imm && 1'($urandom_range(0, 3) != 0);
    u.imm = 32'($urandom_range(0, 1000));
    u.has_dest = (u.unit == UNIT_ALU); u.rd = 5'($urandom_range(1, 7));
    return u;
  endfunction

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pc, regs [32];
    int n_disp, region;
    bit fl, acc;
    logic [31:0] rp;
    in_valid = 0; st_ready = 1; query_tag = 0; dbg_raddr = 0;
    in_uop[0] = '0; in_uop[1] = '0;
    for (int r = 0; r < 5; r++) rs_free[r] = 4;
    for (int k = 0; k < NUM_CDB; k++) cdb[k] = '0;
    pc = 0; n_disp = 0; region = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (n_disp < 3000) begin
      automatic bit lack;
      @(negedge clk);
      // results: up to six ready entries, in random order
      for (int k = 0; k < NUM_CDB; k++) cdb[k] = '0;
      pend.shuffle();
      for (int k = 0, i = 0; k < NUM_CDB && i < pend.size(); ) begin
        if (pend[i].opa.ready && pend[i].opb.ready && $urandom_range(0, 2) != 0) begin
          cdb[k].valid = 1; cdb[k].tag = pend[i].rob_tag;
          cdb[k].value = pend[i].opa.value + pend[i].opb.value;
          if (pend[i].uop.unit == UNIT_BR) begin
            cdb[k].value = 0;
            cdb[k].mispredict = ($urandom_range(0, 5) == 0);
            cdb[k].next_pc = 32'h1000_0000 + (32'(++region) << 16);
            foreach (prog[j]) if (prog[j].pc == pend[i].uop.pc) prog[j].mis = cdb[k].mispredict;
            if (cdb[k].mispredict) foreach (prog[j]) if (prog[j].pc == pend[i].uop.pc) prog[j].immv = cdb[k].next_pc;
          end
          pend.delete(i); k++;
        end else i++;
      end
      // a new pair
      if (!in_valid || in_ready) begin
        in_uop[0] = gen(pc); in_uop[1] = gen(pc + 4);
      end
      in_valid = 1;
      lack = ($urandom_range(0, 9) == 0);
      for (int r = 0; r < 5; r++) rs_free[r] = 4;
      if (lack) rs_free[$urandom_range(0, 4)] = 3'($urandom_range(0, 1));
      #1;
      if (lack) begin chk(!in_ready, "pair waits for free station entries"); stalls++; end
      chk(!pc_mismatch, "Dispatch_PC matches the pair");
      fl = flush; rp = redirect_pc; acc = in_ready;
      @(posedge clk);
      if (fl) begin
        // drop everything younger than the mispredicted branch, restart at its target
        automatic int b = -1;
        foreach (prog[j]) if (prog[j].mis && b < 0) b = j;
        chk(b >= 0 && rp == prog[b].immv, "flush comes from the mispredicted branch");
        if (b >= 0) begin
          while (prog.size() > b + 1) void'(prog.pop_back());
          prog[b].mis = 0; prog[b].br = 1;
          pc = rp;
          prog[b].pc = 32'hFFFF_FFFF;   // resolved: not matched again
        end
        flushes++;
        in_valid = 0;
      end else if (acc) begin
        for (int s = 0; s < 2; s++) begin
          ins_t e;
          e.pc = in_uop[s].pc; e.br = in_uop[s].unit == UNIT_BR; e.mis = 0; e.rd = in_uop[s].rd;
          e.rs = in_uop[s].rs; e.rt = in_uop[s].rt; e.dest = in_uop[s].has_dest;
          e.urs = in_uop[s].use_rs; e.urt = in_uop[s].use_rt; e.imm = in_uop[s].use_imm;
          e.immv = in_uop[s].imm;
          prog.push_back(e);
        end
        n_disp += 2; pc += 8;
      end
    end
    // drain: keep executing until everything has retired
    @(negedge clk); in_valid = 0;
    repeat (400) begin
      @(negedge clk);
      for (int k = 0; k < NUM_CDB; k++) cdb[k] = '0;
      for (int k = 0, i = 0; k < NUM_CDB && i < pend.size(); ) begin
        if (pend[i].opa.ready && pend[i].opb.ready) begin
          cdb[k].valid = 1; cdb[k].tag = pend[i].rob_tag;
          cdb[k].value = (pend[i].uop.unit == UNIT_BR) ? 0 : pend[i].opa.value + pend[i].opb.value;
          pend.delete(i); k++;
        end else i++;
      end
    end
    // reference: in-order execution of the surviving instructions
    for (int r = 0; r < 32; r++) regs[r] = 0;
    foreach (prog[j]) if (!prog[j].br && prog[j].dest) begin
      automatic logic [31:0] a = prog[j].urs ? regs[prog[j].rs] : 0;
      automatic logic [31:0] b = prog[j].imm ? prog[j].immv : prog[j].urt ? regs[prog[j].rt] : 0;
      regs[prog[j].rd] = a + b;
    end
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); dbg_raddr = 5'(r); #1;
      chk(dbg_rdata == regs[r], $sformatf("r%0d = %08h, expected %08h", r, dbg_rdata, regs[r]));
    end
    $display("flushes %0d stalls %0d operands waiting %0d", flushes, stalls, waits);
    chk(flushes > 20 && waits > 200, "flushes and dependency waits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
