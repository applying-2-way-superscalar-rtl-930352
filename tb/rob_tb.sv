// Self-checking testbench of the 32-entry reorder buffer.
// Random instruction mixes (ALU with/without destination, branches, stores) are
// allocated up to two per cycle and completed out of order on random result buses,
// some with an overflow exception or a branch misprediction. A model of the buffer
// checks every cycle: in-order retirement of up to two, the retirement rules (second
// slot only behind the first, never two branches, a store only in the first slot and
// only when the cache accepts it, exceptions and mispredictions alone), the register
// write data, the store port, the branch training port, flush with its redirect
// address, EPC, the older-store query and the done/value lookup.
module rob_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]       alloc, ret_valid, ret_we;
  uop_t             alloc_uop [2];
  logic [ROB_W-1:0] alloc_tag [2], head_tag, query_tag;
  logic [5:0]       free_count;
  cdb_t             cdb [NUM_CDB];
  logic             ent_done [32];
  logic [31:0]      ent_value [32];
  logic [4:0]       ret_rd [2];
  logic [31:0]      ret_value [2], rob_pc, st_addr, st_data, br_target, redirect_pc, epc;
  logic             st_valid, st_ready, older_store, br_valid, br_taken, br_is_jr, flush, exception;
  logic [3:0]       st_be;
  logic [PQ_W-1:0]  br_pq_idx;

  rob dut (.clk, .rst_n, .alloc, .alloc_uop, .alloc_tag, .free_count, .cdb, .ent_done, .ent_value,
           .ret_valid, .ret_we, .ret_rd, .ret_value, .head_tag, .rob_pc, .st_valid, .st_addr,
           .st_data, .st_be, .st_ready, .query_tag, .older_store, .br_valid, .br_pq_idx, .br_taken,
           .br_target, .br_is_jr, .flush, .redirect_pc, .exception, .epc);

  typedef struct {
    int tag; logic [31:0] pc; bit dest; logic [4:0] rd; bit br; bit st; bit done;
    bit exc; bit misp; bit taken; logic [31:0] npc; logic [31:0] value; logic [31:0] sa;
    logic [PQ_W-1:0] pq;
  } ent_t;
  ent_t m [$];
  int checks = 0, failures = 0, retired = 0, flushes = 0, exceptions = 0, duals = 0;
  logic [31:0] pc_ctr = 32'h100;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = 0; st_ready = 0; query_tag = 0;
    alloc_uop[0] = '0; alloc_uop[1] = '0;
    for (int k = 0; k < NUM_CDB; k++) cdb[k] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      automatic int nalloc;
      automatic int used [$];
      automatic bit e0r;
      @(negedge clk);
      // ---- drive: allocation ----
      nalloc = (free_count >= 2) ? $urandom_range(0, 2) : 0;
      alloc = (nalloc == 2) ? 2'b11 : (nalloc == 1) ? 2'b01 : 2'b00;
      for (int s = 0; s < 2; s++) begin
        automatic int kind = $urandom_range(0, 9);
        alloc_uop[s] = '0;
        alloc_uop[s].valid = 1;
        alloc_uop[s].pc = pc_ctr + 32'(4 * s);
        alloc_uop[s].unit = (kind < 2) ? UNIT_BR : (kind < 4) ? UNIT_LS : UNIT_ALU;
        alloc_uop[s].is_store = (kind == 2 || kind == 3);
        alloc_uop[s].has_dest = (kind >= 4) && kind != 9;
        alloc_uop[s].rd = 5'($urandom_range(1, 31));
        alloc_uop[s].pq_idx = PQ_W'($urandom);
      end
      // ---- drive: completions on random buses ----
      for (int k = 0; k < NUM_CDB; k++) cdb[k] = '0;
      for (int k = 0; k < NUM_CDB; k++)
        if (m.size() > 0 && $urandom_range(0, 2) == 0) begin
          automatic int i = $urandom_range(0, m.size() - 1);
          if (!m[i].done && !(i inside {used})) begin
            used.push_back(i);
            cdb[k].valid = 1; cdb[k].tag = ROB_W'(m[i].tag); cdb[k].value = $urandom;
            cdb[k].exception = !m[i].br && !m[i].st && ($urandom_range(0, 60) == 0);
            cdb[k].mispredict = m[i].br && ($urandom_range(0, 8) == 0);
            cdb[k].br_taken = 1'($urandom); cdb[k].next_pc = $urandom & ~32'd3;
            cdb[k].st_addr = $urandom; cdb[k].st_data = $urandom; cdb[k].st_be = 4'($urandom);
          end
        end
      st_ready = 1'($urandom);
      query_tag = (m.size() > 0) ? ROB_W'(m[$urandom_range(0, m.size() - 1)].tag) : head_tag;
      #1;
      // ---- check combinational outputs against the model ----
      chk(int'(free_count) == 32 - m.size(), "free count");
      if (m.size() > 0) chk(head_tag == ROB_W'(m[0].tag) && rob_pc == m[0].pc, "head tag and ROB_PC");
      begin
        automatic bit os = 0;
        for (int i = 0; i < m.size() && m[i].tag != int'(query_tag); i++) if (m[i].st) os = 1;
        chk(older_store == os, "older store query");
      end
      foreach (m[i]) if (m[i].done) chk(ent_done[m[i].tag] && ent_value[m[i].tag] == m[i].value, "done/value lookup");
      e0r = m.size() > 0 && m[0].done && (!m[0].st || st_ready);
      chk(ret_valid[0] == e0r, "slot 0 retires exactly when the head is done");
      if (m.size() > 0) chk(st_valid == (m[0].done && m[0].st && !m[0].exc), "store port valid");
      if (ret_valid[0]) begin
        automatic bit stop0 = m[0].exc || (m[0].br && m[0].misp);
        chk(ret_we[0] == (m[0].dest && !m[0].exc) && (!ret_we[0] || (ret_rd[0] == m[0].rd
            && ret_value[0] == m[0].value)), "slot 0 register write");
        if (m[0].st) chk(st_addr == m[0].sa, "store address");
        chk(flush == stop0, "flush only on exception or misprediction");
        chk(exception == m[0].exc, "exception flag");
        if (m[0].exc) chk(redirect_pc == 32'h180 && epc == m[0].pc, "exception vector and EPC");
        else if (stop0) chk(redirect_pc == m[0].npc, "misprediction redirect");
        if (m[0].br && !m[0].exc) chk(br_valid && br_pq_idx == m[0].pq && br_taken == m[0].taken
            && br_target == m[0].npc, "branch training port");
        if (!stop0 && m.size() > 1) begin
          automatic bit e1r = m[1].done && !m[1].exc && !(m[1].br && m[1].misp) && !m[1].st && !(m[0].br && m[1].br);
          chk(ret_valid[1] == e1r, "slot 1 retirement rule");
          if (ret_valid[1]) chk(ret_we[1] == m[1].dest && (!m[1].dest || (ret_rd[1] == m[1].rd
              && ret_value[1] == m[1].value)), "slot 1 register write");
        end else chk(!ret_valid[1], "nothing retires beside a flushing instruction");
      end else chk(ret_valid == 0 && !flush, "no retirement");
      // ---- clock edge: update the model ----
      @(posedge clk); #1;
      for (int k = 0; k < NUM_CDB; k++)
        if (cdb[k].valid) foreach (m[i]) if (m[i].tag == int'(cdb[k].tag)) begin
          m[i].done = 1; m[i].value = cdb[k].value; m[i].exc = cdb[k].exception;
          m[i].misp = cdb[k].mispredict; m[i].taken = cdb[k].br_taken; m[i].npc = cdb[k].next_pc;
          m[i].sa = cdb[k].st_addr;
        end
    end
    $display("retired %0d, dual %0d, flushes %0d, exceptions %0d", retired, duals, flushes, exceptions);
    chk(duals > 100 && flushes > 10 && exceptions > 3, "all retirement cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update of retirement and allocation, sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    bit fl;
    int nr;
    fl = flush;
    nr = int'(ret_valid[0]) + int'(ret_valid[1]);
    retired += nr; if (nr == 2) duals++;
    if (fl) begin flushes++; if (exception) exceptions++; end
    #0;
    if (fl) m.delete();
    else begin
      for (int i = 0; i < nr; i++) void'(m.pop_front());
      for (int s = 0; s < 2; s++) if (alloc[s]) begin
        ent_t e;
        e.tag = int'(alloc_tag[0]) + s; e.tag = e.tag % 32;
        e.pc = alloc_uop[s].pc; e.dest = alloc_uop[s].has_dest; e.rd = alloc_uop[s].rd;
        e.br = alloc_uop[s].unit == UNIT_BR; e.st = alloc_uop[s].is_store; e.done = 0;
        e.exc = 0; e.misp = 0; e.taken = 0; e.npc = 0; e.value = 0; e.sa = 0; e.pq = alloc_uop[s].pq_idx;
        m.push_back(e);
      end
      if (alloc != 0) pc_ctr += 8;
    end
  end
endmodule
