// Self-checking testbench of the fetch unit (IL1, IQ_SM, BTB, direction predictor,
// prediction queue, BTB lookup buffer, return stacks, instruction queue).
// A small program with a loop branch (taken 3 times out of 4), an alternating forward
// branch, nested calls and returns and a jump runs from an L2 model. The testbench
// plays decode and retirement: it pops the instruction queue at a random rate, follows
// the correct program path, resolves every branch, trains the predictor in order
// through the retirement port and, when the prediction carried with a branch was
// wrong, raises a flush with the correct address after the older branches have
// retired. Checks: every instruction on the correct path arrives once, in order, with
// the right PC and encoding; the branch patterns are learned (few mispredictions in the
// second half); returns are predicted from the return stack; IL1 misses occurred.
module fetch_unit_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  iq_entry_t        iq_data [2];
  logic [1:0]       iq_valid, iq_pop;
  logic             flush, br_valid, br_taken, l2_req, l2_gnt, l2_rvalid, ev_ic_miss, ev_pred_taken;
  logic [31:0]      redirect_pc, br_target, l2_addr;
  logic [PQ_W-1:0]  br_pq_idx;
  logic [31:0]      arch_res [8];
  logic [2:0]       arch_res_ptr;
  logic [127:0]     l2_rdata;

  fetch_unit dut (.clk, .rst_n, .iq_data, .iq_valid, .iq_pop, .flush, .redirect_pc, .br_valid,
    .br_pq_idx, .br_taken, .br_target, .arch_res, .arch_res_ptr, .l2_req, .l2_addr, .l2_gnt,
    .l2_rvalid, .l2_rdata, .ev_ic_miss, .ev_pred_taken);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // ---- program ----
  logic [31:0] mem [1024];
  localparam logic [31:0] NOP = 32'h2400_0000;
  function automatic logic [31:0] br(input logic [5:0] op, input logic [31:0] pc, input logic [31:0] t);
    return {op, 5'd1, 5'd2, 16'((t - pc - 4) >> 2)};
  endfunction
  function automatic logic [31:0] jmp(input logic [5:0] op, input logic [31:0] t);
    return {op, 26'(t >> 2)};
  endfunction
  localparam logic [31:0] JR31 = {6'd0, 5'd31, 15'd0, 6'h08};

  // L2 model
  int ic_misses = 0;
  initial begin
    l2_gnt = 0; l2_rvalid = 0; l2_rdata = '0;
    forever begin
      @(negedge clk);
      if (l2_req) begin
        automatic logic [31:0] a;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        l2_gnt = 1; a = l2_addr; ic_misses++;
        @(negedge clk); l2_gnt = 0;
        repeat ($urandom_range(4, 10)) @(negedge clk);
        for (int w = 0; w < 4; w++) l2_rdata[w*32 +: 32] = mem[{a[11:4], 2'(w)}];
        l2_rvalid = 1;
        @(negedge clk); l2_rvalid = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // retirement-side queue of branch trainings
  typedef struct { logic [PQ_W-1:0] idx; bit taken; logic [31:0] target; bit mis; logic [31:0] next; } tr_t;
  tr_t trq [$];
  int cnt [logic [31:0]];
  logic [31:0] calls [$];

  initial begin
    logic [31:0] exp_pc;
    bit discarding;
    int consumed, branches, mis_late, branches_late, ret_ok, pred_taken_seen;
    for (int i = 0; i < 1024; i++) mem[i] = NOP;
    mem['h20 >> 2]  = br(OP_BNE, 32'h20, 32'h08);     // loop: 3 of 4 taken
    mem['h24 >> 2]  = jmp(OP_JAL, 32'h100);           // call
    mem['h34 >> 2]  = br(OP_BEQ, 32'h34, 32'h48);     // alternating
    mem['h4C >> 2]  = jmp(OP_J, 32'h00);              // back to the start
    mem['h104 >> 2] = jmp(OP_JAL, 32'h200);           // nested call
    mem['h10C >> 2] = JR31;
    mem['h208 >> 2] = JR31;
    iq_pop = 0; flush = 0; redirect_pc = 0; br_valid = 0; br_pq_idx = 0; br_taken = 0; br_target = 0;
    exp_pc = 0; discarding = 0; consumed = 0; branches = 0; mis_late = 0; branches_late = 0;
    ret_ok = 0; pred_taken_seen = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (consumed < 6000) begin
      @(negedge clk);
      iq_pop = 0; flush = 0; br_valid = 0;
      // retirement: one branch per cycle, the mispredicted one flushes
      if (trq.size() > 0 && $urandom_range(0, 3) != 0) begin
        automatic tr_t t = trq.pop_front();
        br_valid = 1; br_pq_idx = t.idx; br_taken = t.taken; br_target = t.target;
        if (t.mis) begin flush = 1; redirect_pc = t.next; end
      end
      // decode: pop 0..2 in order
      if (!flush) begin
        automatic int np = $urandom_range(0, 2);
        for (int s = 0; s < 2; s++) if (s < np && iq_valid[s]) begin
          iq_pop[s] = 1;
          if (!discarding) begin
            automatic logic [31:0] in = iq_data[s].instr, pc = iq_data[s].pc, nx;
            automatic bit tk = 0, isb = 1;
            chk(pc == exp_pc, $sformatf("instruction order: pc %h expected %h", pc, exp_pc));
            chk(in == mem[pc[11:2]], "instruction encoding");
            consumed++;
            nx = pc + 4;
            if (in[31:26] == OP_BNE || in[31:26] == OP_BEQ) begin
              automatic int c = cnt.exists(pc) ? cnt[pc] : 0;
              tk = (in[31:26] == OP_BNE) ? (c % 4 != 3) : (c % 2 == 0);
              cnt[pc] = c + 1;
              if (tk) nx = pc + 4 + {{14{in[15]}}, in[15:0], 2'b00};
            end else if (in[31:26] == OP_J || in[31:26] == OP_JAL) begin
              tk = 1; nx = {pc[31:28], in[25:0], 2'b00};
              if (in[31:26] == OP_JAL) calls.push_back(pc + 4);
            end else if (in == JR31) begin
              tk = 1; nx = calls.pop_back();
              if (iq_data[s].pred_taken && iq_data[s].pred_target == nx) ret_ok++;
            end else isb = 0;
            if (isb) begin
              automatic tr_t t;
              t.idx = iq_data[s].pq_idx; t.taken = tk; t.target = nx; t.next = nx;
              t.mis = iq_data[s].pred_target != nx;
              if (iq_data[s].pred_taken) pred_taken_seen++;
              trq.push_back(t);
              branches++;
              if (consumed > 3000) begin branches_late++; if (t.mis) mis_late++; end
              if (t.mis) discarding = 1;
            end
            exp_pc = nx;
          end
        end
        if (iq_pop == 2'b10) iq_pop = 0;
      end else begin
        discarding = 0;
        // the call stack model follows the correct path only: nothing to undo
      end
    end
    $display("consumed %0d branches %0d late mispredictions %0d/%0d returns predicted %0d IL1 misses %0d",
             consumed, branches, mis_late, branches_late, ret_ok, ic_misses);
    chk(ic_misses > 3, "IL1 misses happened");
    chk(pred_taken_seen > 100, "taken predictions happened");
    chk(ret_ok > 100, "returns predicted by the return stack");
    chk(mis_late * 10 < branches_late, "branch patterns learned (under 10% mispredicted)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
