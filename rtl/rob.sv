// Reorder Buffer (ROB) with ROB_PC: 32 entries, 2 allocations and 2 retirements a cycle.
//
// Instructions are written in program order at dispatch (up to two per cycle; the tag
// of an instruction is its entry number). The six result buses (ALU0, ALU1, LOAD, STORE,
// BR, MULT) mark entries done out of order and deposit their results. Retirement takes up
// to two done instructions from the head in order, writes their results to the
// register file and hands a retiring store to the data cache (`st_ready` must accept
// it). At most one store and one branch retire per cycle. A retiring branch whose
// prediction was wrong, or an instruction that raised an exception (signed overflow,
// illegal instruction), retires alone and raises `flush`: every younger instruction is
// discarded and fetch restarts at `redirect_pc` (the branch's correct target, or
// EXC_VECTOR for an exception, with the faulting PC in `epc` and no register write).
// ROB_PC (`rob_pc`) is the PC of the instruction at the head. Results and done bits of
// all entries are visible to the dispatch stage for operand lookup; `older_store`
// tells whether any store older than `query_tag` is still waiting to retire.
module rob
  import core_pkg::*;
#(
  parameter int          DEPTH      = ROB_DEPTH,
  parameter logic [31:0] EXC_VECTOR = 32'h0000_0180
)(
  input  logic             clk,
  input  logic             rst_n,
  // allocation
  input  logic [1:0]       alloc,
  input  uop_t             alloc_uop [2],
  output logic [ROB_W-1:0] alloc_tag [2],
  output logic [$clog2(DEPTH+1)-1:0] free_count,
  // completion
  input  cdb_t             cdb [NUM_CDB],
  // operand lookup
  output logic             ent_done  [DEPTH],
  output logic [31:0]      ent_value [DEPTH],
  // retirement
  output logic [1:0]       ret_valid,
  output logic [1:0]       ret_we,
  output logic [4:0]       ret_rd    [2],
  output logic [31:0]      ret_value [2],
  output logic [ROB_W-1:0] head_tag,
  output logic [31:0]      rob_pc,
  // store at retirement
  output logic             st_valid,
  output logic [31:0]      st_addr,
  output logic [31:0]      st_data,
  output logic [3:0]       st_be,
  input  logic             st_ready,
  input  logic [ROB_W-1:0] query_tag,
  output logic             older_store,
  // branch retirement (predictor training)
  output logic             br_valid,
  output logic [PQ_W-1:0]  br_pq_idx,
  output logic             br_taken,
  output logic [31:0]      br_target,
  output logic             br_is_jr,
  // pipeline flush
  output logic             flush,
  output logic [31:0]      redirect_pc,
  output logic             exception,
  output logic [31:0]      epc
);
  typedef struct packed {
    logic        valid;
    logic        done;
    logic [31:0] pc;
    logic        has_dest;
    logic [4:0]  rd;
    logic        is_branch;
    logic        is_jr;
    logic [PQ_W-1:0] pq_idx;
    logic        is_store;
    logic        exc;
    logic        mispredict;
    logic        taken;
    logic [31:0] next_pc;
    logic [31:0] value;
    logic [31:0] st_addr;
    logic [31:0] st_data;
    logic [3:0]  st_be;
  } rob_ent_t;

  localparam int CW = $clog2(DEPTH+1);
  rob_ent_t         q [DEPTH];
  logic [ROB_W-1:0] head, tail;
  logic [CW-1:0]    count;
  logic [ROB_W-1:0] h1;
  logic             r0, r1, stop0;

  assign h1       = head + 1'b1;
  assign head_tag = head;
  assign rob_pc   = q[head].pc;
  assign free_count   = CW'(DEPTH) - count;
  assign alloc_tag[0] = tail;
  assign alloc_tag[1] = tail + 1'b1;

  always_comb
    for (int i = 0; i < DEPTH; i++) begin
      ent_done[i]  = q[i].done;
      ent_value[i] = q[i].value;
    end

  always_comb begin
    older_store = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      automatic logic [ROB_W-1:0] t = head + ROB_W'(i);
      automatic logic [ROB_W-1:0] span = query_tag - head;
      if (ROB_W'(i) < span && q[t].valid && q[t].is_store) older_store = 1'b1;
    end
  end

  always_comb begin
    // slot 0
    r0    = q[head].valid && q[head].done && (!q[head].is_store || st_ready);
    stop0 = q[head].exc || (q[head].is_branch && q[head].mispredict);
    // slot 1
    r1 = r0 && !stop0 && q[h1].valid && q[h1].done && !q[h1].exc &&
         !(q[h1].is_branch && q[h1].mispredict) &&
         !q[h1].is_store && !(q[head].is_branch && q[h1].is_branch);
    ret_valid    = {r1, r0};
    ret_we[0]    = r0 && q[head].has_dest && !q[head].exc;
    ret_we[1]    = r1 && q[h1].has_dest;
    ret_rd[0]    = q[head].rd;  ret_rd[1]    = q[h1].rd;
    ret_value[0] = q[head].value; ret_value[1] = q[h1].value;
    st_valid = q[head].valid && q[head].done && q[head].is_store && !q[head].exc;
    st_addr  = q[head].st_addr;
    st_data  = q[head].st_data;
    st_be    = q[head].st_be;
    // branch that retires this cycle (at most one)
    br_valid  = 1'b0; br_pq_idx = q[head].pq_idx; br_taken = q[head].taken;
    br_target = q[head].next_pc; br_is_jr = q[head].is_jr;
    if (r0 && q[head].is_branch && !q[head].exc) br_valid = 1'b1;
    else if (r1 && q[h1].is_branch) begin
      br_valid = 1'b1; br_pq_idx = q[h1].pq_idx; br_taken = q[h1].taken;
      br_target = q[h1].next_pc; br_is_jr = q[h1].is_jr;
    end
    flush       = r0 && stop0;
    exception   = r0 && q[head].exc;
    epc         = q[head].pc;
    redirect_pc = q[head].exc ? EXC_VECTOR : q[head].next_pc;
  end

  // allocation slots: an instruction takes the next free entry if there is room
  logic             alloc_ok [2];
  logic [ROB_W-1:0] alloc_at [2];
  int               n_alloc;
  always_comb begin
    automatic int nret = int'(r0) + int'(r1);
    n_alloc = 0;
    for (int s = 0; s < 2; s++) begin
      alloc_ok[s] = alloc[s] && (int'(count) - nret + n_alloc) < DEPTH;
      alloc_at[s] = tail + ROB_W'(n_alloc);
      if (alloc_ok[s]) n_alloc++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i].valid <= 1'b0;
    end else begin
      automatic int nr = int'(r0) + int'(r1);
      // completion, retirement and allocation, written per entry
      for (int i = 0; i < DEPTH; i++) begin
        for (int k = 0; k < NUM_CDB; k++)
          if (cdb[k].valid && cdb[k].tag == ROB_W'(i)) begin
            q[i].done       <= 1'b1;
            q[i].value      <= cdb[k].value;
            q[i].exc        <= q[i].exc | cdb[k].exception;
            q[i].mispredict <= cdb[k].mispredict;
            q[i].taken      <= cdb[k].br_taken;
            q[i].next_pc    <= cdb[k].next_pc;
            q[i].st_addr    <= cdb[k].st_addr;
            q[i].st_data    <= cdb[k].st_data;
            q[i].st_be      <= cdb[k].st_be;
          end
        if ((r0 && head == ROB_W'(i)) || (r1 && h1 == ROB_W'(i))) q[i].valid <= 1'b0;
        for (int s = 0; s < 2; s++)
          if (alloc_ok[s] && alloc_at[s] == ROB_W'(i)) begin
            q[i]           <= '0;
            q[i].valid     <= 1'b1;
            q[i].done      <= alloc_uop[s].illegal;
            q[i].exc       <= alloc_uop[s].illegal;
            q[i].pc        <= alloc_uop[s].pc;
            q[i].has_dest  <= alloc_uop[s].has_dest;
            q[i].rd        <= alloc_uop[s].rd;
            q[i].is_branch <= alloc_uop[s].unit == UNIT_BR;
            q[i].is_jr     <= alloc_uop[s].unit == UNIT_BR && alloc_uop[s].br_op == BR_JR;
            q[i].pq_idx    <= alloc_uop[s].pq_idx;
            q[i].is_store  <= alloc_uop[s].is_store;
          end
      end
      head <= head + ROB_W'(nr);
      tail  <= tail + ROB_W'(n_alloc);
      count <= CW'(int'(count) - nr + n_alloc);
    end
  end
endmodule
