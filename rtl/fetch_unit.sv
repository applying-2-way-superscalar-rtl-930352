// Fetch stage (IF0/IF1) with the IQ_SM fetch control and the branch prediction block.
//
// IF0 presents the fetch address to the L1 instruction cache. In IF1 the IC tags and the
// prefetch buffer are checked; on a hit the instructions of the 16-byte line, from the
// fetch address up to and including the first branch or jump, are pushed into the
// instruction queue (at most 4 a cycle, only when they all fit). At most one branch is
// handled per cycle. For that branch the BTB, Local History and Global History are
// looked up with its PC and the GHR; a taken prediction needs a BTB hit (conditional
// branches also need the global counter's direction bit), a RET takes its target from
// the fetch return stack, a CALL pushes its return address there. Every branch gets a
// prediction-queue entry and a BTB-lookup-buffer entry (BTB_PLRU and the way hit), and
// a conditional one shifts its predicted direction into the GHR.
// IF0 assumes the next sequential line; whenever IF1 redirects (taken prediction, a
// line only partly consumed, a miss or no room in the IQ) the IF0 access is dropped
// and fetch restarts at the right address the next cycle. On an IC and PB miss the line
// is requested from the L2 and the access is retried until the line arrives.
// Retirement trains the predictor, writes the BTB for taken branches, updates arch_ReS
// and frees the PQ entry. A pipeline flush restarts fetch at `redirect_pc`, empties IQ
// and PQ, restores the GHR from its retired copy and, one cycle later, copies arch_ReS
// into Fetch_ReS.
module fetch_unit
  import core_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter int          IQ_DEPTH   = 10,
  parameter int          RES_DEPTH  = 8
)(
  input  logic             clk,
  input  logic             rst_n,
  // instruction queue read side (to decode)
  output iq_entry_t        iq_data [2],
  output logic [1:0]       iq_valid,
  input  logic [1:0]       iq_pop,
  // flush from retirement
  input  logic             flush,
  input  logic [31:0]      redirect_pc,
  // branch retirement
  input  logic             br_valid,
  input  logic [PQ_W-1:0]  br_pq_idx,
  input  logic             br_taken,
  input  logic [31:0]      br_target,
  // arch_ReS, for the Execute_ReS copy
  output logic [31:0]      arch_res [RES_DEPTH],
  output logic [$clog2(RES_DEPTH)-1:0] arch_res_ptr,
  // L2
  output logic             l2_req,
  output logic [31:0]      l2_addr,
  input  logic             l2_gnt,
  input  logic             l2_rvalid,
  input  logic [127:0]     l2_rdata,
  // events
  output logic             ev_ic_miss,
  output logic             ev_pred_taken
);
  localparam int RW = $clog2(RES_DEPTH);

  logic [31:0]  if0_pc;
  logic         if1_valid;
  logic         ic_hit, ic_busy, ic_miss;
  logic [127:0] ic_line;
  logic [31:0]  pc;
  logic [31:0]  seq_next;

  il1_cache u_il1 (
    .clk, .rst_n,
    .rd_en(1'b1), .rd_addr(if0_pc),
    .hit(ic_hit), .line(ic_line), .if1_addr(pc),
    .miss(ic_miss), .miss_addr(pc), .busy(ic_busy),
    .l2_req, .l2_addr, .l2_gnt, .l2_rvalid, .l2_rdata
  );

  // ---------------- predecode of the line in IF1 ----------------
  logic [31:0] ins [4];
  logic [3:0]  is_br;
  logic [1:0]  s0, fb;
  logic        fb_found;
  logic [2:0]  n;
  always_comb begin
    s0 = pc[3:2];
    fb_found = 1'b0; fb = '0;
    for (int i = 0; i < 4; i++) begin
      ins[i]   = ic_line[i*32 +: 32];
      is_br[i] = (ins[i][31:26] inside {OP_J, OP_JAL, OP_BEQ, OP_BNE}) ||
                 (ins[i][31:26] == OP_SPECIAL && ins[i][5:0] == FN_JR);
    end
    for (int i = 3; i >= 0; i--)
      if (is_br[i] && 2'(i) >= s0) begin fb_found = 1'b1; fb = 2'(i); end
    n = fb_found ? 3'(fb) - 3'(s0) + 3'd1 : 3'd4 - 3'(s0);
  end

  // ---------------- prediction ----------------
  logic [31:0] bpc, br_ins;
  logic [1:0]  bkind;
  logic        btb_hit;
  logic [1:0]  btb_way, btb_kind;
  logic [31:0] btb_target;
  logic [2:0]  btb_plru;
  logic [1:0]  lctr, gctr;
  logic [11:0] gidx;
  logic        gtaken;
  logic [GHR_W-1:0] ghr, arch_ghr;
  logic        pred_taken;
  logic [31:0] pred_target, res_top;
  logic        pq_full;
  logic [PQ_W-1:0] pq_idx;
  pq_entry_t   pq_rd;
  logic        accept;
  logic [31:0] next_pc;
  logic        flush_d;
  logic [2:0]  lookup_plru;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_free;

  always_comb begin
    bpc  = {pc[31:4], fb, 2'b00};
    br_ins = ins[fb];
    if (br_ins[31:26] == OP_JAL)                              bkind = BK_CALL;
    else if (br_ins[31:26] == OP_SPECIAL && br_ins[25:21] == 5'd31) bkind = BK_RET;
    else if (br_ins[31:26] == OP_BEQ || br_ins[31:26] == OP_BNE)    bkind = BK_COND;
    else                                                    bkind = BK_JUMP;
    unique case (bkind)
      BK_COND: pred_taken = btb_hit && gtaken;
      BK_RET:  pred_taken = 1'b1;
      default: pred_taken = btb_hit;
    endcase
    pred_target = (bkind == BK_RET) ? res_top : btb_target;
    accept   = if1_valid && ic_hit && !flush && (int'(n) <= int'(iq_free)) &&
               !(fb_found && pq_full);
    seq_next = {if0_pc[31:4] + 28'd1, 4'd0};
    if (fb_found && pred_taken) next_pc = pred_target;
    else if (fb_found)          next_pc = bpc + 32'd4;
    else                        next_pc = {pc[31:4] + 28'd1, 4'd0};
    ic_miss       = if1_valid && !ic_hit && !flush;
    ev_ic_miss    = ic_miss && !ic_busy;
    ev_pred_taken = accept && fb_found && pred_taken;
  end

  btb u_btb (
    .clk, .rst_n,
    .lk_pc(bpc), .touch(accept && fb_found),
    .lk_hit(btb_hit), .lk_way(btb_way), .lk_target(btb_target), .lk_kind(btb_kind),
    .lk_plru(btb_plru),
    .upd(br_valid && br_taken && pq_rd.kind != BK_RET),
    .upd_pc(pq_rd.pc), .upd_target(br_target), .upd_kind(pq_rd.kind),
    .upd_hit(pq_rd.btb_hit), .upd_way(pq_rd.btb_way), .upd_plru(lookup_plru)
  );

  btb_lookup #(.DEPTH(PQ_DEPTH), .W(3)) u_btb_lookup (
    .clk, .rst_n,
    .we(accept && fb_found), .widx(pq_idx), .wdata(btb_plru),
    .ridx(br_pq_idx), .rdata(lookup_plru)
  );

  branch_predictor u_bp (
    .clk, .rst_n,
    .lk_pc(bpc), .lk_local(lctr), .lk_global(gctr), .lk_gidx(gidx), .lk_taken(gtaken),
    .spec_shift(accept && fb_found && bkind == BK_COND), .spec_bit(pred_taken),
    .ghr_restore(flush), .ghr, .arch_ghr,
    .upd(br_valid && pq_rd.kind == BK_COND), .upd_pc(pq_rd.pc), .upd_gidx(pq_rd.gidx),
    .upd_taken(br_taken)
  );

  pq_entry_t pq_new;
  always_comb begin
    pq_new = '{pc: bpc, kind: bkind, pred_taken: pred_taken, ghr: ghr, gidx: gidx,
               gctr: gctr, lctr: lctr, btb_hit: btb_hit, btb_way: btb_way};
  end

  logic pq_empty;
  prediction_queue u_pq (
    .clk, .rst_n, .flush,
    .push(accept && fb_found), .push_data(pq_new), .push_idx(pq_idx), .full(pq_full),
    .pop(br_valid), .rd_idx(br_pq_idx), .rd_data(pq_rd), .empty(pq_empty)
  );

  // return stacks: speculative copy at fetch, committed copy at retirement
  logic [31:0] fres [RES_DEPTH];
  logic [RW-1:0] fres_ptr;
  return_stack #(.DEPTH(RES_DEPTH)) u_fetch_res (
    .clk, .rst_n,
    .push(accept && fb_found && bkind == BK_CALL), .push_pc(bpc + 32'd4),
    .pop(accept && fb_found && bkind == BK_RET), .top(res_top),
    .load(flush_d), .load_stack(arch_res), .load_ptr(arch_res_ptr),
    .entries(fres), .ptr(fres_ptr)
  );
  logic [31:0] unused_top;
  return_stack #(.DEPTH(RES_DEPTH)) u_arch_res (
    .clk, .rst_n,
    .push(br_valid && pq_rd.kind == BK_CALL), .push_pc(pq_rd.pc + 32'd4),
    .pop(br_valid && pq_rd.kind == BK_RET), .top(unused_top),
    .load(1'b0), .load_stack(fres), .load_ptr(fres_ptr),
    .entries(arch_res), .ptr(arch_res_ptr)
  );

  // ---------------- instruction queue ----------------
  iq_entry_t push_data [4];
  always_comb
    for (int i = 0; i < 4; i++) begin
      automatic logic [1:0] slot = s0 + 2'(i);
      push_data[i] = '{instr: ins[slot], pc: {pc[31:4], slot, 2'b00},
                       pred_taken: 1'b0, pred_target: '0, pq_idx: pq_idx};
      if (fb_found && slot == fb) begin
        push_data[i].pred_taken  = pred_taken;
        push_data[i].pred_target = pred_taken ? pred_target : bpc + 32'd4;
      end
    end

  instruction_queue #(.DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n, .flush,
    .push_n(accept ? n : 3'd0), .push_data,
    .pop_n({1'b0, iq_pop[0]} + {1'b0, iq_pop[1]}),
    .rd_data(iq_data), .rd_valid(iq_valid), .free(iq_free)
  );

  // ---------------- IQ_SM: next fetch address ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if0_pc <= RESET_PC; if1_valid <= 1'b0; flush_d <= 1'b0;
    end else begin
      flush_d <= flush;
      if (flush) begin
        if0_pc <= redirect_pc; if1_valid <= 1'b0;
      end else if (if1_valid && accept && next_pc == if0_pc) begin
        if0_pc <= seq_next; if1_valid <= 1'b1;
      end else if (if1_valid && accept) begin
        if0_pc <= next_pc; if1_valid <= 1'b0;
      end else if (if1_valid) begin
        if0_pc <= pc; if1_valid <= 1'b0;
      end else begin
        if0_pc <= seq_next; if1_valid <= 1'b1;
      end
    end
  end
endmodule
