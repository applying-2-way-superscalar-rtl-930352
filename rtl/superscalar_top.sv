// 2-way superscalar, out-of-order 32-bit RISC processor with two-level caches.
//
// Pipeline: IF0/IF1 (fetch_unit: IL1, prefetch buffer, IQ_SM, 10-entry instruction
// queue, branch prediction with BTB, local/global history, GHR, PQ, return stacks) ->
// DEC (two decoders in parallel, output flopped, skid buffer) -> DP (dispatch_stage:
// rename, register file, 32-entry ROB, Dispatch_PC) -> ISU (five reservation stations:
// ALU0RS and ALU1RS out of order, LSRS, BRRS and MULTRS in order) -> EX (ALU/SHIFT 0
// and 1, load/store address calculation, branch execute, 2-cycle multiplier) -> M0/M1
// (DL1) -> retirement in program order from the ROB.
// Fetch, decode and dispatch handle two instructions per cycle in program order; the
// reservation stations issue as soon as operands are ready, and up to five instructions
// execute at once. An instruction issued in cycle t executes in cycle t+1 and its result
// is broadcast on a result bus in that cycle (loads: two cycles later on a DL1 hit),
// waking up dependent instructions so that they can issue in the same cycle.
// Design choices of this implementation: branch mispredictions and exceptions are
// recovered when the instruction reaches the head of the ROB; a load waits in LSRS until
// no older store is left in the ROB; a MULT/MULTU starts only when it is the oldest
// instruction (the hi/lo pair is written at execute, so it must not be speculative);
// stores write the caches at retirement (write-through to the L2, whose store gathering
// buffer writes to the AHB bus).
// Interface: AHB-Lite master towards system memory, a CP0 register read port (the CP0
// itself is outside this design), the exception indication with its PC, a read port
// into the architectural register file and the number of instructions retired per cycle.
module superscalar_top
  import core_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR = 32'h0000_0180
)(
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite master
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  output logic [3:0]  hwstrb,
  input  logic [31:0] hrdata,
  input  logic        hready,
  // CP0 read port
  output logic [4:0]  cp0_raddr,
  input  logic [31:0] cp0_rdata,
  // status
  output logic        exception,
  output logic [31:0] epc,
  output logic [1:0]  retired,
  input  logic [4:0]  dbg_raddr,
  output logic [31:0] dbg_rdata
);
  localparam int RES_DEPTH = 8;

  logic        flush, flush_d;
  logic [31:0] redirect_pc;
  cdb_t        cdb [NUM_CDB];

  // ================= fetch =================
  iq_entry_t   iq_data [2];
  logic [1:0]  iq_valid, iq_pop;
  logic        br_valid, br_taken;
  logic [PQ_W-1:0] br_pq_idx;
  logic [31:0] br_target;
  logic [31:0] arch_res [RES_DEPTH];
  logic [$clog2(RES_DEPTH)-1:0] arch_res_ptr;
  logic        ic_l2_req, ic_l2_gnt, ic_l2_rvalid;
  logic [31:0] ic_l2_addr;
  logic [127:0] ic_l2_rdata;
  logic        ev_ic_miss, ev_pred_taken;

  fetch_unit #(.RESET_PC(RESET_PC), .RES_DEPTH(RES_DEPTH)) u_fetch (
    .clk, .rst_n,
    .iq_data, .iq_valid, .iq_pop,
    .flush, .redirect_pc,
    .br_valid, .br_pq_idx, .br_taken, .br_target,
    .arch_res, .arch_res_ptr,
    .l2_req(ic_l2_req), .l2_addr(ic_l2_addr), .l2_gnt(ic_l2_gnt),
    .l2_rvalid(ic_l2_rvalid), .l2_rdata(ic_l2_rdata),
    .ev_ic_miss, .ev_pred_taken
  );

  // ================= decode =================
  uop_t dec_uop [2];
  uop_t dp_uop [2];
  logic dec_stall, dp_valid, dp_ready;

  decoder u_dec0 (.valid(iq_valid[0]), .in(iq_data[0]), .uop(dec_uop[0]));
  decoder u_dec1 (.valid(iq_valid[1]), .in(iq_data[1]), .uop(dec_uop[1]));

  assign iq_pop = (dec_stall || flush) ? 2'b00 : iq_valid;

  skid_buffer #(.W(2 * $bits(uop_t))) u_skid (
    .clk, .rst_n, .flush,
    .in_valid(iq_valid[0] && !dec_stall && !flush),
    .in_data({dec_uop[1], dec_uop[0]}),
    .stall(dec_stall),
    .out_valid(dp_valid), .out_data({dp_uop[1], dp_uop[0]}),
    .out_ready(dp_ready)
  );

  // ================= dispatch =================
  logic [2:0]       rs_free [5];
  logic [1:0]       rs_wr_valid [5];
  rs_entry_t        rs_wr_entry [5][2];
  logic [ROB_W-1:0] rob_head_tag, ls_query_tag;
  logic [31:0]      rob_pc;
  logic             older_store;
  logic             st_valid, st_ready;
  logic [31:0]      st_addr, st_data;
  logic [3:0]       st_be;
  logic [31:0]      dispatch_pc0, dispatch_pc1;
  logic             pc_mismatch;

  dispatch_stage #(.RESET_PC(RESET_PC), .EXC_VECTOR(EXC_VECTOR)) u_dp (
    .clk, .rst_n,
    .in_valid(dp_valid), .in_uop(dp_uop), .in_ready(dp_ready),
    .rs_free, .rs_wr_valid, .rs_wr_entry, .cdb,
    .rob_head_tag, .rob_pc, .query_tag(ls_query_tag), .older_store,
    .st_valid, .st_addr, .st_data, .st_be, .st_ready,
    .br_valid, .br_pq_idx, .br_taken, .br_target,
    .flush, .redirect_pc, .exception, .epc, .retired,
    .dispatch_pc0, .dispatch_pc1, .pc_mismatch,
    .dbg_raddr, .dbg_rdata
  );

  // ================= issue =================
  logic      iss_valid [5];
  rs_entry_t iss_ent   [5];
  rs_entry_t head_ent  [5];
  logic      head_valid[5];
  logic      iss_en    [5];

  localparam int RS_DEPTH [5] = '{4, 4, 6, 4, 4};
  localparam bit RS_OOO   [5] = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b0};

  for (genvar r = 0; r < 5; r++) begin : g_rs
    logic [$clog2(RS_DEPTH[r]+1)-1:0] free_cnt;
    reservation_station #(.DEPTH(RS_DEPTH[r]), .OUT_OF_ORDER(RS_OOO[r])) u_rs (
      .clk, .rst_n, .flush,
      .wr_valid(rs_wr_valid[r]), .wr_entry(rs_wr_entry[r]), .cdb,
      .issue_en(iss_en[r]), .issue_valid(iss_valid[r]), .issue_entry(iss_ent[r]),
      .head_entry(head_ent[r]), .head_valid(head_valid[r]), .free_count(free_cnt)
    );
    assign rs_free[r] = 3'(free_cnt);
  end

  // issue conditions of the in-order stations
  logic replay_valid, ld_replay, mult_busy;
  assign ls_query_tag = head_ent[2].rob_tag;
  assign iss_en[0] = 1'b1;
  assign iss_en[1] = 1'b1;
  assign iss_en[2] = head_ent[2].uop.is_store ||
                     (!older_store && !replay_valid && !ld_replay);
  assign iss_en[3] = 1'b1;
  assign iss_en[4] = !mult_busy &&
                     (!(head_ent[4].uop.mult_op inside {MU_MULT, MU_MULTU}) ||
                      head_ent[4].rob_tag == rob_head_tag);

  // ================= execute =================
  logic      ex_valid [4];        // 0 ALU0, 1 ALU1, 2 LS, 3 BR
  rs_entry_t ex_ent   [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin ex_valid[k] <= 1'b0; ex_ent[k] <= '0; end
      flush_d <= 1'b0;
    end else begin
      flush_d <= flush;
      for (int k = 0; k < 4; k++) begin
        ex_valid[k] <= iss_valid[k] && !flush;
        if (iss_valid[k]) ex_ent[k] <= iss_ent[k];
      end
    end
  end

  // ALU/SHIFT 0 and 1
  logic [31:0] alu_res [2];
  logic        alu_ovf [2];
  for (genvar k = 0; k < 2; k++) begin : g_alu
    alu u_alu (
      .ctrl(ex_ent[k].uop.alu_op), .opa(ex_ent[k].opa.value), .opb(ex_ent[k].opb.value),
      .result(alu_res[k]), .overflow(alu_ovf[k])
    );
    always_comb begin
      cdb[k]           = '0;
      cdb[k].valid     = ex_valid[k];
      cdb[k].tag       = ex_ent[k].rob_tag;
      cdb[k].value     = alu_res[k];
      cdb[k].exception = alu_ovf[k];
    end
  end

  // load/store address calculation
  logic [31:0] ls_addr, ls_st_data;
  logic [3:0]  ls_be;
  logic        ls_misaligned;
  ls_addr_calc u_agu (
    .base(ex_ent[2].opa.value), .offset(ex_ent[2].uop.imm[15:0]), .size(ex_ent[2].uop.ls_size),
    .st_data_in(ex_ent[2].opb.value),
    .addr(ls_addr), .byte_valid(ls_be), .st_data(ls_st_data), .misaligned(ls_misaligned)
  );
  always_comb begin
    cdb[CDB_STORE]           = '0;
    cdb[CDB_STORE].valid     = ex_valid[2] && (ex_ent[2].uop.is_store || ls_misaligned);
    cdb[CDB_STORE].tag       = ex_ent[2].rob_tag;
    cdb[CDB_STORE].exception = ls_misaligned;
    cdb[CDB_STORE].is_store  = ex_ent[2].uop.is_store;
    cdb[CDB_STORE].st_addr   = ls_addr;
    cdb[CDB_STORE].st_data   = ls_st_data;
    cdb[CDB_STORE].st_be     = ls_be;
  end

  // data cache (M0/M1) with load replay when its PB is full
  logic             ld_valid;
  logic [31:0]      ld_addr, replay_addr, rp_addr;
  ls_size_e         ld_size, replay_size, rp_size;
  logic [ROB_W-1:0] ld_tag, replay_tag, rp_tag;
  logic             ld_ready, resp_valid;
  logic [ROB_W-1:0] resp_tag;
  logic [31:0]      resp_data;
  logic [1:0]       pb_used;
  logic             dc_l2_req, dc_l2_gnt, dc_l2_rvalid;
  logic [31:0]      dc_l2_addr;
  logic [127:0]     dc_l2_rdata;
  logic             l2_st_req, l2_st_gnt;
  logic [31:0]      l2_st_addr, l2_st_data;
  logic [3:0]       l2_st_be;

  always_comb begin
    if (replay_valid) begin
      ld_valid = 1'b1; ld_addr = rp_addr; ld_size = rp_size; ld_tag = rp_tag;
    end else begin
      ld_valid = ex_valid[2] && !ex_ent[2].uop.is_store && !ls_misaligned;
      ld_addr  = ls_addr; ld_size = ex_ent[2].uop.ls_size; ld_tag = ex_ent[2].rob_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      replay_valid <= 1'b0; rp_addr <= '0; rp_size <= LS_W; rp_tag <= '0;
    end else if (flush) begin
      replay_valid <= 1'b0;
    end else if (ld_replay) begin
      replay_valid <= 1'b1; rp_addr <= replay_addr; rp_size <= replay_size; rp_tag <= replay_tag;
    end else if (replay_valid) begin
      replay_valid <= 1'b0;
    end
  end

  dl1_cache u_dl1 (
    .clk, .rst_n, .flush,
    .ld_valid, .ld_addr, .ld_size, .ld_tag, .ld_ready,
    .resp_valid, .resp_tag, .resp_data,
    .ld_replay, .replay_addr, .replay_size, .replay_tag, .pb_used,
    .st_valid, .st_addr, .st_data, .st_be, .st_ready,
    .l2_req(dc_l2_req), .l2_addr(dc_l2_addr), .l2_gnt(dc_l2_gnt),
    .l2_rvalid(dc_l2_rvalid), .l2_rdata(dc_l2_rdata),
    .l2_st_req, .l2_st_addr, .l2_st_data, .l2_st_be, .l2_st_gnt
  );
  always_comb begin
    cdb[CDB_LOAD]       = '0;
    cdb[CDB_LOAD].valid = resp_valid && !flush;
    cdb[CDB_LOAD].tag   = resp_tag;
    cdb[CDB_LOAD].value = resp_data;
  end

  // branch execute and Execute_ReS
  logic        bu_taken, bu_mispredict;
  logic [31:0] bu_next_pc, bu_link;
  branch_unit u_bru (
    .op(ex_ent[3].uop.br_op), .pc(ex_ent[3].uop.pc),
    .opa(ex_ent[3].opa.value), .opb(ex_ent[3].opb.value), .target(ex_ent[3].uop.jtarget),
    .pred_taken(ex_ent[3].uop.pred_taken), .pred_target(ex_ent[3].uop.pred_target),
    .taken(bu_taken), .next_pc(bu_next_pc), .mispredict(bu_mispredict), .link(bu_link)
  );
  always_comb begin
    cdb[CDB_BR]            = '0;
    cdb[CDB_BR].valid      = ex_valid[3];
    cdb[CDB_BR].tag        = ex_ent[3].rob_tag;
    cdb[CDB_BR].value      = bu_link;
    cdb[CDB_BR].mispredict = bu_mispredict;
    cdb[CDB_BR].br_taken   = bu_taken;
    cdb[CDB_BR].next_pc    = bu_next_pc;
  end

  logic [31:0] exe_res [RES_DEPTH];
  logic [$clog2(RES_DEPTH)-1:0] exe_res_ptr;
  logic [31:0] exe_res_top;
  return_stack #(.DEPTH(RES_DEPTH)) u_execute_res (
    .clk, .rst_n,
    .push(ex_valid[3] && ex_ent[3].uop.br_op == BR_JAL), .push_pc(bu_link),
    .pop(ex_valid[3] && ex_ent[3].uop.br_op == BR_JR && ex_ent[3].uop.rs == 5'd31),
    .top(exe_res_top),
    .load(flush_d), .load_stack(arch_res), .load_ptr(arch_res_ptr),
    .entries(exe_res), .ptr(exe_res_ptr)
  );

  // multiplier and move-from
  logic        mu_done;
  logic [31:0] mu_result, mult_hi, mult_lo;
  logic [ROB_W-1:0] mu_tag;
  assign cp0_raddr = iss_ent[4].uop.imm[4:0];
  mult_unit u_mult (
    .clk, .rst_n, .kill(flush),
    .start(iss_valid[4] && iss_ent[4].uop.mult_op inside {MU_MULT, MU_MULTU}),
    .mult_unsigned(iss_ent[4].uop.mult_op == MU_MULTU),
    .opa(iss_ent[4].opa.value), .opb(iss_ent[4].opb.value),
    .mf_valid(iss_valid[4] && iss_ent[4].uop.mult_op inside {MU_MFUP, MU_MFLP, MU_MFC0}),
    .mfmult_val(iss_ent[4].uop.mult_op != MU_MFC0),
    .mf_hi(iss_ent[4].uop.mult_op == MU_MFUP),
    .cp0_rdata, .tag_in(iss_ent[4].rob_tag),
    .busy(mult_busy), .done(mu_done), .ex_mf_result(mu_result), .tag_out(mu_tag),
    .mult_result_hi(mult_hi), .mult_result_lo(mult_lo)
  );
  always_comb begin
    cdb[CDB_MULT]       = '0;
    cdb[CDB_MULT].valid = mu_done && !flush;
    cdb[CDB_MULT].tag   = mu_tag;
    cdb[CDB_MULT].value = mu_result;
  end

  // ================= L2 and bus =================
  logic         bus_rd_req, bus_rd_done, bus_wr_req, bus_wr_done;
  logic [31:0]  bus_rd_addr, bus_wr_addr;
  logic [511:0] bus_rd_data, bus_wr_data;
  logic [63:0]  bus_wr_be;

  ul2_cache u_ul2 (
    .clk, .rst_n,
    .ic_req(ic_l2_req), .ic_addr(ic_l2_addr), .ic_gnt(ic_l2_gnt),
    .ic_rvalid(ic_l2_rvalid), .ic_rdata(ic_l2_rdata),
    .dc_req(dc_l2_req), .dc_addr(dc_l2_addr), .dc_gnt(dc_l2_gnt),
    .dc_rvalid(dc_l2_rvalid), .dc_rdata(dc_l2_rdata),
    .st_req(l2_st_req), .st_addr(l2_st_addr), .st_data(l2_st_data), .st_be(l2_st_be),
    .st_gnt(l2_st_gnt),
    .bus_rd_req, .bus_rd_addr, .bus_rd_done, .bus_rd_data,
    .bus_wr_req, .bus_wr_addr, .bus_wr_data, .bus_wr_be, .bus_wr_done
  );

  biu u_biu (
    .clk, .rst_n,
    .rd_req(bus_rd_req), .rd_addr(bus_rd_addr), .rd_done(bus_rd_done), .rd_data(bus_rd_data),
    .wr_req(bus_wr_req), .wr_addr(bus_wr_addr), .wr_data(bus_wr_data), .wr_be(bus_wr_be),
    .wr_done(bus_wr_done),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hwstrb, .hrdata, .hready
  );
endmodule
