// Dispatch stage (DP): register renaming, Register File, ROB and Dispatch_PC.
//
// Takes the pair of decoded instructions from the decode stage and, when everything
// they need has room (two free ROB entries and two free entries in every reservation
// station), writes both into the ROB in program order and into the reservation station
// of their type in the same cycle; otherwise the pair waits (`in_ready` low). ALU
// instructions in slot 0 go to ALU0RS and in slot 1 to ALU1RS; loads/stores, branches
// and multiply/move-from instructions go to LSRS, BRRS and MULTRS.
// A rename table remembers, for every architectural register, whether a not yet retired
// instruction will write it and under which ROB tag. Each source operand is taken from
// the instruction in slot 0 of the same pair, from the ROB if the producer has finished,
// from a result bus if it finishes in this very cycle, or from the Register File; if
// none has it yet, the operand carries the producer's tag and the reservation station
// waits for it. The ROB retires into the Register File (two writes per cycle).
// Dispatch_PC0/PC1 are the PCs of the two instructions expected next in program order:
// they step by 8 for a full pair, and jump to the predicted target after a predicted-
// taken branch; `pc_mismatch` flags a pair that does not start at Dispatch_PC0.
// A flush (raised by the ROB) clears the rename table and the ROB; Dispatch_PC then
// follows the redirect address.
// Many output bits are the decoded instruction copied unchanged into the entry of
// each of the five reservation-station write ports, so synthesis sees them wired to inputs.
module dispatch_stage
  import core_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter logic [31:0] EXC_VECTOR = 32'h0000_0180
)(
  input  logic             clk,
  input  logic             rst_n,
  // decoded pair
  input  logic             in_valid,
  input  uop_t             in_uop [2],
  output logic             in_ready,
  // reservation stations: 0 ALU0RS, 1 ALU1RS, 2 LSRS, 3 BRRS, 4 MULTRS
  input  logic [2:0]       rs_free [5],
  output logic [1:0]       rs_wr_valid [5],
  output rs_entry_t        rs_wr_entry [5][2],
  // result buses
  input  cdb_t             cdb [NUM_CDB],
  // retirement side
  output logic [ROB_W-1:0] rob_head_tag,
  output logic [31:0]      rob_pc,
  input  logic [ROB_W-1:0] query_tag,
  output logic             older_store,
  output logic             st_valid,
  output logic [31:0]      st_addr,
  output logic [31:0]      st_data,
  output logic [3:0]       st_be,
  input  logic             st_ready,
  output logic             br_valid,
  output logic [PQ_W-1:0]  br_pq_idx,
  output logic             br_taken,
  output logic [31:0]      br_target,
  output logic             flush,
  output logic [31:0]      redirect_pc,
  output logic             exception,
  output logic [31:0]      epc,
  output logic [1:0]       retired,
  output logic [31:0]      dispatch_pc0,
  output logic [31:0]      dispatch_pc1,
  output logic             pc_mismatch,
  // architectural register read-out (for observation)
  input  logic [4:0]       dbg_raddr,
  output logic [31:0]      dbg_rdata
);
  // ---------------- ROB and register file ----------------
  logic [1:0]       alloc;
  logic [ROB_W-1:0] alloc_tag [2];
  logic [$clog2(ROB_DEPTH+1)-1:0] rob_free;
  logic             ent_done  [ROB_DEPTH];
  logic [31:0]      ent_value [ROB_DEPTH];
  logic [1:0]       ret_valid, ret_we;
  logic [4:0]       ret_rd [2];
  logic [31:0]      ret_value [2];
  logic             br_is_jr;   // not needed here: the PQ entry gives the branch kind

  rob #(.DEPTH(ROB_DEPTH), .EXC_VECTOR(EXC_VECTOR)) u_rob (
    .clk, .rst_n,
    .alloc, .alloc_uop(in_uop), .alloc_tag, .free_count(rob_free),
    .cdb, .ent_done, .ent_value,
    .ret_valid, .ret_we, .ret_rd, .ret_value, .head_tag(rob_head_tag), .rob_pc,
    .st_valid, .st_addr, .st_data, .st_be, .st_ready, .query_tag, .older_store,
    .br_valid, .br_pq_idx, .br_taken, .br_target, .br_is_jr,
    .flush, .redirect_pc, .exception, .epc
  );
  assign retired = ret_valid;

  logic [4:0]  rf_raddr [5];
  logic [31:0] rf_rdata [5];
  register_file #(.NREAD(5)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(ret_we), .waddr(ret_rd), .wdata(ret_value)
  );

  // ---------------- rename table ----------------
  logic             map_busy [32];
  logic [ROB_W-1:0] map_tag  [32];

  always_comb begin
    rf_raddr[0] = in_uop[0].rs; rf_raddr[1] = in_uop[0].rt;
    rf_raddr[2] = in_uop[1].rs; rf_raddr[3] = in_uop[1].rt;
    rf_raddr[4] = dbg_raddr;
  end
  assign dbg_rdata = rf_rdata[4];

  function automatic operand_t source(input logic use_it, input logic [4:0] r,
                                      input logic [31:0] rf_val, input logic dep0,
                                      input logic [ROB_W-1:0] tag0);
    operand_t o = '{ready: 1'b1, tag: '0, value: '0};
    if (!use_it || r == 5'd0) return o;
    if (dep0) begin
      o.ready = 1'b0; o.tag = tag0;
    end else if (map_busy[r]) begin
      o.tag = map_tag[r];
      if (ent_done[map_tag[r]]) o.value = ent_value[map_tag[r]];
      else begin
        o.ready = 1'b0;
        for (int k = 0; k < NUM_CDB; k++)
          if (cdb[k].valid && cdb[k].tag == map_tag[r]) begin
            o.ready = 1'b1; o.value = cdb[k].value;
          end
      end
    end else begin
      o.value = rf_val;
    end
    return o;
  endfunction

  rs_entry_t ent [2];
  logic [2:0] rs_sel [2];
  logic [1:0] v;
  always_comb begin
    v = {in_valid && in_uop[1].valid, in_valid && in_uop[0].valid};
    for (int s = 0; s < 2; s++) begin
      automatic logic dep_a = (s == 1) && in_uop[0].has_dest && in_uop[0].rd == in_uop[1].rs && v[0];
      automatic logic dep_b = (s == 1) && in_uop[0].has_dest && in_uop[0].rd == in_uop[1].rt && v[0];
      automatic logic [31:0] rs_val = (s == 0) ? rf_rdata[0] : rf_rdata[2];
      automatic logic [31:0] rt_val = (s == 0) ? rf_rdata[1] : rf_rdata[3];
      ent[s].uop     = in_uop[s];
      ent[s].rob_tag = alloc_tag[s];
      ent[s].opa     = source(in_uop[s].use_rs, in_uop[s].rs, rs_val, dep_a, alloc_tag[0]);
      ent[s].opb     = source(in_uop[s].use_rt, in_uop[s].rt, rt_val, dep_b, alloc_tag[0]);
      if (in_uop[s].use_imm && !in_uop[s].use_rt)
        ent[s].opb = '{ready: 1'b1, tag: '0, value: in_uop[s].imm};
      unique case (in_uop[s].unit)
        UNIT_ALU:  rs_sel[s] = (s == 0) ? 3'd0 : 3'd1;
        UNIT_LS:   rs_sel[s] = 3'd2;
        UNIT_BR:   rs_sel[s] = 3'd3;
        UNIT_MULT: rs_sel[s] = 3'd4;
        default:   rs_sel[s] = 3'd7;       // illegal: ROB only
      endcase
    end
    in_ready = !flush && (int'(rob_free) >= 2);
    for (int r = 0; r < 5; r++)
      if (int'(rs_free[r]) < 2) in_ready = 1'b0;
    alloc = (in_valid && in_ready) ? v : 2'b00;
    for (int r = 0; r < 5; r++) begin
      rs_wr_valid[r]    = '0;
      rs_wr_entry[r][0] = ent[0];
      rs_wr_entry[r][1] = ent[1];
      for (int s = 0; s < 2; s++)
        if (alloc[s] && rs_sel[s] == 3'(r)) rs_wr_valid[r][s] = 1'b1;
    end
  end

  // ---------------- Dispatch_PC ----------------
  logic [31:0] dpc;
  assign dispatch_pc0 = dpc;
  assign dispatch_pc1 = dpc + 32'd4;
  assign pc_mismatch  = in_valid && in_ready && v[0] && in_uop[0].pc != dpc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dpc <= RESET_PC;
      for (int i = 0; i < 32; i++) begin map_busy[i] <= 1'b0; map_tag[i] <= '0; end
    end else if (flush) begin
      dpc <= redirect_pc;
      for (int i = 0; i < 32; i++) map_busy[i] <= 1'b0;
    end else begin
      // retirement frees a mapping that still points at the retiring instruction
      for (int s = 0; s < 2; s++)
        if (ret_we[s] && map_busy[ret_rd[s]] &&
            map_tag[ret_rd[s]] == rob_head_tag + ROB_W'(s))
          map_busy[ret_rd[s]] <= 1'b0;
      for (int s = 0; s < 2; s++)
        if (alloc[s] && in_uop[s].has_dest) begin
          map_busy[in_uop[s].rd] <= 1'b1;
          map_tag[in_uop[s].rd]  <= alloc_tag[s];
        end
      if (alloc[1]) dpc <= in_uop[1].pred_taken ? in_uop[1].pred_target : in_uop[1].pc + 32'd4;
      else if (alloc[0]) dpc <= in_uop[0].pred_taken ? in_uop[0].pred_target : in_uop[0].pc + 32'd4;
    end
  end
endmodule
