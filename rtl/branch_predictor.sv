// Direction predictor combining local and global history, with the GHR.
//
// Local History: 256 x 2-bit saturating counters indexed by PC[9:2].
// Global History: 256 rows x 32 bits, i.e. 4096 2-bit counters. The local counter,
// the PC bits and the GHR are mixed into a 12-bit index: row = PC[9:2] ^ GHR[7:0],
// column = {local counter, GHR[9:8]}; the counter's bit 1 is the predicted direction
// and bit 0 its strength. The GHR holds the outcomes of the last 10 conditional
// branches; a new outcome enters at bit 0 and older ones move towards bit 9.
// Lookup is combinational (the caller registers the PC in IF0). Two GHRs are kept: the
// speculative one (shifted with each prediction at fetch) and the retired one (shifted
// with each actual outcome); `ghr_restore` copies the retired GHR into the speculative
// one after a flush. Training happens at retirement with the index used at prediction
// time: the row is read, one counter updated and the row written back.
// Both tables are memories without reset. After reset a counter sweeps all 256 rows
// (one per cycle) and sets every counter to weakly not-taken (01); during those
// cycles trainings are ignored and lookups may predict from stale counters, which
// only costs prediction accuracy.
module branch_predictor
  import core_pkg::*;
#(
  parameter int LH_ENTRIES = 256,
  parameter int GH_ROWS    = 256,
  parameter int GH_COLS    = 16      // 2-bit counters per 32-bit row
)(
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [31:0]      lk_pc,
  output logic [1:0]       lk_local,
  output logic [1:0]       lk_global,
  output logic [11:0]      lk_gidx,
  output logic             lk_taken,
  // speculative GHR
  input  logic             spec_shift,
  input  logic             spec_bit,
  input  logic             ghr_restore,
  output logic [GHR_W-1:0] ghr,
  output logic [GHR_W-1:0] arch_ghr,
  // training at retirement
  input  logic             upd,
  input  logic [31:0]      upd_pc,
  input  logic [11:0]      upd_gidx,
  input  logic             upd_taken
);
  localparam int RW = $clog2(GH_ROWS);
  localparam int LW = $clog2(LH_ENTRIES);
  localparam int IW = (RW > LW) ? RW : LW;

  logic [1:0]           lhist [LH_ENTRIES];
  logic [2*GH_COLS-1:0] ghist [GH_ROWS];
  logic [7:0]           lk_row;
  logic [3:0]           lk_col;
  logic [2*GH_COLS-1:0] lk_rowdata, up_rowdata, up_rownew;
  logic [1:0]           up_lnew;
  logic [IW:0]          init_cnt;          // MSB set once the sweep has finished
  logic                 init_done, do_upd;

  always_comb begin
    lk_local   = lhist[lk_pc[9:2]];
    lk_row     = lk_pc[9:2] ^ ghr[7:0];
    lk_col     = {lk_local, ghr[9:8]};
    lk_gidx    = {lk_row, lk_col};
    lk_rowdata = ghist[lk_row];
    lk_global  = lk_rowdata[{lk_col, 1'b0} +: 2];
    lk_taken   = lk_global[1];
  end

  // training: read-modify-write of one row and of one local counter
  assign init_done = init_cnt[IW];
  assign do_upd    = upd && init_done;
  always_comb begin
    up_rowdata = ghist[upd_gidx[11:4]];
    up_rownew  = up_rowdata;
    for (int c = 0; c < GH_COLS; c++)
      if (upd_gidx[3:0] == 4'(c)) up_rownew[2*c +: 2] = sat_update(up_rowdata[2*c +: 2], upd_taken);
    up_lnew = sat_update(lhist[upd_pc[9:2]], upd_taken);
  end

  always_ff @(posedge clk) begin
    if (!init_done) begin
      ghist[init_cnt[RW-1:0]] <= {GH_COLS{2'b01}};
      lhist[init_cnt[LW-1:0]] <= 2'b01;
    end else if (do_upd) begin
      ghist[upd_gidx[11:4]] <= up_rownew;
      lhist[upd_pc[9:2]]    <= up_lnew;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr <= '0; arch_ghr <= '0; init_cnt <= '0;
    end else begin
      if (!init_done) init_cnt <= init_cnt + 1'b1;
      if (ghr_restore)     ghr <= upd ? {arch_ghr[GHR_W-2:0], upd_taken} : arch_ghr;
      else if (spec_shift) ghr <= {ghr[GHR_W-2:0], spec_bit};
      if (upd) arch_ghr <= {arch_ghr[GHR_W-2:0], upd_taken};
    end
  end
endmodule
