// Branch Target Buffer: 1K entries, organised as 256 sets x 4 ways, tree PLRU.
//
// Indexed by PC[9:2]; each entry keeps a valid bit, the remaining PC bits as tag, the
// branch target and the branch kind (conditional, jump, call, return). A lookup is
// combinational and returns hit, way, target, kind and the set's 3-bit PLRU value
// (BTB_PLRU), which the fetch stage keeps in the BTB lookup buffer. `touch` marks the
// hit way most recently used. An update writes an entry at retirement: into the way that
// hit at lookup time, or else into the way the saved PLRU value names as victim; the
// written way becomes most recently used. Tree PLRU: bit0 chooses the half (0 = ways
// 0/1), bit1 chooses within ways 0/1, bit2 within ways 2/3; a bit points at the victim.
module btb #(
  parameter int ENTRIES = 1024,
  parameter int WAYS    = 4
)(
  input  logic        clk,
  input  logic        rst_n,
  // lookup (IF1)
  input  logic [31:0] lk_pc,
  input  logic        touch,
  output logic        lk_hit,
  output logic [1:0]  lk_way,
  output logic [31:0] lk_target,
  output logic [1:0]  lk_kind,
  output logic [2:0]  lk_plru,
  // update (retirement)
  input  logic        upd,
  input  logic [31:0] upd_pc,
  input  logic [31:0] upd_target,
  input  logic [1:0]  upd_kind,
  input  logic        upd_hit,
  input  logic [1:0]  upd_way,
  input  logic [2:0]  upd_plru
);
  localparam int SETS = ENTRIES / WAYS;
  localparam int IW   = $clog2(SETS);
  localparam int TW   = 30 - IW;

  logic [WAYS-1:0] valid [SETS];
  // tag, target and kind arrays have no reset (they are memories); an entry is only
  // used when its valid bit is set. Entry {set, way}.
  logic [TW-1:0]   tag   [SETS*WAYS];
  logic [31:0]     tgt   [SETS*WAYS];
  logic [1:0]      kind  [SETS*WAYS];
  logic [2:0]      plru  [SETS];

  logic [IW-1:0] lk_set, up_set;
  assign lk_set = lk_pc[IW+1:2];
  assign up_set = upd_pc[IW+1:2];

  function automatic logic [2:0] plru_touch(input logic [2:0] p, input logic [1:0] w);
    logic [2:0] r = p;
    if (!w[1]) begin r[0] = 1'b1; r[1] = ~w[0]; end
    else       begin r[0] = 1'b0; r[2] = ~w[0]; end
    return r;
  endfunction

  function automatic logic [1:0] plru_victim(input logic [2:0] p);
    return p[0] ? {1'b1, p[2]} : {1'b0, p[1]};
  endfunction

  always_comb begin
    lk_hit = 1'b0; lk_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[lk_set][w] && tag[{lk_set, 2'(w)}] == lk_pc[31:IW+2]) begin
        lk_hit = 1'b1; lk_way = 2'(w);
      end
    lk_target = tgt[{lk_set, lk_way}];
    lk_kind   = kind[{lk_set, lk_way}];
    lk_plru   = plru[lk_set];
  end

  // update way: the hit way, or the PLRU victim read at lookup time
  logic [1:0] up_way;
  assign up_way = upd_hit ? upd_way : plru_victim(upd_plru);

  always_ff @(posedge clk)
    if (upd) begin
      tag[{up_set, up_way}]  <= upd_pc[31:IW+2];
      tgt[{up_set, up_way}]  <= upd_target;
      kind[{up_set, up_way}] <= upd_kind;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin valid[s] <= '0; plru[s] <= '0; end
    end else begin
      if (touch && lk_hit) plru[lk_set] <= plru_touch(plru[lk_set], lk_way);
      if (upd) begin
        valid[up_set][up_way] <= 1'b1;
        plru[up_set]          <= plru_touch(upd_hit ? plru[up_set] : upd_plru, up_way);
      end
    end
  end
endmodule
