// Non-blocking L1 data cache (DL1): 32 KB, 16-byte lines, 4-way, tree PLRU.
//
// Loads flow through two stages: M0 registers the request, M1 compares tags and, on a
// hit, returns the extended load data with the load's tag, so a hit returns two cycles
// after the request. A miss is parked in the prefetch buffer (PB, 2 entries) and
// requested from the L2; loads behind it keep running, and hits return while the misses
// are outstanding. When the PB is full, a missing load is sent back (`ld_replay`) and
// must be issued again. A returned line is written into the PLRU victim way and its
// load is answered in the next cycle in which M1 has no hit to return.
// Stores arrive in program order from retirement: write-through without allocation. A
// hit updates the line; every store is passed to the L2 and `st_ready` follows the L2's
// grant. A store waits while a load is being presented (loads always find the cache
// ready) and while a PB entry is still fetching the store's line.
// The cache holds no dirty data, so victims are overwritten.
// Line requests to the L2 are aligned, so the low address bits of l2_addr are constant.
module dl1_cache
  import core_pkg::*;
#(
  parameter int SIZE_BYTES = 32768,
  parameter int WAYS       = 4,
  parameter int PB_ENTRIES = 2,
  parameter int TAG_W      = ROB_W
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,        // drop loads in flight (pipeline flush)
  // load request
  input  logic             ld_valid,
  input  logic [31:0]      ld_addr,
  input  ls_size_e         ld_size,
  input  logic [TAG_W-1:0] ld_tag,
  output logic             ld_ready,
  // load response
  output logic             resp_valid,
  output logic [TAG_W-1:0] resp_tag,
  output logic [31:0]      resp_data,
  output logic             ld_replay,
  output logic [31:0]      replay_addr,
  output ls_size_e         replay_size,
  output logic [TAG_W-1:0] replay_tag,
  output logic [$clog2(PB_ENTRIES+1)-1:0] pb_used,
  // store from retirement
  input  logic             st_valid,
  input  logic [31:0]      st_addr,
  input  logic [31:0]      st_data,
  input  logic [3:0]       st_be,
  output logic             st_ready,
  // to the L2
  output logic             l2_req,
  output logic [31:0]      l2_addr,
  input  logic             l2_gnt,
  input  logic             l2_rvalid,
  input  logic [127:0]     l2_rdata,
  output logic             l2_st_req,
  output logic [31:0]      l2_st_addr,
  output logic [31:0]      l2_st_data,
  output logic [3:0]       l2_st_be,
  input  logic             l2_st_gnt
);
  localparam int SETS = SIZE_BYTES / 16 / WAYS;
  localparam int IW   = $clog2(SETS);
  localparam int TW   = 28 - IW;
  localparam int PW   = $clog2(PB_ENTRIES);

  logic [WAYS-1:0] valid [SETS];
  // tag and data arrays have no reset (they are memories); an entry is only used
  // when its valid bit is set. Entry {set, way}.
  logic [TW-1:0]   tag   [SETS*WAYS];
  logic [127:0]    data  [SETS*WAYS];
  logic [2:0]      plru  [SETS];

  typedef struct packed {
    logic             valid;
    logic             requested;
    logic             filled;
    logic             dead;       // its load was flushed: fill the cache, answer nobody
    logic [31:0]      addr;
    ls_size_e         size;
    logic [TAG_W-1:0] tag;
    logic [127:0]     line;
  } pb_t;
  pb_t pb [PB_ENTRIES];

  // M1 stage registers
  logic             m1_valid;
  logic [31:0]      m1_addr;
  ls_size_e         m1_size;
  logic [TAG_W-1:0] m1_tag;

  function automatic logic [2:0] plru_touch(input logic [2:0] p, input logic [1:0] w);
    logic [2:0] r = p;
    if (!w[1]) begin r[0] = 1'b1; r[1] = ~w[0]; end
    else       begin r[0] = 1'b0; r[2] = ~w[0]; end
    return r;
  endfunction

  function automatic logic [31:0] extract(input logic [127:0] line, input logic [3:0] a,
                                          input ls_size_e sz);
    logic [31:0] w = line[{a[3:2], 5'd0} +: 32];
    logic [7:0]  b = w[{a[1:0], 3'd0} +: 8];
    logic [15:0] h = w[{a[1], 4'd0} +: 16];
    unique case (sz)
      LS_B:    return {{24{b[7]}}, b};
      LS_BU:   return {24'd0, b};
      LS_H:    return {{16{h[15]}}, h};
      LS_HU:   return {16'd0, h};
      default: return w;
    endcase
  endfunction

  // M1 tag compare
  logic [IW-1:0] m1_set;
  logic          m1_hit;
  logic [1:0]    m1_way;
  assign m1_set = m1_addr[IW+3:4];
  always_comb begin
    m1_hit = 1'b0; m1_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[m1_set][w] && tag[{m1_set, 2'(w)}] == m1_addr[31:IW+4]) begin
        m1_hit = 1'b1; m1_way = 2'(w);
      end
  end

  // PB bookkeeping
  logic          pb_has_free, pb_fill_ready;
  logic [PW-1:0] pb_free_idx, pb_req_idx, pb_fill_idx;
  logic          pb_req_any;
  logic          st_conflict;
  always_comb begin
    pb_has_free = 1'b0; pb_free_idx = '0;
    pb_req_any  = 1'b0; pb_req_idx  = '0;
    pb_fill_ready = 1'b0; pb_fill_idx = '0;
    st_conflict = 1'b0;
    pb_used = '0;
    for (int i = PB_ENTRIES-1; i >= 0; i--) begin
      if (!pb[i].valid) begin pb_has_free = 1'b1; pb_free_idx = PW'(i); end
      if (pb[i].valid && !pb[i].requested) begin pb_req_any = 1'b1; pb_req_idx = PW'(i); end
      if (pb[i].valid && pb[i].filled && !pb[i].dead) begin pb_fill_ready = 1'b1; pb_fill_idx = PW'(i); end
      if (pb[i].valid && !pb[i].filled && pb[i].addr[31:4] == st_addr[31:4]) st_conflict = 1'b1;
    end
    for (int i = 0; i < PB_ENTRIES; i++) pb_used += $bits(pb_used)'(pb[i].valid);
  end

  // at most one L2 line request outstanding
  logic outstanding;
  logic [PW-1:0] out_idx;
  assign l2_req  = pb_req_any && !outstanding;
  assign l2_addr = {pb[pb_req_idx].addr[31:4], 4'd0};

  assign ld_ready   = 1'b1;
  assign st_ready   = l2_st_gnt;
  assign l2_st_req  = st_valid && !st_conflict && !ld_valid;
  assign l2_st_addr = st_addr;
  assign l2_st_data = st_data;
  assign l2_st_be   = st_be;

  // line fill from L2 (victim chosen by tree-PLRU) and write-through store hit update
  logic          fill, st_hit;
  logic [IW-1:0] fill_set, st_set;
  logic [1:0]    fill_way, st_way;
  logic [127:0]  st_line;
  assign fill     = l2_rvalid && outstanding;
  assign fill_set = pb[out_idx].addr[IW+3:4];
  assign fill_way = plru[fill_set][0] ? {1'b1, plru[fill_set][2]} : {1'b0, plru[fill_set][1]};
  assign st_set   = st_addr[IW+3:4];
  always_comb begin
    st_hit = 1'b0; st_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[st_set][w] && tag[{st_set, 2'(w)}] == st_addr[31:IW+4]) begin
        st_hit = 1'b1; st_way = 2'(w);
      end
    st_line = data[{st_set, st_way}];
    for (int w = 0; w < 4; w++)
      for (int b = 0; b < 4; b++)
        if (st_addr[3:2] == 2'(w) && st_be[b]) st_line[w*32 + b*8 +: 8] = st_data[b*8 +: 8];
  end

  always_ff @(posedge clk) begin
    if (fill) begin
      tag[{fill_set, fill_way}]  <= pb[out_idx].addr[31:IW+4];
      data[{fill_set, fill_way}] <= l2_rdata;
    end
    if (st_valid && st_ready && st_hit) data[{st_set, st_way}] <= st_line;
  end

  // responses: an M1 hit first, otherwise a filled PB entry
  always_comb begin
    resp_valid  = 1'b0; resp_tag = m1_tag; resp_data = '0;
    ld_replay   = 1'b0;
    replay_addr = m1_addr; replay_size = m1_size; replay_tag = m1_tag;
    if (m1_valid && m1_hit) begin
      resp_valid = 1'b1;
      resp_data  = extract(data[{m1_set, m1_way}], m1_addr[3:0], m1_size);
    end else begin
      if (m1_valid && !pb_has_free) ld_replay = 1'b1;
      if (pb_fill_ready) begin
        resp_valid = 1'b1;
        resp_tag   = pb[pb_fill_idx].tag;
        resp_data  = extract(pb[pb_fill_idx].line, pb[pb_fill_idx].addr[3:0], pb[pb_fill_idx].size);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_valid <= 1'b0; m1_addr <= '0; m1_size <= LS_W; m1_tag <= '0;
      outstanding <= 1'b0; out_idx <= '0;
      for (int i = 0; i < PB_ENTRIES; i++) pb[i] <= '0;
      for (int s = 0; s < SETS; s++) begin valid[s] <= '0; plru[s] <= '0; end
    end else begin
      // M0 -> M1
      m1_valid <= ld_valid && ld_ready && !flush;
      m1_addr  <= ld_addr; m1_size <= ld_size; m1_tag <= ld_tag;
      // M1
      if (m1_valid && m1_hit) plru[m1_set] <= plru_touch(plru[m1_set], m1_way);
      else if (m1_valid && pb_has_free && !flush) begin
        pb[pb_free_idx] <= '{valid: 1'b1, requested: 1'b0, filled: 1'b0,
                             dead: 1'b0, addr: m1_addr, size: m1_size, tag: m1_tag,
                             line: '0};
      end
      // filled entry answered when no hit used the response port
      if (pb_fill_ready && !(m1_valid && m1_hit)) pb[pb_fill_idx].valid <= 1'b0;
      for (int i = 0; i < PB_ENTRIES; i++)
        if (pb[i].valid && pb[i].filled && pb[i].dead) pb[i].valid <= 1'b0;
      // L2 request / fill
      if (l2_req && l2_gnt) begin
        pb[pb_req_idx].requested <= 1'b1;
        outstanding <= 1'b1; out_idx <= pb_req_idx;
      end
      if (fill) begin
        outstanding <= 1'b0;
        pb[out_idx].filled <= 1'b1;
        pb[out_idx].line   <= l2_rdata;
        valid[fill_set][fill_way] <= 1'b1;
        plru[fill_set]            <= plru_touch(plru[fill_set], fill_way);
      end
      // a flush drops the load results that are still pending
      // (an entry whose line is being fetched stays until the line lands)
      if (flush)
        for (int i = 0; i < PB_ENTRIES; i++)
          if (pb[i].valid && pb[i].requested && !pb[i].filled) pb[i].dead <= 1'b1;
          else if (!(l2_req && l2_gnt && pb_req_idx == PW'(i))) pb[i].valid <= 1'b0;
          else pb[i].dead <= 1'b1;
    end
  end
endmodule
