// L1 instruction cache (IL1): 32 KB, 16-byte lines (4 instructions), 4-way, tree PLRU,
// with a 1-entry prefetch buffer (PB).
//
// A fetch takes two cycles. In IF0 the fetch address is registered together with the
// indexed set (`rd_en`, `rd_addr`). In IF1 the tags are compared with the registered
// address, and the PB address is checked too: `hit` with the 16-byte `line` when
// either matches. On a miss in both, the fetch stage raises `miss` with the line
// address; the cache then requests that line from the L2 (one request at a time,
// `busy` meanwhile). The returned line is kept in the PB and written into the PLRU
// victim way of its set; a PB hit also refreshes PLRU.
module il1_cache #(
  parameter int SIZE_BYTES = 32768,
  parameter int WAYS       = 4
)(
  input  logic         clk,
  input  logic         rst_n,
  // IF0
  input  logic         rd_en,
  input  logic [31:0]  rd_addr,
  // IF1
  output logic         hit,
  output logic [127:0] line,
  output logic [31:0]  if1_addr,
  input  logic         miss,
  input  logic [31:0]  miss_addr,
  output logic         busy,
  // to the L2
  output logic         l2_req,
  output logic [31:0]  l2_addr,
  input  logic         l2_gnt,
  input  logic         l2_rvalid,
  input  logic [127:0] l2_rdata
);
  localparam int SETS = SIZE_BYTES / 16 / WAYS;
  localparam int IW   = $clog2(SETS);
  localparam int TW   = 28 - IW;

  logic [WAYS-1:0] valid [SETS];
  // tag and data arrays have no reset (they are memories); an entry is only used
  // when its valid bit is set. Entry {set, way}.
  logic [TW-1:0]   tag   [SETS*WAYS];
  logic [127:0]    data  [SETS*WAYS];
  logic [2:0]      plru  [SETS];

  logic [31:0]  a_q;
  logic         pb_valid;
  logic [27:0]  pb_line_addr;
  logic [127:0] pb_data;
  logic         req_pending, waiting;
  logic [27:0]  req_line;
  logic [IW-1:0] set;
  logic          c_hit;
  logic [1:0]    c_way;
  logic          fill;
  logic [IW-1:0] fill_set;
  logic [1:0]    fill_way;

  function automatic logic [2:0] plru_touch(input logic [2:0] p, input logic [1:0] w);
    logic [2:0] r = p;
    if (!w[1]) begin r[0] = 1'b1; r[1] = ~w[0]; end
    else       begin r[0] = 1'b0; r[2] = ~w[0]; end
    return r;
  endfunction

  assign set      = a_q[IW+3:4];
  assign if1_addr = a_q;
  always_comb begin
    c_hit = 1'b0; c_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[set][w] && tag[{set, 2'(w)}] == a_q[31:IW+4]) begin c_hit = 1'b1; c_way = 2'(w); end
    hit  = c_hit || (pb_valid && pb_line_addr == a_q[31:4]);
    line = c_hit ? data[{set, c_way}] : pb_data;
  end

  // line fill: the victim is chosen by the set's tree-PLRU bits
  assign fill     = waiting && l2_rvalid;
  assign fill_set = req_line[IW-1:0];
  assign fill_way = plru[fill_set][0] ? {1'b1, plru[fill_set][2]} : {1'b0, plru[fill_set][1]};

  always_ff @(posedge clk)
    if (fill) begin
      tag[{fill_set, fill_way}]  <= req_line[27:IW];
      data[{fill_set, fill_way}] <= l2_rdata;
    end

  assign busy    = req_pending || waiting;
  assign l2_req  = req_pending;
  assign l2_addr = {req_line, 4'd0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; pb_valid <= 1'b0; pb_line_addr <= '0; pb_data <= '0;
      req_pending <= 1'b0; waiting <= 1'b0; req_line <= '0;
      for (int s = 0; s < SETS; s++) begin valid[s] <= '0; plru[s] <= '0; end
    end else begin
      if (rd_en) a_q <= rd_addr;
      if (c_hit) plru[set] <= plru_touch(plru[set], c_way);
      if (miss && !busy) begin
        req_pending <= 1'b1; req_line <= miss_addr[31:4];
      end
      if (req_pending && l2_gnt) begin req_pending <= 1'b0; waiting <= 1'b1; end
      if (fill) begin
        waiting      <= 1'b0;
        pb_valid     <= 1'b1;
        pb_line_addr <= req_line;
        pb_data      <= l2_rdata;
        valid[fill_set][fill_way] <= 1'b1;
        plru[fill_set] <= plru_touch(plru[fill_set], fill_way);
      end
    end
  end
endmodule
