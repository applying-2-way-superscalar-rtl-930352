// Unified L2 cache (UL2): 256 KB, 64-byte lines, 4-way set associative, tree PLRU.
//
// Shared by the L1 instruction cache, the L1 data cache (16-byte line reads) and the
// stores that retire from the core. A single controller serves one request at a time,
// stores first, then data reads, then instruction reads.
//  * Read hit: the 16-byte part of the line is returned HIT_LAT cycles after the lookup.
//  * Read miss: if the store gathering buffer holds a partial copy of that line it is
//    first written to the bus; the line is then read from the bus through the BIU,
//    written into the PLRU victim way and the requested part returned.
//  * Store: no write allocation. A hit updates the bytes in the L2 line; every store
//    also goes to the store gathering buffer, which writes whole lines to the bus.
// The L2 holds no dirty data (memory is updated through the SGB), so a victim is simply
// overwritten. Valid bits are reset; the tag and data arrays are not.
module ul2_cache #(
  parameter int SIZE_BYTES = 262144,
  parameter int WAYS       = 4,
  parameter int HIT_LAT    = 4
)(
  input  logic         clk,
  input  logic         rst_n,
  // instruction-side line read
  input  logic         ic_req,
  input  logic [31:0]  ic_addr,
  output logic         ic_gnt,
  output logic         ic_rvalid,
  output logic [127:0] ic_rdata,
  // data-side line read
  input  logic         dc_req,
  input  logic [31:0]  dc_addr,
  output logic         dc_gnt,
  output logic         dc_rvalid,
  output logic [127:0] dc_rdata,
  // stores
  input  logic         st_req,
  input  logic [31:0]  st_addr,
  input  logic [31:0]  st_data,
  input  logic [3:0]   st_be,
  output logic         st_gnt,
  // to the bus interface unit
  output logic         bus_rd_req,
  output logic [31:0]  bus_rd_addr,
  input  logic         bus_rd_done,
  input  logic [511:0] bus_rd_data,
  output logic         bus_wr_req,
  output logic [31:0]  bus_wr_addr,
  output logic [511:0] bus_wr_data,
  output logic [63:0]  bus_wr_be,
  input  logic         bus_wr_done
);
  localparam int SETS = SIZE_BYTES / 64 / WAYS;
  localparam int IW   = $clog2(SETS);
  localparam int TW   = 26 - IW;

  typedef enum logic [2:0] {S_IDLE, S_STORE, S_LOOKUP, S_HITWAIT, S_FLUSH, S_BUSRD, S_RESP} state_e;
  state_e state;

  logic [WAYS-1:0] valid [SETS];
  // tag and data arrays have no reset (they are memories); an entry is only used
  // when its valid bit is set. Entry {set, way}.
  logic [TW-1:0]   tag   [SETS*WAYS];
  logic [511:0]    data  [SETS*WAYS];
  logic [2:0]      plru  [SETS];

  logic [31:0]  addr;
  logic         is_ic;
  logic [3:0]   wait_cnt;
  logic [IW-1:0] set;
  logic         hit;
  logic [1:0]   hway;
  logic [511:0] line_q;
  logic [31:0]  st_data_q;
  logic [3:0]   st_be_q;

  // store path to the SGB
  logic sgb_st_valid, sgb_st_ready, sgb_flush_req, sgb_flush_done;

  function automatic logic [2:0] plru_touch(input logic [2:0] p, input logic [1:0] w);
    logic [2:0] r = p;
    if (!w[1]) begin r[0] = 1'b1; r[1] = ~w[0]; end
    else       begin r[0] = 1'b0; r[2] = ~w[0]; end
    return r;
  endfunction

  assign set = addr[IW+5:6];
  always_comb begin
    hit = 1'b0; hway = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[set][w] && tag[{set, 2'(w)}] == addr[31:IW+6]) begin hit = 1'b1; hway = 2'(w); end
  end

  // array writes: a store hit merges its bytes into the line; a bus read fills the
  // tree-PLRU victim way
  logic         st_write, fill;
  logic [1:0]   fill_way;
  logic [511:0] st_line;
  assign st_write = (state == S_STORE) && sgb_st_ready && hit;
  assign fill     = (state == S_BUSRD) && bus_rd_done;
  assign fill_way = plru[set][0] ? {1'b1, plru[set][2]} : {1'b0, plru[set][1]};
  always_comb begin
    st_line = data[{set, hway}];
    for (int w = 0; w < 16; w++)
      for (int b = 0; b < 4; b++)
        if (addr[5:2] == 4'(w) && st_be_q[b]) st_line[w*32 + b*8 +: 8] = st_data_q[b*8 +: 8];
  end

  always_ff @(posedge clk) begin
    if (st_write) data[{set, hway}] <= st_line;
    if (fill) begin
      tag[{set, fill_way}]  <= addr[31:IW+6];
      data[{set, fill_way}] <= bus_rd_data;
    end
  end

  assign st_gnt  = (state == S_IDLE) && st_req;
  assign dc_gnt  = (state == S_IDLE) && !st_req && dc_req;
  assign ic_gnt  = (state == S_IDLE) && !st_req && !dc_req && ic_req;

  assign sgb_st_valid  = (state == S_STORE);
  assign sgb_flush_req = (state == S_FLUSH);
  assign bus_rd_req    = (state == S_BUSRD);
  assign bus_rd_addr   = {addr[31:6], 6'd0};

  store_gathering_buffer u_sgb (
    .clk, .rst_n,
    .st_valid(sgb_st_valid), .st_addr(addr), .st_data(st_data_q), .st_be(st_be_q),
    .st_ready(sgb_st_ready),
    .flush_req(sgb_flush_req), .flush_addr(addr), .flush_done(sgb_flush_done),
    .wr_req(bus_wr_req), .wr_addr(bus_wr_addr), .wr_data(bus_wr_data), .wr_be(bus_wr_be),
    .wr_done(bus_wr_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; addr <= '0; is_ic <= 1'b0; wait_cnt <= '0; line_q <= '0;
      st_data_q <= '0; st_be_q <= '0;
      ic_rvalid <= 1'b0; dc_rvalid <= 1'b0; ic_rdata <= '0; dc_rdata <= '0;
      for (int s = 0; s < SETS; s++) begin valid[s] <= '0; plru[s] <= '0; end
    end else begin
      ic_rvalid <= 1'b0; dc_rvalid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (st_req) begin
            addr <= st_addr; st_data_q <= st_data; st_be_q <= st_be; state <= S_STORE;
          end else if (dc_req) begin
            addr <= dc_addr; is_ic <= 1'b0; state <= S_LOOKUP;
          end else if (ic_req) begin
            addr <= ic_addr; is_ic <= 1'b1; state <= S_LOOKUP;
          end
        end
        S_STORE: if (sgb_st_ready) state <= S_IDLE;
        S_LOOKUP: begin
          if (hit) begin
            line_q     <= data[{set, hway}];
            plru[set]  <= plru_touch(plru[set], hway);
            wait_cnt   <= 4'(HIT_LAT > 1 ? HIT_LAT - 2 : 0);
            state      <= S_HITWAIT;
          end else begin
            state <= S_FLUSH;
          end
        end
        S_HITWAIT: begin
          if (wait_cnt == 0) state <= S_RESP;
          else wait_cnt <= wait_cnt - 1'b1;
        end
        S_FLUSH: if (sgb_flush_done) state <= S_BUSRD;
        S_BUSRD: if (bus_rd_done) begin
          valid[set][fill_way] <= 1'b1;
          plru[set]     <= plru_touch(plru[set], fill_way);
          line_q        <= bus_rd_data;
          state         <= S_RESP;
        end
        S_RESP: begin
          if (is_ic) begin ic_rvalid <= 1'b1; ic_rdata <= line_q[{addr[5:4], 7'd0} +: 128]; end
          else       begin dc_rvalid <= 1'b1; dc_rdata <= line_q[{addr[5:4], 7'd0} +: 128]; end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
