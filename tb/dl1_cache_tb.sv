// Self-checking testbench of the non-blocking L1 data cache with an L2 model.
// Random loads (all sizes, signed and unsigned) with unique tags are issued back to
// back over a working set that misses often; loads sent back because the PB is full
// are issued again. Every response must carry an outstanding tag and the right data.
// Write-through stores (issued when no load is in flight, as retirement order
// guarantees in the core) must update both a cached line and the L2 copy. Random
// pipeline flushes drop the loads in flight: none of them may be answered afterwards.
// The test requires hits under outstanding misses, PB-full replays and flushes to occur.
module dl1_cache_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         flush, ld_valid, ld_ready, resp_valid, ld_replay, st_valid, st_ready;
  logic [31:0]  ld_addr, resp_data, replay_addr, st_addr, st_data, l2_addr, l2_st_addr, l2_st_data;
  ls_size_e     ld_size, replay_size;
  logic [4:0]   ld_tag, resp_tag, replay_tag;
  logic [1:0]   pb_used;
  logic [3:0]   st_be, l2_st_be;
  logic         l2_req, l2_gnt, l2_rvalid, l2_st_req, l2_st_gnt, st_en;
  logic [127:0] l2_rdata;
  logic [7:0]   mem [16384];
  int checks = 0, failures = 0, hum = 0, replays = 0, flushes = 0, answered = 0;

  dl1_cache dut (.clk, .rst_n, .flush, .ld_valid, .ld_addr, .ld_size, .ld_tag, .ld_ready,
    .resp_valid, .resp_tag, .resp_data, .ld_replay, .replay_addr, .replay_size, .replay_tag,
    .pb_used, .st_valid, .st_addr, .st_data, .st_be, .st_ready, .l2_req, .l2_addr, .l2_gnt,
    .l2_rvalid, .l2_rdata, .l2_st_req, .l2_st_addr, .l2_st_data, .l2_st_be, .l2_st_gnt);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  function automatic logic [31:0] expect_load(input logic [31:0] a, input ls_size_e sz);
    logic [31:0] w = {mem[{a[13:2], 2'd3}], mem[{a[13:2], 2'd2}], mem[{a[13:2], 2'd1}], mem[{a[13:2], 2'd0}]};
    logic [7:0]  b = w[{a[1:0], 3'd0} +: 8];
    logic [15:0] h = w[{a[1], 4'd0} +: 16];
    case (sz)
      LS_B:  return {{24{b[7]}}, b};
      LS_BU: return {24'd0, b};
      LS_H:  return {{16{h[15]}}, h};
      LS_HU: return {16'd0, h};
      default: return w;
    endcase
  endfunction

  // L2 model: line reads (grant after 0-2 cycles, data 3-10 cycles later), stores
  assign l2_st_gnt = l2_st_req && st_en;
  initial begin
    l2_gnt = 0; l2_rvalid = 0; l2_rdata = '0;
    forever begin
      @(negedge clk);
      if (l2_req) begin
        automatic logic [31:0] a;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        l2_gnt = 1; a = l2_addr;
        @(negedge clk); l2_gnt = 0;
        repeat ($urandom_range(3, 10)) @(negedge clk);
        for (int b = 0; b < 16; b++) l2_rdata[b*8 +: 8] = mem[{a[13:4], 4'(b)}];
        l2_rvalid = 1;
        @(negedge clk); l2_rvalid = 0;
      end
    end
  end
  always @(posedge clk)
    if (l2_st_req && l2_st_gnt)
      for (int b = 0; b < 4; b++) if (l2_st_be[b]) mem[{l2_st_addr[13:2], 2'(b)}] <= l2_st_data[b*8 +: 8];

  // outstanding loads by tag
  bit          out_v [32];
  logic [31:0] out_a [32];
  ls_size_e    out_s [32];
  logic [31:0] out_e [32];
  int          rq [$];        // tags to issue again

  always @(posedge clk) if (rst_n) begin
    if (resp_valid && !flush) begin
      chk(out_v[resp_tag], "response carries an outstanding tag");
      chk(resp_data == out_e[resp_tag], $sformatf("load data %08h expected %08h", resp_data, out_e[resp_tag]));
      if (pb_used != 0) hum++;
      out_v[resp_tag] = 0; answered++;
    end
    if (ld_replay && !flush) begin
      chk(out_v[replay_tag] && replay_addr == out_a[replay_tag], "replayed load identified");
      rq.push_back(int'(replay_tag)); replays++;
    end
  end

  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued = 0;
    flush = 0; ld_valid = 0; ld_addr = 0; ld_size = LS_W; ld_tag = 0; st_valid = 0; st_addr = 0;
    st_data = 0; st_be = 0; st_en = 0;
    for (int i = 0; i < 32; i++) out_v[i] = 0;
    for (int i = 0; i < 16384; i++) mem[i] = 8'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      automatic int busy_n = 0;
      @(negedge clk);
      ld_valid = 0; flush = 0; st_en = 1'($urandom);
      for (int i = 0; i < 32; i++) busy_n += int'(out_v[i]);
      if (st_valid) begin
        // wait for the store to be accepted
      end else if ($urandom_range(0, 300) == 0) begin
        flush = 1; flushes++;
        for (int i = 0; i < 32; i++) out_v[i] = 0;
        rq.delete();
      end else if (rq.size() > 0 && $urandom_range(0, 1)) begin
        automatic int t = rq.pop_front();
        ld_valid = 1; ld_tag = 5'(t); ld_addr = out_a[t]; ld_size = out_s[t];
      end else if (busy_n == 0 && rq.size() == 0 && $urandom_range(0, 9) == 0) begin
        automatic logic [31:0] a = {18'd0, 2'($urandom), 4'($urandom_range(0, 3)), 6'($urandom)};
        automatic int sz = $urandom_range(0, 2);
        st_valid = 1; st_addr = a; st_data = $urandom;
        st_be = (sz == 0) ? (4'b0001 << a[1:0]) : (sz == 1) ? (a[1] ? 4'b1100 : 4'b0011) : 4'hF;
      end else if (busy_n < 30 && $urandom_range(0, 2) != 0) begin
        automatic int t = 0;
        automatic logic [31:0] a = {18'd0, 2'($urandom), 4'($urandom_range(0, 3)), 6'($urandom)};
        automatic ls_size_e sz = ls_size_e'($urandom_range(0, 4));
        while (out_v[t]) t++;
        if (sz == LS_H || sz == LS_HU) a[0] = 0;
        if (sz == LS_W) a[1:0] = 0;
        out_v[t] = 1; out_a[t] = a; out_s[t] = sz; out_e[t] = expect_load(a, sz);
        ld_valid = 1; ld_tag = 5'(t); ld_addr = a; ld_size = sz; issued++;
      end
      #1;
      if (st_valid && st_ready) begin
        @(posedge clk); #1 st_valid = 0;
      end
    end
    @(negedge clk); ld_valid = 0;
    // drain: issue the remaining replays
    repeat (2000) begin
      @(negedge clk); ld_valid = 0;
      if (rq.size() > 0) begin
        automatic int t = rq.pop_front();
        ld_valid = 1; ld_tag = 5'(t); ld_addr = out_a[t]; ld_size = out_s[t];
      end
    end
    @(negedge clk); ld_valid = 0;
    repeat (50) @(negedge clk);
    for (int i = 0; i < 32; i++) chk(!out_v[i], "every load answered");
    $display("answered %0d hits-under-miss %0d replays %0d flushes %0d", answered, hum, replays, flushes);
    chk(hum > 50 && replays > 50 && flushes > 10, "hit under miss, replay and flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
