// Self-checking testbench of the unified L2 cache (with its store gathering buffer)
// on a simple line-wide bus model. Random instruction-side and data-side 16-byte
// reads and byte/half/word stores go to a small address range (so lines are reused,
// evicted and partially written); one request is outstanding at a time. Every read
// must return the in-order memory contents. Read hits must have a fixed latency,
// shorter than a miss; a miss to a line held partially in the SGB must see the
// gathered bytes. At the end all SGB contents are flushed and memory is compared.
module ul2_cache_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         ic_req, ic_gnt, ic_rvalid, dc_req, dc_gnt, dc_rvalid, st_req, st_gnt;
  logic [31:0]  ic_addr, dc_addr, st_addr, st_data;
  logic [3:0]   st_be;
  logic [127:0] ic_rdata, dc_rdata;
  logic         bus_rd_req, bus_rd_done, bus_wr_req, bus_wr_done;
  logic [31:0]  bus_rd_addr, bus_wr_addr;
  logic [511:0] bus_rd_data, bus_wr_data;
  logic [63:0]  bus_wr_be;
  logic [7:0]   mem [65536], golden [65536];
  int checks = 0, failures = 0, hit_lat = -1, hits = 0, misses = 0;

  ul2_cache dut (.clk, .rst_n, .ic_req, .ic_addr, .ic_gnt, .ic_rvalid, .ic_rdata,
    .dc_req, .dc_addr, .dc_gnt, .dc_rvalid, .dc_rdata, .st_req, .st_addr, .st_data, .st_be,
    .st_gnt, .bus_rd_req, .bus_rd_addr, .bus_rd_done, .bus_rd_data, .bus_wr_req, .bus_wr_addr,
    .bus_wr_data, .bus_wr_be, .bus_wr_done);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // bus: line reads and strobed line writes, 8 to 20 cycles each
  initial begin
    bus_rd_done = 0; bus_wr_done = 0; bus_rd_data = '0;
    forever begin
      @(posedge clk);
      if (bus_rd_req && !bus_rd_done) begin
        repeat ($urandom_range(8, 20)) @(posedge clk);
        #1;
        for (int b = 0; b < 64; b++) bus_rd_data[b*8 +: 8] = mem[{bus_rd_addr[15:6], 6'(b)}];
        bus_rd_done = 1; @(posedge clk); #1 bus_rd_done = 0;
      end else if (bus_wr_req && !bus_wr_done) begin
        repeat ($urandom_range(8, 20)) @(posedge clk);
        #1;
        for (int b = 0; b < 64; b++) if (bus_wr_be[b]) mem[{bus_wr_addr[15:6], 6'(b)}] = bus_wr_data[b*8 +: 8];
        bus_wr_done = 1; @(posedge clk); #1 bus_wr_done = 0;
      end
    end
  end

  initial begin
    repeat (500000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read(input bit ic, input logic [31:0] a);
    int lat = 0;
    logic [127:0] d;
    @(negedge clk);
    if (ic) begin ic_req = 1; ic_addr = a; end else begin dc_req = 1; dc_addr = a; end
    #1;
    while (!(ic ? ic_gnt : dc_gnt)) begin @(negedge clk); #1; end
    @(posedge clk); #1 ic_req = 0; dc_req = 0;
    while (!(ic ? ic_rvalid : dc_rvalid)) begin @(posedge clk); #1; lat++; end
    d = ic ? ic_rdata : dc_rdata;
    for (int b = 0; b < 16; b++) chk(d[b*8 +: 8] == golden[{a[15:4], 4'(b)}], "read data");
    if (lat < 8) begin
      hits++;
      if (hit_lat < 0) hit_lat = lat;
      chk(lat == hit_lat, "fixed hit latency");
    end else misses++;
  endtask

  task automatic store(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk); st_req = 1; st_addr = a; st_data = d; st_be = be;
    #1;
    while (!st_gnt) begin @(negedge clk); #1; end
    @(posedge clk); #1 st_req = 0;
    for (int b = 0; b < 4; b++) if (be[b]) golden[{a[15:2], 2'(b)}] = d[b*8 +: 8];
  endtask

  initial begin
    ic_req = 0; dc_req = 0; st_req = 0; ic_addr = 0; dc_addr = 0; st_addr = 0; st_data = 0; st_be = 0;
    for (int i = 0; i < 65536; i++) begin mem[i] = 8'($urandom); golden[i] = mem[i]; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      // lines spread so that the 4 ways of a few sets overflow
      automatic logic [31:0] a = {16'd0, 2'($urandom), 8'($urandom_range(0, 3)), 6'($urandom)};
      if (n % 50 == 7) a = {a[31:16], 16'($urandom)};
      case ($urandom_range(0, 3))
        0: read(1, a);
        1: read(0, a);
        default: begin
          automatic int sz = $urandom_range(0, 2);
          store(a, $urandom, (sz == 0) ? (4'b0001 << a[1:0]) : (sz == 1) ? (a[1] ? 4'b1100 : 4'b0011) : 4'hF);
        end
      endcase
    end
    // a read miss writes out a gathered line first; after reading every line, memory
    // must hold every store except those of a line still gathered in the SGB
    for (int l = 0; l < 1024; l++) read(0, {16'd0, 10'(l), 6'd0});
    for (int i = 0; i < 65536; i++)
      if (!(dut.u_sgb.valid && dut.u_sgb.line == 26'(i >> 6)))
        if (i < 16384 || golden[i] != mem[i]) chk(mem[i] == golden[i], "memory after all lines were read");
    $display("hits %0d (latency %0d) misses %0d", hits, hit_lat, misses);
    chk(hits > 100 && misses > 100, "hits and misses both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
