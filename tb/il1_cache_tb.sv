// Self-checking testbench of the L1 instruction cache with a line-read L2 model.
// A fetch model presents random addresses (a working set larger than one set's four
// ways in a few sets, mixed with sequential runs). When IF1 reports a hit, the line
// must equal memory; on a miss the fetch raises `miss` and presents the address again
// until it hits. Checks: data of every hit, a missed line is found (in the PB or the
// array) once the L2 answers, lines stay resident (re-fetches hit), and exactly one L2
// request is outstanding at a time.
module il1_cache_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         rd_en, hit, miss, busy, l2_req, l2_gnt, l2_rvalid;
  logic [31:0]  rd_addr, if1_addr, miss_addr, l2_addr;
  logic [127:0] line, l2_rdata;
  int checks = 0, failures = 0, hits = 0, misses = 0, outstanding = 0;

  il1_cache dut (.clk, .rst_n, .rd_en, .rd_addr, .hit, .line, .if1_addr, .miss, .miss_addr,
                 .busy, .l2_req, .l2_addr, .l2_gnt, .l2_rvalid, .l2_rdata);

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return a ^ 32'h5a5a_1234 ^ {a[15:0], a[31:16]};
  endfunction

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // L2 model: grant after 0-3 cycles, data 4-12 cycles later
  initial begin
    l2_gnt = 0; l2_rvalid = 0; l2_rdata = '0;
    forever begin
      @(negedge clk);
      if (l2_req) begin
        automatic logic [31:0] a;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        l2_gnt = 1; a = l2_addr; outstanding++;
        chk(outstanding == 1, "one L2 request at a time");
        @(negedge clk); l2_gnt = 0;
        repeat ($urandom_range(4, 12)) @(negedge clk);
        for (int w = 0; w < 4; w++) l2_rdata[w*32 +: 32] = word_at({a[31:4], 2'(w), 2'b00});
        l2_rvalid = 1; outstanding--;
        @(negedge clk); l2_rvalid = 0;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a;
    int tries;
    rd_en = 0; rd_addr = 0; miss = 0; miss_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    a = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 3 == 0) a = {18'($urandom_range(0, 5)), 3'($urandom_range(0, 2)), 9'd0, 2'b00} | (32'($urandom_range(0, 7)) << 4);
      else a = a + 16;
      tries = 0;
      forever begin
        @(negedge clk); rd_en = 1; rd_addr = a; miss = 0;
        @(negedge clk); rd_en = 0; #1;
        chk(if1_addr == a, "IF1 address");
        if (hit) begin
          for (int w = 0; w < 4; w++) chk(line[w*32 +: 32] == word_at({a[31:4], 2'(w), 2'b00}), "hit line data");
          if (tries == 0) hits++;
          break;
        end
        if (tries == 0) misses++;
        miss = !busy; miss_addr = a;
        tries++;
        chk(tries < 100, "a missed line arrives");
        if (tries >= 100) break;
      end
    end
    @(negedge clk); miss = 0;
    $display("hits %0d misses %0d", hits, misses);
    chk(hits > 1000 && misses > 100, "hits and misses both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
