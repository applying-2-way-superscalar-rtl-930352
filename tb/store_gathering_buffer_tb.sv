// Self-checking testbench of the one-entry store gathering buffer. Random byte, half
// and word stores to a few 64-byte lines (with runs that fill a whole line) and random
// flush requests are applied; a bus model acknowledges line writes after a random delay
// and applies them with their byte enables. Checks: memory equals the in-order result
// of all accepted stores after a final flush, a flush of a held line writes it before
// `flush_done`, and both full-line and partial (eviction) writes occurred.
module store_gathering_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         st_valid, st_ready, flush_req, flush_done, wr_req, wr_done;
  logic [31:0]  st_addr, st_data, flush_addr, wr_addr;
  logic [3:0]   st_be;
  logic [511:0] wr_data;
  logic [63:0]  wr_be;
  logic [7:0]   mem [1024], golden [1024];
  int checks = 0, failures = 0, full_writes = 0, partial_writes = 0;

  store_gathering_buffer dut (.clk, .rst_n, .st_valid, .st_addr, .st_data, .st_be, .st_ready,
    .flush_req, .flush_addr, .flush_done, .wr_req, .wr_addr, .wr_data, .wr_be, .wr_done);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // bus: acknowledge a write after a few cycles and apply it
  initial begin
    wr_done = 0;
    forever begin
      @(posedge clk);
      if (wr_req && !wr_done) begin
        repeat ($urandom_range(1, 6)) @(posedge clk);
        #1;
        for (int b = 0; b < 64; b++) if (wr_be[b]) mem[wr_addr[9:6]*64 + b] = wr_data[b*8 +: 8];
        if (&wr_be) full_writes++; else partial_writes++;
        wr_done = 1;
        @(posedge clk); #1 wr_done = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk); st_valid = 1; st_addr = a; st_data = d; st_be = be;
    #1;
    while (!st_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 st_valid = 0;
    for (int b = 0; b < 4; b++) if (be[b]) golden[{a[9:2], 2'(b)}] = d[b*8 +: 8];
  endtask

  task automatic flush(input logic [31:0] a);
    @(negedge clk); flush_req = 1; flush_addr = a;
    while (!flush_done) @(negedge clk);
    flush_req = 0;
    for (int b = 0; b < 64; b++)
      chk(mem[{a[9:6], 6'(b)}] == golden[{a[9:6], 6'(b)}], "line in memory after its flush");
  endtask

  initial begin
    st_valid = 0; st_addr = 0; st_data = 0; st_be = 0; flush_req = 0; flush_addr = 0;
    for (int i = 0; i < 1024; i++) begin mem[i] = 8'($urandom); golden[i] = mem[i]; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      automatic int r = $urandom_range(0, 9);
      automatic logic [31:0] a = {22'd0, 4'($urandom_range(0, 3)), 6'($urandom)};
      if (r == 0) flush(a);
      else if (r == 1) begin
        // a whole line written word by word
        for (int w = 0; w < 16; w++) store({a[31:6], 4'(w), 2'b00}, $urandom, 4'hF);
      end else begin
        automatic int sz = $urandom_range(0, 2);
        logic [3:0] be;
        be = (sz == 0) ? (4'b0001 << a[1:0]) : (sz == 1) ? (a[1] ? 4'b1100 : 4'b0011) : 4'hF;
        store(a, $urandom, be);
      end
    end
    for (int l = 0; l < 16; l++) flush({22'd0, 4'(l), 6'd0});
    for (int i = 0; i < 1024; i++) chk(mem[i] == golden[i], "final memory contents");
    chk(full_writes > 0 && partial_writes > 0, "full-line and partial writes both happened");
    $display("full %0d partial %0d", full_writes, partial_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
