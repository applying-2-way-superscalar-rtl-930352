// Self-checking testbench of the BTB lookup buffer: random writes and reads of the
// 16 entries compared with a model.
module btb_lookup_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we;
  logic [3:0] widx, ridx;
  logic [2:0] wdata, rdata;
  logic [2:0] m [16];
  int checks = 0, failures = 0;

  btb_lookup dut (.clk, .rst_n, .we, .widx, .wdata, .ridx, .rdata);

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; widx = 0; wdata = 0; ridx = 0;
    for (int i = 0; i < 16; i++) m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ridx = 4'($urandom); #1;
      checks++;
      if (rdata !== m[ridx]) begin failures++; $display("FAIL entry %0d", ridx); end
      we = 1'($urandom); widx = 4'($urandom); wdata = 3'($urandom);
      @(posedge clk); #1;
      if (we) m[widx] = wdata;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
