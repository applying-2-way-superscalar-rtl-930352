// Self-checking testbench of the skid buffer: a source that obeys the registered stall
// sends numbered words; the sink accepts at random. Every word must come out once and
// in order, the skid register must be used (stall seen), and a flush clears the buffer.
module skid_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, in_valid, stall, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0, stalls = 0;
  int sent = 0, expected = 0;

  skid_buffer #(.W(16)) dut (.clk, .rst_n, .flush, .in_valid, .in_data, .stall,
                             .out_valid, .out_data, .out_ready);

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && !flush) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != 16'(expected)) begin
        failures++; $display("FAIL got %0d expected %0d", out_data, expected);
      end
      expected++;
    end
    if (in_valid && !stall) sent++;
    if (stall) stalls++;
  end

  initial begin
    flush = 0; in_valid = 0; in_data = 0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      in_valid  = !stall && ($urandom_range(0, 4) != 0);
      in_data   = 16'(sent);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (expected != sent) begin failures++; $display("FAIL sent %0d received %0d", sent, expected); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL skid register never used"); end
    out_ready = 0; in_valid = 1;
    @(negedge clk); in_valid = 0; flush = 1;
    @(negedge clk); flush = 0;
    checks++;
    if (out_valid || stall) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
