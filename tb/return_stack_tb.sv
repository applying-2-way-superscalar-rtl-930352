// Self-checking testbench of the 8-entry return stack: random push / pop / push+pop
// sequences compared with a circular-stack model (top of stack, pointer), including
// wrap-around beyond 8 calls, and a bulk load of another copy's contents.
module return_stack_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, load;
  logic [31:0] push_pc, top;
  logic [31:0] load_stack [8], entries [8];
  logic [2:0] load_ptr, ptr;
  logic [31:0] m [8];
  logic [2:0] mp;
  int checks = 0, failures = 0;

  return_stack dut (.clk, .rst_n, .push, .push_pc, .pop, .top, .load, .load_stack, .load_ptr, .entries, .ptr);

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; load = 0; push_pc = 0; load_ptr = 0; mp = 0;
    for (int i = 0; i < 8; i++) begin m[i] = 0; load_stack[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (top !== m[mp - 3'd1] || ptr !== mp) begin
        failures++; $display("FAIL top=%08h expected %08h ptr=%0d/%0d", top, m[mp - 3'd1], ptr, mp);
      end
      push = 1'($urandom); pop = 1'($urandom); push_pc = $urandom;
      load = ($urandom_range(0, 30) == 0);
      for (int i = 0; i < 8; i++) load_stack[i] = $urandom;
      load_ptr = 3'($urandom);
      @(posedge clk); #1;
      if (load) begin m = load_stack; mp = load_ptr; end
      else if (push && pop) m[mp - 3'd1] = push_pc;
      else if (push) begin m[mp] = push_pc; mp++; end
      else if (pop) mp--;
      push = 0; pop = 0; load = 0;
      checks++;
      if (entries !== m) begin failures++; $display("FAIL contents"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
