// Self-checking testbench of the register file: random writes on both ports compared
// with a model, register 0 stays zero, port 1 wins a same-register conflict.
module register_file_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0]  ra [4];
  logic [31:0] rd [4];
  logic [1:0]  we;
  logic [4:0]  wa [2];
  logic [31:0] wd [2];
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst_n, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd));

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa[0] = 0; wa[1] = 0; wd[0] = 0; wd[1] = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) ra[p] = 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd[p] !== model[ra[p]]) begin
          failures++; $display("FAIL r%0d = %08h expected %08h", ra[p], rd[p], model[ra[p]]);
        end
      end
      we = 2'($urandom); wa[0] = 5'($urandom); wa[1] = (n % 7 == 0) ? wa[0] : 5'($urandom);
      wd[0] = $urandom; wd[1] = $urandom;
      @(posedge clk); #1;
      if (we[0]) model[wa[0]] = wd[0];
      if (we[1]) model[wa[1]] = wd[1];
      model[0] = 0;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
