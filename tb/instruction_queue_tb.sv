// Self-checking testbench of the 10-entry instruction queue: random pushes of up to 4
// and pops of up to 2 per cycle compared with a queue model (contents of both read
// ports, valid bits, free count), refusal of a push that does not fit, and flush.
module instruction_queue_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush;
  logic [2:0] push_n;
  iq_entry_t push_data [4];
  logic [1:0] pop_n, rd_valid;
  iq_entry_t rd_data [2];
  logic [3:0] free;
  int checks = 0, failures = 0, seq = 0;
  logic [31:0] q [$];

  instruction_queue dut (.clk, .rst_n, .flush, .push_n, .push_data, .pop_n, .rd_data, .rd_valid, .free);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push_n = 0; pop_n = 0;
    for (int i = 0; i < 4; i++) push_data[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int np, nq;
      @(negedge clk);
      chk(int'(free) == 10 - q.size(), "free count");
      chk(rd_valid[0] == (q.size() > 0) && rd_valid[1] == (q.size() > 1), "valid bits");
      if (q.size() > 0) chk(rd_data[0].instr == q[0], "read port 0");
      if (q.size() > 1) chk(rd_data[1].instr == q[1], "read port 1");
      push_n = 3'($urandom_range(0, 4));
      pop_n  = 2'($urandom_range(0, 2));
      for (int i = 0; i < 4; i++) push_data[i].instr = 32'(seq + i);
      np = (int'(push_n) <= 10 - q.size()) ? int'(push_n) : 0;
      nq = (int'(pop_n) <= q.size()) ? int'(pop_n) : q.size();
      @(posedge clk); #1;
      for (int i = 0; i < nq; i++) void'(q.pop_front());
      for (int i = 0; i < np; i++) q.push_back(32'(seq + i));
      seq += np;
    end
    @(negedge clk); push_n = 0; pop_n = 0; flush = 1;
    @(negedge clk); flush = 0;
    chk(free == 10 && rd_valid == 0, "flush empties the queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
