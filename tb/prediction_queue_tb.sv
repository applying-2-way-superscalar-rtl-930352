// Self-checking testbench of the 16-entry prediction queue: random pushes and pops
// against a FIFO model; the entry index returned at push must later read back the
// pushed data, full/empty must track the model, pushes into a full queue are refused
// and flush empties the queue.
module prediction_queue_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, push, pop, full, empty;
  pq_entry_t push_data, rd_data;
  logic [3:0] push_idx, rd_idx;
  int checks = 0, failures = 0;
  int qi [$];
  pq_entry_t qd [$];

  prediction_queue dut (.clk, .rst_n, .flush, .push, .push_data, .push_idx, .full, .pop, .rd_idx, .rd_data, .empty);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push = 0; pop = 0; push_data = '0; rd_idx = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit dp, dq;
      @(negedge clk);
      chk(full == (qi.size() == 16) && empty == (qi.size() == 0), "full/empty");
      if (qi.size() > 0) begin
        rd_idx = 4'(qi[0]); #1;
        chk(rd_data == qd[0], "oldest entry reads back");
      end
      push = ($urandom_range(0, 2) != 0) && (n % 400 < 300);
      pop  = ($urandom_range(0, 2) == 0) || (n % 400 >= 300);
      push_data = {$urandom, $urandom, $urandom};
      dp = push && qi.size() < 16; dq = pop && qi.size() > 0;
      #1;
      if (dp) chk(int'(push_idx) == ((qi.size() > 0) ? (qi[$] + 1) % 16 : int'(push_idx)), "push index");
      @(posedge clk); #1;
      if (dq) begin void'(qi.pop_front()); void'(qd.pop_front()); end
      if (dp) begin qi.push_back(int'(push_idx) == 0 ? 15 : int'(push_idx) - 1); qd.push_back(push_data); end
      push = 0; pop = 0;
    end
    @(negedge clk); push = 1; @(negedge clk); push = 0; flush = 1; @(negedge clk); flush = 0;
    chk(empty && !full, "flush empties the queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
