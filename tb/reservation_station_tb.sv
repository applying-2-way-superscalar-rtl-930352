// Self-checking testbench of the reservation station, in both configurations.
// Out-of-order (4 entries): entries waiting on ROB tags are woken by result buses in
// an order different from their age; the oldest ready entry must issue first, a result
// arriving in the cycle of issue must be forwarded into the issued operand, and the
// station must report full. In-order (6 entries): a ready younger entry must wait
// behind a waiting older one. Flush empties the station.
module reservation_station_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      flush;
  logic [1:0] wv_o, wv_i;
  rs_entry_t we [2];
  cdb_t      cdb [NUM_CDB];
  logic      en_o, en_i, iv_o, iv_i, hv_o, hv_i;
  rs_entry_t ie_o, ie_i, he_o, he_i;
  logic [2:0] free_o, free_i;

  reservation_station #(.DEPTH(4), .OUT_OF_ORDER(1'b1)) u_ooo (
    .clk, .rst_n, .flush, .wr_valid(wv_o), .wr_entry(we), .cdb, .issue_en(en_o),
    .issue_valid(iv_o), .issue_entry(ie_o), .head_entry(he_o), .head_valid(hv_o), .free_count(free_o));
  reservation_station #(.DEPTH(6), .OUT_OF_ORDER(1'b0)) u_ino (
    .clk, .rst_n, .flush, .wr_valid(wv_i), .wr_entry(we), .cdb, .issue_en(en_i),
    .issue_valid(iv_i), .issue_entry(ie_i), .head_entry(he_i), .head_valid(hv_i), .free_count(free_i));

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic rs_entry_t mk(input int robtag, input int wait_tag, input bit rdy);
    rs_entry_t e = '0;
    e.rob_tag = ROB_W'(robtag);
    e.uop.valid = 1'b1;
    e.opa = '{ready: rdy, tag: ROB_W'(wait_tag), value: rdy ? 32'(robtag * 10) : 32'd0};
    e.opb = '{ready: 1'b1, tag: '0, value: 32'(robtag)};
    return e;
  endfunction

  task automatic clear_cdb();
    for (int k = 0; k < NUM_CDB; k++) cdb[k] = '0;
  endtask

  task automatic bcast(input int k, input int tag, input logic [31:0] v);
    cdb[k].valid = 1'b1; cdb[k].tag = ROB_W'(tag); cdb[k].value = v;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; wv_o = 0; wv_i = 0; en_o = 0; en_i = 0; clear_cdb();
    we[0] = '0; we[1] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // ---- out-of-order station: four entries waiting on tags 20..23 ----
    @(negedge clk); we[0] = mk(1, 20, 0); we[1] = mk(2, 21, 0); wv_o = 2'b11;
    @(negedge clk); we[0] = mk(3, 22, 0); we[1] = mk(4, 23, 0); wv_o = 2'b11;
    @(negedge clk); wv_o = 0; en_o = 1;
    chk(free_o == 0, "station full after 4 writes");
    chk(!iv_o, "nothing ready, nothing issued");
    // wake entry with rob tag 3 and 4 (younger ones) first
    bcast(0, 22, 32'h333); bcast(1, 23, 32'h444);
    #1;
    chk(iv_o && ie_o.rob_tag == 3 && ie_o.opa.value == 32'h333,
        "oldest ready entry issues, operand forwarded from the result bus");
    @(negedge clk); clear_cdb();
    chk(iv_o && ie_o.rob_tag == 4 && ie_o.opa.value == 32'h444, "woken entry issues next");
    @(negedge clk);
    chk(!iv_o, "remaining entries still wait");
    bcast(2, 20, 32'h111);
    #1;
    chk(iv_o && ie_o.rob_tag == 1 && ie_o.opa.value == 32'h111, "entry 1 issues in its wakeup cycle");
    @(negedge clk); clear_cdb();
    chk(!iv_o && free_o == 3, "one entry left");
    // ---- in-order station ----
    @(negedge clk); we[0] = mk(5, 25, 0); we[1] = mk(6, 0, 1); wv_i = 2'b11; en_i = 1;
    @(negedge clk); wv_i = 0;
    chk(!iv_i, "in-order: ready younger entry waits behind the older one");
    chk(hv_i && he_i.rob_tag == 5, "head is the oldest");
    bcast(3, 25, 32'h555);
    #1;
    chk(iv_i && ie_i.rob_tag == 5 && ie_i.opa.value == 32'h555, "in-order head issues when woken");
    @(negedge clk); clear_cdb();
    chk(iv_i && ie_i.rob_tag == 6, "then the next one");
    @(negedge clk); en_i = 0;
    chk(!iv_i && free_i == 6, "in-order station empty");
    // ---- flush ----
    flush = 1;
    @(negedge clk); flush = 0;
    chk(free_o == 4 && !hv_o, "flush empties the station");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
