// Self-checking testbench of the direction predictor (local 256 x 2-bit table, global
// 4096 x 2-bit table in 256 rows, 10-bit speculative and architectural history).
// Random lookups, speculative history shifts, trainings and history restores are
// applied to the block and to a model; every lookup output (local counter, index,
// global counter, prediction) and both history registers are compared every cycle.
// A final phase trains one branch with a fixed pattern and checks it is learned.
// The tables are initialised by a sweep after reset; the test starts after it.
module branch_predictor_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] lk_pc, upd_pc;
  logic [1:0]  lk_local, lk_global;
  logic [11:0] lk_gidx, upd_gidx;
  logic        lk_taken, spec_shift, spec_bit, ghr_restore, upd, upd_taken;
  logic [9:0]  ghr, arch_ghr;
  logic [1:0]  ml [256];
  logic [1:0]  mg [4096];
  logic [9:0]  mghr, march;
  int checks = 0, failures = 0;

  branch_predictor dut (.clk, .rst_n, .lk_pc, .lk_local, .lk_global, .lk_gidx, .lk_taken,
                        .spec_shift, .spec_bit, .ghr_restore, .ghr, .arch_ghr,
                        .upd, .upd_pc, .upd_gidx, .upd_taken);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int correct;
    spec_shift = 0; spec_bit = 0; ghr_restore = 0; upd = 0; upd_taken = 0; upd_pc = 0;
    upd_gidx = 0; lk_pc = 0;
    for (int i = 0; i < 256; i++) ml[i] = 2'b01;
    for (int i = 0; i < 4096; i++) mg[i] = 2'b01;
    mghr = 0; march = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (260) @(posedge clk);          // initialisation sweep of the tables
    for (int n = 0; n < 20000; n++) begin
      automatic logic [11:0] gi;
      @(negedge clk);
      lk_pc = {22'($urandom_range(0, 3)), 8'($urandom_range(0, 40)), 2'b00};
      #1;
      gi = {lk_pc[9:2] ^ mghr[7:0], ml[lk_pc[9:2]], mghr[9:8]};
      chk(lk_local == ml[lk_pc[9:2]], "local counter");
      chk(lk_gidx == gi, "global index");
      chk(lk_global == mg[gi] && lk_taken == mg[gi][1], "global counter and prediction");
      chk(ghr == mghr && arch_ghr == march, "history registers");
      spec_shift = 1'($urandom); spec_bit = 1'($urandom);
      ghr_restore = ($urandom_range(0, 20) == 0);
      upd = 1'($urandom); upd_taken = ($urandom_range(0, 3) != 0);
      upd_pc = {22'd0, 8'($urandom_range(0, 40)), 2'b00};
      upd_gidx = 12'($urandom);
      @(posedge clk); #1;
      if (ghr_restore) mghr = upd ? {march[8:0], upd_taken} : march;
      else if (spec_shift) mghr = {mghr[8:0], spec_bit};
      if (upd) begin
        march = {march[8:0], upd_taken};
        ml[upd_pc[9:2]] = sat_update(ml[upd_pc[9:2]], upd_taken);
        mg[upd_gidx] = sat_update(mg[upd_gidx], upd_taken);
      end
      spec_shift = 0; ghr_restore = 0; upd = 0;
    end
    // a branch taken three times, then not taken, repeated: learned through history
    correct = 0;
    for (int n = 0; n < 400; n++) begin
      automatic logic t = (n % 4 != 3);
      @(negedge clk); lk_pc = 32'h0000_0120; #1;
      if (n >= 200 && lk_taken == t) correct++;
      upd = 1; upd_pc = lk_pc; upd_gidx = lk_gidx; upd_taken = t; spec_shift = 1; spec_bit = t;
      @(negedge clk); upd = 0; spec_shift = 0;
    end
    chk(correct == 200, "periodic pattern is predicted perfectly after training");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
