// Self-checking testbench of the 1K-entry, 4-way BTB.
// 1) Random branch PCs are looked up and then written with a new target, the way the
//    fetch unit uses it (hit way / PLRU bits from the lookup passed back at update).
//    Any hit must return the last target written for that PC; a PC just written must hit.
// 2) Four PCs of one set all stay resident (tree-PLRU fills every way); a fifth evicts
//    exactly one of them, and it is the least recently used one.
module btb_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] lk_pc, lk_target, upd_pc, upd_target;
  logic        touch, lk_hit, upd, upd_hit;
  logic [1:0]  lk_way, lk_kind, upd_kind, upd_way;
  logic [2:0]  lk_plru, upd_plru;
  int checks = 0, failures = 0;
  logic [31:0] model [logic [31:0]];

  btb dut (.clk, .rst_n, .lk_pc, .touch, .lk_hit, .lk_way, .lk_target, .lk_kind, .lk_plru,
           .upd, .upd_pc, .upd_target, .upd_kind, .upd_hit, .upd_way, .upd_plru);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s pc=%08h", m, lk_pc); end
  endtask

  task automatic lookup(input logic [31:0] pc);
    @(negedge clk); lk_pc = pc; touch = 1; #1;
  endtask

  task automatic write(input logic [31:0] pc, input logic [31:0] t);
    lookup(pc);
    upd_pc = pc; upd_target = t; upd_kind = t[1:0]; upd_hit = lk_hit; upd_way = lk_way;
    upd_plru = lk_plru;
    @(negedge clk); touch = 0; upd = 1;
    @(negedge clk); upd = 0;
    model[pc] = t;
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    touch = 0; upd = 0; lk_pc = 0; upd_pc = 0; upd_target = 0; upd_kind = 0; upd_hit = 0;
    upd_way = 0; upd_plru = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // PCs from 64 sets and a few tags so that sets overflow
      automatic logic [31:0] pc = {22'($urandom_range(0, 5)), 2'b00, 6'($urandom), 2'b00};
      lookup(pc);
      if (lk_hit) chk(model.exists(pc) && lk_target == model[pc] && lk_kind == model[pc][1:0], "hit returns last target");
      if ($urandom_range(0, 1)) begin
        write(pc, $urandom);
        lookup(pc);
        chk(lk_hit && lk_target == model[pc], "written PC hits");
      end
    end
    // set 0x80: four residents, then a fifth
    for (int i = 0; i < 4; i++) write({22'(100 + i), 8'h80, 2'b00}, 32'(i));
    for (int i = 0; i < 4; i++) begin lookup({22'(100 + i), 8'h80, 2'b00}); chk(lk_hit, "four ways resident"); end
    // the lookups above touched 100..103 in order, so 100 is the least recently used
    write({22'd200, 8'h80, 2'b00}, 32'h55);
    touch = 0; hits = 0;
    for (int i = 0; i < 4; i++) begin lookup({22'(100 + i), 8'h80, 2'b00}); hits += int'(lk_hit); end
    touch = 0;
    lookup({22'd100, 8'h80, 2'b00}); touch = 0;
    chk(hits == 3 && !lk_hit, "fifth entry evicts the least recently used way");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
