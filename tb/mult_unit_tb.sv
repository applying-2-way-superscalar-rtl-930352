// Self-checking testbench of the multiply unit: signed and unsigned products checked
// through MFUP/MFLP and the hi/lo outputs, the two-cycle latency and busy signal of a
// multiplication, the one-cycle move-from, the CP0 source of the move-from selector and
// the kill input.
module mult_unit_tb;
  import core_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, uns, mf_valid, mfmult_val, mf_hi, kill, busy, done;
  logic [31:0] a, b, cp0, res, hi, lo;
  logic [ROB_W-1:0] tin, tout;
  int checks = 0, failures = 0;

  mult_unit dut (.clk, .rst_n, .kill, .start, .mult_unsigned(uns), .opa(a), .opb(b),
    .mf_valid, .mfmult_val, .mf_hi, .cp0_rdata(cp0), .tag_in(tin), .busy, .done,
    .ex_mf_result(res), .tag_out(tout), .mult_result_hi(hi), .mult_result_lo(lo));

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic mul(input logic [31:0] x, y, input bit u);
    logic [63:0] e;
    int lat = 0;
    e = u ? {32'd0, x} * {32'd0, y} : 64'($signed(x) * $signed(y));
    @(negedge clk); start = 1; uns = u; a = x; b = y; tin = 5'd7;
    @(negedge clk); start = 0; lat = 1;
    chk(busy, "busy during multiplication");
    while (!done) begin @(negedge clk); lat++; end
    chk(lat == 2, $sformatf("multiply latency %0d, expected 2", lat));
    chk(tout == 5'd7, "tag returned");
    chk({hi, lo} == e, $sformatf("product %h*%h u=%0d = %h, expected %h", x, y, u, {hi, lo}, e));
    // move-from
    @(negedge clk); mf_valid = 1; mfmult_val = 1; mf_hi = 1; tin = 5'd9;
    @(negedge clk); mf_valid = 0;
    chk(done && res == e[63:32] && tout == 5'd9, "MFUP result in one cycle");
    @(negedge clk); mf_valid = 1; mfmult_val = 1; mf_hi = 0;
    @(negedge clk); mf_valid = 0;
    chk(done && res == e[31:0], "MFLP result");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; uns = 0; mf_valid = 0; mfmult_val = 0; mf_hi = 0; kill = 0; a = 0; b = 0;
    cp0 = 32'hABCD_0123; tin = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    mul(32'hFFFF_FFFD, 32'd1000, 0);
    mul(32'hFFFF_FFFD, 32'd1000, 1);
    mul(32'h8000_0000, 32'h8000_0000, 0);
    for (int i = 0; i < 20; i++) mul($urandom, $urandom, i[0]);
    @(negedge clk); mf_valid = 1; mfmult_val = 0;
    @(negedge clk); mf_valid = 0;
    chk(done && res == cp0, "move-from CP0");
    @(negedge clk); mf_valid = 1; mfmult_val = 0; kill = 1;
    @(negedge clk); mf_valid = 0; kill = 0;
    chk(!done, "killed move-from gives no result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
