// Self-checking testbench of the ALU/SHIFT unit: directed corner cases and random
// operands for every operation, compared with a reference computed here, including the
// signed-overflow flag of ADD and SUB.
module alu_tb;
  import core_pkg::*;
  alu_op_e     ctrl;
  logic [31:0] a, b, res;
  logic        ovf;
  int checks = 0, failures = 0;

  alu dut (.ctrl, .opa(a), .opb(b), .result(res), .overflow(ovf));

  function automatic void model(input alu_op_e op, input logic [31:0] x, y,
                                output logic [31:0] r, output logic o);
    logic signed [32:0] wide;
    o = 1'b0;
    case (op)
      ALU_ADD:  begin wide = $signed({x[31], x}) + $signed({y[31], y}); r = wide[31:0]; o = wide[32] != wide[31]; end
      ALU_ADDU: r = x + y;
      ALU_SUB:  begin wide = $signed({x[31], x}) - $signed({y[31], y}); r = wide[31:0]; o = wide[32] != wide[31]; end
      ALU_SUBU: r = x - y;
      ALU_CLT:  r = ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      ALU_CLTU: r = (x < y) ? 32'd1 : 32'd0;
      ALU_AND:  r = x & y;
      ALU_OR:   r = x | y;
      ALU_XOR:  r = x ^ y;
      ALU_NOR:  r = ~(x | y);
      ALU_SLL:  r = x << y[4:0];
      ALU_SRL:  r = x >> y[4:0];
      ALU_SRA:  r = $signed(x) >>> y[4:0];
      default:  r = {y[15:0], 16'd0};
    endcase
  endfunction

  task automatic try(input alu_op_e op, input logic [31:0] x, y);
    logic [31:0] er; logic eo;
    ctrl = op; a = x; b = y; #1;
    model(op, x, y, er, eo);
    checks++;
    if (res !== er || ovf !== eo) begin
      failures++;
      $display("FAIL op=%s a=%08h b=%08h got %08h/%0d expected %08h/%0d", op.name(), x, y, res, ovf, er, eo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(ALU_ADD, 32'h7FFF_FFFF, 32'd1);      // overflow
    try(ALU_ADD, 32'h8000_0000, 32'hFFFF_FFFF);
    try(ALU_ADDU, 32'h7FFF_FFFF, 32'd1);     // no flag
    try(ALU_SUB, 32'h8000_0000, 32'd1);      // overflow
    try(ALU_SUB, 32'd5, 32'd7);
    try(ALU_CLT, 32'hFFFF_FFFF, 32'd1);
    try(ALU_CLTU, 32'hFFFF_FFFF, 32'd1);
    try(ALU_SRA, 32'h8000_0000, 32'd31);
    try(ALU_SLL, 32'h0000_0001, 32'd31);
    try(ALU_LUI, 32'd0, 32'h0000_1234);
    for (int i = 0; i < 2000; i++)
      try(alu_op_e'($urandom_range(0, 13)), $urandom, (i % 3 == 0) ? 32'($urandom_range(0, 31)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
