// Self-checking testbench of the branch execute unit: random BEQ/BNE/J/JAL/JR with
// random predictions; direction, next PC, link value and the misprediction flag are
// compared with a reference.
module branch_unit_tb;
  import core_pkg::*;
  br_op_e op;
  logic [31:0] pc, a, b, tgt, ptgt, npc, link;
  logic ptaken, taken, misp;
  int checks = 0, failures = 0;

  branch_unit dut (.op, .pc, .opa(a), .opb(b), .target(tgt), .pred_taken(ptaken),
    .pred_target(ptgt), .taken, .next_pc(npc), .mispredict(misp), .link);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic et; logic [31:0] en; logic em;
      op = br_op_e'($urandom_range(0, 4));
      pc = $urandom & ~32'd3; tgt = $urandom & ~32'd3;
      a = $urandom_range(0, 3); b = $urandom_range(0, 3);
      if (op == BR_JR) a = $urandom & ~32'd3;
      ptaken = $urandom_range(0, 1);
      case ($urandom_range(0, 2))
        0: ptgt = tgt; 1: ptgt = a; default: ptgt = $urandom;
      endcase
      #1;
      et = (op == BR_BEQ) ? (a == b) : (op == BR_BNE) ? (a != b) : 1'b1;
      en = !et ? pc + 4 : (op == BR_JR) ? a : tgt;
      em = (et != ptaken) || (et && ptgt != en);
      checks++;
      if (taken !== et || npc !== en || misp !== em || link !== pc + 4) begin
        failures++;
        $display("FAIL op=%s taken %0d/%0d next %08h/%08h misp %0d/%0d", op.name(), taken, et, npc, en, misp, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
