// Branch execute unit (BRANCH EXECUTE in the Execute stage).
//
// Combinational. Resolves a branch or jump: BEQ/BNE compare the two register operands,
// J/JAL always go to their absolute target, JR goes to the register value. It compares
// the actual outcome with the fetch-stage prediction carried by the instruction and
// raises `mispredict` when the direction or the target differs; `next_pc` is then the
// correct address to fetch from. JAL (a CALL) produces the link value pc+4 for r31.
module branch_unit
  import core_pkg::*;
(
  input  br_op_e      op,
  input  logic [31:0] pc,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  input  logic [31:0] target,       // decoded target of BEQ/BNE/J/JAL
  input  logic        pred_taken,
  input  logic [31:0] pred_target,
  output logic        taken,
  output logic [31:0] next_pc,
  output logic        mispredict,
  output logic [31:0] link
);
  always_comb begin
    unique case (op)
      BR_BEQ:  taken = (opa == opb);
      BR_BNE:  taken = (opa != opb);
      default: taken = 1'b1;
    endcase
    if (!taken)          next_pc = pc + 32'd4;
    else if (op == BR_JR) next_pc = opa;
    else                  next_pc = target;
    mispredict = (taken != pred_taken) || (taken && (pred_target != next_pc));
    link = pc + 32'd4;
  end
endmodule
