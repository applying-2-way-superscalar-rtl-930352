// ALU/SHIFT execution unit (two instances, ALU0 and ALU1, in the Execute stage).
//
// Purely combinational: every ALU instruction completes in the single Execute cycle.
// The operation is selected by `ctrl` (the isu_aluN_control signals). Operations: signed
// and unsigned add/subtract, signed/unsigned compare-less-than (CLT, result 1 or 0),
// AND, OR, XOR, NOR, logical left shift, logical and arithmetic right shift (shift amount
// in opb[4:0]) and load-upper-immediate. `overflow` is set when a signed ADD or SUB
// result does not fit in 32 bits, as the unit's description requires; the unsigned
// variants never flag. The LUI operation is this design's addition for building constants.
module alu
  import core_pkg::*;
(
  input  alu_op_e     ctrl,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic [31:0] result,
  output logic        overflow
);
  logic [31:0] sum, diff;

  always_comb begin
    sum      = opa + opb;
    diff     = opa - opb;
    overflow = 1'b0;
    unique case (ctrl)
      ALU_ADD:  begin result = sum;  overflow = (opa[31] == opb[31]) && (sum[31]  != opa[31]); end
      ALU_ADDU: result = sum;
      ALU_SUB:  begin result = diff; overflow = (opa[31] != opb[31]) && (diff[31] != opa[31]); end
      ALU_SUBU: result = diff;
      ALU_CLT:  result = {31'd0, $signed(opa) < $signed(opb)};
      ALU_CLTU: result = {31'd0, opa < opb};
      ALU_AND:  result = opa & opb;
      ALU_OR:   result = opa | opb;
      ALU_XOR:  result = opa ^ opb;
      ALU_NOR:  result = ~(opa | opb);
      ALU_SLL:  result = opa << opb[4:0];
      ALU_SRL:  result = opa >> opb[4:0];
      ALU_SRA:  result = 32'($signed(opa) >>> opb[4:0]);
      ALU_LUI:  result = {opb[15:0], 16'd0};
      default:  result = '0;
    endcase
  end
endmodule
