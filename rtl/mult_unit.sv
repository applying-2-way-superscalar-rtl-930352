// Multiply unit of the Execute stage, with the move-from result selector.
//
// A MULT/MULTU takes two clock cycles and blocks the unit meanwhile (`busy`): the
// operands are registered in the first cycle and the 64-bit product is written into
// the register pair mult_result_hi / mult_result_lo at the end of the second, when
// `done` pulses. `mult_unsigned` = 1 selects an unsigned product, 0 a signed one.
// Move-from operations (MFUP, MFLP, MFC0) complete in one cycle: ex_mf_result is the
// high or low product when mfmult_val = 1, otherwise the CP0 register value supplied on
// cp0_rdata. `tag_out` returns the ROB tag given with the operation. `kill` discards a
// move-from issued in a flush cycle; a started multiplication always completes.
module mult_unit
  import core_pkg::*;
#(
  parameter int TAG_W = ROB_W
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             kill,         // drop a move-from result (pipeline flush)
  input  logic             start,        // issue a MULT/MULTU
  input  logic             mult_unsigned,
  input  logic [31:0]      opa,
  input  logic [31:0]      opb,
  input  logic             mf_valid,     // issue a move-from
  input  logic             mfmult_val,   // 1: from hi/lo, 0: from CP0
  input  logic             mf_hi,        // 1: MFUP (high product), 0: MFLP
  input  logic [31:0]      cp0_rdata,
  input  logic [TAG_W-1:0] tag_in,
  output logic             busy,
  output logic             done,         // result valid this cycle
  output logic [31:0]      ex_mf_result, // value written to the destination
  output logic [TAG_W-1:0] tag_out,
  output logic [31:0]      mult_result_hi,
  output logic [31:0]      mult_result_lo
);
  logic             stage1;
  logic [32:0]      a_q, b_q;
  logic [TAG_W-1:0] tag_q;
  logic [65:0]      prod;

  assign prod = 66'($signed(a_q) * $signed(b_q));
  assign busy = stage1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= 1'b0;
      a_q <= '0; b_q <= '0; tag_q <= '0;
      mult_result_hi <= '0; mult_result_lo <= '0;
      done <= 1'b0; ex_mf_result <= '0; tag_out <= '0;
    end else begin
      done <= 1'b0;
      if (stage1) begin
        {mult_result_hi, mult_result_lo} <= prod[63:0];
        stage1       <= 1'b0;
        done         <= 1'b1;
        ex_mf_result <= '0;
        tag_out      <= tag_q;
      end else if (start) begin
        stage1 <= 1'b1;
        a_q    <= {mult_unsigned ? 1'b0 : opa[31], opa};
        b_q    <= {mult_unsigned ? 1'b0 : opb[31], opb};
        tag_q  <= tag_in;
      end else if (mf_valid && !kill) begin
        done         <= 1'b1;
        tag_out      <= tag_in;
        ex_mf_result <= mfmult_val ? (mf_hi ? mult_result_hi : mult_result_lo) : cp0_rdata;
      end
    end
  end
endmodule
