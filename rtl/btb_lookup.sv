// BTB lookup buffer: 16 entries, one per prediction-queue entry.
//
// When a branch is looked up in the BTB at IF1, the BTB_PLRU value of its set (and the
// way it hit, if any) is stored here under the branch's PQ index. When the branch later
// retires and the BTB must be written, this stored value chooses the way to replace,
// so the replacement follows the PLRU state seen at prediction time. Synchronous write,
// asynchronous read.
module btb_lookup #(
  parameter int DEPTH = 16,
  parameter int W     = 3
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] widx,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] ridx,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  assign rdata = mem[ridx];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    else if (we) mem[widx] <= wdata;
endmodule
