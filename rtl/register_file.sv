// Architectural register file (32 x 32 bits) of the Dispatch stage.
//
// NREAD asynchronous read ports (four by default) serve the two source operands of
// each of the two instructions dispatched per cycle. Two write ports are driven by the reorder buffer
// when it retires up to two instructions per cycle, so the file only ever holds
// committed state. Register 0 always reads as zero. If both write ports name the same
// register in one cycle, port 1 (the younger instruction) wins. Writes take effect at
// the clock edge; a read in the same cycle sees the old value.
module register_file #(
  parameter int NREGS = 32,
  parameter int W     = 32,
  parameter int NREAD = 4
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr [NREAD],
  output logic [W-1:0]             rdata [NREAD],
  input  logic [1:0]               we,
  input  logic [$clog2(NREGS)-1:0] waddr [2],
  input  logic [W-1:0]             wdata [2]
);
  logic [W-1:0] regs [NREGS];

  always_comb
    for (int p = 0; p < NREAD; p++)
      rdata[p] = (raddr[p] == '0) ? '0 : regs[raddr[p]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule
