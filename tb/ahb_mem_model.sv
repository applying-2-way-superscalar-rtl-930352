// Behavioural AHB-Lite slave memory used by the processor testbenches.
//
// Not part of the design: it stands for the system memory behind the bus. Every data
// phase takes WAIT_STATES+1 cycles (HREADY low meanwhile), which models a bus clock
// slower than the core clock. Writes honour HWSTRB. The array is public so that a
// testbench can load a program and inspect results.
module ahb_mem_model #(
  parameter int WORDS       = 65536,
  parameter int WAIT_STATES = 2
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic [3:0]  hwstrb,
  output logic [31:0] hrdata,
  output logic        hready
);
  logic [31:0] mem [WORDS];
  logic        dp_valid, dp_write;
  logic [31:0] dp_addr;
  int          wait_cnt;
  int unsigned beats;

  assign hready = !dp_valid || wait_cnt == 0;
  assign hrdata = mem[dp_addr[$clog2(WORDS)+1:2]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid <= 1'b0; dp_write <= 1'b0; dp_addr <= '0; wait_cnt <= 0; beats <= 0;
    end else if (hready) begin
      if (dp_valid) begin
        beats <= beats + 1;
        if (dp_write)
          for (int b = 0; b < 4; b++)
            if (hwstrb[b]) mem[dp_addr[$clog2(WORDS)+1:2]][b*8 +: 8] <= hwdata[b*8 +: 8];
      end
      dp_valid <= htrans[1];
      dp_addr  <= haddr;
      dp_write <= hwrite;
      wait_cnt <= WAIT_STATES;
    end else begin
      wait_cnt <= wait_cnt - 1;
    end
  end
endmodule
