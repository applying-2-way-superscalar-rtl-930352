// Instruction Queue (IQ) of the fetch stage: 10 entries.
//
// A circular buffer with one write pointer and two read pointers (head and head+1), so
// that Instruction_0 and Instruction_1 can be sent to the two decoders in the same
// cycle. The fetch stage pushes up to 4 instructions of one L1 cache line per cycle
// (`push_n`, entries in program order in push_data[0..]); the decode stage pops 0, 1 or
// 2 (`pop_n`). `free` tells the fetch stage how much room is left; pushing more than
// that is ignored. `flush` empties the queue.
module instruction_queue
  import core_pkg::*;
#(
  parameter int DEPTH = 10
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic [2:0]                 push_n,
  input  iq_entry_t                  push_data [4],
  input  logic [1:0]                 pop_n,
  output iq_entry_t                  rd_data [2],
  output logic [1:0]                 rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);

  iq_entry_t     mem [DEPTH];
  logic [AW-1:0] wp, rp0, rp1;
  logic [CW-1:0] count;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p, input int n);
    int s = int'(p) + n;
    return AW'((s >= DEPTH) ? s - DEPTH : s);
  endfunction

  assign rp1        = inc(rp0, 1);
  assign rd_data[0] = mem[rp0];
  assign rd_data[1] = mem[rp1];
  assign rd_valid   = {count > CW'(1), count > CW'(0)};
  assign free       = CW'(DEPTH) - count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp0 <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (flush) begin
      wp <= '0; rp0 <= '0; count <= '0;
    end else begin
      automatic int np = (int'(push_n) <= int'(free)) ? int'(push_n) : 0;
      automatic int nq = (int'(pop_n) <= int'(count)) ? int'(pop_n) : int'(count);
      for (int i = 0; i < 4; i++)
        if (i < np) mem[inc(wp, i)] <= push_data[i];
      wp    <= inc(wp, np);
      rp0   <= inc(rp0, nq);
      count <= CW'(int'(count) + np - nq);
    end
  end
endmodule
