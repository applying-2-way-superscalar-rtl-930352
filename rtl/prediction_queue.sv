// Prediction Queue (PQ): 16 entries holding the information of every predicted branch.
//
// An entry is set up at IF1 for each branch or jump that is fetched (`push`), and the
// index it gets travels with the instruction. Entries are read by index (asynchronously)
// by the later stages; the oldest entry is released when its branch retires (`pop`), so
// the queue stays in program order. `flush` empties the queue when the pipeline is
// cleared after a misprediction or exception. `full` stops the fetch stage.
module prediction_queue
  import core_pkg::*;
#(
  parameter int DEPTH = PQ_DEPTH
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     push,
  input  pq_entry_t                push_data,
  output logic [$clog2(DEPTH)-1:0] push_idx,
  output logic                     full,
  input  logic                     pop,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output pq_entry_t                rd_data,
  output logic                     empty
);
  localparam int AW = $clog2(DEPTH);
  pq_entry_t    mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;

  assign push_idx = wp;
  assign full     = (count == (AW+1)'(DEPTH));
  assign empty    = (count == '0);
  assign rd_data  = mem[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      automatic logic do_push = push && !full;
      automatic logic do_pop  = pop && !empty;
      if (do_push) begin
        mem[wp] <= push_data;
        wp      <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (do_pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
