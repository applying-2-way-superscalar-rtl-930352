// Return stack (ReS) for CALL/RET prediction.
//
// Three copies exist in the processor: Fetch_ReS (speculative, used to predict RET
// targets), Execute_ReS (updated as branches execute) and arch_ReS (updated at
// retirement). On a CALL the return PC is written at ReS_pointer and the pointer
// increases by 1; on a RET the entry below the pointer is read and the pointer
// decreases by 1. The stack is circular: overflow overwrites the oldest entry.
// `load` copies a whole stack (entries and pointer) from another copy in one cycle,
// which is how the speculative copies are repaired after a flush. Push and pop in
// the same cycle replace the top entry.
module return_stack #(
  parameter int DEPTH = 8
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [31:0]              push_pc,
  input  logic                     pop,
  output logic [31:0]              top,
  input  logic                     load,
  input  logic [31:0]              load_stack [DEPTH],
  input  logic [$clog2(DEPTH)-1:0] load_ptr,
  output logic [31:0]              entries [DEPTH],
  output logic [$clog2(DEPTH)-1:0] ptr
);
  assign top = entries[ptr - 1'b1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int i = 0; i < DEPTH; i++) entries[i] <= '0;
    end else if (load) begin
      ptr   <= load_ptr;
      entries <= load_stack;
    end else if (push && pop) begin
      entries[ptr - 1'b1] <= push_pc;
    end else if (push) begin
      entries[ptr] <= push_pc;
      ptr        <= ptr + 1'b1;
    end else if (pop) begin
      ptr <= ptr - 1'b1;
    end
  end
endmodule
