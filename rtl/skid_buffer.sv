// Skid buffer at the output of the Decode stage.
//
// The decode stage flops its decoded pair of instructions into an output register.
// When the dispatch stage cannot take it (`out_ready` low) the decode stage raises
// `stall` to the fetch stage; because `stall` is itself a register, one more pair is
// already on its way and is caught here in the skid register. When the stall ends, the
// next output is taken from the skid register instead of from the decoders, and only
// then does the fetch stage resume. Nothing is lost or duplicated. `flush` clears both
// registers. Payload width is a parameter.
module skid_buffer #(
  parameter int W = 8
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         stall,      // registered: upstream must not send
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready
);
  logic         skid_valid;
  logic [W-1:0] skid_data;

  assign stall = skid_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; skid_valid <= 1'b0;
      out_data  <= '0;   skid_data  <= '0;
    end else if (flush) begin
      out_valid <= 1'b0; skid_valid <= 1'b0;
    end else begin
      if (!out_valid || out_ready) begin
        if (skid_valid) begin
          out_valid  <= 1'b1;
          out_data   <= skid_data;
          skid_valid <= 1'b0;
        end else begin
          out_valid <= in_valid;
          if (in_valid) out_data <= in_data;
        end
      end else if (in_valid && !skid_valid) begin
        skid_valid <= 1'b1;
        skid_data  <= in_data;
      end
    end
  end
endmodule
