// Store Gathering Buffer (SGB) of the unified L2 cache.
//
// Collects stores that fall into the same 64-byte L2 line (address bits 31..6 equal)
// and writes the line to the system bus as one burst once all 64 bytes have been
// collected. One entry is kept. The entry is written to the bus early (with only the
// bytes collected so far enabled) in two cases: a store arrives for a different line,
// or the L2 is about to read the same line from the bus (`flush_req` with that line's
// address), so that memory is never read stale. `st_ready` is low while a write to the
// bus is in progress; `flush_done` pulses when a flush request has been served (at
// once if the entry did not hold that line).
module store_gathering_buffer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         st_valid,
  input  logic [31:0]  st_addr,
  input  logic [31:0]  st_data,     // data on its byte lanes
  input  logic [3:0]   st_be,
  output logic         st_ready,
  input  logic         flush_req,
  input  logic [31:0]  flush_addr,
  output logic         flush_done,
  // bus write of a whole line
  output logic         wr_req,
  output logic [31:0]  wr_addr,
  output logic [511:0] wr_data,
  output logic [63:0]  wr_be,
  input  logic         wr_done
);
  logic         valid, writing;
  logic [25:0]  line;
  logic [511:0] data;
  logic [63:0]  be;

  assign wr_req   = writing;
  assign wr_addr  = {line, 6'd0};
  assign wr_data  = data;
  assign wr_be    = be;
  assign st_ready = !writing && !(valid && st_valid && st_addr[31:6] != line);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; writing <= 1'b0; line <= '0; data <= '0; be <= '0;
      flush_done <= 1'b0;
    end else begin
      flush_done <= 1'b0;
      if (writing) begin
        if (wr_done) begin writing <= 1'b0; valid <= 1'b0; be <= '0; end
      end else if (flush_req) begin
        if (valid && flush_addr[31:6] == line) writing <= 1'b1;
        else flush_done <= 1'b1;
      end else if (st_valid) begin
        if (valid && st_addr[31:6] != line) begin
          writing <= 1'b1;                         // evict the partial line first
        end else begin
          automatic logic [63:0]  nbe = valid ? be : '0;
          automatic logic [511:0] nd  = data;
          for (int b = 0; b < 4; b++)
            if (st_be[b]) begin
              nbe[{st_addr[5:2], 2'(b)}] = 1'b1;
              nd[{st_addr[5:2], 2'(b), 3'd0} +: 8] = st_data[b*8 +: 8];
            end
          valid <= 1'b1;
          line  <= st_addr[31:6];
          be    <= nbe;
          data  <= nd;
          if (&nbe) writing <= 1'b1;               // whole line collected
        end
      end
    end
  end
endmodule
