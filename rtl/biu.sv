// Bus Interface Unit: AHB-Lite master connecting the L2 cache to the system bus.
//
// Moves one 64-byte L2 line per transaction as a 16-beat INCR16 burst of 32-bit words.
// A read (`rd_req`) returns the whole line on `rd_data` with a one-cycle `rd_done`; a
// write (`wr_req`) sends the line with per-byte strobes (HWSTRB, as in AHB5) so that a
// partially collected line from the store gathering buffer only updates its valid bytes.
// Address and data phases are pipelined as AHB requires: the address of beat n+1 is on
// the bus while beat n's data is transferred; HREADY low from the slave extends the
// current phases. A request is taken when the unit is idle, except in the cycle in
// which it signals completion of the previous one. The bus is clocked with the core here; a slower bus (the processor
// runs it at a third of the core clock) appears as wait states. HRESP is not checked.
module biu (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rd_req,
  input  logic [31:0]  rd_addr,
  output logic         rd_done,
  output logic [511:0] rd_data,
  input  logic         wr_req,
  input  logic [31:0]  wr_addr,
  input  logic [511:0] wr_data,
  input  logic [63:0]  wr_be,
  output logic         wr_done,
  // AHB-Lite master
  output logic [31:0]  haddr,
  output logic [1:0]   htrans,
  output logic         hwrite,
  output logic [2:0]   hsize,
  output logic [2:0]   hburst,
  output logic [31:0]  hwdata,
  output logic [3:0]   hwstrb,
  input  logic [31:0]  hrdata,
  input  logic         hready
);
  localparam logic [1:0] IDLE = 2'b00, NONSEQ = 2'b10, SEQ = 2'b11;

  logic         active, is_wr, dphase;
  logic [25:0]  line;
  logic [4:0]   abeat;
  logic [3:0]   dbeat;
  logic [511:0] wbuf;
  logic [63:0]  wbe;

  assign haddr  = {line, abeat[3:0], 2'b00};
  assign htrans = (active && abeat < 5'd16) ? ((abeat == 0) ? NONSEQ : SEQ) : IDLE;
  assign hwrite = is_wr;
  assign hsize  = 3'b010;
  assign hburst = 3'b111;        // INCR16
  assign hwdata = wbuf[{dbeat, 5'd0} +: 32];
  assign hwstrb = wbe[{dbeat, 2'd0} +: 4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; is_wr <= 1'b0; dphase <= 1'b0; line <= '0;
      abeat <= '0; dbeat <= '0; wbuf <= '0; wbe <= '0; rd_data <= '0;
      rd_done <= 1'b0; wr_done <= 1'b0;
    end else begin
      rd_done <= 1'b0; wr_done <= 1'b0;
      if (!active) begin
        // the cycle that shows rd_done/wr_done is not a new request
        if ((wr_req || rd_req) && !rd_done && !wr_done) begin
          active <= 1'b1;
          is_wr  <= wr_req;
          line   <= wr_req ? wr_addr[31:6] : rd_addr[31:6];
          wbuf   <= wr_data;
          wbe    <= wr_be;
          abeat  <= '0; dbeat <= '0; dphase <= 1'b0;
        end
      end else if (hready) begin
        if (dphase) begin
          if (!is_wr) rd_data[{dbeat, 5'd0} +: 32] <= hrdata;
          dbeat <= dbeat + 1'b1;
          if (dbeat == 4'd15) begin
            active <= 1'b0;
            if (is_wr) wr_done <= 1'b1; else rd_done <= 1'b1;
          end
        end
        dphase <= (abeat < 5'd16);
        if (abeat < 5'd16) abeat <= abeat + 1'b1;
      end
    end
  end
endmodule
