// Reservation station of the Issue stage.
//
// One module serves all five stations: ALU0RS and ALU1RS (OUT_OF_ORDER = 1, 4 entries)
// and LSRS (6 entries), BRRS and MULTRS (4 entries) with OUT_OF_ORDER = 0.
// Entries are kept in age order in a compacting array: entry 0 is the oldest, new
// entries are appended after the last valid one (up to two per cycle, from the two
// dispatch slots) and an issued entry is removed with the younger ones shifting down.
// Each operand holds either its value or the ROB tag that will produce it. Every cycle
// the station compares the waiting tags with the result buses and sets an operand ready
// as soon as its result appears; a result that appears in the very cycle an entry is
// selected is forwarded straight into the issued operands ("RS data + forward data").
// An out-of-order station issues the oldest entry whose operands are ready; an in-order
// station issues only its oldest entry. Issue happens when `issue_en` allows it; the
// issued entry leaves the station in that cycle. `flush` empties the station.
module reservation_station
  import core_pkg::*;
#(
  parameter int DEPTH        = 4,
  parameter bit OUT_OF_ORDER = 1'b1
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic [1:0]             wr_valid,
  input  rs_entry_t              wr_entry [2],
  input  cdb_t                   cdb [NUM_CDB],
  input  logic                   issue_en,
  output logic                   issue_valid,
  output rs_entry_t              issue_entry,
  output rs_entry_t              head_entry,  // oldest entry as stored, for issue conditions
  output logic                   head_valid,
  output logic [$clog2(DEPTH+1)-1:0] free_count
);
  localparam int CW = $clog2(DEPTH+1);

  rs_entry_t        ent   [DEPTH];
  logic [CW-1:0]    count;
  rs_entry_t        woken [DEPTH];
  logic [DEPTH-1:0] rdy;
  logic             sel_found;
  int unsigned      sel;

  // Resolve one operand against the result buses
  function automatic operand_t wake(input operand_t o, input cdb_t b [NUM_CDB]);
    operand_t r = o;
    for (int k = 0; k < NUM_CDB; k++)
      if (!r.ready && b[k].valid && b[k].tag == r.tag) begin
        r.ready = 1'b1;
        r.value = b[k].value;
      end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      woken[i]     = ent[i];
      woken[i].opa = wake(ent[i].opa, cdb);
      woken[i].opb = wake(ent[i].opb, cdb);
      rdy[i]       = (i < int'(count)) && woken[i].opa.ready && woken[i].opb.ready;
    end
    sel_found = 1'b0;
    sel       = 0;
    if (OUT_OF_ORDER) begin
      for (int i = DEPTH-1; i >= 0; i--)
        if (rdy[i]) begin sel_found = 1'b1; sel = i; end
    end else begin
      sel_found = rdy[0];
    end
    issue_valid = sel_found && issue_en;
    issue_entry = woken[sel];
    head_entry  = ent[0];
    head_valid  = (count != 0);
    free_count  = CW'(DEPTH) - count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else if (flush) begin
      count <= '0;
    end else begin
      automatic rs_entry_t nxt [DEPTH];
      automatic int n = int'(count);
      for (int i = 0; i < DEPTH; i++) nxt[i] = woken[i];
      if (issue_valid) begin
        for (int i = 0; i < DEPTH-1; i++)
          if (i >= int'(sel)) nxt[i] = woken[i+1];
        n = n - 1;
      end
      for (int w = 0; w < 2; w++)
        if (wr_valid[w] && n < DEPTH) begin
          nxt[n]     = wr_entry[w];
          nxt[n].opa = wake(wr_entry[w].opa, cdb);
          nxt[n].opb = wake(wr_entry[w].opb, cdb);
          n = n + 1;
        end
      for (int i = 0; i < DEPTH; i++) ent[i] <= nxt[i];
      count <= CW'(n);
    end
  end
endmodule
