// Load/store address calculation (ADDR CALCULATION in the Execute stage).
//
// Combinational. The 16-bit offset is sign-extended to 32 bits and added to the base
// register (isu_ls_opa). From the access size and the low address bits it forms the
// byte valid bits (one per byte lane of the 32-bit word, little-endian lanes) and
// shifts store data onto those lanes. A misaligned halfword or word sets `misaligned`.
// Only the address, byte valid bits and aligned store data are produced here; the cache
// access happens in the following memory stages.
module ls_addr_calc
  import core_pkg::*;
(
  input  logic [31:0] base,        // isu_ls_opa
  input  logic [15:0] offset,      // isu_ls_offset
  input  ls_size_e    size,
  input  logic [31:0] st_data_in,  // register value to store
  output logic [31:0] addr,
  output logic [3:0]  byte_valid,
  output logic [31:0] st_data,     // store data placed on its byte lanes
  output logic        misaligned
);
  always_comb begin
    addr = base + {{16{offset[15]}}, offset};
    misaligned = 1'b0;
    unique case (size)
      LS_B, LS_BU: begin
        byte_valid = 4'b0001 << addr[1:0];
        st_data    = {4{st_data_in[7:0]}};
      end
      LS_H, LS_HU: begin
        byte_valid = addr[1] ? 4'b1100 : 4'b0011;
        st_data    = {2{st_data_in[15:0]}};
        misaligned = addr[0];
      end
      default: begin
        byte_valid = 4'b1111;
        st_data    = st_data_in;
        misaligned = |addr[1:0];
      end
    endcase
  end
endmodule
