// Self-checking testbench of the load/store address calculation: random base and
// 16-bit offsets (sign extension), byte valid bits, store-data lane placement and the
// misalignment flag for every access size.
module ls_addr_calc_tb;
  import core_pkg::*;
  logic [31:0] base, sd_in, addr, sd;
  logic [15:0] off;
  ls_size_e    size;
  logic [3:0]  bv;
  logic        mis;
  int checks = 0, failures = 0;

  ls_addr_calc dut (.base, .offset(off), .size, .st_data_in(sd_in), .addr, .byte_valid(bv),
                    .st_data(sd), .misaligned(mis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ea, eb_data; logic [3:0] ebv; logic emis;
      base = $urandom; off = 16'($urandom); sd_in = $urandom;
      size = ls_size_e'($urandom_range(0, 4));
      if (i < 4) begin base = 32'h1000; off = 16'hFFFC; end   // negative offset
      #1;
      ea = base + 32'($signed(off));
      case (size)
        LS_B, LS_BU: begin ebv = 4'b0001 << ea[1:0]; emis = 0; end
        LS_H, LS_HU: begin ebv = 4'b0011 << (ea[1] * 2); emis = ea[0]; end
        default:     begin ebv = 4'b1111; emis = ea[1:0] != 0; end
      endcase
      checks++;
      if (addr !== ea || bv !== ebv || mis !== emis) begin
        failures++;
        $display("FAIL base=%08h off=%04h size=%0d: %08h/%b/%0d expected %08h/%b/%0d",
                 base, off, size, addr, bv, mis, ea, ebv, emis);
      end
      // the enabled lanes must carry the low bytes of the register
      checks++;
      if (!mis) begin
        automatic int k = 0;
        for (int b = 0; b < 4; b++)
          if (ebv[b]) begin
            if (sd[b*8 +: 8] !== sd_in[k*8 +: 8]) begin
              failures++; $display("FAIL store lane %0d", b); break;
            end
            k++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
