// Self-checking testbench of the bus interface unit against the behavioural AHB-Lite
// memory (with wait states). Random whole-line reads and strobed line writes are
// compared with a memory model; a bus monitor checks the AHB protocol of every burst
// (NONSEQ then 15 SEQ beats, word-incrementing address inside the line, INCR16, word
// size, address and control held while HREADY is low).
module biu_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         rd_req, rd_done, wr_req, wr_done, hwrite, hready;
  logic [31:0]  rd_addr, wr_addr, haddr, hwdata, hrdata;
  logic [511:0] rd_data, wr_data;
  logic [63:0]  wr_be;
  logic [1:0]   htrans;
  logic [2:0]   hsize, hburst;
  logic [3:0]   hwstrb;
  logic [31:0]  model [1024];
  int checks = 0, failures = 0, beat = 0;

  biu dut (.clk, .rst_n, .rd_req, .rd_addr, .rd_done, .rd_data, .wr_req, .wr_addr, .wr_data,
           .wr_be, .wr_done, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hwstrb,
           .hrdata, .hready);
  ahb_mem_model #(.WORDS(1024), .WAIT_STATES(2)) u_mem (.clk, .rst_n, .haddr, .htrans, .hwrite,
           .hwdata, .hwstrb, .hrdata, .hready);

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // protocol monitor
  logic [31:0] last_addr; logic [1:0] last_trans; logic last_ready;
  always @(posedge clk) if (rst_n) begin
    if (htrans != 2'b00) begin
      chk(hburst == 3'b111 && hsize == 3'b010, "INCR16 word burst");
      if (!last_ready && last_trans != 2'b00) chk(haddr == last_addr && htrans == last_trans, "address held during wait");
      else if (htrans == 2'b10) begin chk(haddr[5:0] == 0, "burst starts at line base"); beat = 1; end
      else begin chk(htrans == 2'b11 && haddr == last_addr + 4 && beat < 16, "sequential beat"); beat++; end
    end
    last_addr = haddr; last_trans = htrans; last_ready = hready;
  end

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_req = 0; wr_req = 0; rd_addr = 0; wr_addr = 0; wr_data = 0; wr_be = 0;
    for (int i = 0; i < 1024; i++) begin model[i] = $urandom; u_mem.mem[i] = model[i]; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int ln = $urandom_range(0, 63);
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        rd_req = 1; rd_addr = {20'd0, 6'(ln), 6'($urandom)};
        do @(negedge clk); while (!rd_done);
        rd_req = 0;
        for (int w = 0; w < 16; w++) chk(rd_data[w*32 +: 32] == model[ln*16 + w], "read line word");
      end else begin
        wr_req = 1; wr_addr = {20'd0, 6'(ln), 6'd0};
        for (int w = 0; w < 16; w++) wr_data[w*32 +: 32] = $urandom;
        wr_be = (n % 3 == 0) ? '1 : {$urandom, $urandom};
        do @(negedge clk); while (!wr_done);
        wr_req = 0;
        for (int b = 0; b < 64; b++) if (wr_be[b]) model[ln*16 + b/4][(b%4)*8 +: 8] = wr_data[b*8 +: 8];
      end
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < 1024; i++) chk(u_mem.mem[i] == model[i], "memory contents after writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
