// tb_gb_dma: a write of 0xC1 copies 0xC100..0xC19F from a memory model into an OAM
// model; checks every byte, the source addresses, and the 640-clock busy time.
module tb_gb_dma;
  logic clk = 0, rst = 1, cs = 0, we = 0;
  logic [7:0] wdata = 0, rdata, bus_data, oam_addr, oam_wdata;
  logic active, rd, oam_we;
  logic [15:0] addr;
  logic [7:0] mem [65536];
  logic [7:0] oam [160];
  int checks = 0, failures = 0, busy = 0, bad_addr = 0;

  always #5 clk = ~clk;
  gb_dma dut (.*);
  assign bus_data = mem[addr];
  always @(posedge clk) begin
    if (oam_we) oam[oam_addr] <= oam_wdata;
    if (active) begin
      busy++;
      if (addr[15:8] != 8'hC1 || addr[7:0] > 8'd159) bad_addr++;
    end
  end

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i ^ (i >> 8));
    for (int i = 0; i < 160; i++) oam[i] = 0;
    @(negedge clk); rst = 0;
    @(negedge clk); cs = 1; we = 1; wdata = 8'hC1;
    @(negedge clk); cs = 0; we = 0;
    wait (!active);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 160; i++) begin
      checks++;
      if (oam[i] !== mem[16'hC100 + i]) begin failures++; if (failures < 5) $display("FAIL oam[%0d]", i); end
    end
    checks++; if (busy != 640) begin failures++; $display("FAIL busy %0d", busy); end
    checks++; if (bad_addr != 0) begin failures++; $display("FAIL source address"); end
    checks++; if (rdata !== 8'hC1) begin failures++; $display("FAIL readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
