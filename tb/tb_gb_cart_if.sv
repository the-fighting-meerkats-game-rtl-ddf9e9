// tb_gb_cart_if: a cartridge model (32 KiB ROM + 8 KiB RAM behind active-low pins)
// is read and written through the interface: ROM reads, RAM write then read back,
// chip select only in the RAM range, no write strobe when not selected.
module tb_gb_cart_if;
  logic clk = 0;
  logic sel = 0, rd = 0, wr = 0, cart_doe, cart_rd_n, cart_wr_n, cart_cs_n;
  logic [15:0] addr = 0, cart_addr;
  logic [7:0] wdata = 0, rdata, cart_dout, cart_din;
  logic [7:0] rom [32768];
  logic [7:0] ram [8192];
  int checks = 0, failures = 0, cs_in_rom = 0;

  always #5 clk = ~clk;
  gb_cart_if dut (.*);

  // cartridge model: ROM answers with /CS high, RAM with /CS low
  assign cart_din = !cart_cs_n ? ram[cart_addr[12:0]] : rom[cart_addr[14:0]];
  always @(posedge clk) begin
    if (!cart_wr_n && !cart_cs_n && cart_doe) ram[cart_addr[12:0]] <= cart_dout;
    if (!cart_cs_n && !cart_addr[15]) cs_in_rom++;
  end

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 32768; i++) rom[i] = 8'(i * 3 + (i >> 8));
    for (int i = 0; i < 8192; i++) ram[i] = 8'h00;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      sel = 1; rd = 1; wr = 0; addr = 16'($urandom % 32768); #1;
      chk("ROM read", rdata, 8'(addr * 3 + (addr >> 8)));
    end
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); sel = 1; rd = 0; wr = 1; addr = 16'hA000 + 16'(i * 13); wdata = 8'(i + 100);
    end
    @(negedge clk); wr = 0; sel = 0; addr = 16'hA000; wdata = 8'hEE;
    @(negedge clk); wr = 1;                       // not selected: must not write
    @(negedge clk); wr = 0;
    chk("unselected write ignored", ram[0], 8'd100);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); sel = 1; rd = 1; addr = 16'hA000 + 16'(i * 13); #1;
      chk("RAM read", rdata, 32'(unsigned'(8'(i + 100))));
    end
    chk("no /CS in ROM range", cs_in_rom, 0);
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
