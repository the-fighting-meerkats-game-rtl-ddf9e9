// tb_gb_dvi: random pixels and syncs go in on each rising edge of the pixel clock.
// In the following period the testbench samples the pins in the middle of the high
// phase (expects the low half of the previous pixel) and in the middle of the low
// phase (expects the high half), and checks the registered syncs and data enable.
// It also checks the values held in reset and that `dvi_xclk` follows the clock.
module tb_gb_dvi;
  logic pclk = 0, prst = 1, hsync = 1, vsync = 1, de = 0;
  logic [23:0] rgb = 0;
  logic dvi_xclk, dvi_hsync, dvi_vsync, dvi_de;
  logic [11:0] dvi_d;
  int checks = 0, failures = 0;

  always #10 pclk = ~pclk;

  gb_dvi dut (.*);

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    logic [23:0] p;
    logic [2:0]  s;
    repeat (3) @(posedge pclk);
    #5;
    chk("reset data", dvi_d, 0);
    chk("reset syncs", {dvi_hsync, dvi_vsync, dvi_de}, 3'b110);
    @(negedge pclk); prst = 0;
    for (int i = 0; i < 500; i++) begin
      p = 24'($urandom);
      s = 3'($urandom);
      rgb = p; {hsync, vsync, de} = s;          // set up before the rising edge
      @(posedge pclk); #5;                       // middle of the high phase
      rgb = 24'($urandom); {hsync, vsync, de} = 3'($urandom);   // next pixel must not leak
      chk("first half", dvi_d, p[11:0]);
      chk("xclk high", dvi_xclk, 1);
      chk("syncs", {dvi_hsync, dvi_vsync, dvi_de}, s);
      @(negedge pclk); #5;                       // middle of the low phase
      chk("second half", dvi_d, p[23:12]);
      chk("xclk low", dvi_xclk, 0);
      @(negedge pclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
