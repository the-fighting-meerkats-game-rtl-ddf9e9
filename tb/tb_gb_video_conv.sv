// tb_gb_video_conv: a small monitor timing (216x166 total) on a separate pixel clock.
// Two random Game Boy frames are written one after the other; after each one every
// displayed pixel of a monitor frame is compared with the frame just finished
// (centred, grey-mapped, black around). Also checks sync periods and pulse widths
// and the data-enable count per line.
module tb_gb_video_conv;
  localparam int HA = 200, HF = 4, HS = 8, HB = 4, VA = 160, VF = 2, VS = 2, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int X0 = (HA - 160) / 2, Y0 = (VA - 144) / 2;
  logic clk = 0, rst = 1, pclk = 0, prst = 1, pix_valid = 0;
  logic [7:0] pix_x = 0, pix_y = 0;
  logic [1:0] pix = 0;
  logic hsync, vsync, de;
  logic [23:0] rgb;
  logic [1:0] img [144][160];
  int checks = 0, failures = 0;
  int hq = 0, vq = 0, bad = 0, de_line = 0, de_bad = 0, hs_low = 0, hs_bad = 0, hs_t = 0, hs_per_bad = 0, vs_n = 0;
  bit compare = 0;

  always #5 clk = ~clk;
  always #7 pclk = ~pclk;
  gb_video_conv #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                  .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);

  function automatic logic [23:0] expect_rgb(int x, int y);
    logic [7:0] g [4] = '{8'hFF, 8'hAA, 8'h55, 8'h00};
    if (x < X0 || x >= X0 + 160 || y < Y0 || y >= Y0 + 144) return 24'h0;
    return {3{g[img[y - Y0][x - X0]]}};
  endfunction

  always @(posedge pclk) begin hq <= dut.hc; vq <= dut.vc; end
  logic hs_q = 1, vs_q = 1;
  always @(negedge pclk) if (!prst) begin
    if (compare && rgb !== expect_rgb(hq, vq)) begin
      bad++; if (bad < 4) $display("  pixel (%0d,%0d) %h expected %h", hq, vq, rgb, expect_rgb(hq, vq));
    end
    if (de) de_line++;
    if (!hsync) hs_low++;
    if (hs_q && !hsync) begin
      if (hs_t != 0 && ($time - hs_t) / 14 != HT) hs_per_bad++;
      hs_t = $time;
      if (de_line != 0 && de_line != HA) de_bad++;
      de_line = 0;
    end
    if (!hs_q && hsync) begin if (hs_low != HS) hs_bad++; hs_low = 0; end
    if (vs_q && !vsync) vs_n++;
    hs_q = hsync; vs_q = vsync;
  end

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  task automatic send_frame;
    for (int y = 0; y < 144; y++) for (int x = 0; x < 160; x++) img[y][x] = 2'($urandom);
    for (int y = 0; y < 144; y++)
      for (int x = 0; x < 160; x++) begin
        @(negedge clk); pix_valid = 1; pix_x = 8'(x); pix_y = 8'(y); pix = img[y][x];
      end
    @(negedge clk); pix_valid = 0;
  endtask

  task automatic check_monitor_frame(input string w);
    int v0;
    v0 = vs_n;
    wait (vs_n == v0 + 2);                // let the buffer select pass over
    bad = 0; compare = 1;
    wait (vs_n == v0 + 3);
    compare = 0;
    chk({w, " pixels differing"}, bad, 0);
  endtask

  initial begin
    repeat (3) @(negedge pclk); prst = 0;
    @(negedge clk); rst = 0;
    send_frame();
    check_monitor_frame("frame 1");
    send_frame();
    check_monitor_frame("frame 2");
    chk("hsync period errors", hs_per_bad, 0);
    chk("hsync width errors", hs_bad, 0);
    chk("data enable per line errors", de_bad, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
