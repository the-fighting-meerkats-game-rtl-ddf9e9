// tb_gb_video: fills VRAM and OAM with random tiles, map and sprites through the CPU
// ports, turns the LCD on and compares every pixel of a whole frame with a reference
// model written here (background with scroll, window, 8x8 sprites with flips,
// palettes, priority, the 10-per-line limit). Also checks the frame period
// (456 x 154 clocks), the line period, the start of mode 3 at clock 80 of a line,
// the LY=LYC STAT interrupt and OAM writes from the DMA port.
module tb_gb_video;
  localparam int LC = 456, NL = 154, VIS = 144;
  logic clk = 0, rst = 1;
  logic reg_cs = 0, we = 0, vram_cs = 0, oam_cs = 0, dma_we = 0;
  logic [3:0] reg_addr = 0;
  logic [7:0] wdata = 0, reg_rdata, vram_rdata, oam_rdata, oam_addr = 0, dma_addr = 0, dma_wdata = 0;
  logic [12:0] vram_addr = 0;
  logic irq_vblank, irq_stat, pix_valid;
  logic [1:0] mode, pix;
  logic [7:0] pix_x, pix_y;

  logic [7:0] vr [8192];
  logic [7:0] om [160];
  logic [7:0] lcdc, scx, scy, wx, wy, bgp, obp0, obp1;
  logic [1:0] frame [144][160];
  int checks = 0, failures = 0, nvbl = 0, nstat = 0, t_vbl [3], stat_ly = -1;

  always #5 clk = ~clk;
  gb_video #(.LINE_CYCLES(LC), .LINES(NL), .VISIBLE(VIS)) dut (.*);

  always @(posedge clk) begin
    if (pix_valid && pix_y < 144) frame[pix_y][pix_x] <= pix;
    if (irq_vblank) begin if (nvbl < 3) t_vbl[nvbl] = $time; nvbl++; end
    if (irq_stat) begin nstat++; stat_ly = dut.ly; end
  end

  task automatic wreg(input int a, input logic [7:0] d);
    @(negedge clk); reg_cs = 1; we = 1; reg_addr = 4'(a); wdata = d;
    @(negedge clk); reg_cs = 0; we = 0;
  endtask
  task automatic wvram(input int a, input logic [7:0] d);
    @(negedge clk); vram_cs = 1; we = 1; vram_addr = 13'(a); wdata = d; vr[a] = d;
    @(negedge clk); vram_cs = 0; we = 0;
  endtask
  task automatic woam(input int a, input logic [7:0] d);
    @(negedge clk); oam_cs = 1; we = 1; oam_addr = 8'(a); wdata = d; om[a] = d;
    @(negedge clk); oam_cs = 0; we = 0;
  endtask
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  function automatic void bg_at(int x, int y, output logic [1:0] ci, output logic [1:0] shade);
    int fx, fy, base, tidx, ta, b;
    logic win = lcdc[5] && y >= wy && x + 7 >= wx;
    fx = win ? x + 7 - wx : (x + scx) & 255;
    fy = win ? y - wy : (y + scy) & 255;
    base = (win ? lcdc[6] : lcdc[3]) ? 'h1C00 : 'h1800;
    tidx = vr[base + (fy / 8) * 32 + fx / 8];
    ta = lcdc[4] ? tidx * 16 : (tidx < 128 ? 'h1000 + tidx * 16 : tidx * 16);
    ta += (fy % 8) * 2;
    b = 7 - fx % 8;
    ci = {vr[ta + 1][b], vr[ta][b]};
    shade = 2'(bgp >> (2 * ci));
  endfunction

  function automatic logic [1:0] ref_pix(int x, int y);
    logic [1:0] ci, sh;
    int n = 0;
    bg_at(x, y, ci, sh);
    for (int s = 0; s < 40 && n < 10; s++) begin
      int oy = om[4*s], ox = om[4*s+1], t = om[4*s+2], at = om[4*s+3];
      if (y + 16 >= oy && y + 16 < oy + 8) begin
        int sl = y + 16 - oy, sj = x + 8 - ox, a, b;
        logic [1:0] sci;
        n++;
        if (sj < 0 || sj > 7) continue;
        if (at[6]) sl = 7 - sl;
        a = t * 16 + sl * 2;
        b = at[5] ? sj : 7 - sj;
        sci = {vr[a + 1][b], vr[a][b]};
        if (sci == 0) continue;
        if (at[7] && ci != 0) return sh;
        return 2'((at[4] ? obp1 : obp0) >> (2 * sci));
      end
    end
    return sh;
  endfunction

  task automatic compare_frame(input string w);
    int bad = 0;
    for (int y = 0; y < 144; y++) begin
      int badl = 0;
      for (int x = 0; x < 160; x++)
        if (frame[y][x] !== ref_pix(x, y)) begin
          badl++;
          if (bad + badl < 4) $display("  %s (%0d,%0d) got %0d expected %0d", w, x, y, frame[y][x], ref_pix(x, y));
        end
      checks++;
      if (badl != 0) begin failures++; bad += badl; end
    end
    if (bad != 0) $display("FAIL %s: %0d pixels differ", w, bad);
  endtask

  initial begin
    int t_line, t_m3;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 8192; i++) wvram(i, 8'($urandom));
    for (int i = 0; i < 160; i++) woam(i, 8'($urandom));
    for (int s = 0; s < 40; s++) begin          // keep most sprites on screen
      woam(4*s, 8'(16 + $urandom % 150));
      woam(4*s+1, 8'($urandom % 176));
    end
    lcdc = 8'h93; scx = 8'd37; scy = 8'd201; bgp = 8'hE4; obp0 = 8'hD2; obp1 = 8'h1B;
    wx = 8'd80; wy = 8'd60;
    wreg(2, scy); wreg(3, scx); wreg(7, bgp); wreg(8, obp0); wreg(9, obp1);
    wreg(10, wy); wreg(11, wx); wreg(5, 8'd10); wreg(1, 8'h40);
    wreg(0, lcdc);
    // line and mode timing
    wait (dut.ly == 1); t_line = $time;
    wait (mode == 2'd3); t_m3 = $time;
    chk("mode 3 starts at clock 80", (t_m3 - t_line) / 10, 80);
    wait (dut.ly == 2);
    chk("line period", ($time - t_line) / 10, LC);
    wait (nvbl == 1);
    wait (nvbl == 2);
    compare_frame("background+sprites");
    chk("frame period", (t_vbl[1] - t_vbl[0]) / 10, LC * NL);
    chk("STAT interrupt on LY=LYC", stat_ly, 10);
    checks++; if (nstat < 1) failures++;
    lcdc = 8'hF3; wreg(0, lcdc);                // window on, map at 9C00
    wait (nvbl == 3);
    wait (nvbl == 4);
    compare_frame("window");
    // DMA port writes OAM
    @(negedge clk); dma_we = 1; dma_addr = 8'd5; dma_wdata = 8'h5A;
    @(negedge clk); dma_we = 0; oam_addr = 8'd5; #1;
    chk("OAM via DMA port", oam_rdata, 8'h5A);
    reg_addr = 4'd1; #1;
    chk("STAT reads mode", reg_rdata[1:0], mode);
    wreg(0, 8'h00);
    repeat (2) @(negedge clk);
    reg_addr = 4'd4; #1; chk("LCD off: LY 0", reg_rdata, 0);
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
