// tb_gb_top: the whole console at its default parameters, end to end.
// A boot ROM model (set the stack, write 0xFF50, fall into the cartridge at 0x0100)
// and a cartridge model (32 KiB ROM, 8 KiB RAM) hold a hand-assembled program that:
// copies an OAM-DMA wait routine into high memory and runs it (the CPU keeps
// executing from high memory while the DMA owns the bus), draws a tile pattern,
// starts sound channel 2 and triggers channel 4, runs the timer at 262144 Hz, starts
// a link-cable transfer with its internal clock, selects the button row of the joypad
// and waits in HALT for three vertical blanks with all five interrupts enabled. The
// handlers count in high memory. Afterwards it stores its results in work RAM and
// writes and reads cartridge RAM. The testbench plays a second console on the link
// cable, an NES controller (pressing A after the first frame) and the breakpoint
// operator (stop after the HALT, single step, continue).
// Each mechanism is counted and a failure is counted for any that never happened;
// the program's results, the OAM contents, the DMA length (640 clocks), the
// frame period (70224 clocks) and the DVI pins against the RGB stream are checked.
module tb_gb_top;
  logic clk = 0, rst = 1, pclk = 0, prst = 1;
  logic [8:0]  boot_addr;
  logic [7:0]  boot_data, cart_dout, cart_din, buttons, bp_switches = 0;
  logic [15:0] cart_addr, bp_addr, cpu_pc;
  logic cart_doe, cart_rd_n, cart_wr_n, cart_cs_n, nes_latch, nes_clk, nes_data;
  logic sck_in, sck_out, sck_oe, sin, sout, hsync, vsync, de, bp_half_hi, cpu_stalled;
  logic bp_enable = 0, bp_btn_half = 0, bp_btn_save = 0, bp_btn_step = 0, bp_btn_cont = 0;
  logic [8:0]  audio_left, audio_right;
  logic [23:0] rgb;
  logic        dvi_xclk, dvi_hsync, dvi_vsync, dvi_de;
  logic [11:0] dvi_d;

  logic [7:0] boot [512];
  logic [7:0] rom [32768];
  logic [7:0] cram [8192];
  int checks = 0, failures = 0;

  always #6 clk = ~clk;      // system clock
  always #1 pclk = ~pclk;    // monitor pixel clock, about six times faster

  gb_top dut (.*);

  // boot ROM and cartridge
  assign boot_data = boot[boot_addr];
  assign cart_din  = !cart_cs_n ? cram[cart_addr[12:0]] : rom[cart_addr[14:0]];
  always @(posedge clk) if (!cart_wr_n && !cart_cs_n && cart_doe) cram[cart_addr[12:0]] <= cart_dout;

  // the other console on the link cable (external clock)
  logic       p_cs = 0, p_we = 0, p_ad = 0, p_irq, p_sck_unused, p_sckoe;
  logic [7:0] p_wdata = 0, p_rdata;
  gb_serial partner (.clk, .rst, .cs(p_cs), .we(p_we), .addr(p_ad), .wdata(p_wdata), .rdata(p_rdata),
                     .irq(p_irq), .sck_in(sck_oe ? sck_out : 1'b1), .sck_out(p_sck_unused),
                     .sck_oe(p_sckoe), .sin(sout), .sout(sin));
  assign sck_in = p_sckoe ? p_sck_unused : 1'b1;

  // NES controller: latch loads the active-low buttons, rising clock shifts
  logic [7:0] pressed = 0, nsh = 8'hFF;
  logic nclk_q = 0;
  always @(posedge clk) begin
    nclk_q <= nes_clk;
    if (nes_latch) nsh <= ~pressed;
    else if (nes_clk && !nclk_q) nsh <= {1'b1, nsh[7:1]};
  end
  assign nes_data = nsh[0];

  // mechanism counters
  int n_boot_off = 0, n_dma = 0, n_dma_fetch = 0, n_vbl_isr = 0, n_tim_isr = 0, n_ser_isr = 0,
      n_joy_isr = 0, n_halt = 0, n_stall = 0, n_snd = 0, n_c4 = 0, n_pix = 0, n_vga = 0,
      n_cram_wr = 0, n_tim_ovf = 0, n_vbl = 0, n_sck = 0;
  longint cyc = 0, t_vbl [2];
  logic boot_q = 1, sck_q = 1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    boot_q <= dut.boot_active;
    if (boot_q && !dut.boot_active) n_boot_off++;
    if (dut.dma_active) begin n_dma++; if (dut.fetch_done) n_dma_fetch++; end
    if (dut.fetch_done && !cpu_stalled) case (cpu_pc)
      16'h0040: n_vbl_isr++;
      16'h0050: n_tim_isr++;
      16'h0058: n_ser_isr++;
      16'h0060: n_joy_isr++;
      default: ;
    endcase
    if (dut.halted) n_halt++;
    if (cpu_stalled) n_stall++;
    if (audio_left != 0 && dut.ch_active[1]) n_snd++;
    if (dut.ch_active[3]) n_c4++;
    if (dut.pix_valid) n_pix++;
    if (!cart_wr_n && !cart_cs_n) n_cram_wr++;
    if (dut.irq_timer) n_tim_ovf++;
    if (dut.irq_vblank) begin if (n_vbl < 2) t_vbl[n_vbl] = cyc; n_vbl++; end
    sck_q <= sck_out;
    if (sck_q && !sck_out) n_sck++;
  end
  always @(posedge pclk) if (de && rgb != 24'h0) n_vga++;
  // DVI pins: in the low phase they carry the high half of the pixel taken at the
  // last rising edge, with its data enable (the low half is checked in tb_gb_dvi)
  logic [23:0] rgb_q;
  logic        de_q;
  int n_dvi = 0, n_dvi_err = 0;
  always @(posedge pclk) begin rgb_q <= rgb; de_q <= de; end
  always @(negedge pclk) if (!prst) begin
    if (dvi_d !== rgb_q[23:12] || dvi_de !== de_q) n_dvi_err++;
    if (dvi_de && rgb_q != 24'h0) n_dvi++;
  end

  task automatic chk(input string w, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", w, got, exp); end
  endtask
  task automatic happened(input string w, input int n);
    checks++;
    $display("  %-34s %0d", w, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", w); end
  endtask
  task automatic press(ref logic b);
    @(negedge clk); b = 1; @(negedge clk); b = 0;
  endtask
  task automatic put_boot(input logic [15:0] a, input logic [7:0] b []);
    foreach (b[i]) boot[a + i] = b[i];
  endtask
  task automatic put_rom(input logic [15:0] a, input logic [7:0] b []);
    foreach (b[i]) rom[a + i] = b[i];
  endtask

  localparam logic [15:0] MAIN = 16'h01DC, DONE = 16'h0206;
  localparam logic [15:0] BP = MAIN + 16'd2;   // LDH A,(0x90) after the HALT
  logic [15:0] last_fetch = 0;
  always @(posedge clk) if (dut.fetch_done && !cpu_stalled) last_fetch <= cpu_pc;

  initial begin
    for (int i = 0; i < 512; i++) boot[i] = 8'h00;
    for (int i = 0; i < 32768; i++) rom[i] = 8'h00;
    for (int i = 0; i < 8192; i++) cram[i] = 8'h00;
    put_boot(16'h0000, '{8'h31, 8'hFE, 8'hDF, 8'h3E, 8'h01, 8'hC3, 8'hFC, 8'h00});
    put_boot(16'h00FC, '{8'hE0, 8'h50});
    put_rom(16'h0040, '{8'hF5, 8'hF0, 8'h90, 8'h3C, 8'hE0, 8'h90, 8'hF1, 8'hD9, 8'hD9});
    put_rom(16'h0050, '{8'hF5, 8'hF0, 8'h91, 8'h3C, 8'hE0, 8'h91, 8'hF1, 8'hD9, 8'hF5, 8'hF0, 8'h01, 8'hE0});
    put_rom(16'h005C, '{8'h92, 8'hF1, 8'hD9});
    put_rom(16'h0060, '{8'hF5, 8'hF0, 8'h93, 8'h3C, 8'hE0, 8'h93, 8'hF1, 8'hD9});
    put_rom(16'h00FE, '{8'h00, 8'h00, 8'hC3, 8'h50, 8'h01});
    put_rom(16'h0150, '{8'hF3, 8'h31, 8'hFE, 8'hDF, 8'hAF, 8'hE0, 8'h90, 8'hE0, 8'h91, 8'hE0, 8'h92, 8'hE0});
    put_rom(16'h015C, '{8'h93, 8'h21, 8'h08, 8'h02, 8'h0E, 8'h80, 8'h06, 8'h0A, 8'h2A, 8'hE2, 8'h0C, 8'h05});
    put_rom(16'h0168, '{8'h20, 8'hFA, 8'h21, 8'h00, 8'hC0, 8'h06, 8'hA0, 8'h7D, 8'hEE, 8'h5A, 8'h22, 8'h05});
    put_rom(16'h0174, '{8'h20, 8'hF9, 8'hCD, 8'h80, 8'hFF, 8'h3E, 8'hE4, 8'hE0, 8'h47, 8'h21, 8'h00, 8'h80});
    put_rom(16'h0180, '{8'h06, 8'h08, 8'h3E, 8'hF0, 8'h22, 8'h3E, 8'hCC, 8'h22, 8'h05, 8'h20, 8'hF7, 8'h21});
    put_rom(16'h018C, '{8'h00, 8'h98, 8'h01, 8'h00, 8'h04, 8'hAF, 8'h22, 8'h0B, 8'h78, 8'hB1, 8'h20, 8'hF9});
    put_rom(16'h0198, '{8'h3E, 8'h91, 8'hE0, 8'h40, 8'h3E, 8'h80, 8'hE0, 8'h26, 8'h3E, 8'h77, 8'hE0, 8'h24});
    put_rom(16'h01A4, '{8'h3E, 8'hFF, 8'hE0, 8'h25, 8'h3E, 8'h80, 8'hE0, 8'h16, 8'h3E, 8'hF0, 8'hE0, 8'h17});
    put_rom(16'h01B0, '{8'h3E, 8'h00, 8'hE0, 8'h18, 8'h3E, 8'h87, 8'hE0, 8'h19, 8'h3E, 8'h80, 8'hE0, 8'h23});
    put_rom(16'h01BC, '{8'h3E, 8'h00, 8'hE0, 8'h06, 8'h3E, 8'h00, 8'hE0, 8'h05, 8'h3E, 8'h05, 8'hE0, 8'h07});
    put_rom(16'h01C8, '{8'h3E, 8'h5A, 8'hE0, 8'h01, 8'h3E, 8'h81, 8'hE0, 8'h02, 8'h3E, 8'h10, 8'hE0, 8'h00});
    put_rom(16'h01D4, '{8'h3E, 8'h1F, 8'hE0, 8'hFF, 8'hAF, 8'hE0, 8'h0F, 8'hFB, 8'h76, 8'h00, 8'hF0, 8'h90});
    put_rom(16'h01E0, '{8'hFE, 8'h03, 8'h38, 8'hF8, 8'hF3, 8'hF0, 8'h91, 8'hEA, 8'h00, 8'hC1, 8'hF0, 8'h92});
    put_rom(16'h01EC, '{8'hEA, 8'h01, 8'hC1, 8'hF0, 8'h00, 8'hEA, 8'h02, 8'hC1, 8'hF0, 8'h93, 8'hEA, 8'h04});
    put_rom(16'h01F8, '{8'hC1, 8'h3E, 8'hA5, 8'hEA, 8'h00, 8'hA0, 8'h3E, 8'h00, 8'hFA, 8'h00, 8'hA0, 8'hEA});
    put_rom(16'h0204, '{8'h03, 8'hC1, 8'h18, 8'hFE, 8'h3E, 8'hC0, 8'hE0, 8'h46, 8'h3E, 8'h28, 8'h3D, 8'h20});
    put_rom(16'h0210, '{8'hFD, 8'hC9});
    repeat (4) @(negedge clk);
    rst = 0; prst = 0;
    // partner console: byte 0xC3 ready, waiting for the external clock
    @(negedge clk); p_cs = 1; p_we = 1; p_ad = 0; p_wdata = 8'hC3;
    @(negedge clk); p_ad = 1; p_wdata = 8'h80;
    @(negedge clk); p_cs = 0; p_we = 0;
    // breakpoint address, entered as two halves
    bp_switches = BP[7:0]; press(bp_btn_save);
    press(bp_btn_half);
    bp_switches = BP[15:8]; press(bp_btn_save);
    chk("breakpoint address", bp_addr, BP);
    wait (n_vbl == 1);
    pressed = 8'h01;                       // press A
    wait (n_vbl == 2);
    bp_enable = 1;
    wait (cpu_stalled);
    repeat (100) @(negedge clk);
    chk("stopped at the breakpoint", last_fetch, BP);
    press(bp_btn_step);
    wait (cpu_stalled);
    repeat (20) @(negedge clk);
    chk("stopped again after one step", cpu_stalled, 1);
    chk("next instruction", last_fetch, BP + 2);
    press(bp_btn_cont);
    bp_enable = 0;
    wait (dut.fetch_done && cpu_pc == DONE);
    repeat (20) @(negedge clk);
    $display("mechanisms:");
    happened("boot ROM switched off", n_boot_off);
    happened("DMA bus clocks", n_dma);
    happened("CPU fetches during DMA", n_dma_fetch);
    happened("timer overflows", n_tim_ovf);
    happened("timer interrupts taken", n_tim_isr);
    happened("VBlank interrupts taken", n_vbl_isr);
    happened("link transfer interrupts taken", n_ser_isr);
    happened("link clock pulses", n_sck);
    happened("joypad interrupts taken", n_joy_isr);
    happened("HALT clocks", n_halt);
    happened("breakpoint stall clocks", n_stall);
    happened("channel 2 sound clocks", n_snd);
    happened("channel 4 playing clocks", n_c4);
    happened("pixels sent to converter", n_pix);
    happened("lit monitor pixels", n_vga);
    happened("lit pixels on the DVI pins", n_dvi);
    chk("DVI pins match the RGB stream", n_dvi_err, 0);
    happened("cartridge RAM writes", n_cram_wr);
    chk("DMA length in clocks", n_dma, 640);
    chk("frame period in clocks", t_vbl[1] - t_vbl[0], 70224);
    for (int i = 0; i < 160; i++) begin
      checks++;
      if (dut.u_video.oam[i] !== 8'(i ^ 8'h5A)) begin failures++; $display("FAIL oam[%0d]", i); end
    end
    chk("timer count in high memory", dut.u_wram.mem[13'h100], n_tim_isr % 256);
    chk("exactly one link interrupt", n_ser_isr, 1);
    chk("byte received over the link", dut.u_wram.mem[13'h101], 8'hC3);
    chk("byte the partner received", partner.sb, 8'h5A);
    chk("joypad read with A pressed", dut.u_wram.mem[13'h102], 8'hDE);
    chk("cartridge RAM read back", dut.u_wram.mem[13'h103], 8'hA5);
    chk("joypad interrupt count", dut.u_wram.mem[13'h104], n_joy_isr);
    chk("VBlank count in high memory", dut.u_cpu.u_hram.mem[7'h10], 3);
    chk("pixels per frame", n_pix / n_vbl >= 23040, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
