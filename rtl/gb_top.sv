// gb_top: the complete Game Boy.
// The CPU executes code from the cartridge (or, after reset, from the boot ROM) and
// controls every other block through memory-mapped registers on one shared address
// and data bus: video module (VRAM, OAM, LCD registers), sound unit, timer, DMA,
// link-cable port, joypad register (fed by the NES-controller poller), 8 KiB work RAM
// and the cartridge interface. While a DMA transfer runs, the DMA block drives the
// bus address and the CPU's external accesses are disabled. The video module's, the
// timer's, the link port's and the joypad register's interrupt requests go into the
// CPU's IF register. A breakpoint unit can stop the CPU at a chosen address.
// Parts outside the logic are reached through ports: the boot ROM (a read port,
// asynchronous), the cartridge pins, the NES controller pins, the link-cable pins,
// the audio levels for the codec, and the monitor
// timing/RGB for the DVI encoder (pixel clock `pclk`): 24-bit RGB with its syncs, and
// the same pixels on 12 double-data-rate pins (`dvi_*`) as the encoder chip takes them.
// Clock: one system clock at the CPU rate (4.194304 MHz nominal); every memory is
// asynchronous-read, single-cycle-write.
module gb_top #(
  parameter int unsigned LINE_CYCLES  = 456,
  parameter int unsigned LINES        = 154,
  parameter int unsigned FS_DIV       = 8192,
  parameter int unsigned POLL_CYCLES  = 69905,
  parameter int unsigned SCK_HALF     = 256,
  parameter int unsigned H_ACTIVE     = 640,
  parameter int unsigned V_ACTIVE     = 480
) (
  input  logic        clk,
  input  logic        rst,
  // boot ROM
  output logic [8:0]  boot_addr,
  input  logic [7:0]  boot_data,
  // cartridge connector
  output logic [15:0] cart_addr,
  output logic [7:0]  cart_dout,
  output logic        cart_doe,
  input  logic [7:0]  cart_din,
  output logic        cart_rd_n,
  output logic        cart_wr_n,
  output logic        cart_cs_n,
  // NES controller
  output logic        nes_latch,
  output logic        nes_clk,
  input  logic        nes_data,
  output logic [7:0]  buttons,
  // link cable
  input  logic        sck_in,
  output logic        sck_out,
  output logic        sck_oe,
  input  logic        sin,
  output logic        sout,
  // audio
  output logic [8:0]  audio_left,
  output logic [8:0]  audio_right,
  // video
  input  logic        pclk,
  input  logic        prst,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic [23:0] rgb,
  output logic        dvi_xclk,
  output logic        dvi_hsync,
  output logic        dvi_vsync,
  output logic        dvi_de,
  output logic [11:0] dvi_d,
  // breakpoint controls
  input  logic        bp_enable,
  input  logic [7:0]  bp_switches,
  input  logic        bp_btn_half,
  input  logic        bp_btn_save,
  input  logic        bp_btn_step,
  input  logic        bp_btn_cont,
  output logic        bp_half_hi,
  output logic [15:0] bp_addr,
  output logic        cpu_stalled,
  output logic [15:0] cpu_pc
);

  // ---------------- CPU ----------------
  logic [15:0] cpu_addr, fetch_pc;
  logic [7:0]  cpu_dout, bus_rdata;
  logic        cpu_rd, cpu_wr, fetch_done, halted, stall;
  logic [4:0]  irq;
  logic        dma_active;

  gb_cpu u_cpu (
    .clk(clk), .rst(rst), .stall(stall), .addr(cpu_addr), .dout(cpu_dout),
    .din(bus_rdata), .rd(cpu_rd), .wr(cpu_wr), .mem_disable(dma_active), .irq(irq),
    .fetch_pc(fetch_pc), .fetch_done(fetch_done), .halted(halted)
  );

  gb_breakpoint u_bp (
    .clk(clk), .rst(rst), .enable(bp_enable), .switches(bp_switches),
    .btn_half(bp_btn_half), .btn_save(bp_btn_save), .btn_step(bp_btn_step),
    .btn_cont(bp_btn_cont), .fetch_pc(fetch_pc), .fetch_done(fetch_done),
    .stall(stall), .half_hi(bp_half_hi), .bp_addr(bp_addr)
  );

  assign cpu_stalled = stall;
  assign cpu_pc      = fetch_pc;

  // ---------------- bus master select ----------------
  logic [15:0] dma_addr, bus_addr;
  logic        dma_rd, bus_rd, bus_wr;

  assign bus_addr = dma_active ? dma_addr : cpu_addr;
  assign bus_rd   = dma_active ? dma_rd : cpu_rd;
  assign bus_wr   = !dma_active && cpu_wr;

  // ---------------- decoder ----------------
  logic sel_boot, sel_cart, sel_vram, sel_wram, wram_we, sel_oam, sel_joy, sel_serial,
        sel_timer, sel_sound, sel_video, sel_dma, boot_active;
  logic [7:0] cart_rdata, vram_rdata, wram_rdata, oam_rdata, joy_rdata, serial_rdata,
              timer_rdata, sound_rdata, video_rdata, dma_rdata;

  gb_mmu u_mmu (
    .clk(clk), .rst(rst), .addr(bus_addr), .wr(bus_wr), .wdata(cpu_dout), .rdata(bus_rdata),
    .boot_active(boot_active),
    .sel_boot(sel_boot), .sel_cart(sel_cart), .sel_vram(sel_vram), .sel_wram(sel_wram),
    .wram_we(wram_we), .sel_oam(sel_oam), .sel_joy(sel_joy), .sel_serial(sel_serial),
    .sel_timer(sel_timer), .sel_sound(sel_sound), .sel_video(sel_video), .sel_dma(sel_dma),
    .boot_rdata(boot_data), .cart_rdata(cart_rdata), .vram_rdata(vram_rdata),
    .wram_rdata(wram_rdata), .oam_rdata(oam_rdata), .joy_rdata(joy_rdata),
    .serial_rdata(serial_rdata), .timer_rdata(timer_rdata), .sound_rdata(sound_rdata),
    .video_rdata(video_rdata), .dma_rdata(dma_rdata)
  );

  assign boot_addr = bus_addr[8:0];

  // ---------------- memories and peripherals ----------------
  gb_ram #(.DEPTH(8192)) u_wram (
    .clk(clk), .we(wram_we), .addr(bus_addr[12:0]), .wdata(cpu_dout), .rdata(wram_rdata)
  );

  gb_cart_if u_cart (
    .sel(sel_cart), .addr(bus_addr), .rd(bus_rd), .wr(bus_wr), .wdata(cpu_dout),
    .rdata(cart_rdata), .cart_addr(cart_addr), .cart_dout(cart_dout), .cart_doe(cart_doe),
    .cart_din(cart_din), .cart_rd_n(cart_rd_n), .cart_wr_n(cart_wr_n), .cart_cs_n(cart_cs_n)
  );

  logic       oam_dma_we;
  logic [7:0] oam_dma_addr, oam_dma_wdata;

  gb_dma u_dma (
    .clk(clk), .rst(rst), .cs(sel_dma), .we(bus_wr), .wdata(cpu_dout), .rdata(dma_rdata),
    .active(dma_active), .addr(dma_addr), .rd(dma_rd), .bus_data(bus_rdata),
    .oam_we(oam_dma_we), .oam_addr(oam_dma_addr), .oam_wdata(oam_dma_wdata)
  );

  logic irq_timer, irq_serial, irq_joy, irq_vblank, irq_stat;

  gb_timer u_timer (
    .clk(clk), .rst(rst), .cs(sel_timer), .we(bus_wr), .addr(bus_addr[1:0]),
    .wdata(cpu_dout), .rdata(timer_rdata), .irq(irq_timer)
  );

  gb_serial #(.SCK_HALF(SCK_HALF)) u_serial (
    .clk(clk), .rst(rst), .cs(sel_serial), .we(bus_wr), .addr(bus_addr[1]),
    .wdata(cpu_dout), .rdata(serial_rdata), .irq(irq_serial),
    .sck_in(sck_in), .sck_out(sck_out), .sck_oe(sck_oe), .sin(sin), .sout(sout)
  );

  gb_nes_ctrl #(.POLL_CYCLES(POLL_CYCLES)) u_nes (
    .clk(clk), .rst(rst), .nes_latch(nes_latch), .nes_clk(nes_clk), .nes_data(nes_data),
    .buttons(buttons)
  );

  gb_joypad u_joy (
    .clk(clk), .rst(rst), .cs(sel_joy), .we(bus_wr), .wdata(cpu_dout), .rdata(joy_rdata),
    .buttons(buttons), .irq(irq_joy)
  );

  logic [7:0] snd_off;
  logic [3:0] ch_active;
  assign snd_off = bus_addr[7:0] - 8'h10;

  gb_audio #(.FS_DIV(FS_DIV)) u_audio (
    .clk(clk), .rst(rst), .cs(sel_sound), .we(bus_wr), .addr(snd_off[5:0]),
    .wdata(cpu_dout), .rdata(sound_rdata),
    .left(audio_left), .right(audio_right), .ch_active(ch_active)
  );

  logic       pix_valid;
  logic [7:0] pix_x, pix_y;
  logic [1:0] pix, lcd_mode;

  gb_video #(.LINE_CYCLES(LINE_CYCLES), .LINES(LINES)) u_video (
    .clk(clk), .rst(rst), .reg_cs(sel_video), .reg_addr(bus_addr[3:0]), .we(bus_wr),
    .wdata(cpu_dout), .reg_rdata(video_rdata),
    .vram_cs(sel_vram), .vram_addr(bus_addr[12:0]), .vram_rdata(vram_rdata),
    .oam_cs(sel_oam), .oam_addr(bus_addr[7:0]), .oam_rdata(oam_rdata),
    .dma_we(oam_dma_we), .dma_addr(oam_dma_addr), .dma_wdata(oam_dma_wdata),
    .irq_vblank(irq_vblank), .irq_stat(irq_stat), .mode(lcd_mode),
    .pix_valid(pix_valid), .pix_x(pix_x), .pix_y(pix_y), .pix(pix)
  );

  gb_video_conv #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_conv (
    .clk(clk), .rst(rst), .pix_valid(pix_valid), .pix_x(pix_x), .pix_y(pix_y), .pix(pix),
    .pclk(pclk), .prst(prst), .hsync(hsync), .vsync(vsync), .de(de), .rgb(rgb)
  );

  gb_dvi u_dvi (
    .pclk(pclk), .prst(prst), .hsync(hsync), .vsync(vsync), .de(de), .rgb(rgb),
    .dvi_xclk(dvi_xclk), .dvi_hsync(dvi_hsync), .dvi_vsync(dvi_vsync), .dvi_de(dvi_de),
    .dvi_d(dvi_d)
  );

  assign irq = {irq_joy, irq_serial, irq_timer, irq_stat, irq_vblank};

endmodule
