// gb_mmu: address decoder and read multiplexer of the shared system bus.
// Every component sits on one address bus and one data bus; this block turns the bus
// address into one select line per component and routes the selected component's
// read data back (a multiplexer in place of tristate buffers). It also holds the
// boot-ROM switch at 0xFF50: after reset the boot ROM answers for 0x0000-0x0103;
// once a value with bit 0 set is written to 0xFF50 those addresses go to the cartridge
// for good. Memory map: 0x0000-0x7FFF cartridge ROM, 0x8000-0x9FFF VRAM, 0xA000-0xBFFF
// cartridge RAM, 0xC000-0xDFFF work RAM, 0xE000-0xFDFF echo of work RAM (reads only,
// writes are dropped), 0xFE00-0xFE9F OAM, 0xFF00 joypad, 0xFF01-02 serial, 0xFF04-07
// timer, 0xFF10-0xFF3F sound, 0xFF40-0xFF4B video registers except 0xFF46 DMA.
// High memory, IF and IE never reach this bus (they are inside the CPU). Unmapped
// addresses read 0xFF. Combinational, apart from the 0xFF50 register.
module gb_mmu (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] addr,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        boot_active,
  // selects
  output logic        sel_boot,
  output logic        sel_cart,
  output logic        sel_vram,
  output logic        sel_wram,
  output logic        wram_we,
  output logic        sel_oam,
  output logic        sel_joy,
  output logic        sel_serial,
  output logic        sel_timer,
  output logic        sel_sound,
  output logic        sel_video,
  output logic        sel_dma,
  // read data of each target
  input  logic [7:0]  boot_rdata,
  input  logic [7:0]  cart_rdata,
  input  logic [7:0]  vram_rdata,
  input  logic [7:0]  wram_rdata,
  input  logic [7:0]  oam_rdata,
  input  logic [7:0]  joy_rdata,
  input  logic [7:0]  serial_rdata,
  input  logic [7:0]  timer_rdata,
  input  logic [7:0]  sound_rdata,
  input  logic [7:0]  video_rdata,
  input  logic [7:0]  dma_rdata
);

  logic boot_off;
  logic is_io;

  always_ff @(posedge clk) begin
    if (rst) boot_off <= 1'b0;
    else if (wr && addr == 16'hff50 && wdata[0]) boot_off <= 1'b1;
  end

  assign boot_active = !boot_off;
  assign is_io       = (addr[15:8] == 8'hff);

  always_comb begin
    sel_boot   = !boot_off && (addr <= 16'h0103);
    sel_cart   = ((addr[15] == 1'b0) && !sel_boot) || (addr[15:13] == 3'b101);
    sel_vram   = (addr[15:13] == 3'b100);
    sel_wram   = (addr[15:13] == 3'b110) || ((addr[15:13] == 3'b111) && (addr < 16'hfe00));
    wram_we    = wr && (addr[15:13] == 3'b110);
    sel_oam    = (addr >= 16'hfe00) && (addr <= 16'hfe9f);
    sel_joy    = is_io && (addr[7:0] == 8'h00);
    sel_serial = is_io && (addr[7:0] == 8'h01 || addr[7:0] == 8'h02);
    sel_timer  = is_io && (addr[7:2] == 6'b000001);
    sel_sound  = is_io && (addr[7:0] >= 8'h10) && (addr[7:0] <= 8'h3f);
    sel_dma    = is_io && (addr[7:0] == 8'h46);
    sel_video  = is_io && (addr[7:4] == 4'h4) && (addr[3:0] <= 4'hb) && !sel_dma;

    rdata = 8'hff;
    if (sel_boot)        rdata = boot_rdata;
    else if (sel_cart)   rdata = cart_rdata;
    else if (sel_vram)   rdata = vram_rdata;
    else if (sel_wram)   rdata = wram_rdata;
    else if (sel_oam)    rdata = oam_rdata;
    else if (sel_joy)    rdata = joy_rdata;
    else if (sel_serial) rdata = serial_rdata;
    else if (sel_timer)  rdata = timer_rdata;
    else if (sel_sound)  rdata = sound_rdata;
    else if (sel_dma)    rdata = dma_rdata;
    else if (sel_video)  rdata = video_rdata;
    else if (is_io && addr[7:0] == 8'h50) rdata = {7'h7f, boot_off};
  end

endmodule
