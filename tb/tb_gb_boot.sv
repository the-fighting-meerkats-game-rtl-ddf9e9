// tb_gb_boot: the bootstrap sequence on the whole console, at default parameters.
// The boot ROM model holds a small start-up program with the steps a Game Boy
// bootstrap performs: set the stack, clear VRAM (0x8000-0x9FFF) to zero, copy the
// 48-byte logo from the cartridge (0x0104-0x0133) into VRAM tile data at 0x8010 while
// comparing every byte with the boot ROM's own copy, then form the header checksum
// over 0x0134-0x014C (x = x - byte - 1, the standard rule) and compare it with
// 0x014D. On any mismatch it stops in HALT with the boot ROM still mapped. Otherwise
// it writes 1 to 0xFF50 from 0x00FE, so the next fetch comes from the cartridge at
// 0x0100, where the cartridge program stores 0x5A to work RAM and halts.
// Three runs with a random logo and header: a good cartridge, one logo byte wrong,
// and a wrong checksum. Checked: the boot ROM is switched off only for the good
// cartridge, the cartridge code runs only then, VRAM holds zeros and the logo, and
// the bad cartridges stop with the boot ROM mapped.
module tb_gb_boot;
  logic clk = 0, rst = 1, pclk = 0;
  logic [8:0]  boot_addr;
  logic [7:0]  boot_data, cart_dout, cart_din, buttons;
  logic [15:0] cart_addr, bp_addr, cpu_pc;
  logic cart_doe, cart_rd_n, cart_wr_n, cart_cs_n, nes_latch, nes_clk, nes_data = 1'b1;
  logic sck_in = 1'b1, sck_out, sck_oe, sin = 1'b1, sout, hsync, vsync, de;
  logic bp_half_hi, cpu_stalled, prst = 1;
  logic [7:0]  bp_switches = 0;
  logic bp_enable = 0, bp_btn_half = 0, bp_btn_save = 0, bp_btn_step = 0, bp_btn_cont = 0;
  logic [8:0]  audio_left, audio_right;
  logic [23:0] rgb;
  logic        dvi_xclk, dvi_hsync, dvi_vsync, dvi_de;
  logic [11:0] dvi_d;

  logic [7:0] boot [512];
  logic [7:0] rom [32768];
  logic [7:0] logo [48];
  int checks = 0, failures = 0;

  always #6 clk = ~clk;
  always #1 pclk = ~pclk;

  gb_top dut (.*);

  assign boot_data = boot[boot_addr];
  assign cart_din  = rom[cart_addr[14:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put_boot(input int a, input logic [7:0] b []);
    foreach (b[i]) boot[a + i] = b[i];
  endtask
  task automatic put_rom(input int a, input logic [7:0] b []);
    foreach (b[i]) rom[a + i] = b[i];
  endtask

  task automatic load_boot();
    logic [7:0] prog [] = '{
      8'h31, 8'hFE, 8'hFF,          // 0000 LD SP,0xFFFE
      8'hAF,                        // 0003 XOR A
      8'h21, 8'h00, 8'h80,          // 0004 LD HL,0x8000
      8'h22,                        // 0007 clr: LD (HL+),A
      8'hCB, 8'h6C,                 // 0008 BIT 5,H        (HL reached 0xA000?)
      8'h28, 8'hFB,                 // 000A JR Z,clr
      8'h11, 8'h04, 8'h01,          // 000C LD DE,0x0104   cartridge logo
      8'h21, 8'h10, 8'h80,          // 000F LD HL,0x8010   VRAM destination
      8'h01, 8'hA8, 8'h00,          // 0012 LD BC,0x00A8   boot ROM's copy
      8'h1A,                        // 0015 cmp: LD A,(DE)
      8'h77,                        // 0016 LD (HL),A
      8'h0A,                        // 0017 LD A,(BC)
      8'hBE,                        // 0018 CP (HL)
      8'h20, 8'h1A,                 // 0019 JR NZ,fail
      8'h13, 8'h23, 8'h03,          // 001B INC DE, INC HL, INC BC
      8'h7B,                        // 001E LD A,E
      8'hFE, 8'h34,                 // 001F CP 0x34
      8'h20, 8'hF2,                 // 0021 JR NZ,cmp
      8'h21, 8'h34, 8'h01,          // 0023 LD HL,0x0134
      8'h06, 8'h19,                 // 0026 LD B,25
      8'hAF,                        // 0028 XOR A
      8'h96,                        // 0029 sum: SUB (HL)
      8'h3D,                        // 002A DEC A
      8'h23,                        // 002B INC HL
      8'h05,                        // 002C DEC B
      8'h20, 8'hFA,                 // 002D JR NZ,sum
      8'hBE,                        // 002F CP (HL)        header checksum at 0x014D
      8'h20, 8'h03,                 // 0030 JR NZ,fail
      8'hC3, 8'hFC, 8'h00,          // 0032 JP 0x00FC
      8'h76,                        // 0035 fail: HALT
      8'h18, 8'hFD                  // 0036 JR fail
    };
    for (int i = 0; i < 512; i++) boot[i] = 8'h00;
    put_boot(0, prog);
    for (int i = 0; i < 48; i++) boot[16'h00A8 + i] = logo[i];
    put_boot(16'h00FC, '{8'h3E, 8'h01, 8'hE0, 8'h50});   // LD A,1; LDH (0x50),A
  endtask

  task automatic load_cart(input int bad);
    logic [7:0] x = 0;
    for (int i = 0; i < 32768; i++) rom[i] = 8'h00;
    put_rom(16'h0100, '{8'h00, 8'hC3, 8'h50, 8'h01});                       // NOP; JP 0x0150
    put_rom(16'h0150, '{8'h3E, 8'h5A, 8'hEA, 8'h00, 8'hC0, 8'h76, 8'h18, 8'hFD});
    for (int i = 0; i < 48; i++) rom[16'h0104 + i] = logo[i];
    for (int i = 16'h0134; i < 16'h014D; i++) begin
      rom[i] = 8'($urandom);
      x = x - rom[i] - 8'd1;
    end
    rom[16'h014D] = x;
    if (bad == 1) rom[16'h0104 + $urandom % 48] ^= 8'h01 << ($urandom % 8);
    if (bad == 2) rom[16'h014D] = x + 8'd1;
  endtask

  int n_boot_off = 0, n_fail_stop = 0;

  initial begin
    int boot_off;
    for (int run = 0; run < 3; run++) begin
      for (int i = 0; i < 48; i++) logo[i] = 8'($urandom);
      load_boot();
      load_cart(run);
      dut.u_wram.mem[0] = 8'h00;
      rst = 1'b1; prst = 1'b1;
      repeat (4) @(negedge clk);
      rst = 1'b0; prst = 1'b0;
      fork
        begin wait (dut.halted); end
        begin repeat (400000) @(negedge clk); end
      join_any
      disable fork;
      repeat (8) @(negedge clk);
      boot_off = !dut.boot_active;
      check(dut.halted, $sformatf("run %0d: program did not reach HALT", run));
      if (run == 0) begin
        n_boot_off += boot_off;
        check(boot_off, "good cartridge: boot ROM still mapped");
        check(dut.u_wram.mem[0] == 8'h5A, "good cartridge: cartridge code did not run");
        for (int a = 0; a < 8192; a++)
          if (a >= 16'h0010 && a < 16'h0040)
            check(dut.u_video.vram[a] == logo[a - 16'h0010], $sformatf("VRAM logo byte %0d", a - 16));
          else if (dut.u_video.vram[a] != 8'h00) check(0, $sformatf("VRAM %04h not cleared", a));
        checks++;
      end else begin
        n_fail_stop += !boot_off;
        check(!boot_off, $sformatf("run %0d: bad cartridge left the boot ROM", run));
        check(dut.u_wram.mem[0] != 8'h5A, $sformatf("run %0d: bad cartridge code ran", run));
        check(cpu_pc >= 16'h0035 && cpu_pc <= 16'h0038, $sformatf("run %0d: stopped at %04h", run, cpu_pc));
      end
    end
    check(n_boot_off == 1, "boot switch never happened");
    check(n_fail_stop == 2, "mismatch stop did not happen twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
