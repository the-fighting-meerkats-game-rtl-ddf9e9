// tb_gb_mmu: every address of the 64 KiB map is decoded and must select exactly the
// component the memory map gives (each component answers with its own tag byte);
// echo RAM reads but does not write; the 0xFF50 switch hands 0x0000-0x0103 from the
// boot ROM to the cartridge for good.
module tb_gb_mmu;
  logic clk = 0, rst = 1, wr = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic boot_active, sel_boot, sel_cart, sel_vram, sel_wram, wram_we, sel_oam, sel_joy,
        sel_serial, sel_timer, sel_sound, sel_video, sel_dma;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_mmu dut (.*, .boot_rdata(8'hB0), .cart_rdata(8'hC0), .vram_rdata(8'h80), .wram_rdata(8'hD0),
              .oam_rdata(8'hE0), .joy_rdata(8'h01), .serial_rdata(8'h02), .timer_rdata(8'h04),
              .sound_rdata(8'h10), .video_rdata(8'h40), .dma_rdata(8'h46));

  function automatic logic [7:0] expect_tag(int a, bit boot);
    if (boot && a <= 'h0103) return 8'hB0;
    if (a < 'h8000) return 8'hC0;
    if (a < 'hA000) return 8'h80;
    if (a < 'hC000) return 8'hC0;
    if (a < 'hFE00) return 8'hD0;
    if (a < 'hFEA0) return 8'hE0;
    if (a < 'hFF00) return 8'hFF;
    case (a & 'hFF)
      'h00: return 8'h01;
      'h01, 'h02: return 8'h02;
      'h04, 'h05, 'h06, 'h07: return 8'h04;
      'h46: return 8'h46;
      'h50: return boot ? 8'hFE : 8'hFF;
      default: ;
    endcase
    if ((a & 'hFF) >= 'h10 && (a & 'hFF) <= 'h3F) return 8'h10;
    if ((a & 'hFF) >= 'h40 && (a & 'hFF) <= 'h4B) return 8'h40;
    return 8'hFF;
  endfunction

  task automatic sweep(input bit boot);
    int bad = 0, multi = 0;
    for (int a = 0; a < 65536; a++) begin
      addr = 16'(a); #1;
      if (rdata !== expect_tag(a, boot)) begin
        bad++; if (bad < 4) $display("  %04h read %02h expected %02h", a, rdata, expect_tag(a, boot));
      end
      if ($countones({sel_boot, sel_cart, sel_vram, sel_wram, sel_oam, sel_joy, sel_serial,
                      sel_timer, sel_sound, sel_video, sel_dma}) > 1) multi++;
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL %0d addresses mis-decoded", bad); end
    checks++; if (multi != 0) begin failures++; $display("FAIL %0d addresses with two selects", multi); end
  endtask

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    sweep(1);
    addr = 16'hC123; wr = 1; #1; chk("work RAM write enable", wram_we, 1);
    addr = 16'hE123; #1; chk("echo write dropped", wram_we, 0);
    @(negedge clk); addr = 16'hFF50; wdata = 8'h00; wr = 1;
    @(negedge clk); wr = 0; chk("boot still on", boot_active, 1);
    @(negedge clk); addr = 16'hFF50; wdata = 8'h01; wr = 1;
    @(negedge clk); wr = 0; chk("boot off", boot_active, 0);
    @(negedge clk); addr = 16'hFF50; wdata = 8'h00; wr = 1;
    @(negedge clk); wr = 0; chk("boot stays off", boot_active, 0);
    sweep(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
