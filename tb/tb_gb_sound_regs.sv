// tb_gb_sound_regs: every register and wave RAM byte reads back what was written,
// the NR52 read shows the master enable bit and the channel-status inputs (0 while
// the master enable is clear), trigger and length-load pulses last
// one clock and come only from the right registers, and the decoded fields line up.
module tb_gb_sound_regs;
  import gb_pkg::*;
  logic clk = 0, rst = 1, cs = 0, we = 0;
  logic [5:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  snd_regs_t regs;
  logic [127:0] wave_ram;
  logic [3:0] trigger;
  logic [3:0] len_load;
  logic [3:0] ch_status = 4'h0;
  logic [7:0] shadow [48];
  int checks = 0, failures = 0, trig_cnt [4], ll_cnt [4];

  always #5 clk = ~clk;
  gb_sound_regs dut (.*);
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 4; i++) if (trigger[i]) trig_cnt[i]++;
    for (int i = 0; i < 4; i++) if (len_load[i]) ll_cnt[i]++;
  end

  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    @(negedge clk); cs = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); cs = 0; we = 0;
  endtask
  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    for (int i = 0; i < 48; i++) begin
      if (i < 23 || i >= 32) begin
        shadow[i] = 8'($urandom) & 8'h7F;       // bit 7 clear: no triggers yet
        wr(6'(i), shadow[i]);
      end
    end
    for (int i = 0; i < 48; i++) begin
      if ((i < 23 && i != 22) || i >= 32) begin
        addr = 6'(i); #1;
        chk($sformatf("readback %02h", i), rdata, shadow[i]);
      end
    end
    for (int i = 0; i < 4; i++) chk("no trigger with bit 7 clear", trig_cnt[i], 0);
    for (int i = 0; i < 4; i++) chk("length load", ll_cnt[i], 1);
    ch_status = 4'($urandom);
    wr(6'h16, 8'h0F);
    addr = 6'h16; #1; chk("NR52 off", rdata, 8'h70);
    wr(6'h16, 8'h8F);
    addr = 6'h16; #1; chk("NR52", rdata, {4'hF, ch_status});
    ch_status = ~ch_status;
    #1; chk("NR52 status", rdata, {4'hF, ch_status});
    chk("master_on", regs.master_on, 1);
    wr(6'h04, 8'h80); wr(6'h09, 8'hC0); wr(6'h0e, 8'h80); wr(6'h13, 8'h80); wr(6'h05, 8'h80);
    for (int i = 0; i < 4; i++) chk("one trigger each", trig_cnt[i], 1);
    wr(6'h03, 8'h34); wr(6'h04, 8'h05);
    chk("c1 freq", regs.c1_freq, 11'h534);
    wr(6'h01, 8'hBF);
    chk("c1 duty", regs.c1_duty, 2); chk("c1 len", regs.c1_len, 6'h3F);
    wr(6'h1C, 8'h40);
    chk("c3 level", regs.c3_level, 2);
    chk("wave byte 0", wave_ram[7:0], shadow[32]);
    chk("wave byte 15", wave_ram[127:120], shadow[47]);
    addr = 6'h17; #1; chk("unmapped", rdata, 8'hFF);
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
