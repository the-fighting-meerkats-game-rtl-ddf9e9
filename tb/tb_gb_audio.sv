// tb_gb_audio: drives the sound block only through its registers. Starts channel 2
// with a short length and channel 3 from wave RAM, checks that both reach the outputs
// with the routing given by NR51, that the length counter ends channel 2 after the
// expected number of sequencer steps, and that the noise channel, once triggered,
// plays its volume on and off on the right side. NR52 must show the playing channels.
module tb_gb_audio;
  localparam int FS = 32;
  logic clk = 0, rst = 1, cs = 0, we = 0;
  logic [5:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [8:0] left, right;
  logic [3:0] ch_active;
  int checks = 0, failures = 0, max_l = 0, max_r = 0, n_on = 0, n_off = 0;

  always #5 clk = ~clk;
  gb_audio #(.FS_DIV(FS), .SQ_PRESCALE(2), .WAV_PRESCALE(1)) dut (.*);
  always @(posedge clk) if (!rst) begin
    if (left > max_l) max_l = left;
    if (right > max_r) max_r = right;
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] d);   // a = FFxx low byte
    @(negedge clk); cs = 1; we = 1; addr = 6'(a - 8'h10); wdata = d;
    @(negedge clk); cs = 0; we = 0;
  endtask
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  initial begin
    int t0, steps;
    @(negedge clk); rst = 0;
    wr(8'h26, 8'h80); wr(8'h24, 8'h77);
    wr(8'h25, 8'h20);                     // channel 2 left only
    wr(8'h16, 8'hBE);                     // duty 50 %, length 64-62 = 2
    wr(8'h17, 8'hF0);                     // volume 15, no envelope
    wr(8'h18, 8'hF0);
    t0 = $time;
    wr(8'h19, 8'hC7);                     // trigger, length enable, freq 0x7F0
    repeat (2) @(negedge clk);            // trigger pulse is registered, then the channel
    chk("ch2 on", ch_active[1], 1);
    wait (!ch_active[1]);
    steps = ($time - t0) / 10 / FS;
    checks++;
    if (steps < 2 || steps > 4) begin failures++; $display("FAIL length took %0d steps", steps); end
    chk("ch2 reached left", max_l, 15 * 8);
    chk("right silent", max_r, 0);
    for (int i = 0; i < 16; i++) wr(8'h30 + 8'(i), 8'hF0);
    wr(8'h25, 8'h04);                     // channel 3 right only
    wr(8'h1A, 8'h80); wr(8'h1C, 8'h20); wr(8'h1D, 8'hF8); wr(8'h1E, 8'h87);
    repeat (2) @(negedge clk);
    chk("ch3 on", ch_active[2], 1);
    max_r = 0;
    repeat (200) @(negedge clk);
    chk("ch3 reached right", max_r, 15 * 8);
    wr(8'h25, 8'h08);                     // channel 4 right only
    wr(8'h20, 8'h11); wr(8'h21, 8'h90); wr(8'h22, 8'h00); wr(8'h23, 8'h80);   // volume 9, fastest
    repeat (2) @(negedge clk);
    chk("ch4 on", ch_active[3], 1);
    max_r = 0;
    repeat (400) begin
      @(negedge clk);
      if (right == 9'd72) n_on++;
      else if (right == 9'd0) n_off++;
    end
    chk("ch4 reached right", max_r, 9 * 8);
    chk("noise both on and off", n_on > 20 && n_off > 20, 1);
    addr = 6'h16; #1; chk("NR52 shows the playing channels", rdata, {4'hF, ch_active});
    chk("channels playing", ch_active[3] && ch_active[2], 1);
    wr(8'h26, 8'h00);
    repeat (2) @(negedge clk);
    chk("master off", right, 0);
    addr = 6'h16; #1; chk("NR52 read", rdata, 8'h70);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
