// tb_gb_wave_ch: plays a known 32-sample table at the fastest rate and checks the
// order (from the last byte backwards, high nibble first), the output level shifts,
// the sample period at a slower frequency, length stop and the DAC-off stop.
module tb_gb_wave_ch;
  logic clk = 0, rst = 1, trigger = 0, len_load = 0, len_tick = 0, on = 1, len_en = 0, active;
  logic [7:0] len = 0;
  logic [1:0] out_level = 1;
  logic [10:0] freq = 11'd2047;
  logic [127:0] wave_ram;
  logic [3:0] level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_wave_ch #(.PRESCALE(1), .REVERSE(1'b1)) dut (.*);

  function automatic logic [3:0] sample(int k);   // k-th sample played
    logic [7:0] b = wave_ram[(15 - k / 2) * 8 +: 8];
    return (k % 2) ? b[3:0] : b[7:4];
  endfunction
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  initial begin
    int changes;
    logic [3:0] prev;
    for (int i = 0; i < 16; i++) wave_ram[i*8 +: 8] = 8'($urandom);
    @(negedge clk); rst = 0;
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = 0;
    for (int k = 0; k < 40; k++) begin
      #1 chk($sformatf("sample %0d", k), level, sample(k % 32));
      @(negedge clk);
    end
    out_level = 2; @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    #1 chk("level >>1", level, sample(0) >> 1);
    out_level = 3; #1 chk("level >>2", level, sample(0) >> 2);
    out_level = 0; #1 chk("mute", level, 0);
    // 2048-2040 = 8 clocks per sample
    out_level = 1; freq = 11'd2040;
    for (int i = 0; i < 16; i++) wave_ram[i*8 +: 8] = 8'h0F;   // alternating 0 / F
    pulse(trigger);
    changes = 0; prev = level;
    repeat (160) begin @(negedge clk); if (level != prev) changes++; prev = level; end
    chk("sample rate", changes, 20);
    len = 8'd253; len_en = 1; pulse(len_load); pulse(trigger);
    repeat (2) pulse(len_tick);
    chk("still active", active, 1);
    pulse(len_tick);
    chk("length stop", active, 0);
    len_en = 0; pulse(trigger);
    chk("restart", active, 1);
    on = 0; @(negedge clk);
    chk("DAC off stops", active, 0);
    pulse(trigger);
    chk("no start while off", active, 0);
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
