// tb_gb_square_ch: measures the period and high time of the wave for each duty,
// then checks envelope steps, the length counter stopping the channel, and the
// frequency sweep including the overflow stop.
module tb_gb_square_ch;
  localparam int PRE = 2;
  logic clk = 0, rst = 1, trigger = 0, len_load = 0, len_tick = 0, sweep_tick = 0, env_tick = 0;
  logic [2:0] sweep_time = 0, sweep_shift = 0, env_period = 0;
  logic sweep_sub = 0, len_en = 0, env_up = 0, active;
  logic [1:0] duty = 0;
  logic [5:0] len = 0;
  logic [3:0] env_init = 4'hF, level;
  logic [10:0] freq = 11'd2048 - 11'd16;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_square_ch #(.SWEEP(1'b1), .PRESCALE(PRE)) dut (.*);

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  initial begin
    int hi, rises, t_first, t_last;
    int exp_hi [4] = '{14, 12, 8, 4};      // of 16 ticks
    logic prev;
    @(negedge clk); rst = 0;
    for (int d = 0; d < 4; d++) begin
      duty = 2'(d);
      pulse(trigger);
      hi = 0; rises = 0; prev = 0;
      repeat (16 * PRE * 10) begin
        @(negedge clk);
        if (level != 0) hi++;
        if (level != 0 && !prev) begin rises++; if (rises == 1) t_first = $time; t_last = $time; end
        prev = level != 0;
      end
      chk($sformatf("duty %0d high time", d), hi, exp_hi[d] * PRE * 10);
      chk($sformatf("duty %0d period", d), (t_last - t_first) / 10 / (rises - 1), 16 * PRE);
    end
    // envelope: start at 5, step down every envelope tick
    duty = 2; env_init = 5; env_period = 1; env_up = 0;
    pulse(trigger);
    repeat (3) pulse(env_tick);
    chk("envelope down", dut.vol, 2);
    env_up = 1;
    repeat (20) pulse(env_tick);
    chk("envelope up saturates", dut.vol, 15);
    // length: 64-60 = 4 ticks
    len = 60; len_en = 1; pulse(len_load); pulse(trigger);
    repeat (3) pulse(len_tick);
    chk("still active", active, 1);
    pulse(len_tick);
    chk("length stop", active, 0);
    // sweep: 0x400 + 0x400>>1 = 0x600, then 0x900 overflows and stops
    len_en = 0; freq = 11'h400; sweep_time = 1; sweep_shift = 1; sweep_sub = 0;
    pulse(trigger);
    pulse(sweep_tick);
    chk("sweep up", dut.f, 11'h600);
    pulse(sweep_tick);
    chk("sweep overflow stop", active, 0);
    sweep_sub = 1; pulse(trigger);
    pulse(sweep_tick);
    chk("sweep down", dut.f, 11'h200);
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
