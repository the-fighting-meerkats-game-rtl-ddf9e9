// tb_gb_noise_ch: the noise channel against a model of the 15-bit shift register.
// For random shift-clock settings (divisor code, shift 0-3, 15- or 7-bit mode) the
// channel is triggered and its output is sampled in the middle of every expected
// shift period; it must be the volume exactly when the model's bit 0 is 0, for 64
// periods, which checks both the sequence and the shift rate. Also checked: no
// shifting with shift 14, the length counter stopping the channel after 64-t1
// ticks, the envelope stepping up, and NR41 writes reloading the length.
module tb_gb_noise_ch;
  localparam int P = 2;
  logic clk = 0, rst = 1, trigger = 0, len_load = 0, len_tick = 0, env_tick = 0;
  logic [5:0] len = 0;
  logic len_en = 0, env_up = 0, width7 = 0;
  logic [3:0] env_init = 4'hA, shift = 0;
  logic [2:0] env_period = 0, div = 0;
  logic [3:0] level;
  logic active;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gb_noise_ch #(.PRESCALE(P)) dut (.*);

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  task automatic fire();
    @(negedge clk) trigger = 1;
    @(posedge clk);
    @(negedge clk) trigger = 0;
  endtask

  function automatic logic [14:0] step(logic [14:0] r, bit w7);
    logic x = r[0] ^ r[1];
    r = {x, r[14:1]};
    if (w7) r[6] = x;
    return r;
  endfunction

  initial begin
    logic [14:0] ref_r;
    int period, half, d;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      div = 3'($urandom); shift = 4'($urandom % 4); width7 = t % 2;
      env_init = 4'($urandom % 15) + 4'd1;
      d = (div == 0) ? 1 : 2 * div;
      period = (d << shift) * P;
      half = period / 2;
      @(negedge clk) trigger = 1;
      @(posedge clk);                         // trigger edge
      ref_r = '1;
      trigger <= 0;
      for (int k = 0; k < 64; k++) begin
        repeat (half) @(posedge clk);
        #1;
        chk($sformatf("r=%0d s=%0d w7=%0d period %0d", div, shift, width7, k),
            level, ref_r[0] ? 0 : env_init);
        repeat (period - half) @(posedge clk);
        ref_r = step(ref_r, width7);
      end
    end
    // shift 14: frozen register (all ones, output low)
    shift = 14; div = 1;
    fire();
    repeat (2000) @(negedge clk);
    chk("no shifting with s=14", level, 0);
    chk("still active", active, 1);
    // length: t1 = 60 -> 4 ticks
    shift = 0; len = 6'd60; len_en = 1;
    @(negedge clk) len_load = 1; @(negedge clk) len_load = 0;
    fire();
    for (int i = 0; i < 3; i++) begin @(negedge clk) len_tick = 1; @(negedge clk) len_tick = 0; end
    chk("active before the last length tick", active, 1);
    @(negedge clk) len_tick = 1; @(negedge clk) len_tick = 0;
    chk("stopped by length", active, 0);
    chk("silent when stopped", level, 0);
    // envelope up, period 1
    len_en = 0; env_init = 4'd3; env_up = 1; env_period = 3'd1; shift = 14;
    len = 6'd0; @(negedge clk) len_load = 1; @(negedge clk) len_load = 0;
    fire();
    for (int i = 0; i < 5; i++) begin @(negedge clk) env_tick = 1; @(negedge clk) env_tick = 0; end
    shift = 0; div = 0;
    begin
      int mx = 0;
      repeat (400) begin @(negedge clk); if (level > mx) mx = level; end
      chk("envelope volume on the output", mx, 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
