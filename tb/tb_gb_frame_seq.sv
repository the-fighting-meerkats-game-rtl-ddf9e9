// tb_gb_frame_seq: over 32 steps of DIV clocks counts 16 length ticks, 8 sweep ticks
// and 4 envelope ticks, checks the step on which each kind comes and the spacing.
module tb_gb_frame_seq;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, len_tick, sweep_tick, env_tick;
  logic [2:0] step;
  int checks = 0, failures = 0, nl = 0, ns = 0, ne = 0, bad_step = 0, t_env = 0, env_gap = 0;

  always #5 clk = ~clk;
  gb_frame_seq #(.DIV(DIV)) dut (.*);
  always @(posedge clk) if (!rst) begin
    if (len_tick) begin nl++; if (step[0]) bad_step++; end
    if (sweep_tick) begin ns++; if (step != 2 && step != 6) bad_step++; end
    if (env_tick) begin
      ne++; if (step != 7) bad_step++;
      if (t_env != 0) env_gap = ($time - t_env) / 10;
      t_env = $time;
    end
  end

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    repeat (32 * DIV + 2) @(negedge clk);
    chk("length ticks", nl, 16);
    chk("sweep ticks", ns, 8);
    chk("envelope ticks", ne, 4);
    chk("step pattern", bad_step, 0);
    chk("envelope spacing", env_gap, 8 * DIV);
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
