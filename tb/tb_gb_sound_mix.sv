// tb_gb_sound_mix: random channel levels, routing and volumes against a reference
// sum; master enable off forces silence. Output is registered one clock.
module tb_gb_sound_mix;
  logic clk = 0, rst = 1, master_on = 1;
  logic [3:0] ch1, ch2, ch3, ch4;
  logic [7:0] nr50, nr51;
  logic [8:0] left, right;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_sound_mix dut (.*);

  initial begin
    int l, r;
    logic [3:0] c [4];
    @(negedge clk); rst = 0;
    for (int n = 0; n < 2000; n++) begin
      ch1 = 4'($urandom); ch2 = 4'($urandom); ch3 = 4'($urandom); ch4 = 4'($urandom);
      nr50 = 8'($urandom); nr51 = 8'($urandom); master_on = ($urandom % 8) != 0;
      c = '{ch1, ch2, ch3, ch4};
      l = 0; r = 0;
      for (int i = 0; i < 4; i++) begin
        if (nr51[i]) r += c[i];
        if (nr51[i+4]) l += c[i];
      end
      l *= nr50[6:4] + 1; r *= nr50[2:0] + 1;
      if (!master_on) begin l = 0; r = 0; end
      @(negedge clk);
      checks++;
      if (left != l || right != r) begin
        failures++; if (failures < 5) $display("FAIL mix %0d/%0d expected %0d/%0d", left, right, l, r);
      end
    end
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
