// tb_gb_nes_ctrl: a model of the controller's shift register (latch loads the eight
// active-low buttons, each rising clock edge moves to the next) is polled; checks the
// decoded buttons for several patterns, one latch pulse and seven clock pulses per
// poll, and the poll period.
module tb_gb_nes_ctrl;
  localparam int POLL = 200;
  logic clk = 0, rst = 1, nes_latch, nes_clk, nes_data;
  logic [7:0] buttons, pressed, sh;
  int checks = 0, failures = 0, latches = 0, clks = 0, lt0, lt1;
  logic clk_q = 0, latch_q = 0;

  always #5 clk = ~clk;
  gb_nes_ctrl #(.POLL_CYCLES(POLL), .STATE_CYCLES(2)) dut (.*);

  // controller model
  always @(posedge clk) begin
    latch_q <= nes_latch; clk_q <= nes_clk;
    if (nes_latch) sh <= ~pressed;
    else if (nes_clk && !clk_q) sh <= {1'b1, sh[7:1]};
    if (nes_latch && !latch_q) begin latches++; lt0 = lt1; lt1 = $time; end
    if (nes_clk && !clk_q) clks++;
  end
  assign nes_data = sh[0];

  initial begin
    logic [7:0] pats[4] = '{8'h01, 8'h80, 8'h5A, 8'hFF};
    @(negedge clk); rst = 0;
    foreach (pats[i]) begin
      pressed = pats[i];
      latches = 0; clks = 0;
      repeat (2 * POLL) @(negedge clk);
      checks++;
      if (buttons !== pats[i]) begin failures++; $display("FAIL buttons %h expected %h", buttons, pats[i]); end
      checks++;
      if (clks != 7 * latches || latches < 1) begin failures++; $display("FAIL pulses %0d latches %0d", clks, latches); end
    end
    checks++;
    if ((lt1 - lt0) / 10 != POLL) begin failures++; $display("FAIL poll period %0d", (lt1 - lt0) / 10); end
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
