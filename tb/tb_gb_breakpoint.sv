// tb_gb_breakpoint: the address is entered as two halves from the switches; a fake
// fetch stream stops at that address, a step lets exactly one more fetch through, and
// continue resumes.
module tb_gb_breakpoint;
  logic clk = 0, rst = 1, enable = 0, btn_half = 0, btn_save = 0, btn_step = 0, btn_cont = 0;
  logic [7:0] switches = 0;
  logic [15:0] fetch_pc = 0, bp_addr;
  logic fetch_done, stall, half_hi;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_breakpoint dut (.*);

  // fetch stream: one fetch every 4 clocks, PC counting up, frozen while stalled
  int ph = 0;
  logic [15:0] last_fetch = 0;
  always @(posedge clk) if (fetch_done) last_fetch <= fetch_pc;
  always @(posedge clk) begin
    if (!rst && !stall) begin
      ph <= (ph + 1) % 4;
      if (ph == 3) fetch_pc <= fetch_pc + 1;
    end
  end
  assign fetch_done = !stall && ph == 3;

  task automatic pulse(ref logic b);
    @(negedge clk); b = 1; @(negedge clk); b = 0;
  endtask
  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    switches = 8'h30; pulse(btn_save);          // low half
    pulse(btn_half);
    chk("half select", half_hi, 1);
    switches = 8'h00; pulse(btn_save);          // high half
    chk("address", bp_addr, 16'h0030);
    enable = 1;
    wait (stall);
    @(negedge clk);
    chk("stopped at", last_fetch, 16'h0030);
    repeat (20) @(negedge clk);
    chk("stays stopped", last_fetch, 16'h0030);
    pulse(btn_step);
    wait (stall);
    @(negedge clk);
    chk("one step", last_fetch, 16'h0031);
    pulse(btn_cont);
    repeat (40) @(negedge clk);
    chk("running", stall, 0);
    checks++; if (fetch_pc < 16'h0035) begin failures++; $display("FAIL did not resume"); end
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
