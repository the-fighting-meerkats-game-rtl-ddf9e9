// tb_gb_interrupts: requests are merged into IF without losing earlier bits, IE masks
// them, the lowest pending bit is chosen with vector 0x40 + 8*n, an acknowledge
// clears only that bit, and CPU writes replace IF.
module tb_gb_interrupts;
  logic clk = 0, rst = 1;
  logic [4:0] irq = 0;
  logic if_we = 0, ie_we = 0, ack = 0;
  logic [7:0] wdata = 0, if_q, ie_q;
  logic pending;
  logic [15:0] vector;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_interrupts dut (.*);

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    irq = 5'b00100; @(negedge clk); irq = 0;
    chk("IF after timer", if_q, 8'hE4);
    chk("masked", pending, 0);
    wdata = 8'h1F; ie_we = 1; @(negedge clk); ie_we = 0;
    chk("pending", pending, 1);
    chk("vector timer", vector, 16'h0050);
    irq = 5'b10001; @(negedge clk); irq = 0;
    chk("IF merged", if_q, 8'hF5);
    chk("vector vblank", vector, 16'h0040);
    ack = 1; @(negedge clk); ack = 0;
    chk("ack clears vblank", if_q, 8'hF4);
    chk("next vector", vector, 16'h0050);
    ack = 1; @(negedge clk); ack = 0;
    chk("ack clears timer", if_q, 8'hF0);
    chk("vector joypad", vector, 16'h0060);
    wdata = 8'h08; if_we = 1; irq = 5'b00010; @(negedge clk); if_we = 0; irq = 0;
    chk("write plus request", if_q, 8'hEA);
    wdata = 8'h08; ie_we = 1; @(negedge clk); ie_we = 0;
    chk("vector serial", vector, 16'h0058);
    wdata = 8'h00; ie_we = 1; @(negedge clk); ie_we = 0;
    chk("IE 0 masks all", pending, 0);
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
