// tb_gb_timer: DIV counts every 256 clocks and clears on write; TIMA at TAC=01
// (every 16 clocks) and TAC=00 (every 1024 clocks) increments at the expected rate,
// reloads from TMA on overflow with one interrupt pulse; TAC bit 2 stops it.
module tb_gb_timer;
  logic clk = 0, rst = 1, cs = 0, we = 0, irq;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0, irqs = 0;

  always #5 clk = ~clk;
  gb_timer dut (.*);
  always @(posedge clk) if (irq) irqs++;

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); cs = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); cs = 0; we = 0;
  endtask
  task automatic rdchk(input string w, input logic [1:0] a, input logic [7:0] exp);
    addr = a; #1;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL %s: %h expected %h", w, rdata, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    wr(2'd0, 8'h00);                       // counter = 0 after this edge
    repeat (255 * 4 - 1) @(negedge clk);
    rdchk("DIV after 1020", 2'd0, 8'd3);
    repeat (5) @(negedge clk);
    rdchk("DIV after 1025", 2'd0, 8'd4);
    wr(2'd0, 8'h55);
    rdchk("DIV cleared", 2'd0, 8'd0);
    wr(2'd2, 8'hF0);                       // TMA
    wr(2'd1, 8'hF0);                       // TIMA
    wr(2'd0, 8'h00);
    wr(2'd3, 8'h05);                       // enable, 262144 Hz (every 16 clocks)
    repeat (16 * 10) @(negedge clk);
    rdchk("TIMA +10", 2'd1, 8'hFA);
    irqs = 0;
    repeat (16 * 6) @(negedge clk);
    rdchk("TIMA reloaded", 2'd1, 8'hF0);
    checks++; if (irqs != 1) begin failures++; $display("FAIL irq count %0d", irqs); end
    wr(2'd3, 8'h01);                       // disabled
    wr(2'd1, 8'h10);
    repeat (200) @(negedge clk);
    rdchk("TIMA stopped", 2'd1, 8'h10);
    rdchk("TAC readback", 2'd3, 8'hF9);
    wr(2'd0, 8'h00);
    wr(2'd3, 8'h04);                       // 4096 Hz: every 1024 clocks
    repeat (1024 * 3 + 10) @(negedge clk);
    rdchk("TIMA slow", 2'd1, 8'h13);
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
