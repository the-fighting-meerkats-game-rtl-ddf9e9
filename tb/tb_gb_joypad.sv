// tb_gb_joypad: selecting directions or buttons returns the right active-low nibble,
// and a new key press in the selected group raises one interrupt.
module tb_gb_joypad;
  logic clk = 0, rst = 1, cs = 0, we = 0, irq;
  logic [7:0] wdata = 0, rdata, buttons = 0;
  int checks = 0, failures = 0, irqs = 0;

  always #5 clk = ~clk;
  gb_joypad dut (.*);
  always @(posedge clk) if (irq) irqs++;

  task automatic sel(input logic [7:0] d);
    @(negedge clk); cs = 1; we = 1; wdata = d; @(negedge clk); cs = 0; we = 0;
  endtask
  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    buttons = 8'b1001_0001;          // Right, Up, A
    sel(8'h20);                      // P14 low: directions
    chk("directions", rdata, 8'hEA); // Down1 Up0 Left1 Right0
    sel(8'h10);                      // P15 low: buttons
    chk("buttons", rdata, 8'hDE);    // Start1 Select1 B1 A0
    sel(8'h30);
    chk("none", rdata, 8'hFF);
    sel(8'h10);
    repeat (3) @(negedge clk);
    irqs = 0;
    buttons = 8'b1001_1001;          // press Start
    repeat (3) @(negedge clk);
    chk("start pressed", rdata, 8'hD6);
    chk("one interrupt", irqs, 1);
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
