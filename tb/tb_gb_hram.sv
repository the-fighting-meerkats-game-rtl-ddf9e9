// tb_gb_hram: fills all 127 bytes with a pattern, reads them back asynchronously and
// checks that a write without `we` changes nothing.
module tb_gb_hram;
  logic clk = 0, we = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_hram dut (.*);

  initial begin
    for (int i = 0; i < 127; i++) begin
      @(negedge clk); addr = 7'(i); wdata = 8'(i * 7 + 3); we = 1;
    end
    @(negedge clk); we = 0;
    addr = 7'd5; wdata = 8'h00; @(negedge clk);
    for (int i = 0; i < 127; i++) begin
      addr = 7'(i); #1;
      checks++;
      if (rdata !== 8'(i * 7 + 3)) begin failures++; $display("FAIL %0d: %h", i, rdata); end
    end
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
