// tb_gb_ram: writes a pattern over the whole 8 KiB, then reads it back with
// asynchronous reads in a different order.
module tb_gb_ram;
  logic clk = 0, we = 0;
  logic [12:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gb_ram #(.DEPTH(8192)) dut (.*);

  initial begin
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); we = 1; addr = 13'(i); wdata = 8'((i * 37) ^ (i >> 5));
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 8192; i += 3) begin
      addr = 13'(8191 - i); #1;
      checks++;
      if (rdata !== 8'(((8191 - i) * 37) ^ ((8191 - i) >> 5))) begin
        failures++; if (failures < 5) $display("FAIL at %0d", 8191 - i);
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
