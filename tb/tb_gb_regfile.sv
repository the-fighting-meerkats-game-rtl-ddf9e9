// tb_gb_regfile: random writes through all four ports against a reference copy of the
// registers, including the rule that a 16-bit write to SP wins over the SP port and
// that nothing changes without the clock enable.
module tb_gb_regfile;
  import gb_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic w8_en = 0, w16_en = 0, sp_en = 0, pc_en = 0;
  logic [2:0] w8_sel = 0;
  logic [1:0] w16_sel = 0;
  logic [7:0] w8_d = 0;
  logic [15:0] w16_d = 0, sp_d = 0, pc_d = 0;
  regs_t regs;
  logic [7:0] r [6];
  logic [15:0] sp, pc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gb_regfile dut (.*);

  initial begin
    for (int i = 0; i < 6; i++) r[i] = 0;
    sp = 0; pc = 0;
    @(posedge clk); #1 rst = 0;
    for (int it = 0; it < 2000; it++) begin
      ce = ($urandom % 8) != 0;
      w8_en = $urandom; w8_sel = $urandom % 6; w8_d = $urandom;
      w16_en = $urandom; w16_sel = $urandom; w16_d = $urandom;
      sp_en = $urandom; sp_d = $urandom; pc_en = $urandom; pc_d = $urandom;
      if (w16_en && w8_en && w8_sel[2:1] == w16_sel) w8_en = 0;   // keep writes disjoint
      @(posedge clk);
      if (ce) begin
        if (sp_en) sp = sp_d;
        if (pc_en) pc = pc_d;
        if (w16_en) case (w16_sel)
          0: {r[0], r[1]} = w16_d;
          1: {r[2], r[3]} = w16_d;
          2: {r[4], r[5]} = w16_d;
          default: sp = w16_d;
        endcase
        if (w8_en) r[w8_sel] = w8_d;
      end
      #1;
      checks++;
      if (regs !== {r[0], r[1], r[2], r[3], r[4], r[5], sp, pc}) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d: %h vs %h", it, regs, {r[0], r[1], r[2], r[3], r[4], r[5], sp, pc});
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
