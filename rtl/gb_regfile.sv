// gb_regfile: the CPU register file, B C D E H L, SP and PC (A and F live beside it).
// Three write ports act in the same clock edge, qualified by `ce`:
//  * an 8-bit port (w8_sel 0..5 = B C D E H L),
//  * a 16-bit port (w16_sel 0..3 = BC DE HL SP), which wins over the SP port,
//  * dedicated SP and PC ports, so that stack and fetch updates can happen alongside
//    a register load, as the microcode needs (for example POP with SP increment).
// All registers are read continuously through `regs`. Reset clears every register,
// so execution starts at PC = 0 where the boot ROM is mapped.
module gb_regfile
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        w8_en,
  input  logic [2:0]  w8_sel,
  input  logic [7:0]  w8_d,
  input  logic        w16_en,
  input  logic [1:0]  w16_sel,
  input  logic [15:0] w16_d,
  input  logic        sp_en,
  input  logic [15:0] sp_d,
  input  logic        pc_en,
  input  logic [15:0] pc_d,
  output regs_t       regs
);

  logic [7:0] r [6];
  logic [15:0] sp, pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 6; i++) r[i] <= 8'h00;
      sp <= 16'h0000;
      pc <= 16'h0000;
    end else if (ce) begin
      if (sp_en) sp <= sp_d;
      if (pc_en) pc <= pc_d;
      if (w16_en) begin
        case (w16_sel)
          2'd0: {r[0], r[1]} <= w16_d;
          2'd1: {r[2], r[3]} <= w16_d;
          2'd2: {r[4], r[5]} <= w16_d;
          default: sp <= w16_d;
        endcase
      end
      if (w8_en && w8_sel < 3'd6) r[w8_sel] <= w8_d;
    end
  end

  assign regs.bc = {r[0], r[1]};
  assign regs.de = {r[2], r[3]};
  assign regs.hl = {r[4], r[5]};
  assign regs.sp = sp;
  assign regs.pc = pc;

endmodule
