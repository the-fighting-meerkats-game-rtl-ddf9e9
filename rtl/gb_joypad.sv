// gb_joypad: the joypad register at 0xFF00.
// The CPU writes bits 5 (select buttons) and 4 (select direction keys), both active
// low. Reading gives those bits back, bits 7:6 as 1, and in bits 3:0 the selected
// group, active low: directions Down, Up, Left, Right on bits 3..0 and buttons Start,
// Select, B, A on bits 3..0 (both groups ANDed when both are selected). A one-clock
// interrupt request is raised when any of bits 3:0 falls. `buttons` is active high in
// the controller order A, B, Select, Start, Up, Down, Left, Right (bit 0..7).
// The bit assignment is the standard Game Boy one.
module gb_joypad (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] buttons,
  output logic       irq
);

  logic [1:0] sel;      // {P15, P14}
  logic [3:0] lines, lines_q;

  always_comb begin
    lines = 4'hf;
    if (!sel[0]) lines &= ~{buttons[5], buttons[4], buttons[6], buttons[7]};
    if (!sel[1]) lines &= ~{buttons[3], buttons[2], buttons[1], buttons[0]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= 2'b11; lines_q <= 4'hf; irq <= 1'b0;
    end else begin
      if (cs && we) sel <= wdata[5:4];
      lines_q <= lines;
      irq <= |(lines_q & ~lines);
    end
  end

  assign rdata = {2'b11, sel, lines};

endmodule
