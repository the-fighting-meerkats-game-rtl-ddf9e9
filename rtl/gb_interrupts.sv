// gb_interrupts: the IF and IE registers and interrupt address selection.
// Request pulses from the peripherals are ORed into IF while the bits already in IF
// are kept; a CPU write to IF (0xFF0F) or IE (0xFFFF) replaces the register, and the
// requests of that same cycle are still added. When the CPU acknowledges, the bit of
// the highest-priority pending interrupt (lowest bit number) is cleared.
// `pending` is (IE & IF) != 0; `vector` is 0x40 + 8 * number of that interrupt.
// IF reads back with its three unused upper bits at 1. Those bits, and the bits of
// `vector` that are the same for all five addresses, are constant outputs.
module gb_interrupts
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  irq,
  input  logic        if_we,
  input  logic        ie_we,
  input  logic [7:0]  wdata,
  input  logic        ack,
  output logic [7:0]  if_q,
  output logic [7:0]  ie_q,
  output logic        pending,
  output logic [15:0] vector
);

  logic [4:0] iflag;
  logic [7:0] ie;
  logic [4:0] act;
  logic [2:0] sel;

  assign act = iflag & ie[4:0];
  assign pending = |act;

  always_comb begin
    sel = 3'd0;
    for (int i = 4; i >= 0; i--)
      if (act[i]) sel = 3'(i);
  end

  assign vector = 16'h0040 + {10'd0, sel, 3'd0};

  always_ff @(posedge clk) begin
    if (rst) begin
      iflag <= '0;
      ie    <= '0;
    end else begin
      logic [4:0] nxt;
      nxt = iflag;
      if (ack && pending) nxt[sel] = 1'b0;
      if (if_we) nxt = wdata[4:0];
      iflag <= nxt | irq;
      if (ie_we) ie <= wdata;
    end
  end

  assign if_q = {3'b111, iflag};
  assign ie_q = ie;

endmodule
