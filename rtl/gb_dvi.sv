// gb_dvi: the pixel output to the DVI encoder chip, 12 data pins at double data rate.
// Each `pclk` period carries one whole 24-bit pixel over the 12 pins: the pixel and
// its syncs are registered on the rising edge of `pclk`. The pins then show the low
// half rgb[11:0] while `pclk` is high and the high half rgb[23:12] while it is low.
// The output clock `dvi_xclk` is `pclk` itself, so the encoder can take one half on
// each edge. Syncs and data enable are registered with the data and keep their
// polarity (one `pclk` of latency for everything).
// Sending data on both clock edges to complete a 24-bit value per period follows
// the document. Which half goes first is this design's choice; on an FPGA the
// clock-selected multiplexer would be a dedicated double-data-rate output cell.
// The encoder's I2C set-up is not part of this block.
module gb_dvi (
  input  logic        pclk,
  input  logic        prst,
  input  logic        hsync,
  input  logic        vsync,
  input  logic        de,
  input  logic [23:0] rgb,
  output logic        dvi_xclk,
  output logic        dvi_hsync,
  output logic        dvi_vsync,
  output logic        dvi_de,
  output logic [11:0] dvi_d
);

  logic [11:0] lo, hi;

  always_ff @(posedge pclk) begin
    if (prst) begin
      lo <= '0; hi <= '0;
      dvi_hsync <= 1'b1; dvi_vsync <= 1'b1; dvi_de <= 1'b0;
    end else begin
      lo <= rgb[11:0];
      hi <= rgb[23:12];
      dvi_hsync <= hsync;
      dvi_vsync <= vsync;
      dvi_de    <= de;
    end
  end

  assign dvi_d    = pclk ? lo : hi;
  assign dvi_xclk = pclk;

endmodule
