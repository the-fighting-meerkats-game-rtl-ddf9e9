// gb_cart_if: interface to a Game Boy cartridge connector.
// The cartridge needs no clock: while reading, its data pins show the byte at the
// address pins. This block drives the 16 address pins, the active-low read, write and
// RAM chip-select pins and the data-pin output enable, and returns the data pins.
// `sel` marks a bus access to a cartridge range (ROM 0x0000-0x7FFF, RAM
// 0xA000-0xBFFF). Chip select is asserted for the RAM range only; writes to the ROM
// range are passed on too (a mapper chip may use them). Reads are asynchronous and a
// write is the bus's one-clock write pulse. Outside accesses the pins idle with
// read asserted, as a ROM-only cartridge expects.
module gb_cart_if (
  input  logic        sel,
  input  logic [15:0] addr,
  input  logic        rd,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic [15:0] cart_addr,
  output logic [7:0]  cart_dout,
  output logic        cart_doe,
  input  logic [7:0]  cart_din,
  output logic        cart_rd_n,
  output logic        cart_wr_n,
  output logic        cart_cs_n
);

  logic ram_range;
  assign ram_range = (addr[15:13] == 3'b101);

  assign cart_addr = addr;
  assign cart_dout = wdata;
  assign cart_doe  = sel && wr;
  assign cart_wr_n = !(sel && wr);
  assign cart_rd_n = sel && wr;
  assign cart_cs_n = !(sel && ram_range && (rd || wr));
  assign rdata     = cart_din;

endmodule
