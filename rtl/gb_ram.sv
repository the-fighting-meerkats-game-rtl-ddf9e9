// gb_ram: byte-wide RAM with asynchronous read and single-cycle write, the memory
// behaviour every Game Boy component assumes. Used for the 8 KiB work RAM.
// Writes happen at the rising clock edge while `we` is high; `rdata` follows `addr`
// combinationally. Contents are not initialised.
module gb_ram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
