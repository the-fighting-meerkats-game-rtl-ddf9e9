// gb_hram: the CPU's private "high memory", 127 bytes at 0xFF80-0xFFFE.
// Asynchronous read, single-cycle write (like the SRAMs the CPU is built for). It is
// wired to the CPU's internal buses only, so the CPU can run code from it while the
// DMA block owns the shared address and data buses.
module gb_hram #(
  parameter int unsigned DEPTH = 127
) (
  input  logic       clk,
  input  logic       we,
  input  logic [6:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && 32'(addr) < DEPTH) mem[addr] <= wdata;

  assign rdata = (32'(addr) < DEPTH) ? mem[addr] : 8'hff;

endmodule
