// gb_dma: block transfer of 160 bytes of sprite data into OAM.
// Writing a value XX to 0xFF46 starts a copy of XX00..XX9F into OAM 0xFE00..0xFE9F.
// While `active` the DMA owns the shared address bus (`addr`, `rd`) and the CPU's
// external accesses are disabled; the CPU keeps running from its high memory. One
// byte moves every BYTE_CYCLES clocks: the source address is held for the whole slot
// and the byte on `bus_data` (asynchronous read) is written into OAM in the slot's
// last clock through `oam_we`/`oam_addr`/`oam_wdata` (`oam_wdata` is `bus_data`
// itself; the copy needs no buffer). The register reads back the
// last value written. The slot length (one machine cycle, 640 clocks in all) is
// this design's choice.
module gb_dma #(
  parameter int unsigned BYTES       = 160,
  parameter int unsigned BYTE_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cs,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        active,
  output logic [15:0] addr,
  output logic        rd,
  input  logic [7:0]  bus_data,
  output logic        oam_we,
  output logic [7:0]  oam_addr,
  output logic [7:0]  oam_wdata
);

  logic [7:0] src;
  logic [7:0] idx;
  logic [$clog2(BYTE_CYCLES)-1:0] slot;
  logic       slot_end;

  assign slot_end = (32'(slot) == BYTE_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      src <= '0; idx <= '0; slot <= '0; active <= 1'b0;
    end else if (cs && we) begin
      src <= wdata; idx <= '0; slot <= '0; active <= 1'b1;
    end else if (active) begin
      slot <= slot_end ? '0 : slot + 1'b1;
      if (slot_end) begin
        idx <= idx + 8'd1;
        if (32'(idx) == BYTES - 1) active <= 1'b0;
      end
    end
  end

  assign rdata     = src;
  assign addr      = {src, idx};
  assign rd        = active;
  assign oam_we    = active && slot_end;
  assign oam_addr  = idx;
  assign oam_wdata = bus_data;

endmodule
