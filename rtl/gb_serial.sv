// gb_serial: the link-cable port, registers SB (0xFF01) and SC (0xFF02).
// The selected serial clock (internal, or the other console's on `sck_in`) is
// sampled with the system clock; an edge detector marks its falling and rising edges.
// On a falling edge SB[7] is put on `sout`; on a rising edge `sin` is shifted into
// SB from the right (SB shifts out to the left) and a 3-bit counter advances. When
// the counter wraps after the eighth bit the transfer ends: SC[7] clears and a
// one-clock interrupt request is raised. Writing SC[7]=1 starts (internal clock) or
// arms (external clock) a transfer. SC[0]=1 selects the internal clock, which
// toggles every SCK_HALF clocks (8192 Hz at 4.194304 MHz with the default); the
// shared clock line is then driven (`sck_oe`) and idles high. Other SC bits read 1.
// The internal clock rate and SC[0] polarity are the standard Game Boy ones.
module gb_serial #(
  parameter int unsigned SCK_HALF = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs,
  input  logic       we,
  input  logic       addr,      // 0: SB, 1: SC
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq,
  input  logic       sck_in,
  output logic       sck_out,
  output logic       sck_oe,
  input  logic       sin,
  output logic       sout
);

  logic [7:0] sb;
  logic       busy, int_clk;
  logic [2:0] bitcnt;
  logic [$clog2(SCK_HALF)-1:0] div;
  logic       isck;
  logic [1:0] ext_sync;
  logic       sck_cur, sck_prev;
  logic       fall, rise;

  assign sck_cur = int_clk ? isck : ext_sync[1];
  assign fall = sck_prev && !sck_cur;
  assign rise = !sck_prev && sck_cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      sb <= '0; busy <= 1'b0; int_clk <= 1'b0; bitcnt <= '0; div <= '0;
      isck <= 1'b1; ext_sync <= 2'b11; sck_prev <= 1'b1; sout <= 1'b1; irq <= 1'b0;
    end else begin
      irq      <= 1'b0;
      ext_sync <= {ext_sync[0], sck_in};
      sck_prev <= sck_cur;
      // internal clock generator, runs only during an internal-clock transfer
      if (busy && int_clk) begin
        if (32'(div) == SCK_HALF - 1) begin div <= '0; isck <= ~isck; end
        else div <= div + 1'b1;
      end else begin
        div <= '0; isck <= 1'b1;
      end
      if (busy && fall) sout <= sb[7];
      if (busy && rise) begin
        sb     <= {sb[6:0], sin};
        bitcnt <= bitcnt + 3'd1;
        if (bitcnt == 3'd7) begin busy <= 1'b0; irq <= 1'b1; end
      end
      if (cs && we) begin
        if (!addr) sb <= wdata;
        else begin busy <= wdata[7]; int_clk <= wdata[0]; bitcnt <= '0; end
      end
    end
  end

  assign rdata   = addr ? {busy, 6'b111111, int_clk} : sb;
  assign sck_out = isck;
  assign sck_oe  = int_clk;

endmodule
