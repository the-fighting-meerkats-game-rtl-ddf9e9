// gb_video_conv: the video converter between the Game Boy pixel stream and the
// monitor timing.
// Write side (`clk`): pixels from the video module (`pix_valid`, x, y, 2-bit shade)
// are stored into one of two frame buffers of 160x144 2-bit pixels; when the last
// pixel of a frame (x=159, y=143) is written the buffers swap, so one frame can be
// shown while the next is written. Read side (`pclk`): a sync generator makes
// horizontal and vertical sync and data-enable for an H_ACTIVE x V_ACTIVE display;
// the Game Boy frame is shown unscaled in the centre, read from the displayed buffer
// and converted from a 2-bit shade to 24-bit grey RGB (0 white .. 3 black); outside
// the frame the output is black. The displayed buffer is chosen by a two-flop
// synchronised copy of the writer's buffer select, taken at the start of each
// monitor frame. Buffer 1 starts right after buffer 0 (offset 160x144).
// rgb/hsync/vsync/de are registered (one `pclk` of latency).
// The monitor timing (640x480, 60 Hz VGA by default, active-low syncs) and the
// grey levels are this design's choices.
module gb_video_conv #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_valid,
  input  logic [7:0]  pix_x,
  input  logic [7:0]  pix_y,
  input  logic [1:0]  pix,
  input  logic        pclk,
  input  logic        prst,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic [23:0] rgb
);

  localparam int unsigned GB_W = 160;
  localparam int unsigned GB_H = 144;
  localparam int unsigned FB   = GB_W * GB_H;
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned X0 = (H_ACTIVE - GB_W) / 2;
  localparam int unsigned Y0 = (V_ACTIVE - GB_H) / 2;

  logic [1:0] fb [2*FB];
  logic       wsel;               // buffer being written

  // ---------------- write side ----------------
  logic [15:0] waddr;
  assign waddr = 16'(pix_y) * 16'(GB_W) + 16'(pix_x);

  always_ff @(posedge clk) begin
    if (pix_valid && pix_x < 8'(GB_W) && pix_y < 8'(GB_H))
      fb[wsel ? 16'(FB) + waddr : waddr] <= pix;
  end

  always_ff @(posedge clk) begin
    if (rst) wsel <= 1'b0;
    else if (pix_valid && pix_x == 8'(GB_W - 1) && pix_y == 8'(GB_H - 1)) wsel <= ~wsel;
  end

  // ---------------- read side ----------------
  logic [$clog2(H_TOTAL)-1:0] hc;
  logic [$clog2(V_TOTAL)-1:0] vc;
  logic [1:0]  wsel_sync;
  logic        rsel;
  logic        in_frame;
  logic [15:0] raddr;
  logic [7:0]  grey;

  assign in_frame = (32'(hc) >= X0) && (32'(hc) < X0 + GB_W) &&
                    (32'(vc) >= Y0) && (32'(vc) < Y0 + GB_H);
  assign raddr = 16'(32'(vc) - Y0) * 16'(GB_W) + 16'(32'(hc) - X0);

  always_comb begin
    unique case (fb[rsel ? 16'(FB) + raddr : raddr])
      2'd0: grey = 8'hff;
      2'd1: grey = 8'haa;
      2'd2: grey = 8'h55;
      default: grey = 8'h00;
    endcase
  end

  always_ff @(posedge pclk) begin
    if (prst) begin
      hc <= '0; vc <= '0; wsel_sync <= '0; rsel <= 1'b1;
      hsync <= 1'b1; vsync <= 1'b1; de <= 1'b0; rgb <= '0;
    end else begin
      wsel_sync <= {wsel_sync[0], wsel};
      if (32'(hc) == H_TOTAL - 1) begin
        hc <= '0;
        if (32'(vc) == V_TOTAL - 1) begin
          vc <= '0;
          rsel <= ~wsel_sync[1];     // show the buffer not being written
        end else vc <= vc + 1'b1;
      end else hc <= hc + 1'b1;
      hsync <= !((32'(hc) >= H_ACTIVE + H_FP) && (32'(hc) < H_ACTIVE + H_FP + H_SYNC));
      vsync <= !((32'(vc) >= V_ACTIVE + V_FP) && (32'(vc) < V_ACTIVE + V_FP + V_SYNC));
      de    <= (32'(hc) < H_ACTIVE) && (32'(vc) < V_ACTIVE);
      rgb   <= in_frame ? {grey, grey, grey} : 24'h000000;
    end
  end

endmodule
