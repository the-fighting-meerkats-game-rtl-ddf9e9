// gb_video: the video module (GPU): VRAM, OAM, the LCD registers, the line controller
// and the two scanline buffers.
//
// Registers (index = address - 0xFF40): 0 LCDC, 1 STAT, 2 SCY, 3 SCX, 4 LY (read
// only), 5 LYC, 7 BGP, 8 OBP0, 9 OBP1, 10 WY, 11 WX. VRAM (8 KiB, 0x8000-0x9FFF) and
// OAM (160 bytes, 0xFE00-0xFE9F) are arrays with asynchronous read; the CPU reaches
// them at any time, the DMA block writes OAM through its own port.
//
// Line controller: a dot counter runs LINE_CYCLES clocks per line over LINES lines,
// the first VISIBLE of which are drawn (mode 1 = vertical blank for the rest). On a
// visible line:
//  * mode 2 (first 80 clocks): OAM is searched, one sprite per two clocks, and up to
//    10 sprites that cross the line are listed;
//  * mode 3: first the background or window pixel of each of the 160 columns is
//    fetched (one column per clock: tile map byte, then the two tile-data bytes),
//    palette-mapped and written into the scanline buffers, the upper shade bit into
//    one buffer and the lower bit into the other; then each listed sprite is examined
//    pixel by pixel (8 clocks per sprite) and its non-transparent pixels overwrite the
//    line where the sprite's priority allows (attribute bit 7 keeps it behind
//    background colours 1-3; an earlier OAM entry wins over a later one; X and Y flip
//    and 8x16 sprites are honoured);
//  * mode 0: horizontal blank.
// Once a line is final it is sent out one pixel per clock (`pix_valid`, `pix_x`,
// `pix_y`, 2-bit `pix`), reading the upper bit from one buffer and the lower from
// the other. Interrupts: `irq_vblank` pulses when line VISIBLE begins, `irq_stat` on
// a rising edge of the STAT condition (LY=LYC and the mode-0/1/2 enables).
// With LCDC bit 7 clear the controller rests at line 0, mode 0.
// Line and frame lengths and the register layout are the standard Game Boy ones.
module gb_video #(
  parameter int unsigned LINE_CYCLES = 456,
  parameter int unsigned LINES       = 154,
  parameter int unsigned VISIBLE     = 144
) (
  input  logic        clk,
  input  logic        rst,
  // register port
  input  logic        reg_cs,
  input  logic [3:0]  reg_addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  reg_rdata,
  // VRAM port
  input  logic        vram_cs,
  input  logic [12:0] vram_addr,
  output logic [7:0]  vram_rdata,
  // OAM port
  input  logic        oam_cs,
  input  logic [7:0]  oam_addr,
  output logic [7:0]  oam_rdata,
  input  logic        dma_we,
  input  logic [7:0]  dma_addr,
  input  logic [7:0]  dma_wdata,
  // interrupts and pixels
  output logic        irq_vblank,
  output logic        irq_stat,
  output logic [1:0]  mode,
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [1:0]  pix
);

  logic [7:0] vram [8192];
  logic [7:0] oam  [160];
  logic [7:0] lcdc, stat_en, scy, scx, ly, lyc, bgp, obp0, obp1, wy, wx;

  // ---------------- CPU access ----------------
  always_ff @(posedge clk) begin
    if (vram_cs && we) vram[vram_addr] <= wdata;
    if (dma_we && dma_addr < 8'd160) oam[dma_addr] <= dma_wdata;
    else if (oam_cs && we && oam_addr < 8'd160) oam[oam_addr] <= wdata;
  end
  assign vram_rdata = vram[vram_addr];
  assign oam_rdata  = (oam_addr < 8'd160) ? oam[oam_addr] : 8'hff;

  logic coinc;
  assign coinc = (ly == lyc);

  always_comb begin
    unique case (reg_addr)
      4'd0:  reg_rdata = lcdc;
      4'd1:  reg_rdata = {1'b1, stat_en[6:3], coinc, mode};
      4'd2:  reg_rdata = scy;
      4'd3:  reg_rdata = scx;
      4'd4:  reg_rdata = ly;
      4'd5:  reg_rdata = lyc;
      4'd7:  reg_rdata = bgp;
      4'd8:  reg_rdata = obp0;
      4'd9:  reg_rdata = obp1;
      4'd10: reg_rdata = wy;
      4'd11: reg_rdata = wx;
      default: reg_rdata = 8'hff;
    endcase
  end

  // ---------------- line controller ----------------
  typedef enum logic [1:0] {P_WAIT, P_BG, P_SPR} phase_e;
  phase_e     phase;
  logic [8:0] dot;
  logic [7:0] px;
  logic [5:0] spr_list [10];
  logic [3:0] nspr, sk;
  logic [2:0] sj;
  logic [159:0] scan_hi, scan_lo, bg_nz, drawn;
  logic [7:0] wline;
  logic       win_used;
  logic       visible;
  logic       out_active;
  logic [7:0] out_x, out_y;

  assign visible = (32'(ly) < VISIBLE);

  // OAM search: sprite (dot/2) during mode 2
  logic [5:0] srch_i;
  logic [7:0] srch_y;
  logic [8:0] ly16;
  logic       tall;
  logic       srch_hit;
  assign tall     = lcdc[2];
  assign srch_i   = dot[6:1];
  assign srch_y   = oam[{srch_i, 2'b00}];
  assign ly16     = {1'b0, ly} + 9'd16;
  assign srch_hit = (ly16 >= {1'b0, srch_y}) && (ly16 < {1'b0, srch_y} + (tall ? 9'd16 : 9'd8));

  // background / window fetch for column px
  logic        in_win;
  logic [7:0]  fx, fy, tidx, tlo, thi;
  logic [12:0] map_addr, tile_addr;
  logic [2:0]  bitsel;
  logic [1:0]  ci, shade;
  assign in_win   = lcdc[5] && (ly >= wy) && ({1'b0, px} + 9'd7 >= {1'b0, wx});
  assign fx       = in_win ? px + 8'd7 - wx : px + scx;
  assign fy       = in_win ? wline : ly + scy;
  assign map_addr = {((in_win ? lcdc[6] : lcdc[3]) ? 3'b111 : 3'b110), fy[7:3], fx[7:3]};
  assign tidx     = vram[map_addr];
  assign tile_addr = {~(lcdc[4] | tidx[7]), tidx, fy[2:0], 1'b0};
  assign tlo      = vram[tile_addr];
  assign thi      = vram[tile_addr | 13'd1];
  assign bitsel   = 3'd7 - fx[2:0];
  assign ci       = lcdc[0] ? {thi[bitsel], tlo[bitsel]} : 2'd0;
  assign shade    = lcdc[0] ? bgp[{ci, 1'b0} +: 2] : 2'd0;

  // sprite pixel sk/sj
  logic [5:0]  se;
  logic [7:0]  soy, sox, stile, sattr, sline8, stnum, slo, shi;
  logic [3:0]  sline;
  logic [8:0]  sx;
  logic [12:0] saddr;
  logic [2:0]  sbit;
  logic [1:0]  sci, sshade;
  logic [7:0]  spal;
  assign se     = spr_list[sk];
  assign soy    = oam[{se, 2'b00}];
  assign sox    = oam[{se, 2'b01}];
  assign stile  = oam[{se, 2'b10}];
  assign sattr  = oam[{se, 2'b11}];
  assign sline8 = ly + 8'd16 - soy;
  assign sline  = sattr[6] ? ((tall ? 4'd15 : 4'd7) - sline8[3:0]) : sline8[3:0];
  assign stnum  = tall ? {stile[7:1], sline[3]} : stile;
  assign saddr  = {1'b0, stnum, sline[2:0], 1'b0};
  assign slo    = vram[saddr];
  assign shi    = vram[saddr | 13'd1];
  assign sbit   = sattr[5] ? sj : 3'd7 - sj;
  assign sci    = {shi[sbit], slo[sbit]};
  assign spal   = sattr[4] ? obp1 : obp0;
  assign sshade = spal[{sci, 1'b0} +: 2];
  assign sx     = {1'b0, sox} + {6'd0, sj} - 9'd8;   // wraps above 255 when off-screen left

  logic sx_on;
  assign sx_on = ({1'b0, sox} + {6'd0, sj} >= 9'd8) && ({1'b0, sox} + {6'd0, sj} < 9'd168);

  logic stat_line, stat_line_q;
  always_comb begin
    stat_line = (stat_en[6] && coinc) ||
                (stat_en[5] && mode == 2'd2) ||
                (stat_en[4] && mode == 2'd1) ||
                (stat_en[3] && mode == 2'd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lcdc <= 8'h00; stat_en <= 8'h00; scy <= 8'h00; scx <= 8'h00; lyc <= 8'h00;
      bgp <= 8'h00; obp0 <= 8'h00; obp1 <= 8'h00; wy <= 8'h00; wx <= 8'h00;
      ly <= 8'h00; dot <= '0; mode <= 2'd0; phase <= P_WAIT; px <= '0;
      nspr <= '0; sk <= '0; sj <= '0; wline <= '0; win_used <= 1'b0;
      irq_vblank <= 1'b0; irq_stat <= 1'b0; stat_line_q <= 1'b0;
      out_active <= 1'b0; out_x <= '0; out_y <= '0;
      scan_hi <= '0; scan_lo <= '0; bg_nz <= '0; drawn <= '0;
      for (int i = 0; i < 10; i++) spr_list[i] <= '0;
    end else begin
      irq_vblank  <= 1'b0;
      stat_line_q <= stat_line;
      irq_stat    <= stat_line && !stat_line_q;

      if (reg_cs && we) begin
        unique case (reg_addr)
          4'd0:  lcdc <= wdata;
          4'd1:  stat_en <= {1'b0, wdata[6:3], 3'b000};
          4'd2:  scy <= wdata;
          4'd3:  scx <= wdata;
          4'd5:  lyc <= wdata;
          4'd7:  bgp <= wdata;
          4'd8:  obp0 <= wdata;
          4'd9:  obp1 <= wdata;
          4'd10: wy <= wdata;
          4'd11: wx <= wdata;
          default: ;
        endcase
      end

      // pixel output of the finished line
      if (out_active) begin
        out_x <= out_x + 8'd1;
        if (out_x == 8'd159) out_active <= 1'b0;
      end

      if (!lcdc[7]) begin
        ly <= 8'h00; dot <= '0; mode <= 2'd0; phase <= P_WAIT; wline <= '0; nspr <= '0;
      end else begin
        // dot and line counters
        if (32'(dot) == LINE_CYCLES - 1) begin
          dot <= '0;
          if (win_used) wline <= wline + 8'd1;
          win_used <= 1'b0;
          if (32'(ly) == LINES - 1) begin
            ly <= 8'h00; wline <= '0;
          end else ly <= ly + 8'd1;
          if (32'(ly) == VISIBLE - 1) begin
            irq_vblank <= 1'b1;
            mode <= 2'd1;
          end else if (32'(ly) == LINES - 1 || 32'(ly) < VISIBLE - 1) begin
            mode <= 2'd2;
            nspr <= '0;
          end
        end else dot <= dot + 9'd1;

        if (visible) begin
          // mode 2: OAM search
          if (dot < 9'd80 && !dot[0] && srch_hit && nspr < 4'd10) begin
            spr_list[nspr] <= srch_i;
            nspr <= nspr + 4'd1;
          end
          if (dot == 9'd79) begin
            mode  <= 2'd3;
            phase <= P_BG;
            px    <= '0;
          end
          unique case (phase)
            P_BG: begin
              scan_hi[px] <= shade[1];
              scan_lo[px] <= shade[0];
              bg_nz[px]   <= (ci != 2'd0);
              drawn[px]   <= 1'b0;
              if (in_win) win_used <= 1'b1;
              px <= px + 8'd1;
              if (px == 8'd159) begin
                sk <= '0; sj <= '0;
                if (lcdc[1] && nspr != 4'd0) phase <= P_SPR;
                else begin
                  phase <= P_WAIT; mode <= 2'd0;
                  out_active <= 1'b1; out_x <= '0; out_y <= ly;
                end
              end
            end
            P_SPR: begin
              if (sx_on && sci != 2'd0 && !drawn[sx[7:0]]) begin
                drawn[sx[7:0]] <= 1'b1;
                if (!sattr[7] || !bg_nz[sx[7:0]]) begin
                  scan_hi[sx[7:0]] <= sshade[1];
                  scan_lo[sx[7:0]] <= sshade[0];
                end
              end
              sj <= sj + 3'd1;
              if (sj == 3'd7) begin
                sk <= sk + 4'd1;
                if (sk == nspr - 4'd1) begin
                  phase <= P_WAIT; mode <= 2'd0;
                  out_active <= 1'b1; out_x <= '0; out_y <= ly;
                end
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  assign pix_valid = out_active;
  assign pix_x     = out_x;
  assign pix_y     = out_y;
  assign pix       = {scan_hi[out_x], scan_lo[out_x]};

endmodule
