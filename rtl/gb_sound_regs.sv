// gb_sound_regs: the 18 memory-mapped sound registers and the 16-byte wave RAM.
// Registers are plain storage written by the CPU: NR10-NR14 at 0xFF10-0xFF14,
// NR21-NR24 at 0xFF16-0xFF19, NR30-NR34 at 0xFF1A-0xFF1E, NR41-NR44 at 0xFF20-0xFF23,
// NR50-NR52 at 0xFF24-0xFF26, wave RAM at 0xFF30-0xFF3F (`addr` is the low 6 bits of
// the address, offset from 0xFF10). Each field is brought out by name in `regs`.
// Writing a 1 to the "initial" bit (bit 7 of NR14, NR24, NR34, NR44) produces a
// one-clock trigger pulse for that channel on every such write, whatever the bit
// held before. Writes to NR11/NR21/NR31 also pulse `len_load` so a channel can
// reload its length counter (NR41 likewise). NR52 bit 7 is the master enable; its read-only bits
// 3:0 show `ch_status`, whether each channel is playing (the document describes
// these flags; its own design left them out). They read 0 while the master enable
// is clear. Other reads return the stored value.
module gb_sound_regs
  import gb_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         cs,
  input  logic         we,
  input  logic [5:0]   addr,
  input  logic [7:0]   wdata,
  output logic [7:0]   rdata,
  output snd_regs_t    regs,
  output logic [127:0] wave_ram,
  output logic [3:0]   trigger,
  output logic [3:0]   len_load,
  input  logic [3:0]   ch_status
);

  logic [7:0] r [23];      // 0xFF10..0xFF26
  logic [7:0] wave [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 23; i++) r[i] <= 8'h00;
      for (int i = 0; i < 16; i++) wave[i] <= 8'h00;
      trigger  <= '0;
      len_load <= '0;
    end else begin
      trigger  <= '0;
      len_load <= '0;
      if (cs && we) begin
        if (addr < 6'd23) r[addr[4:0]] <= wdata;
        else if (addr >= 6'h20) wave[addr[3:0]] <= wdata;
        unique case (addr)
          6'h04: trigger[0] <= wdata[7];
          6'h09: trigger[1] <= wdata[7];
          6'h0e: trigger[2] <= wdata[7];
          6'h13: trigger[3] <= wdata[7];
          6'h01: len_load[0] <= 1'b1;
          6'h06: len_load[1] <= 1'b1;
          6'h0b: len_load[2] <= 1'b1;
          6'h10: len_load[3] <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    if (addr < 6'd23) rdata = r[addr[4:0]];
    else if (addr >= 6'h20) rdata = wave[addr[3:0]];
    else rdata = 8'hff;
    if (addr == 6'h16) rdata = {r[22][7], 3'b111, r[22][7] ? ch_status : 4'h0};
  end

  always_comb begin
    for (int i = 0; i < 16; i++) wave_ram[i*8 +: 8] = wave[i];
  end

  assign regs.c1_sweep_time  = r[0][6:4];
  assign regs.c1_sweep_sub   = r[0][3];
  assign regs.c1_sweep_shift = r[0][2:0];
  assign regs.c1_duty        = r[1][7:6];
  assign regs.c1_len         = r[1][5:0];
  assign regs.c1_env_init    = r[2][7:4];
  assign regs.c1_env_up      = r[2][3];
  assign regs.c1_env_period  = r[2][2:0];
  assign regs.c1_freq        = {r[4][2:0], r[3]};
  assign regs.c1_len_en      = r[4][6];
  assign regs.c2_duty        = r[6][7:6];
  assign regs.c2_len         = r[6][5:0];
  assign regs.c2_env_init    = r[7][7:4];
  assign regs.c2_env_up      = r[7][3];
  assign regs.c2_env_period  = r[7][2:0];
  assign regs.c2_freq        = {r[9][2:0], r[8]};
  assign regs.c2_len_en      = r[9][6];
  assign regs.c3_on          = r[10][7];
  assign regs.c3_len         = r[11];
  assign regs.c3_level       = r[12][6:5];
  assign regs.c3_freq        = {r[14][2:0], r[13]};
  assign regs.c3_len_en      = r[14][6];
  assign regs.c4_regs        = {r[19], r[18], r[17], r[16]};
  assign regs.nr50           = r[20];
  assign regs.nr51           = r[21];
  assign regs.master_on      = r[22][7];

endmodule
