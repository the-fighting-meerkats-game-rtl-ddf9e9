// gb_audio: the sound unit: registers, frame sequencer, two square channels, the
// waveform player, the noise channel and the mixer. The CPU side is the register
// port of gb_sound_regs (0xFF10-0xFF3F). `left`/`right` are the mixed levels for the
// audio codec; `ch_active` shows which channels are playing (also read in NR52).
// The document's own design had no noise channel; it is built here as the fourth
// channel the document describes.
// Parameters set the clock dividers for a 4.194304 MHz clock.
module gb_audio
  import gb_pkg::*;
#(
  parameter int unsigned FS_DIV       = 8192,
  parameter int unsigned SQ_PRESCALE  = 32,
  parameter int unsigned WAV_PRESCALE = 2,
  parameter int unsigned NOI_PRESCALE = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cs,
  input  logic        we,
  input  logic [5:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic [8:0]  left,
  output logic [8:0]  right,
  output logic [3:0]  ch_active
);

  snd_regs_t    regs;
  logic [127:0] wave;
  logic [3:0]   trig;
  logic [3:0]   lload;
  logic         len_tick, sweep_tick, env_tick;
  logic [2:0]   step;
  logic [3:0]   l1, l2, l3, l4;
  logic [31:0]  c4;

  gb_sound_regs u_regs (
    .clk(clk), .rst(rst), .cs(cs), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata),
    .regs(regs), .wave_ram(wave), .trigger(trig), .len_load(lload),
    .ch_status(ch_active)
  );

  gb_frame_seq #(.DIV(FS_DIV)) u_fs (
    .clk(clk), .rst(rst), .len_tick(len_tick), .sweep_tick(sweep_tick),
    .env_tick(env_tick), .step(step)
  );

  gb_square_ch #(.SWEEP(1'b1), .PRESCALE(SQ_PRESCALE)) u_ch1 (
    .clk(clk), .rst(rst), .trigger(trig[0]), .len_load(lload[0]), .len_tick(len_tick),
    .sweep_tick(sweep_tick), .env_tick(env_tick),
    .sweep_time(regs.c1_sweep_time), .sweep_sub(regs.c1_sweep_sub),
    .sweep_shift(regs.c1_sweep_shift), .duty(regs.c1_duty), .len(regs.c1_len),
    .len_en(regs.c1_len_en), .env_init(regs.c1_env_init), .env_up(regs.c1_env_up),
    .env_period(regs.c1_env_period), .freq(regs.c1_freq), .level(l1), .active(ch_active[0])
  );

  gb_square_ch #(.SWEEP(1'b0), .PRESCALE(SQ_PRESCALE)) u_ch2 (
    .clk(clk), .rst(rst), .trigger(trig[1]), .len_load(lload[1]), .len_tick(len_tick),
    .sweep_tick(1'b0), .env_tick(env_tick),
    .sweep_time(3'd0), .sweep_sub(1'b0), .sweep_shift(3'd0),
    .duty(regs.c2_duty), .len(regs.c2_len),
    .len_en(regs.c2_len_en), .env_init(regs.c2_env_init), .env_up(regs.c2_env_up),
    .env_period(regs.c2_env_period), .freq(regs.c2_freq), .level(l2), .active(ch_active[1])
  );

  gb_wave_ch #(.PRESCALE(WAV_PRESCALE)) u_ch3 (
    .clk(clk), .rst(rst), .trigger(trig[2]), .len_load(lload[2]), .len_tick(len_tick),
    .on(regs.c3_on), .len(regs.c3_len), .len_en(regs.c3_len_en),
    .out_level(regs.c3_level), .freq(regs.c3_freq), .wave_ram(wave),
    .level(l3), .active(ch_active[2])
  );

  gb_sound_mix u_mix (
    .clk(clk), .rst(rst), .ch1(l1), .ch2(l2), .ch3(l3), .ch4(l4),
    .nr50(regs.nr50), .nr51(regs.nr51), .master_on(regs.master_on),
    .left(left), .right(right)
  );

  // NR41-NR44: {NR44, NR43, NR42, NR41}
  assign c4 = regs.c4_regs;
  gb_noise_ch #(.PRESCALE(NOI_PRESCALE)) u_ch4 (
    .clk(clk), .rst(rst), .trigger(trig[3]), .len_load(lload[3]), .len_tick(len_tick),
    .env_tick(env_tick), .len(c4[5:0]), .len_en(c4[30]), .env_init(c4[15:12]),
    .env_up(c4[11]), .env_period(c4[10:8]), .shift(c4[23:20]), .width7(c4[19]),
    .div(c4[18:16]), .level(l4), .active(ch_active[3])
  );

endmodule
