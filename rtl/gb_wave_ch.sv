// gb_wave_ch: the waveform player (sound channel 3).
// Plays the 32 4-bit samples held in the 16-byte wave RAM, one byte at a time, upper
// four bits first. A sample step comes every 2048-x ticks of a 2097152 Hz clock
// (PRESCALE clocks per tick), so the whole 32-sample waveform repeats at
// 65536/(2048-x) Hz. With REVERSE=1 the bytes are played from 0xFF3F down to 0xFF30,
// with REVERSE=0 from 0xFF30 up. Length: a trigger loads 256-t1; each 256 Hz tick with
// length enabled counts it down and the channel stops at zero, (256-t1)/256 s.
// Output level 0..3 shifts the sample right by 4 (mute), 0, 1 or 2. The channel
// plays only while its enable flag (NR30 bit 7) is set; a trigger restarts it.
module gb_wave_ch #(
  parameter int unsigned PRESCALE = 2,
  parameter bit          REVERSE  = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         trigger,
  input  logic         len_load,
  input  logic         len_tick,
  input  logic         on,
  input  logic [7:0]   len,
  input  logic         len_en,
  input  logic [1:0]   out_level,
  input  logic [10:0]  freq,
  input  logic [127:0] wave_ram,
  output logic [3:0]   level,
  output logic         active
);

  logic [$clog2(PRESCALE+1)-1:0] pre;
  logic        tick;
  logic [10:0] cnt;
  logic [4:0]  pos;
  logic [8:0]  len_cnt;
  logic [3:0]  byte_i;
  logic [7:0]  b;
  logic [3:0]  sample;

  assign tick   = (32'(pre) == PRESCALE - 1);
  assign byte_i = REVERSE ? ~pos[4:1] : pos[4:1];
  assign b      = wave_ram[byte_i*8 +: 8];
  assign sample = pos[0] ? b[3:0] : b[7:4];

  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0; cnt <= '0; pos <= '0; len_cnt <= '0; active <= 1'b0;
    end else begin
      pre <= tick ? '0 : pre + 1'b1;
      if (tick) begin
        if (cnt == 11'd0 - freq - 11'd1) begin
          cnt <= '0;
          pos <= pos + 5'd1;
        end else cnt <= cnt + 11'd1;
      end
      if (len_load) len_cnt <= 9'd256 - {1'b0, len};
      if (len_tick && len_en && len_cnt != 9'd0) begin
        len_cnt <= len_cnt - 9'd1;
        if (len_cnt == 9'd1) active <= 1'b0;
      end
      if (!on) active <= 1'b0;
      if (trigger) begin
        active <= on;
        cnt <= '0;
        pos <= '0;
        pre <= '0;
        if (len_cnt == 9'd0) len_cnt <= 9'd256 - {1'b0, len};
      end
    end
  end

  always_comb begin
    unique case (out_level)
      2'd0: level = 4'd0;
      2'd1: level = sample;
      2'd2: level = sample >> 1;
      default: level = sample >> 2;
    endcase
    if (!active) level = 4'd0;
  end

endmodule
