// gb_square_ch: square-wave sound channel (channel 1 with SWEEP=1, channel 2 with
// SWEEP=0).
// Frequency: a prescaler makes a 131072 Hz tick (PRESCALE clocks, 32 at 4.194304 MHz)
// and a counter of those ticks runs over 2048-x ticks per period, so the tone is
// 131072/(2048-x) Hz. Duty: the output is low while the counter is below 1/8, 1/4,
// 1/2 or 3/4 of the period (duty 0..3) and high (at the current volume) for the rest;
// the duty figure is the share of time the wave is low. Length: a trigger loads
// 64-t1, each 256 Hz tick with length enabled counts it down and the channel stops at
// zero, giving (64-t1)/256 s. Envelope: the trigger loads the initial volume; every n
// 64 Hz ticks (n = envelope period, 0 = off) the volume moves by 1 up or down until it
// reaches 0 or 15. Sweep: every `sweep_time` 128 Hz ticks x becomes x +/- x>>shift;
// the channel stops if x would pass 2047. A trigger restarts the channel whenever it
// comes. `level` is the 4-bit output, 0 while the channel is stopped.
module gb_square_ch #(
  parameter bit          SWEEP    = 1'b1,
  parameter int unsigned PRESCALE = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        trigger,
  input  logic        len_load,
  input  logic        len_tick,
  input  logic        sweep_tick,
  input  logic        env_tick,
  input  logic [2:0]  sweep_time,
  input  logic        sweep_sub,
  input  logic [2:0]  sweep_shift,
  input  logic [1:0]  duty,
  input  logic [5:0]  len,
  input  logic        len_en,
  input  logic [3:0]  env_init,
  input  logic        env_up,
  input  logic [2:0]  env_period,
  input  logic [10:0] freq,
  output logic [3:0]  level,
  output logic        active
);

  logic [$clog2(PRESCALE)-1:0] pre;
  logic        tick;
  logic [10:0] f;
  logic [11:0] cnt, period, low_len;
  logic [6:0]  len_cnt;
  logic [3:0]  vol;
  logic [2:0]  env_cnt, swp_cnt;
  logic [11:0] swp_next;

  assign tick   = (32'(pre) == PRESCALE - 1);
  assign period = 12'd2048 - {1'b0, f};
  always_comb begin
    unique case (duty)
      2'd0: low_len = period >> 3;
      2'd1: low_len = period >> 2;
      2'd2: low_len = period >> 1;
      default: low_len = period - (period >> 2);
    endcase
    swp_next = sweep_sub ? {1'b0, f} - {1'b0, f >> sweep_shift}
                         : {1'b0, f} + {1'b0, f >> sweep_shift};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0; f <= '0; cnt <= '0; len_cnt <= '0; vol <= '0; env_cnt <= '0;
      swp_cnt <= '0; active <= 1'b0;
    end else begin
      pre <= tick ? '0 : pre + 1'b1;
      if (!SWEEP) f <= freq;
      if (tick) cnt <= (cnt >= period - 12'd1) ? 12'd0 : cnt + 12'd1;
      if (len_load) len_cnt <= 7'd64 - {1'b0, len};
      if (len_tick && len_en && len_cnt != 7'd0) begin
        len_cnt <= len_cnt - 7'd1;
        if (len_cnt == 7'd1) active <= 1'b0;
      end
      if (env_tick && env_period != 3'd0) begin
        if (env_cnt <= 3'd1) begin
          env_cnt <= env_period;
          if (env_up && vol != 4'hf) vol <= vol + 4'd1;
          else if (!env_up && vol != 4'h0) vol <= vol - 4'd1;
        end else env_cnt <= env_cnt - 3'd1;
      end
      if (SWEEP && sweep_tick && sweep_time != 3'd0 && active) begin
        if (swp_cnt <= 3'd1) begin
          swp_cnt <= sweep_time;
          if (sweep_shift != 3'd0) begin
            if (swp_next[11]) active <= 1'b0;
            else f <= swp_next[10:0];
          end
        end else swp_cnt <= swp_cnt - 3'd1;
      end
      if (trigger) begin
        active  <= 1'b1;
        f       <= freq;
        cnt     <= '0;
        pre     <= '0;
        vol     <= env_init;
        env_cnt <= env_period;
        swp_cnt <= sweep_time;
        if (len_cnt == 7'd0) len_cnt <= 7'd64 - {1'b0, len};
      end
    end
  end

  assign level = (active && cnt >= low_len) ? vol : 4'd0;

endmodule
