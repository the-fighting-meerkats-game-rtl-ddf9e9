// gb_noise_ch: the noise sound channel (channel 4).
// A 15-bit linear-feedback shift register is the "polynomial counter": on each shift
// the XOR of its two lowest bits enters at bit 14 (and also at bit 6 in the 7-bit
// mode, NR43 bit 3), and the output is high while bit 0 is 0. The shift rate comes
// from NR43: a prescaler makes a 524288 Hz tick (PRESCALE clocks, 8 at 4.194304 MHz)
// and the register shifts every d << s ticks, d = 1, 2, 4, 6, ... 14 for divisor code
// r = 0..7 and s = NR43[7:4]; with s = 14 or 15 it does not shift. Length and
// envelope work as on the square channels: a trigger loads 64-t1 (also loaded by a
// write to NR41), each 256 Hz tick with length enabled counts down and stops the
// channel at zero; every n 64 Hz ticks the volume moves one step up or down. A trigger
// fills the register with ones and restarts the channel. `level` is the volume while
// the output is high, 0 otherwise or while stopped.
// That channel 4 plays white noise from a polynomial counter follows the document;
// the register layout, the feedback taps and the rates are the standard Game Boy ones.
module gb_noise_ch #(
  parameter int unsigned PRESCALE = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       trigger,
  input  logic       len_load,
  input  logic       len_tick,
  input  logic       env_tick,
  input  logic [5:0] len,
  input  logic       len_en,
  input  logic [3:0] env_init,
  input  logic       env_up,
  input  logic [2:0] env_period,
  input  logic [3:0] shift,
  input  logic       width7,
  input  logic [2:0] div,
  output logic [3:0] level,
  output logic       active
);

  logic [$clog2(PRESCALE)-1:0] pre;
  logic        tick, fb;
  logic [16:0] cnt, period;
  logic [14:0] lfsr;
  logic [6:0]  len_cnt;
  logic [3:0]  vol;
  logic [2:0]  env_cnt;

  assign tick   = (32'(pre) == PRESCALE - 1);
  assign period = (div == 3'd0 ? 17'd1 : {13'd0, div, 1'b0}) << shift;
  assign fb     = lfsr[0] ^ lfsr[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0; cnt <= '0; lfsr <= '1; len_cnt <= '0; vol <= '0; env_cnt <= '0;
      active <= 1'b0;
    end else begin
      pre <= tick ? '0 : pre + 1'b1;
      if (tick && shift < 4'd14) begin
        if (cnt >= period - 17'd1) begin
          cnt  <= '0;
          lfsr <= {fb, lfsr[14:8], width7 ? fb : lfsr[7], lfsr[6:1]};
        end else cnt <= cnt + 17'd1;
      end
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
      if (trigger) begin
        active  <= 1'b1;
        lfsr    <= '1;
        cnt     <= '0;
        pre     <= '0;
        vol     <= env_init;
        env_cnt <= env_period;
        if (len_cnt == 7'd0) len_cnt <= 7'd64 - {1'b0, len};
      end
    end
  end

  assign level = (active && !lfsr[0]) ? vol : 4'd0;

endmodule
