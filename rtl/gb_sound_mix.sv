// gb_sound_mix: stereo mixer of the four channel levels.
// For each side the 4-bit levels of the channels enabled for it in NR51 (bits 3:0
// right, 7:4 left, channel 1 in the lowest bit) are added, then multiplied by that
// side's master volume + 1 from NR50 (bits 2:0 right, 6:4 left). With the master
// enable (NR52 bit 7) clear both outputs are 0. Outputs are unsigned levels, 0..480,
// registered once. NR50 bits 7 and 3 (routing of the cartridge's Vin input) are
// stored but not used, as no cartridge audio input is mixed.
module gb_sound_mix (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] ch1,
  input  logic [3:0] ch2,
  input  logic [3:0] ch3,
  input  logic [3:0] ch4,
  input  logic [7:0] nr50,
  input  logic [7:0] nr51,
  input  logic       master_on,
  output logic [8:0] left,
  output logic [8:0] right
);

  logic [5:0] sum_l, sum_r;

  always_comb begin
    sum_l = '0;
    sum_r = '0;
    if (nr51[0]) sum_r += {2'd0, ch1};
    if (nr51[1]) sum_r += {2'd0, ch2};
    if (nr51[2]) sum_r += {2'd0, ch3};
    if (nr51[3]) sum_r += {2'd0, ch4};
    if (nr51[4]) sum_l += {2'd0, ch1};
    if (nr51[5]) sum_l += {2'd0, ch2};
    if (nr51[6]) sum_l += {2'd0, ch3};
    if (nr51[7]) sum_l += {2'd0, ch4};
  end

  always_ff @(posedge clk) begin
    if (rst || !master_on) begin
      left <= '0; right <= '0;
    end else begin
      left  <= 9'({3'd0, sum_l} * ({6'd0, nr50[6:4]} + 9'd1));
      right <= 9'({3'd0, sum_r} * ({6'd0, nr50[2:0]} + 9'd1));
    end
  end

endmodule
