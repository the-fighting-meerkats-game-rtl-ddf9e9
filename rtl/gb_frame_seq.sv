// gb_frame_seq: the sound frame sequencer.
// A divider makes a 512 Hz step (DIV clocks per step; 8192 at 4.194304 MHz) and a
// 3-bit step counter runs 0..7. One-clock ticks: length counters on steps 0, 2, 4, 6
// (256 Hz), frequency sweep on steps 2 and 6 (128 Hz), volume envelope on step 7
// (64 Hz). The ticks are raised in the clock where the counter enters the step.
module gb_frame_seq #(
  parameter int unsigned DIV = 8192
) (
  input  logic       clk,
  input  logic       rst,
  output logic       len_tick,
  output logic       sweep_tick,
  output logic       env_tick,
  output logic [2:0] step
);

  logic [$clog2(DIV)-1:0] cnt;
  logic [2:0] nstep;

  assign nstep = step + 3'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; step <= 3'd7; len_tick <= 1'b0; sweep_tick <= 1'b0; env_tick <= 1'b0;
    end else begin
      len_tick <= 1'b0; sweep_tick <= 1'b0; env_tick <= 1'b0;
      if (32'(cnt) == DIV - 1) begin
        cnt  <= '0;
        step <= nstep;
        len_tick   <= !nstep[0];
        sweep_tick <= (nstep == 3'd2) || (nstep == 3'd6);
        env_tick   <= (nstep == 3'd7);
      end else cnt <= cnt + 1'b1;
    end
  end

endmodule
