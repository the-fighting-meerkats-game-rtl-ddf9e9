// gb_nes_ctrl: polls an NES controller with a 17-state machine.
// Every POLL_CYCLES clocks (60 Hz at 4.194304 MHz by default) the machine leaves its
// idle state (0), raises the latch/strobe for one state (1), samples button A in
// state 2, then produces seven clock pulses (high states 3,5,..,15, low states
// 4,6,..,16); the controller moves to its next button on each rising edge and the
// machine samples it at the end of the following low state. Order: A, B, Select,
// Start, Up, Down, Left, Right. The data line is active low; `buttons` is active high,
// bit 0 = A .. bit 7 = Right, and is updated once a full poll has finished.
// Each state lasts STATE_CYCLES clocks (the controller clock is then
// clk / (2*STATE_CYCLES)); that rate is this design's choice.
module gb_nes_ctrl #(
  parameter int unsigned POLL_CYCLES  = 69905,
  parameter int unsigned STATE_CYCLES = 1
) (
  input  logic       clk,
  input  logic       rst,
  output logic       nes_latch,
  output logic       nes_clk,
  input  logic       nes_data,
  output logic [7:0] buttons
);

  logic [4:0]  state;
  logic [$clog2(POLL_CYCLES)-1:0] poll;
  logic [$clog2(STATE_CYCLES+1)-1:0] sdiv;
  logic [7:0]  shreg;
  logic        step;

  assign step = (32'(sdiv) == STATE_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0; poll <= '0; sdiv <= '0; shreg <= '0; buttons <= '0;
    end else begin
      poll <= (32'(poll) == POLL_CYCLES - 1) ? '0 : poll + 1'b1;
      if (state == 5'd0) begin
        sdiv <= '0;
        if (32'(poll) == POLL_CYCLES - 1) state <= 5'd1;
      end else begin
        sdiv <= step ? '0 : sdiv + 1'b1;
        if (step) begin
          if (state == 5'd2) shreg[0] <= ~nes_data;
          else if (state >= 5'd4 && !state[0]) shreg[3'(state[4:1] - 4'd1)] <= ~nes_data;
          if (state == 5'd16) begin
            state <= 5'd0;
            buttons <= {~nes_data, shreg[6:0]};
          end else state <= state + 5'd1;
        end
      end
    end
  end

  assign nes_latch = (state == 5'd1);
  assign nes_clk   = (state >= 5'd3) && state[0];

endmodule
