// gb_breakpoint: on-board breakpoint and single-step unit.
// The 16-bit breakpoint address is entered in two halves from 8 switches: `btn_half`
// toggles which half is being set (shown on `half_hi`), `btn_save` stores the switch
// value into that half. With `enable` high the unit stops the CPU (`stall`) as soon
// as an opcode at the breakpoint address has been fetched. While stopped, `btn_step`
// lets exactly one instruction run (until the next opcode fetch) and `btn_cont`
// resumes free running; the stop address is ignored for the fetch that resumes.
// Buttons are expected as clean one-clock pulses (debouncing is outside this block).
module gb_breakpoint (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [7:0]  switches,
  input  logic        btn_half,
  input  logic        btn_save,
  input  logic        btn_step,
  input  logic        btn_cont,
  input  logic [15:0] fetch_pc,
  input  logic        fetch_done,
  output logic        stall,
  output logic        half_hi,
  output logic [15:0] bp_addr
);

  typedef enum logic [1:0] {RUN, STOPPED, STEP} bp_state_e;
  bp_state_e st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= RUN; half_hi <= 1'b0; bp_addr <= 16'h0000;
    end else begin
      if (btn_half) half_hi <= ~half_hi;
      if (btn_save) begin
        if (half_hi) bp_addr[15:8] <= switches;
        else         bp_addr[7:0]  <= switches;
      end
      unique case (st)
        RUN:     if (enable && fetch_done && fetch_pc == bp_addr) st <= STOPPED;
        STOPPED: if (btn_step) st <= STEP;
                 else if (btn_cont || !enable) st <= RUN;
        default: if (fetch_done) st <= STOPPED;   // STEP: one instruction
      endcase
    end
  end

  assign stall = (st == STOPPED);

endmodule
