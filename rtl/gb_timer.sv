// gb_timer: the DIV/TIMA/TMA/TAC timer block (0xFF04-0xFF07).
// A 16-bit counter advances every clock (one T cycle); DIV reads its upper 8 bits and
// any write to DIV clears the whole counter. TIMA increments on the falling edge of
// one counter bit chosen by TAC[1:0] (bit 9, 3, 5, 7: 4096, 262144, 65536, 16384 Hz
// at 4.194304 MHz) while TAC[2] enables it; on overflow TIMA is reloaded from TMA and
// a one-clock interrupt request is raised. Register access: `cs` with `addr` 0..3
// selecting DIV, TIMA, TMA, TAC; writes take effect at the clock edge with `we`,
// reads are combinational. The counter bit choices are the standard Game Boy ones;
// the reload happens in the same cycle as the overflow (no extra delay).
module gb_timer (
  input  logic       clk,
  input  logic       rst,
  input  logic       cs,
  input  logic       we,
  input  logic [1:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq
);

  logic [15:0] cnt;
  logic [7:0]  tima, tma;
  logic [2:0]  tac;
  logic        sel_bit, sel_q;

  always_comb begin
    unique case (tac[1:0])
      2'd0: sel_bit = cnt[9];
      2'd1: sel_bit = cnt[3];
      2'd2: sel_bit = cnt[5];
      default: sel_bit = cnt[7];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; tima <= '0; tma <= '0; tac <= '0; sel_q <= 1'b0; irq <= 1'b0;
    end else begin
      irq   <= 1'b0;
      sel_q <= sel_bit & tac[2];
      cnt   <= (cs && we && addr == 2'd0) ? 16'd0 : cnt + 16'd1;
      if (sel_q && !(sel_bit & tac[2])) begin
        if (tima == 8'hff) begin
          tima <= tma;
          irq  <= 1'b1;
        end else tima <= tima + 8'd1;
      end
      if (cs && we) begin
        unique case (addr)
          2'd1: tima <= wdata;
          2'd2: tma  <= wdata;
          2'd3: tac  <= wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      2'd0: rdata = cnt[15:8];
      2'd1: rdata = tima;
      2'd2: rdata = tma;
      default: rdata = {5'b11111, tac};
    endcase
  end

endmodule
