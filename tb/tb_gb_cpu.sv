// tb_gb_cpu: self-checking test of the CPU against a 64 KiB memory model.
// Program 1 (hand-assembled): the BCD example 0x19 + 0x19 then DAA (expects 0x38),
// a Fibonacci loop (10 iterations, expects 55), CB SRL on (HL), LD A,(HL+), SWAP,
// PUSH/POP, CALL/RET. Results are stored to 0xC000.. and compared with values worked
// out by hand, and the T-cycle count from the first opcode fetch to the HALT fetch is
// compared with the sum of the documented instruction timings (592 cycles).
// Program 2: enables the timer interrupt, HALTs, receives a request pulse, runs the
// handler at 0x0050 (which uses high memory) and returns with RETI.
module tb_gb_cpu;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] addr, fetch_pc;
  logic [7:0]  dout, din;
  logic        rd, wr, fetch_done, halted;
  logic [4:0]  irq = '0;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gb_cpu dut (
    .clk(clk), .rst(rst), .stall(1'b0), .addr(addr), .dout(dout), .din(din),
    .rd(rd), .wr(wr), .mem_disable(1'b0), .irq(irq),
    .fetch_pc(fetch_pc), .fetch_done(fetch_done), .halted(halted)
  );

  assign din = mem[addr];
  always_ff @(posedge clk) if (wr) mem[addr] <= dout;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic load(input logic [15:0] base, input byte unsigned b[]);
    foreach (b[i]) mem[base + i] = b[i];
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_first, t_halt, cyc = 0;
  logic saw_isr;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) if (fetch_done && fetch_pc == 16'h0050) saw_isr <= 1'b1;

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    load(16'h0000, '{8'h31, 8'hFE, 8'hDF, 8'h3E, 8'h19, 8'hC6, 8'h19, 8'h27,
                     8'hEA, 8'h00, 8'hC0, 8'h06, 8'h0A, 8'h0E, 8'h00, 8'h16, 8'h01,
                     8'h79, 8'h82, 8'h4A, 8'h57, 8'h05, 8'h20, 8'hF9,
                     8'h79, 8'hEA, 8'h01, 8'hC0, 8'h21, 8'h10, 8'hC0, 8'h36, 8'h5A,
                     8'hCB, 8'h3E, 8'h2A, 8'hCB, 8'h37, 8'h77,
                     8'h01, 8'h34, 8'h12, 8'hC5, 8'hD1, 8'hCD, 8'h40, 8'h00,
                     8'h7A, 8'hEA, 8'h03, 8'hC0, 8'h76});
    load(16'h0040, '{8'h7B, 8'hEA, 8'h02, 8'hC0, 8'hC9});
    repeat (3) @(posedge clk);
    rst = 1'b0;
    t_first = -1;
    t_halt = -1;
    while (t_halt < 0) begin
      @(posedge clk);
      if (fetch_done && fetch_pc == 16'h0000 && t_first < 0) t_first = cyc;
      if (fetch_done && fetch_pc == 16'h0033) t_halt = cyc;
    end
    repeat (20) @(posedge clk);
    check("DAA 0x19+0x19", mem[16'hC000], 8'h38);
    check("fib(10)", mem[16'hC001], 8'h37);
    check("POP DE low via CALL", mem[16'hC002], 8'h34);
    check("POP DE high", mem[16'hC003], 8'h12);
    check("SRL (HL)", mem[16'hC010], 8'h2D);
    check("SWAP A then LD (HL+)", mem[16'hC011], 8'hD2);
    check("return address pushed low", mem[16'hDFFC], 8'h2F);
    check("halted", int'(halted), 1);
    check("cycles to HALT", int'(t_halt - t_first), 592);

    // ---- program 2: interrupt out of HALT ----
    rst = 1'b1;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    load(16'h0000, '{8'h31, 8'hFE, 8'hFF, 8'h3E, 8'h04, 8'hE0, 8'hFF, 8'hFB, 8'h76,
                     8'hEA, 8'h05, 8'hC0, 8'h76});
    load(16'h0050, '{8'h3E, 8'h77, 8'hE0, 8'h80, 8'hF0, 8'h80, 8'h3C, 8'hD9});
    saw_isr = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (halted);
    repeat (40) @(posedge clk);
    check("still halted without request", int'(halted), 1);
    irq[2] = 1'b1;
    @(posedge clk);
    irq[2] = 1'b0;
    repeat (400) @(posedge clk);
    check("handler ran", int'(saw_isr), 1);
    check("value from high memory + 1", mem[16'hC005], 8'h78);
    check("high memory kept off the bus", mem[16'hFF80], 8'h00);
    check("IF bit cleared", int'(dut.u_int.if_q[2]), 0);
    check("ime restored by RETI", int'(dut.ime), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
