// tb_gb_cpu_timing: checks the length of every defined instruction in clocks.
// Each opcode (and every CB-prefixed opcode) is placed after a short set-up sequence
// (SP = 0xD000, HL = 0xC100, F = 0 via PUSH BC / POP AF) and followed by operand bytes
// 0x00 0xC0; the CPU is reset for each one. The time from the fetch of the opcode to
// the next opcode fetch must equal 4 clocks times the machine-cycle count of the
// standard Game Boy timing table. With F = 0, NZ/NC branches are taken and Z/C
// branches are not, so both lengths of conditional instructions are covered.
// Not timed: HALT, STOP and the eleven undefined opcodes (entries of 0 below).
module tb_gb_cpu_timing;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] addr, fetch_pc;
  logic [7:0]  dout, din;
  logic        rd, wr, fetch_done, halted;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;

  // machine cycles of each unprefixed opcode
  localparam int MC [256] = '{
    1, 3, 2, 2, 1, 1, 2, 1, 5, 2, 2, 2, 1, 1, 2, 1,
    0, 3, 2, 2, 1, 1, 2, 1, 3, 2, 2, 2, 1, 1, 2, 1,
    3, 3, 2, 2, 1, 1, 2, 1, 2, 2, 2, 2, 1, 1, 2, 1,
    3, 3, 2, 2, 3, 3, 3, 1, 2, 2, 2, 2, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    2, 2, 2, 2, 2, 2, 0, 2, 1, 1, 1, 1, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1, 2, 1,
    5, 3, 4, 4, 6, 4, 2, 4, 2, 4, 3, 0, 3, 6, 2, 4,
    5, 3, 4, 0, 6, 4, 2, 4, 2, 4, 3, 0, 3, 0, 2, 4,
    3, 3, 2, 0, 0, 4, 2, 4, 4, 1, 4, 0, 0, 0, 2, 4,
    3, 3, 2, 1, 0, 4, 2, 4, 3, 2, 4, 1, 0, 0, 2, 4
  };

  always #5 clk = ~clk;

  gb_cpu dut (
    .clk(clk), .rst(rst), .stall(1'b0), .addr(addr), .dout(dout), .din(din),
    .rd(rd), .wr(wr), .mem_disable(1'b0), .irq(5'd0),
    .fetch_pc(fetch_pc), .fetch_done(fetch_done), .halted(halted)
  );

  assign din = mem[addr];
  always_ff @(posedge clk) if (wr) mem[addr] <= dout;

  localparam logic [15:0] AT = 16'h000A;

  // run the instruction at AT and return the clocks until the next opcode fetch
  task automatic time_one(input logic [7:0] b0, input logic [7:0] b1, input logic [7:0] b2, output int clocks);
    longint t0;
    int n;
    rst = 1'b1;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    mem[16'hD000] = 8'h00; mem[16'hD001] = 8'hC2;       // return address for RET/RETI/POP
    {mem[0], mem[1], mem[2]} = {8'h31, 8'h00, 8'hD0};   // LD SP,0xD000
    {mem[3], mem[4], mem[5]} = {8'h21, 8'h00, 8'hC1};   // LD HL,0xC100
    {mem[6], mem[7], mem[8]} = {8'h01, 8'h00, 8'h00};   // LD BC,0x0000
    mem[9] = 8'hC5;                                     // PUSH BC
    mem[AT] = 8'hF1;                                    // POP AF: F = 0
    {mem[AT+1], mem[AT+2], mem[AT+3]} = {b0, b1, b2};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n = 0;
    clocks = -1;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk);
      if (fetch_done) begin
        if (n == 1) begin clocks = int'(($time - t0) / 10); break; end
        if (fetch_pc == AT + 1) begin t0 = $time; n = 1; end
      end
    end
  endtask

  initial begin
    int clocks, exp;
    for (int op = 0; op < 256; op++) begin
      if (MC[op] == 0 || op == 8'hCB) continue;
      time_one(8'(op), 8'h00, 8'hC0, clocks);
      checks++;
      if (clocks != 4 * MC[op]) begin
        failures++;
        $display("FAIL opcode %02h: %0d clocks, expected %0d", op, clocks, 4 * MC[op]);
      end
    end
    for (int op = 0; op < 256; op++) begin
      exp = (op[2:0] != 3'd6) ? 8 : (op[7:6] == 2'b01) ? 12 : 16;
      time_one(8'hCB, 8'(op), 8'h00, clocks);
      checks++;
      if (clocks != exp) begin
        failures++;
        $display("FAIL opcode CB %02h: %0d clocks, expected %0d", op, clocks, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
