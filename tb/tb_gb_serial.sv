// tb_gb_serial: two link ports wired together like two consoles. Port A uses its
// internal clock, port B the external one; they exchange 0xA5 and 0x3C. Checks both
// received bytes, SC[7] clearing, one interrupt each, eight clock pulses, that SOUT
// changes only while the clock is low, and the transfer time (8 x 2 x SCK_HALF).
module tb_gb_serial;
  localparam int HALF = 8;
  logic clk = 0, rst = 1;
  logic csa = 0, csb = 0, we = 0, ad = 0;
  logic [7:0] wdata = 0, rda, rdb;
  logic irqa, irqb, scka, sckoea, sckb_unused, sckoeb, souta, soutb;
  int checks = 0, failures = 0, ia = 0, ib = 0, pulses = 0, t0, t1, bad_edge = 0;
  logic sck_q = 1, souta_q = 1;

  always #5 clk = ~clk;
  gb_serial #(.SCK_HALF(HALF)) ua (.clk, .rst, .cs(csa), .we, .addr(ad), .wdata, .rdata(rda), .irq(irqa),
    .sck_in(1'b1), .sck_out(scka), .sck_oe(sckoea), .sin(soutb), .sout(souta));
  gb_serial #(.SCK_HALF(HALF)) ub (.clk, .rst, .cs(csb), .we, .addr(ad), .wdata, .rdata(rdb), .irq(irqb),
    .sck_in(scka), .sck_out(sckb_unused), .sck_oe(sckoeb), .sin(souta), .sout(soutb));

  always @(posedge clk) if (!rst) begin
    if (irqa) begin ia++; t1 = $time; end
    if (irqb) ib++;
    sck_q <= scka; souta_q <= souta;
    if (!sck_q && scka) pulses++;
    if (souta != souta_q && scka && sck_q) bad_edge++;
  end

  task automatic wr(input logic a_sel, input logic adr, input logic [7:0] d);
    @(negedge clk); csa = a_sel; csb = !a_sel; we = 1; ad = adr; wdata = d;
    @(negedge clk); csa = 0; csb = 0; we = 0;
  endtask

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0h expected %0h", w, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    wr(0, 0, 8'h3C); wr(0, 1, 8'h80);      // B: data, external clock, armed
    wr(1, 0, 8'hA5);
    t0 = $time; pulses = 0;
    wr(1, 1, 8'h81);                       // A: start with internal clock
    repeat (2 * HALF * 8 + 40) @(negedge clk);
    ad = 0; #1;
    chk("A received", rda, 8'h3C);
    chk("B received", rdb, 8'hA5);
    ad = 1; #1;
    chk("A SC7 clear", rda[7], 0);
    chk("B SC7 clear", rdb[7], 0);
    chk("A irq", ia, 1);
    chk("B irq", ib, 1);
    chk("pulses", pulses, 8);
    chk("SOUT moved only while SCK low", bad_edge, 0);
    chk("A drives clock", sckoea, 1);
    chk("B does not", sckoeb, 0);
    chk("transfer time", (t1 - t0) / 10, 2 * HALF * 8 + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
