// tb_gb_cpu_random: random programs against an instruction-level
// reference model written here.
// Each program sets SP, A, F, BC, DE and HL, then runs 300 random instructions drawn
// from: LD r,r' / LD r,n (including (HL)), the eight ALU operations on registers,
// (HL) and immediates, INC/DEC r, LD rr,nn, INC/DEC rr, ADD HL,rr, LD (HL+)/(HL-),
// RLCA/RRCA/RLA/RRA, DAA, CPL, SCF, CCF, PUSH/POP (kept balanced, AF included),
// LD HL,SP+e, ADD SP,e, LD (BC)/(DE)/(nn) with A, every CB operation, JR/JP
// (conditional or not) over one random instruction, and CALL/CALL cc to a
// subroutine of one instruction that ends in RET, RETI or RET cc. Every memory access through HL,
// BC or DE is preceded by a load of the high byte so it lands in work RAM. The
// program ends by pushing AF, BC, DE, HL, storing SP and executing HALT. The
// reference model executes the same bytes from the same memory image; afterwards
// the whole memory below 0xFF80 must be equal.
module tb_gb_cpu_random;
  localparam int PROGRAMS = 200, LEN = 300;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] addr, fetch_pc;
  logic [7:0]  dout, din;
  logic        rd, wr, fetch_done, halted;
  logic [7:0]  mem  [65536];
  logic [7:0]  rmem [65536];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gb_cpu dut (
    .clk(clk), .rst(rst), .stall(1'b0), .addr(addr), .dout(dout), .din(din),
    .rd(rd), .wr(wr), .mem_disable(1'b0), .irq(5'd0),
    .fetch_pc(fetch_pc), .fetch_done(fetch_done), .halted(halted)
  );

  assign din = mem[addr];
  always_ff @(posedge clk) if (wr) mem[addr] <= dout;

  // ---------------- program generator ----------------
  int pc_gen;
  task automatic emit(input logic [7:0] b);
    mem[pc_gen] = b; rmem[pc_gen] = b; pc_gen++;
  endtask
  task automatic emit_hl_guard();
    emit(8'h26); emit(8'hC0);                 // LD H,0xC0
  endtask

  int depth, sp_off;

  // one random instruction; `simple` excludes branches and stack-pointer changes
  // (used for the instruction a branch may skip)
  task automatic gen_one(input bit simple);
    int k = $urandom % (simple ? 15 : 22);
    logic [7:0] op;
    int at, at2, e;
    case (k)
      0, 1: begin                            // LD r,r'
        do op = 8'h40 | 8'($urandom % 64); while (op == 8'h76);
        if (op[2:0] == 3'd6 || op[5:3] == 3'd6) emit_hl_guard();
        emit(op);
      end
      2: begin                               // LD r,n
        op = 8'h06 | {2'b00, 3'($urandom), 3'b000};
        if (op[5:3] == 3'd6) emit_hl_guard();
        emit(op); emit(8'($urandom));
      end
      3, 4: begin                            // ALU A,r
        op = 8'h80 | 8'($urandom % 64);
        if (op[2:0] == 3'd6) emit_hl_guard();
        emit(op);
      end
      5: begin emit(8'hC6 | {2'b00, 3'($urandom), 3'b000}); emit(8'($urandom)); end
      6: begin                               // INC/DEC r
        op = 8'h04 | {2'b00, 3'($urandom), 3'b000} | 8'($urandom % 2);
        if (op[5:3] == 3'd6) emit_hl_guard();
        emit(op);
      end
      7: begin                               // 16-bit: LD rr,nn / INC rr / DEC rr / ADD HL,rr
        int p = $urandom % 3;
        case ($urandom % 4)
          0: begin emit(8'h01 | 8'(p << 4)); emit(8'($urandom)); emit(8'($urandom)); end
          1: emit(8'h03 | 8'(p << 4));
          2: emit(8'h0B | 8'(p << 4));
          default: emit(8'h09 | 8'(($urandom % 4) << 4));
        endcase
      end
      8: begin emit_hl_guard(); emit(8'h22 | 8'(($urandom % 4) << 3)); end   // LD (HL+/-)
      9: emit(8'h07 | 8'(($urandom % 8) << 3));                               // rotates, DAA..CCF
      10: begin emit(8'hF8); emit(8'($urandom)); end                         // LD HL,SP+e
      11: begin                              // LD (BC)/(DE),A and LD A,(BC)/(DE)
        op = 8'h02 | 8'(($urandom % 4) << 3);
        emit(op[4] ? 8'h16 : 8'h06); emit(8'hC1);                            // LD D/B,0xC1
        emit(op);
      end
      12: begin emit($urandom % 2 ? 8'hEA : 8'hFA); emit(8'($urandom)); emit(8'hC2); end  // LD (nn),A / LD A,(nn)
      13, 14: begin                          // CB
        op = 8'($urandom);
        if (op[2:0] == 3'd6) emit_hl_guard();
        emit(8'hCB); emit(op);
      end
      15, 16: begin                          // PUSH / POP, balanced
        int p = $urandom % 4;
        if (depth < 16 && ($urandom % 2 || depth == 0)) begin emit(8'hC5 | 8'(p << 4)); depth++; end
        else begin emit(8'hC1 | 8'(p << 4)); depth--; end
      end
      17: begin                              // ADD SP,e, SP kept within 0xDF00 +/- 0x100
        e = $signed(8'($urandom));
        if (sp_off + e > 256 || sp_off + e < -256) e = -e;
        sp_off += e;
        emit(8'hE8); emit(8'(e));
      end
      18: begin                              // JR (conditional or not) over one instruction
        emit($urandom % 5 == 0 ? 8'h18 : 8'h20 | 8'(($urandom % 4) << 3));
        at = pc_gen; emit(8'h00);
        gen_one(1'b1);
        mem[at] = 8'(pc_gen - at - 1); rmem[at] = mem[at];
      end
      20, 21: begin                          // CALL L1; x; JR L2; L1: y; RET; L2:
        emit($urandom % 3 == 0 ? 8'hCD : 8'hC4 | 8'(($urandom % 4) << 3));
        at = pc_gen; emit(8'h00); emit(8'h00);
        gen_one(1'b1);
        emit(8'h18); at2 = pc_gen; emit(8'h00);
        mem[at] = 8'(pc_gen); rmem[at] = mem[at];
        mem[at + 1] = 8'(pc_gen >> 8); rmem[at + 1] = mem[at + 1];
        gen_one(1'b1);
        case ($urandom % 3)                  // RET, RETI or RET cc
          0: emit(8'hC9);
          1: emit(8'hD9);
          default: emit(8'hC0 | 8'(($urandom % 4) << 3));
        endcase
        mem[at2] = 8'(pc_gen - at2 - 1); rmem[at2] = mem[at2];
      end
      default: begin                         // JP (conditional or not) over one instruction
        emit($urandom % 5 == 0 ? 8'hC3 : 8'hC2 | 8'(($urandom % 4) << 3));
        at = pc_gen; emit(8'h00); emit(8'h00);
        gen_one(1'b1);
        mem[at] = 8'(pc_gen); rmem[at] = mem[at];
        mem[at + 1] = 8'(pc_gen >> 8); rmem[at + 1] = mem[at + 1];
      end
    endcase
  endtask

  task automatic gen_program();
    depth = 0; sp_off = 0;
    for (int i = 0; i < 65536; i++) begin mem[i] = 8'h00; rmem[i] = 8'h00; end
    pc_gen = 0;
    emit(8'h31); emit(8'h00); emit(8'hDF);   // LD SP,0xDF00
    emit(8'h01); emit(8'($urandom)); emit(8'($urandom));
    emit(8'hC5); emit(8'hF1);                 // PUSH BC, POP AF
    emit(8'h01); emit(8'($urandom)); emit(8'($urandom));
    emit(8'h11); emit(8'($urandom)); emit(8'($urandom));
    emit(8'h21); emit(8'($urandom)); emit(8'($urandom));
    for (int n = 0; n < LEN; n++) gen_one(1'b0);
    emit(8'hF5); emit(8'hC5); emit(8'hD5); emit(8'hE5);   // PUSH AF, BC, DE, HL
    emit(8'h08); emit(8'h00); emit(8'hC8);                // LD (0xC800),SP
    emit(8'h76);                                          // HALT
  endtask

  // ---------------- reference model ----------------
  logic [7:0]  ra, rf;
  logic [7:0]  rr [8];        // B C D E H L - A (index 6 unused)
  logic [15:0] rsp, rpc;

  function automatic logic [15:0] hl(); return {rr[4], rr[5]}; endfunction
  function automatic logic [7:0] fetch8();
    logic [7:0] v = rmem[rpc]; rpc++; return v;
  endfunction
  function automatic logic [7:0] get8(int i);
    if (i == 6) return rmem[hl()];
    if (i == 7) return ra;
    return rr[i];
  endfunction
  function automatic void set8(int i, logic [7:0] v);
    if (i == 6) rmem[hl()] = v;
    else if (i == 7) ra = v;
    else rr[i] = v;
  endfunction
  function automatic logic [15:0] get16(int p);      // BC DE HL SP
    case (p)
      0: return {rr[0], rr[1]};
      1: return {rr[2], rr[3]};
      2: return hl();
      default: return rsp;
    endcase
  endfunction
  function automatic void set16(int p, logic [15:0] v);
    case (p)
      0: {rr[0], rr[1]} = v;
      1: {rr[2], rr[3]} = v;
      2: {rr[4], rr[5]} = v;
      default: rsp = v;
    endcase
  endfunction
  function automatic void flags(bit z, bit n, bit h, bit c);
    rf = {z, n, h, c, 4'h0};
  endfunction
  function automatic void alu(int y, logic [7:0] b);
    int r;
    bit c = rf[4];
    case (y)
      0: begin r = ra + b; flags(r[7:0] == 0, 0, (ra[3:0] + b[3:0]) > 15, r > 255); ra = r[7:0]; end
      1: begin r = ra + b + c; flags(r[7:0] == 0, 0, (ra[3:0] + b[3:0] + c) > 15, r > 255); ra = r[7:0]; end
      2: begin r = ra - b; flags(r[7:0] == 0, 1, ra[3:0] < b[3:0], ra < b); ra = r[7:0]; end
      3: begin r = ra - b - c; flags(r[7:0] == 0, 1, int'(ra[3:0]) < int'(b[3:0]) + int'(c), int'(ra) < int'(b) + int'(c)); ra = r[7:0]; end
      4: begin ra = ra & b; flags(ra == 0, 0, 1, 0); end
      5: begin ra = ra ^ b; flags(ra == 0, 0, 0, 0); end
      6: begin ra = ra | b; flags(ra == 0, 0, 0, 0); end
      default: begin r = ra - b; flags(r[7:0] == 0, 1, ra[3:0] < b[3:0], ra < b); end
    endcase
  endfunction
  function automatic bit cond(logic [1:0] cc);     // NZ Z NC C
    case (cc)
      0: return !rf[7];
      1: return rf[7];
      2: return !rf[4];
      default: return rf[4];
    endcase
  endfunction
  function automatic void push16(logic [15:0] v);
    rsp -= 2; rmem[rsp + 16'd1] = v[15:8]; rmem[rsp] = v[7:0];
  endfunction
  function automatic logic [15:0] pop16();
    logic [15:0] v = {rmem[rsp + 16'd1], rmem[rsp]}; rsp += 2; return v;
  endfunction

  function automatic bit ref_exec();
    logic [7:0] op = fetch8(), v, n8;
    logic [15:0] w;
    int x = op[7:6], y = op[5:3], z = op[2:0], p = op[5:4];
    int r;
    bit c;
    if (op == 8'h76) return 1;
    case (x)
      1: set8(y, get8(z));
      2: alu(y, get8(z));
      0: case (z)
        1: if (!op[3]) begin n8 = fetch8(); set16(p, {fetch8(), n8}); end
           else begin
             r = hl() + get16(p);
             rf = {rf[7], 1'b0, (hl() & 16'h0fff) + (get16(p) & 16'h0fff) > 16'h0fff, r > 65535, 4'h0};
             set16(2, 16'(r));
           end
        2: if (!op[5]) begin   // LD (BC)/(DE),A and LD A,(BC)/(DE)
             w = get16(p);
             if (!op[3]) rmem[w] = ra; else ra = rmem[w];
           end else begin        // LD (HL+/-),A and LD A,(HL+/-)
             if (!op[3]) rmem[hl()] = ra; else ra = rmem[hl()];
             set16(2, op[4] ? hl() - 16'd1 : hl() + 16'd1);
           end
        0: if (op == 8'h18 || op[5]) begin   // JR e, JR cc,e
             n8 = fetch8();
             if (op == 8'h18 || cond(op[4:3])) rpc = rpc + {{8{n8[7]}}, n8};
           end
        3: set16(p, op[3] ? get16(p) - 16'd1 : get16(p) + 16'd1);
        4: begin v = get8(y) + 8'd1; set8(y, v); rf = {v == 0, 1'b0, v[3:0] == 4'h0, rf[4], 4'h0}; end
        5: begin v = get8(y) - 8'd1; set8(y, v); rf = {v == 0, 1'b1, v[3:0] == 4'hf, rf[4], 4'h0}; end
        6: set8(y, fetch8());
        7: case (y)
             0: begin c = ra[7]; ra = {ra[6:0], c}; flags(0, 0, 0, c); end
             1: begin c = ra[0]; ra = {c, ra[7:1]}; flags(0, 0, 0, c); end
             2: begin c = ra[7]; ra = {ra[6:0], rf[4]}; flags(0, 0, 0, c); end
             3: begin c = ra[0]; ra = {rf[4], ra[7:1]}; flags(0, 0, 0, c); end
             4: begin    // DAA
                  c = rf[4];
                  if (!rf[6]) begin
                    if (c || ra > 8'h99) begin ra += 8'h60; c = 1; end
                    if (rf[5] || ra[3:0] > 4'h9) ra += 8'h06;
                  end else begin
                    if (c) ra -= 8'h60;
                    if (rf[5]) ra -= 8'h06;
                  end
                  rf = {ra == 0, rf[6], 1'b0, c, 4'h0};
                end
             5: begin ra = ~ra; rf = {rf[7], 1'b1, 1'b1, rf[4], 4'h0}; end
             6: rf = {rf[7], 1'b0, 1'b0, 1'b1, 4'h0};
             default: rf = {rf[7], 1'b0, 1'b0, !rf[4], 4'h0};
           endcase
        default: ;
      endcase
      default: begin   // x == 3
        if (op == 8'hCB) begin
          n8 = fetch8();
          v = get8(n8[2:0]);
          case (n8[7:6])
            0: begin
                 case (n8[5:3])
                   0: begin c = v[7]; v = {v[6:0], v[7]}; end
                   1: begin c = v[0]; v = {v[0], v[7:1]}; end
                   2: begin c = v[7]; v = {v[6:0], rf[4]}; end
                   3: begin c = v[0]; v = {rf[4], v[7:1]}; end
                   4: begin c = v[7]; v = {v[6:0], 1'b0}; end
                   5: begin c = v[0]; v = {v[7], v[7:1]}; end
                   6: begin c = 0; v = {v[3:0], v[7:4]}; end
                   default: begin c = v[0]; v = {1'b0, v[7:1]}; end
                 endcase
                 flags(v == 0, 0, 0, c);
                 set8(n8[2:0], v);
               end
            1: rf = {!v[n8[5:3]], 1'b0, 1'b1, rf[4], 4'h0};
            2: begin v[n8[5:3]] = 1'b0; set8(n8[2:0], v); end
            default: begin v[n8[5:3]] = 1'b1; set8(n8[2:0], v); end
          endcase
        end else if (z == 6) alu(y, fetch8());
        else if (z == 5 && !op[3]) push16(p == 3 ? {ra, rf} : get16(p));
        else if (z == 1 && !op[3]) begin
          w = pop16();
          if (p == 3) begin ra = w[15:8]; rf = {w[7:4], 4'h0}; end else set16(p, w);
        end else if (op == 8'hC3 || (z == 2 && y < 4)) begin   // JP nn, JP cc,nn
          n8 = fetch8(); w = {fetch8(), n8};
          if (op == 8'hC3 || cond(op[4:3])) rpc = w;
        end else if (op == 8'hCD || (z == 4 && y < 4)) begin   // CALL nn, CALL cc,nn
          n8 = fetch8(); w = {fetch8(), n8};
          if (op == 8'hCD || cond(op[4:3])) begin push16(rpc); rpc = w; end
        end else if (op == 8'hC9 || op == 8'hD9 || (z == 0 && y < 4)) begin   // RET, RETI, RET cc
          if (op[0] || cond(op[4:3])) rpc = pop16();
        end else if (op == 8'hEA || op == 8'hFA) begin
          n8 = fetch8(); w = {fetch8(), n8};
          if (op[4]) ra = rmem[w]; else rmem[w] = ra;
        end else if (op == 8'hE8) begin
          n8 = fetch8();
          flags(0, 0, (rsp[3:0] + n8[3:0]) > 15, (rsp[7:0] + n8) > 255);
          rsp = rsp + {{8{n8[7]}}, n8};
        end else if (op == 8'hF8) begin
          n8 = fetch8();
          w = rsp + {{8{n8[7]}}, n8};
          flags(0, 0, (rsp[3:0] + n8[3:0]) > 15, (rsp[7:0] + n8) > 255);
          set16(2, w);
        end
      end
    endcase
    // LD (nn),SP is opcode 0x08 (x=0, z=0): handled here
    if (op == 8'h08) begin
      n8 = fetch8(); w = {fetch8(), n8};
      rmem[w] = rsp[7:0]; rmem[w + 16'd1] = rsp[15:8];
    end
    return 0;
  endfunction

  initial begin
    int bad, steps;
    for (int prog = 0; prog < PROGRAMS; prog++) begin
      gen_program();
      // reference run
      ra = 0; rf = 0; rsp = 0; rpc = 0;
      for (int i = 0; i < 8; i++) rr[i] = 0;
      steps = 0;
      while (!ref_exec() && steps < 10000) steps++;
      // design run
      rst = 1'b1;
      repeat (3) @(negedge clk);
      rst = 1'b0;
      fork
        begin wait (halted); end
        begin repeat (200000) @(negedge clk); end
      join_any
      disable fork;
      repeat (8) @(negedge clk);
      bad = 0;
      for (int i = 0; i < 16'hFF80; i++)
        if (mem[i] !== rmem[i]) begin
          bad++;
          if (bad <= 4) $display("  program %0d: mem[%04h] = %02h, reference %02h", prog, i, mem[i], rmem[i]);
        end
      checks++;
      if (!halted || bad != 0) begin
        failures++;
        $display("FAIL program %0d: %0d bytes differ, halted=%0d", prog, bad, halted);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
