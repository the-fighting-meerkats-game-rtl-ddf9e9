// gb_cpu: multi-cycle, microcoded, non-pipelined Game Boy CPU (8-bit Z80/8080 hybrid).
//
// How it works. Every instruction is a sequence of machine cycles of four clock
// cycles (T cycles) each, and the number of machine cycles per instruction is the
// documented one, so the instruction timing (4..24 T cycles, fewer for a conditional
// that is not taken) is exact. A 2-bit T counter and a machine-cycle counter `m`
// index the microcode: one case statement on the instruction, and inside it on `m`.
// The microcode decides, from the state alone, the bus address, read or write, and
// the data to write; read data is captured into the data buffer at T2, and all
// register updates happen at the end of T3. As in the original part, the last machine
// cycle of every instruction is the fetch of the next opcode; interrupts are checked
// at that point (IF and IE, "cycle 0"). A pending, enabled interrupt discards the
// fetched opcode and runs a 5-machine-cycle dispatch that pushes PC and jumps to the
// vector. EI takes effect after the following instruction; HALT waits (consuming
// machine cycles) until any enabled interrupt is flagged.
//
// Datapath (after the block diagram): accumulator A and flags F, register file
// (B..L, SP, PC), ALU, temporaries Z/W (temp0/temp1), instruction register, the
// IF/IE interrupt block and the private high memory (0xFF80-0xFFFE). Accesses to high
// memory, IF (0xFF0F) and IE (0xFFFF) never appear on the external bus.
//
// Interface and timing. External bus: asynchronous read, single-cycle write. `addr`
// and `rd` are held for the whole machine cycle and read data must be valid by T2;
// `wr` is a one-clock pulse in T3 with `dout` valid. While `mem_disable` is high (DMA
// in progress) the CPU drives no external strobes and reads 0xFF from the bus.
// `stall` freezes the CPU completely (used by the breakpoint unit). `fetch_done`
// pulses at the end of every opcode fetch, with `fetch_pc` the opcode's address.
// 16-bit arithmetic (ADD HL,rr, ADD SP,e, INC/DEC rr) is done beside the ALU rather
// than in two ALU passes; illegal opcodes execute as 4-cycle no-operations and STOP
// as a 4-cycle NOP. These are this design's choices.
module gb_cpu
  import gb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  output logic [15:0] addr,
  output logic [7:0]  dout,
  input  logic [7:0]  din,
  output logic        rd,
  output logic        wr,
  input  logic        mem_disable,
  input  logic [4:0]  irq,
  output logic [15:0] fetch_pc,
  output logic        fetch_done,
  output logic        halted
);

  // ---------------- state ----------------
  logic [1:0] t;
  logic [2:0] m;
  logic [7:0] ir, a, zr, wreg, mdr;
  logic [3:0] fl;
  logic       ime, ei_pend, halt, intr;
  regs_t      rf;
  logic       ce;

  assign ce = !stall;

  // ---------------- microcode outputs ----------------
  logic [15:0] bus_addr;
  logic        bus_rd, bus_wr, last;
  logic [7:0]  bus_wd;
  logic [7:0]  a_n, z_n, w_n, ir_n;
  logic [3:0]  fl_n;
  logic        ime_n, ei_n, halt_n, intr_n, ack;
  logic        w8_en, w16_en, sp_en, pc_en;
  logic [2:0]  w8_sel;
  logic [1:0]  w16_sel;
  logic [7:0]  w8_d;
  logic [15:0] w16_d, sp_d, pc_d, fa;
  alu_op_e     alu_op;
  logic [7:0]  alu_a, alu_b, alu_y;
  logic [3:0]  alu_f;

  // ---------------- internal memories ----------------
  logic        is_hram, is_if, is_ie, is_int;
  logic [7:0]  hram_q, if_q, ie_q;
  logic        int_pend;
  logic [15:0] int_vec;
  logic        at_t3;

  assign at_t3   = ce && (t == 2'd3);
  assign is_hram = (bus_addr >= 16'hff80) && (bus_addr != 16'hffff);
  assign is_if   = (bus_addr == 16'hff0f);
  assign is_ie   = (bus_addr == 16'hffff);
  assign is_int  = is_hram | is_if | is_ie;

  gb_hram u_hram (
    .clk(clk), .we(at_t3 && bus_wr && is_hram), .addr(bus_addr[6:0]),
    .wdata(bus_wd), .rdata(hram_q)
  );

  gb_interrupts u_int (
    .clk(clk), .rst(rst), .irq(irq),
    .if_we(at_t3 && bus_wr && is_if), .ie_we(at_t3 && bus_wr && is_ie),
    .wdata(bus_wd), .ack(at_t3 && ack), .if_q(if_q), .ie_q(ie_q),
    .pending(int_pend), .vector(int_vec)
  );

  gb_regfile u_rf (
    .clk(clk), .rst(rst), .ce(at_t3),
    .w8_en(w8_en), .w8_sel(w8_sel), .w8_d(w8_d),
    .w16_en(w16_en), .w16_sel(w16_sel), .w16_d(w16_d),
    .sp_en(sp_en), .sp_d(sp_d), .pc_en(pc_en), .pc_d(pc_d),
    .regs(rf)
  );

  gb_alu u_alu (
    .op(alu_op), .data1(alu_a), .data0(alu_b), .flags_in(fl),
    .data_out(alu_y), .flags_out(alu_f)
  );

  // External bus
  assign addr = bus_addr;
  assign dout = bus_wd;
  assign rd   = ce && bus_rd && !is_int && !mem_disable;
  assign wr   = at_t3 && bus_wr && !is_int && !mem_disable;
  assign halted = halt;
  assign fetch_pc   = fa;
  assign fetch_done = at_t3 && last;

  // ---------------- instruction fields ----------------
  logic [1:0] x, p, cbx;
  logic [2:0] y, z, cby, cbz;
  logic       q;
  logic [7:0] rv [8];
  logic [15:0] rr_p, pc1, hl_inc, hl_dec, zw, rel, spe;
  logic        cc_ok;
  logic [16:0] add16;

  assign x = ir[7:6]; assign y = ir[5:3]; assign z = ir[2:0];
  assign p = ir[5:4]; assign q = ir[3];
  assign cbx = zr[7:6]; assign cby = zr[5:3]; assign cbz = zr[2:0];

  always_comb begin
    rv[0] = rf.bc[15:8]; rv[1] = rf.bc[7:0];
    rv[2] = rf.de[15:8]; rv[3] = rf.de[7:0];
    rv[4] = rf.hl[15:8]; rv[5] = rf.hl[7:0];
    rv[6] = mdr;         rv[7] = a;
  end

  always_comb begin
    unique case (p)
      2'd0: rr_p = rf.bc;
      2'd1: rr_p = rf.de;
      2'd2: rr_p = rf.hl;
      default: rr_p = rf.sp;
    endcase
    unique case (y[1:0])
      2'd0: cc_ok = !fl[F_Z];
      2'd1: cc_ok =  fl[F_Z];
      2'd2: cc_ok = !fl[F_C];
      default: cc_ok = fl[F_C];
    endcase
  end

  assign pc1    = rf.pc + 16'd1;
  assign hl_inc = rf.hl + 16'd1;
  assign hl_dec = rf.hl - 16'd1;
  assign zw     = {wreg, zr};
  assign rel    = rf.pc + {{8{zr[7]}}, zr};
  assign spe    = rf.sp + {{8{zr[7]}}, zr};
  assign add16  = {1'b0, rf.hl} + {1'b0, rr_p};

  // ---------------- microcode ----------------
  always_comb begin
    bus_addr = rf.pc; bus_rd = 1'b0; bus_wr = 1'b0; bus_wd = 8'h00;
    last = 1'b0; fa = rf.pc;
    a_n = a; fl_n = fl; z_n = zr; w_n = wreg; ir_n = ir;
    ime_n = ime; ei_n = ei_pend; halt_n = halt; intr_n = intr; ack = 1'b0;
    w8_en = 1'b0; w8_sel = 3'd0; w8_d = 8'h00;
    w16_en = 1'b0; w16_sel = 2'd0; w16_d = 16'h0000;
    sp_en = 1'b0; sp_d = rf.sp; pc_en = 1'b0; pc_d = rf.pc;
    alu_op = ALU_ADD; alu_a = a; alu_b = 8'h00;

    if (halt) begin
      bus_addr = rf.pc;
      if (int_pend) begin halt_n = 1'b0; last = 1'b1; end
    end else if (intr) begin
      unique case (m)
        3'd0: ;
        3'd1: begin sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
        3'd2: begin bus_addr = rf.sp; bus_wr = 1'b1; bus_wd = rf.pc[15:8];
                    sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
        3'd3: begin bus_addr = rf.sp; bus_wr = 1'b1; bus_wd = rf.pc[7:0];
                    pc_en = 1'b1; pc_d = int_vec; ack = 1'b1; ime_n = 1'b0; end
        default: begin last = 1'b1; intr_n = 1'b0; end
      endcase
    end else begin
      unique case (x)
        // ------------------------------------------------------------ x = 0
        2'd0: unique case (z)
          3'd0: begin
            if (y == 3'd1) begin                         // LD (nn),SP
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; w_n = mdr; end
                3'd2: begin bus_addr = zw; bus_wr = 1'b1; bus_wd = rf.sp[7:0]; end
                3'd3: begin bus_addr = zw + 16'd1; bus_wr = 1'b1; bus_wd = rf.sp[15:8]; end
                default: last = 1'b1;
              endcase
            end else if (y >= 3'd3) begin                // JR e / JR cc,e
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: if (y != 3'd3 && !cc_ok) last = 1'b1;
                      else begin pc_en = 1'b1; pc_d = rel; end
                default: last = 1'b1;
              endcase
            end else last = 1'b1;                        // NOP, STOP
          end
          3'd1: begin
            if (!q) begin                                // LD rr,nn
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; w_n = mdr; end
                default: begin last = 1'b1; w16_en = 1'b1; w16_sel = p; w16_d = zw; end
              endcase
            end else begin                               // ADD HL,rr
              if (m == 3'd0) begin
                w16_en = 1'b1; w16_sel = 2'd2; w16_d = add16[15:0];
                fl_n = {fl[F_Z], 1'b0,
                        ({1'b0, rf.hl[11:0]} + {1'b0, rr_p[11:0]}) > 13'h0fff, add16[16]};
              end else last = 1'b1;
            end
          end
          3'd2: begin                                    // LD (rr),A / LD A,(rr)
            if (m == 3'd0) begin
              unique case (p)
                2'd0: bus_addr = rf.bc;
                2'd1: bus_addr = rf.de;
                default: bus_addr = rf.hl;
              endcase
              if (p == 2'd2) begin w16_en = 1'b1; w16_sel = 2'd2; w16_d = hl_inc; end
              if (p == 2'd3) begin w16_en = 1'b1; w16_sel = 2'd2; w16_d = hl_dec; end
              if (!q) begin bus_wr = 1'b1; bus_wd = a; end
              else begin bus_rd = 1'b1; a_n = mdr; end
            end else last = 1'b1;
          end
          3'd3: begin                                    // INC rr / DEC rr
            if (m == 3'd0) begin
              if (p == 2'd3) begin sp_en = 1'b1; sp_d = q ? rf.sp - 16'd1 : rf.sp + 16'd1; end
              else begin w16_en = 1'b1; w16_sel = p; w16_d = q ? rr_p - 16'd1 : rr_p + 16'd1; end
            end else last = 1'b1;
          end
          3'd4, 3'd5: begin                              // INC r / DEC r
            alu_op = z[0] ? ALU_DEC : ALU_INC;
            if (y != 3'd6) begin
              last = 1'b1; alu_a = rv[y]; fl_n = alu_f;
              if (y == 3'd7) a_n = alu_y; else begin w8_en = 1'b1; w8_sel = y; w8_d = alu_y; end
            end else begin
              unique case (m)
                3'd0: begin bus_addr = rf.hl; bus_rd = 1'b1; z_n = mdr; end
                3'd1: begin bus_addr = rf.hl; bus_wr = 1'b1; alu_a = zr; bus_wd = alu_y; fl_n = alu_f; end
                default: last = 1'b1;
              endcase
            end
          end
          3'd6: begin                                    // LD r,n / LD (HL),n
            unique case (m)
              3'd0: begin
                bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr;
                if (y == 3'd7) a_n = mdr;
                else if (y != 3'd6) begin w8_en = 1'b1; w8_sel = y; w8_d = mdr; end
              end
              3'd1: if (y == 3'd6) begin bus_addr = rf.hl; bus_wr = 1'b1; bus_wd = zr; end
                    else last = 1'b1;
              default: last = 1'b1;
            endcase
          end
          default: begin                                 // RLCA..CCF
            last = 1'b1; alu_op = alu_op_e'(5'd18 + {2'd0, y}); alu_a = a;
            a_n = alu_y; fl_n = alu_f;
          end
        endcase
        // ------------------------------------------------------------ x = 1
        2'd1: begin
          if (y == 3'd6 && z == 3'd6) begin              // HALT
            halt_n = 1'b1;
            if (ei_pend) begin ime_n = 1'b1; ei_n = 1'b0; end   // EI; HALT
          end else if (z == 3'd6) begin                  // LD r,(HL)
            if (m == 3'd0) begin
              bus_addr = rf.hl; bus_rd = 1'b1;
              if (y == 3'd7) a_n = mdr; else begin w8_en = 1'b1; w8_sel = y; w8_d = mdr; end
            end else last = 1'b1;
          end else if (y == 3'd6) begin                  // LD (HL),r
            if (m == 3'd0) begin bus_addr = rf.hl; bus_wr = 1'b1; bus_wd = rv[z]; end
            else last = 1'b1;
          end else begin                                 // LD r,r'
            last = 1'b1;
            if (y == 3'd7) a_n = rv[z]; else begin w8_en = 1'b1; w8_sel = y; w8_d = rv[z]; end
          end
        end
        // ------------------------------------------------------------ x = 2
        2'd2: begin                                      // ALU A,r / ALU A,(HL)
          alu_op = alu_op_e'({2'd0, y}); alu_a = a; alu_b = rv[z];
          if (z != 3'd6) begin last = 1'b1; a_n = alu_y; fl_n = alu_f; end
          else if (m == 3'd0) begin bus_addr = rf.hl; bus_rd = 1'b1; a_n = alu_y; fl_n = alu_f; end
          else last = 1'b1;
        end
        // ------------------------------------------------------------ x = 3
        default: unique case (z)
          3'd0: begin
            if (y < 3'd4) begin                          // RET cc
              unique case (m)
                3'd0: ;
                3'd1: if (!cc_ok) last = 1'b1;
                      else begin bus_addr = rf.sp; bus_rd = 1'b1; sp_en = 1'b1; sp_d = rf.sp + 16'd1;
                                 z_n = mdr; end
                3'd2: begin bus_addr = rf.sp; bus_rd = 1'b1; sp_en = 1'b1; sp_d = rf.sp + 16'd1;
                            w_n = mdr; end
                3'd3: begin pc_en = 1'b1; pc_d = zw; end
                default: last = 1'b1;
              endcase
            end else if (y == 3'd4 || y == 3'd6) begin   // LDH (n),A / LDH A,(n)
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin
                  bus_addr = {8'hff, zr};
                  if (y == 3'd4) begin bus_wr = 1'b1; bus_wd = a; end
                  else begin bus_rd = 1'b1; a_n = mdr; end
                end
                default: last = 1'b1;
              endcase
            end else begin                               // ADD SP,e / LD HL,SP+e
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin
                  fl_n = {1'b0, 1'b0, ({1'b0, rf.sp[3:0]} + {1'b0, zr[3:0]}) > 5'h0f,
                          ({1'b0, rf.sp[7:0]} + {1'b0, zr}) > 9'h0ff};
                  if (y == 3'd7) begin w16_en = 1'b1; w16_sel = 2'd2; w16_d = spe; end
                  else begin sp_en = 1'b1; sp_d = spe; end
                end
                3'd2: if (y == 3'd7) last = 1'b1;
                default: last = 1'b1;
              endcase
            end
          end
          3'd1: begin
            if (!q || p < 2'd2) begin                    // POP rr / RET / RETI
              unique case (m)
                3'd0: begin bus_addr = rf.sp; bus_rd = 1'b1; sp_en = 1'b1; sp_d = rf.sp + 16'd1; z_n = mdr; end
                3'd1: begin bus_addr = rf.sp; bus_rd = 1'b1; sp_en = 1'b1; sp_d = rf.sp + 16'd1; w_n = mdr; end
                3'd2: begin
                  if (!q) begin
                    last = 1'b1;
                    if (p == 2'd3) begin a_n = wreg; fl_n = zr[7:4]; end
                    else begin w16_en = 1'b1; w16_sel = p; w16_d = zw; end
                  end else begin
                    pc_en = 1'b1; pc_d = zw;
                    if (p == 2'd1) ime_n = 1'b1;
                  end
                end
                default: last = 1'b1;
              endcase
            end else if (p == 2'd2) begin                // JP HL
              last = 1'b1; fa = rf.hl;
            end else begin                               // LD SP,HL
              if (m == 3'd0) begin sp_en = 1'b1; sp_d = rf.hl; end
              else last = 1'b1;
            end
          end
          3'd2: begin
            if (y < 3'd4) begin                          // JP cc,nn
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; w_n = mdr; end
                3'd2: if (!cc_ok) last = 1'b1; else begin pc_en = 1'b1; pc_d = zw; end
                default: last = 1'b1;
              endcase
            end else if (y == 3'd4 || y == 3'd6) begin   // LD (C),A / LD A,(C)
              if (m == 3'd0) begin
                bus_addr = {8'hff, rf.bc[7:0]};
                if (y == 3'd4) begin bus_wr = 1'b1; bus_wd = a; end
                else begin bus_rd = 1'b1; a_n = mdr; end
              end else last = 1'b1;
            end else begin                               // LD (nn),A / LD A,(nn)
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; w_n = mdr; end
                3'd2: begin
                  bus_addr = zw;
                  if (y == 3'd5) begin bus_wr = 1'b1; bus_wd = a; end
                  else begin bus_rd = 1'b1; a_n = mdr; end
                end
                default: last = 1'b1;
              endcase
            end
          end
          3'd3: begin
            unique case (y)
              3'd0: unique case (m)                      // JP nn
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; w_n = mdr; end
                3'd2: begin pc_en = 1'b1; pc_d = zw; end
                default: last = 1'b1;
              endcase
              3'd1: begin                                // CB prefix
                alu_op = (cbx == 2'd0) ? alu_op_e'({2'b01, cby}) : alu_op_e'(5'd25 + {3'd0, cbx});
                alu_b = {2'b00, cby, 3'b000};
                if (m == 3'd0) begin
                  bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr;
                end else if (cbz != 3'd6) begin
                  last = 1'b1; alu_a = rv[cbz]; fl_n = alu_f;
                  if (cbx != 2'd1) begin
                    if (cbz == 3'd7) a_n = alu_y;
                    else begin w8_en = 1'b1; w8_sel = cbz; w8_d = alu_y; end
                  end
                end else begin
                  alu_a = wreg;
                  unique case (m)
                    3'd1: begin bus_addr = rf.hl; bus_rd = 1'b1; w_n = mdr; end
                    3'd2: if (cbx == 2'd1) begin last = 1'b1; fl_n = alu_f; end
                          else begin bus_addr = rf.hl; bus_wr = 1'b1; bus_wd = alu_y; fl_n = alu_f; end
                    default: last = 1'b1;
                  endcase
                end
              end
              3'd6: begin last = 1'b1; ime_n = 1'b0; ei_n = 1'b0; end   // DI
              3'd7: begin last = 1'b1; ei_n = 1'b1; end                 // EI
              default: last = 1'b1;                                     // illegal
            endcase
          end
          3'd4, 3'd5: begin
            if (z == 3'd5 && !q) begin                   // PUSH rr
              unique case (m)
                3'd0: begin sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
                3'd1: begin
                  bus_addr = rf.sp; bus_wr = 1'b1; sp_en = 1'b1; sp_d = rf.sp - 16'd1;
                  unique case (p)
                    2'd0: bus_wd = rf.bc[15:8];
                    2'd1: bus_wd = rf.de[15:8];
                    2'd2: bus_wd = rf.hl[15:8];
                    default: bus_wd = a;
                  endcase
                end
                3'd2: begin
                  bus_addr = rf.sp; bus_wr = 1'b1;
                  unique case (p)
                    2'd0: bus_wd = rf.bc[7:0];
                    2'd1: bus_wd = rf.de[7:0];
                    2'd2: bus_wd = rf.hl[7:0];
                    default: bus_wd = {fl, 4'h0};
                  endcase
                end
                default: last = 1'b1;
              endcase
            end else if ((z == 3'd4 && y < 3'd4) || (z == 3'd5 && y == 3'd1)) begin  // CALL
              unique case (m)
                3'd0: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; z_n = mdr; end
                3'd1: begin bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; w_n = mdr; end
                3'd2: if (z == 3'd4 && !cc_ok) last = 1'b1;
                      else begin sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
                3'd3: begin bus_addr = rf.sp; bus_wr = 1'b1; bus_wd = rf.pc[15:8];
                            sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
                3'd4: begin bus_addr = rf.sp; bus_wr = 1'b1; bus_wd = rf.pc[7:0];
                            pc_en = 1'b1; pc_d = zw; end
                default: last = 1'b1;
              endcase
            end else last = 1'b1;                        // illegal
          end
          3'd6: begin                                    // ALU A,n
            alu_op = alu_op_e'({2'd0, y}); alu_a = a; alu_b = mdr;
            if (m == 3'd0) begin
              bus_rd = 1'b1; pc_en = 1'b1; pc_d = pc1; a_n = alu_y; fl_n = alu_f;
            end else last = 1'b1;
          end
          default: begin                                 // RST
            unique case (m)
              3'd0: begin sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
              3'd1: begin bus_addr = rf.sp; bus_wr = 1'b1; bus_wd = rf.pc[15:8];
                          sp_en = 1'b1; sp_d = rf.sp - 16'd1; end
              3'd2: begin bus_addr = rf.sp; bus_wr = 1'b1; bus_wd = rf.pc[7:0];
                          pc_en = 1'b1; pc_d = {10'd0, y, 3'd0}; end
              default: last = 1'b1;
            endcase
          end
        endcase
      endcase
    end

    // Opcode fetch closes every instruction; interrupts are checked here.
    if (last) begin
      bus_addr = fa; bus_rd = 1'b1; bus_wr = 1'b0;
      ir_n = mdr;
      pc_en = 1'b1; pc_d = fa + 16'd1;
      if (ime && int_pend) begin
        intr_n = 1'b1; pc_d = fa;
      end
      if (ei_pend) begin
        if (ei_n) ime_n = 1'b1;
        ei_n = 1'b0;
      end
    end
  end

  // ---------------- sequencing ----------------
  logic [7:0] rdata;
  always_comb begin
    if (is_hram)     rdata = hram_q;
    else if (is_if)  rdata = if_q;
    else if (is_ie)  rdata = ie_q;
    else if (mem_disable) rdata = 8'hff;
    else             rdata = din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t <= 2'd0; m <= 3'd0;
      ir <= 8'h00; a <= 8'h00; fl <= 4'h0; zr <= 8'h00; wreg <= 8'h00; mdr <= 8'h00;
      ime <= 1'b0; ei_pend <= 1'b0; halt <= 1'b0; intr <= 1'b0;
    end else if (ce) begin
      t <= t + 2'd1;
      if (t == 2'd2) mdr <= rdata;
      if (t == 2'd3) begin
        a <= a_n; fl <= fl_n; zr <= z_n; wreg <= w_n; ir <= ir_n;
        ime <= ime_n; ei_pend <= ei_n; halt <= halt_n; intr <= intr_n;
        if (last || halt_n) m <= 3'd0;
        else m <= m + 3'd1;
      end
    end
  end

endmodule
