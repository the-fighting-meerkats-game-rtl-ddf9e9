// tb_gb_alu: checks the ALU against an arithmetic reference written here.
// Random operands for the 8 ALU-group operations and INC/DEC (result and all four
// flags); DAA on every pair of BCD numbers 00..99 for addition and subtraction, where
// the adjusted result must be the decimal sum/difference and C the decimal carry;
// the 0x19 + 0x19 -> 0x38 example; rotate Z-flag rules; BIT/SET/RES.
module tb_gb_alu;
  import gb_pkg::*;
  alu_op_e    op;
  logic [7:0] a, b, y;
  logic [3:0] fi, fo;
  int checks = 0, failures = 0;

  gb_alu dut (.op(op), .data1(a), .data0(b), .flags_in(fi), .data_out(y), .flags_out(fo));

  task automatic chk(input string what, input logic [11:0] got, input logic [11:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (op %0d a %h b %h f %h)", what, got, exp, op, a, b, fi);
    end
  endtask

  function automatic logic [11:0] ref_arith(input int o, input int x, input int z, input logic [3:0] f);
    int c, r, h;
    logic zf, nf, hf, cf;
    c = f[0];
    case (o)
      0, 1: begin
        if (o == 0) c = 0;
        r = x + z + c; h = (x % 16) + (z % 16) + c;
        zf = (r % 256) == 0; nf = 0; hf = h > 15; cf = r > 255;
      end
      2, 3, 7: begin
        if (o != 3) c = 0;
        r = x - z - c; h = (x % 16) - (z % 16) - c;
        zf = ((r + 256) % 256) == 0; nf = 1; hf = h < 0; cf = r < 0;
        if (o == 7) r = x;
      end
      4: begin r = x & z; zf = r == 0; nf = 0; hf = 1; cf = 0; end
      5: begin r = x ^ z; zf = r == 0; nf = 0; hf = 0; cf = 0; end
      6: begin r = x | z; zf = r == 0; nf = 0; hf = 0; cf = 0; end
      16: begin r = x + 1; zf = (r % 256) == 0; nf = 0; hf = (x % 16) == 15; cf = f[0]; end
      default: begin r = x - 1; zf = x == 1; nf = 1; hf = (x % 16) == 0; cf = f[0]; end
    endcase
    return {8'((r + 512) % 256), zf, nf, hf, cf};
  endfunction

  function automatic logic [7:0] bcd(input int v);
    return 8'(((v / 10) % 10) * 16 + (v % 10));
  endfunction

  initial begin
    int ops[10] = '{0, 1, 2, 3, 4, 5, 6, 7, 16, 17};
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(ops[i % 10]);
      a = 8'($urandom); b = 8'($urandom); fi = 4'($urandom);
      #1;
      chk("arith", {y, fo}, ref_arith(ops[i % 10], a, b, fi));
    end
    // DAA after addition and subtraction of BCD numbers
    for (int p = 0; p < 100; p += 3) begin
      for (int q = 0; q < 100; q += 1) begin
        logic [7:0] s;
        logic [3:0] sf;
        op = ALU_ADD; a = bcd(p); b = bcd(q); fi = 4'h0; #1;
        s = y; sf = fo;
        op = ALU_DAA; a = s; fi = sf; #1;
        chk("DAA add", {y, 3'b000, fo[F_C]}, {bcd(p + q), 3'b000, 1'((p + q) >= 100)});
        op = ALU_SUB; a = bcd(p); b = bcd(q); fi = 4'h0; #1;
        s = y; sf = fo;
        op = ALU_DAA; a = s; fi = sf; #1;
        chk("DAA sub", {y, 3'b000, fo[F_C]}, {bcd((p - q + 100) % 100), 3'b000, 1'(p < q)});
      end
    end
    op = ALU_ADD; a = 8'h19; b = 8'h19; fi = 4'h0; #1;
    chk("0x19+0x19", {4'h0, y}, 12'h032);
    op = ALU_DAA; a = y; fi = fo; #1;
    chk("DAA -> 0x38", {4'h0, y}, 12'h038);
    // rotates: RLCA clears Z, RLC sets it from a zero result
    op = ALU_RLCA; a = 8'h80; fi = 4'h0; #1; chk("RLCA", {y, fo}, {8'h01, 4'b0001});
    op = ALU_RLC;  a = 8'h00; fi = 4'h0; #1; chk("RLC 0", {y, fo}, {8'h00, 4'b1000});
    op = ALU_RLA;  a = 8'h00; fi = 4'h1; #1; chk("RLA", {y, fo}, {8'h01, 4'b0000});
    op = ALU_RR;   a = 8'h01; fi = 4'h0; #1; chk("RR", {y, fo}, {8'h00, 4'b1001});
    op = ALU_SRA;  a = 8'h81; fi = 4'h0; #1; chk("SRA", {y, fo}, {8'hC0, 4'b0001});
    op = ALU_SWAP; a = 8'hA5; fi = 4'hF; #1; chk("SWAP", {y, fo}, {8'h5A, 4'b0000});
    op = ALU_BIT;  a = 8'h10; b = {2'b0, 3'd4, 3'b0}; fi = 4'h1; #1; chk("BIT 4 set", {4'h0, fo, 4'h0}, {4'h0, 4'b0011, 4'h0});
    op = ALU_BIT;  a = 8'h10; b = {2'b0, 3'd3, 3'b0}; fi = 4'h0; #1; chk("BIT 3 clr", {4'h0, fo, 4'h0}, {4'h0, 4'b1010, 4'h0});
    op = ALU_SET;  a = 8'h00; b = {2'b0, 3'd7, 3'b0}; #1; chk("SET 7", {4'h0, y}, 12'h080);
    op = ALU_RES;  a = 8'hFF; b = {2'b0, 3'd0, 3'b0}; #1; chk("RES 0", {4'h0, y}, 12'h0FE);
    op = ALU_CPL;  a = 8'h0F; fi = 4'h0; #1; chk("CPL", {y, fo}, {8'hF0, 4'b0110});
    op = ALU_CCF;  fi = 4'b1001; #1; chk("CCF", {4'h0, fo, 4'h0}, {4'h0, 4'b1000, 4'h0});
    op = ALU_SCF;  fi = 4'b0110; #1; chk("SCF", {4'h0, fo, 4'h0}, {4'h0, 4'b0001, 4'h0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
