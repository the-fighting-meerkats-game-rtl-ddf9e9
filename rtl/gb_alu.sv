// gb_alu: the CPU's 8-bit arithmetic and logic unit.
// Purely combinational. It takes an opcode, two operands and the current flags and
// returns a result and new flags (Z, N, H, C). Operand `data1` is the accumulator or
// the register being operated on; `data0` is the second operand, and for BIT/RES/SET
// it carries the bit number in bits 5:3 (as the instruction's bits 5:3 are placed on
// the ALU input in the datapath). Each instruction sets the flags its own way: RLCA
// and friends clear Z, while the CB rotates set Z from the result.
// DAA follows the two-step adjustment: after an addition add 6 when H is set or the
// low digit is above 9, then add 0x60 when C is set or the intermediate is above 0x9F;
// after a subtraction subtract 6 on H and 0x60 on C. C is set if the second step
// carries and otherwise kept; H is cleared.
// The opcode set (29 operations) is this design's own split of the instruction set.
module gb_alu
  import gb_pkg::*;
(
  input  alu_op_e     op,
  input  logic [7:0]  data1,
  input  logic [7:0]  data0,
  input  logic [3:0]  flags_in,
  output logic [7:0]  data_out,
  output logic [3:0]  flags_out
);

  logic [8:0] r9, i1, i2;
  logic [4:0] r5;  // only the carry out of bit 3 is used
  logic       cin;
  logic [2:0] bitn;
  logic [7:0] mask;

  assign cin  = flags_in[F_C];
  assign bitn = data0[5:3];
  assign mask = 8'd1 << bitn;

  always_comb begin
    data_out  = data1;
    flags_out = flags_in;
    r9 = '0;
    r5 = '0;
    i1 = '0;
    i2 = '0;
    unique case (op)
      ALU_ADD, ALU_ADC: begin
        r9 = {1'b0, data1} + {1'b0, data0} + {8'd0, (op == ALU_ADC) & cin};
        r5 = {1'b0, data1[3:0]} + {1'b0, data0[3:0]} + {4'd0, (op == ALU_ADC) & cin};
        data_out  = r9[7:0];
        flags_out = {r9[7:0] == 8'd0, 1'b0, r5[4], r9[8]};
      end
      ALU_SUB, ALU_SBC, ALU_CP: begin
        r9 = {1'b0, data1} - {1'b0, data0} - {8'd0, (op == ALU_SBC) & cin};
        r5 = {1'b0, data1[3:0]} - {1'b0, data0[3:0]} - {4'd0, (op == ALU_SBC) & cin};
        data_out  = (op == ALU_CP) ? data1 : r9[7:0];
        flags_out = {r9[7:0] == 8'd0, 1'b1, r5[4], r9[8]};
      end
      ALU_AND: begin data_out = data1 & data0; flags_out = {data_out == 8'd0, 3'b010}; end
      ALU_XOR: begin data_out = data1 ^ data0; flags_out = {data_out == 8'd0, 3'b000}; end
      ALU_OR:  begin data_out = data1 | data0; flags_out = {data_out == 8'd0, 3'b000}; end
      ALU_INC: begin
        data_out  = data1 + 8'd1;
        flags_out = {data_out == 8'd0, 1'b0, data1[3:0] == 4'hf, cin};
      end
      ALU_DEC: begin
        data_out  = data1 - 8'd1;
        flags_out = {data_out == 8'd0, 1'b1, data1[3:0] == 4'h0, cin};
      end
      ALU_RLC, ALU_RLCA: begin data_out = {data1[6:0], data1[7]}; flags_out = {1'b0, 2'b00, data1[7]}; end
      ALU_RRC, ALU_RRCA: begin data_out = {data1[0], data1[7:1]}; flags_out = {1'b0, 2'b00, data1[0]}; end
      ALU_RL,  ALU_RLA:  begin data_out = {data1[6:0], cin};      flags_out = {1'b0, 2'b00, data1[7]}; end
      ALU_RR,  ALU_RRA:  begin data_out = {cin, data1[7:1]};      flags_out = {1'b0, 2'b00, data1[0]}; end
      ALU_SLA:  begin data_out = {data1[6:0], 1'b0};        flags_out = {1'b0, 2'b00, data1[7]}; end
      ALU_SRA:  begin data_out = {data1[7], data1[7:1]};    flags_out = {1'b0, 2'b00, data1[0]}; end
      ALU_SWAP: begin data_out = {data1[3:0], data1[7:4]};  flags_out = 4'b0000; end
      ALU_SRL:  begin data_out = {1'b0, data1[7:1]};        flags_out = {1'b0, 2'b00, data1[0]}; end
      ALU_BIT:  begin flags_out = {~data1[bitn], 1'b0, 1'b1, cin}; end
      ALU_RES:  data_out = data1 & ~mask;
      ALU_SET:  data_out = data1 | mask;
      ALU_CPL:  begin data_out = ~data1; flags_out = {flags_in[F_Z], 1'b1, 1'b1, cin}; end
      ALU_SCF:  flags_out = {flags_in[F_Z], 1'b0, 1'b0, 1'b1};
      ALU_CCF:  flags_out = {flags_in[F_Z], 1'b0, 1'b0, ~cin};
      ALU_DAA: begin
        if (!flags_in[F_N]) begin
          i1 = (flags_in[F_H] || (data1[3:0] > 4'd9)) ? {1'b0, data1} + 9'h006 : {1'b0, data1};
          i2 = (cin || (i1 > 9'h09f)) ? i1 + 9'h060 : i1;
        end else begin
          i1 = flags_in[F_H] ? {1'b0, data1 - 8'h06} : {1'b0, data1};
          i2 = cin ? i1 - 9'h060 : i1;
        end
        data_out  = i2[7:0];
        flags_out = {i2[7:0] == 8'd0, flags_in[F_N], 1'b0, i2[8] | cin};
      end
      default: ;
    endcase
    // The CB rotates and shifts set Z from the result; the A-register rotates clear it.
    if (op inside {ALU_RLC, ALU_RRC, ALU_RL, ALU_RR, ALU_SLA, ALU_SRA, ALU_SWAP, ALU_SRL})
      flags_out[F_Z] = (data_out == 8'd0);
  end

endmodule
