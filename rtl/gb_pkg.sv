// gb_pkg: types and constants shared by the Game Boy blocks.
// Flag bit positions follow the CPU's F register order Z, N, H, C (bits 3..0 of the
// 4-bit flag vector, bits 7..4 of F). The ALU opcode numbering is this design's own:
// it is chosen so that the instruction fields index it directly (ALU group y, CB
// rotate group y, BIT/RES/SET group x).
package gb_pkg;

  localparam int F_Z = 3;
  localparam int F_N = 2;
  localparam int F_H = 1;
  localparam int F_C = 0;

  typedef enum logic [4:0] {
    ALU_ADD  = 5'd0,  ALU_ADC  = 5'd1,  ALU_SUB  = 5'd2,  ALU_SBC  = 5'd3,
    ALU_AND  = 5'd4,  ALU_XOR  = 5'd5,  ALU_OR   = 5'd6,  ALU_CP   = 5'd7,
    ALU_RLC  = 5'd8,  ALU_RRC  = 5'd9,  ALU_RL   = 5'd10, ALU_RR   = 5'd11,
    ALU_SLA  = 5'd12, ALU_SRA  = 5'd13, ALU_SWAP = 5'd14, ALU_SRL  = 5'd15,
    ALU_INC  = 5'd16, ALU_DEC  = 5'd17,
    ALU_RLCA = 5'd18, ALU_RRCA = 5'd19, ALU_RLA  = 5'd20, ALU_RRA  = 5'd21,
    ALU_DAA  = 5'd22, ALU_CPL  = 5'd23, ALU_SCF  = 5'd24, ALU_CCF  = 5'd25,
    ALU_BIT  = 5'd26, ALU_RES  = 5'd27, ALU_SET  = 5'd28
  } alu_op_e;

  // Interrupt request bits of IF/IE, lowest bit has the highest priority.
  localparam int IRQ_VBLANK = 0;
  localparam int IRQ_STAT   = 1;
  localparam int IRQ_TIMER  = 2;
  localparam int IRQ_SERIAL = 3;
  localparam int IRQ_JOYPAD = 4;

  // Register file contents seen by the CPU datapath.
  typedef struct packed {
    logic [15:0] bc;
    logic [15:0] de;
    logic [15:0] hl;
    logic [15:0] sp;
    logic [15:0] pc;
  } regs_t;

  // Fields of the sound registers NR10..NR52 used by the sound generators.
  typedef struct packed {
    // channel 1 (NR10..NR14)
    logic [2:0]  c1_sweep_time;
    logic        c1_sweep_sub;
    logic [2:0]  c1_sweep_shift;
    logic [1:0]  c1_duty;
    logic [5:0]  c1_len;
    logic [3:0]  c1_env_init;
    logic        c1_env_up;
    logic [2:0]  c1_env_period;
    logic [10:0] c1_freq;
    logic        c1_len_en;
    // channel 2 (NR21..NR24)
    logic [1:0]  c2_duty;
    logic [5:0]  c2_len;
    logic [3:0]  c2_env_init;
    logic        c2_env_up;
    logic [2:0]  c2_env_period;
    logic [10:0] c2_freq;
    logic        c2_len_en;
    // channel 3 (NR30..NR34)
    logic        c3_on;
    logic [7:0]  c3_len;
    logic [1:0]  c3_level;
    logic [10:0] c3_freq;
    logic        c3_len_en;
    // channel 4 registers (NR41..NR44), stored and brought out only
    logic [31:0] c4_regs;
    // control (NR50..NR52)
    logic [7:0]  nr50;
    logic [7:0]  nr51;
    logic        master_on;
  } snd_regs_t;

endpackage
