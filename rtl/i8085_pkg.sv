// i8085_pkg -- types and constants shared by the 8085A processor blocks.
//
// Holds the processor states (T1..T6, TRESET, THALT, TWAIT, THOLD), the
// machine-cycle kinds with their IO/M, S1, S0 status codes, the address
// sources the address latch can select, the ALU operations, the flag
// register layout (S Z x AC x P x CY, unused bits forced to 0) and the
// instruction classes the decoder reports.  The register codes SSS/DDD
// (B=000 .. L=101, M=110, A=111) and the register-pair codes (BC, DE, HL,
// SP) are those of the 8085A instruction format.
package i8085_pkg;

  // Processor states of the state generator.
  typedef enum logic [3:0] {
    ST_RESET = 4'd0,
    ST_T1    = 4'd1,
    ST_T2    = 4'd2,
    ST_T3    = 4'd3,
    ST_T4    = 4'd4,
    ST_T5    = 4'd5,
    ST_T6    = 4'd6,
    ST_WAIT  = 4'd7,
    ST_HOLD  = 4'd8,
    ST_HALT  = 4'd9
  } tstate_e;

  // Machine-cycle kinds.
  typedef enum logic [2:0] {
    MC_OF   = 3'd0,   // opcode fetch
    MC_MR   = 3'd1,   // memory read
    MC_MW   = 3'd2,   // memory write
    MC_IOR  = 3'd3,   // I/O read
    MC_IOW  = 3'd4,   // I/O write
    MC_INTA = 3'd5,   // interrupt acknowledge
    MC_BI   = 3'd6    // bus idle
  } mc_type_e;

  // Status outputs {IO/M, S1, S0} issued at the start of each machine cycle.
  function automatic logic [2:0] mc_status(mc_type_e t);
    case (t)
      MC_OF:   return 3'b011;
      MC_MR:   return 3'b010;
      MC_MW:   return 3'b001;
      MC_IOR:  return 3'b110;
      MC_IOW:  return 3'b101;
      MC_INTA: return 3'b111;
      default: return 3'b000;
    endcase
  endfunction

  // Source of the address sent out in T1.
  typedef enum logic [2:0] {
    AS_PC = 3'd0,
    AS_HL = 3'd1,
    AS_BC = 3'd2,
    AS_DE = 3'd3,
    AS_SP = 3'd4,
    AS_WZ = 3'd5,
    AS_IO = 3'd6    // 8-bit port address in Z, copied to both halves
  } addr_src_e;

  // What the incrementer/decrementer writes back to the address source in T2.
  typedef enum logic [1:0] {
    ID_NONE = 2'd0,
    ID_INC  = 2'd1,
    ID_DEC  = 2'd2
  } idact_e;

  // ALU operations.
  typedef enum logic [4:0] {
    ALU_ADD = 5'd0,  ALU_ADC = 5'd1,  ALU_SUB = 5'd2,  ALU_SBB = 5'd3,
    ALU_ANA = 5'd4,  ALU_XRA = 5'd5,  ALU_ORA = 5'd6,  ALU_CMP = 5'd7,
    ALU_RLC = 5'd8,  ALU_RRC = 5'd9,  ALU_RAL = 5'd10, ALU_RAR = 5'd11,
    ALU_DAA = 5'd12, ALU_CMA = 5'd13, ALU_STC = 5'd14, ALU_CMC = 5'd15,
    ALU_INR = 5'd16, ALU_DCR = 5'd17
  } alu_op_e;

  // Flag register, bit 7 down to bit 0: S Z x AC x P x CY.
  typedef struct packed {
    logic s;
    logic z;
    logic x5;
    logic ac;
    logic x3;
    logic p;
    logic x1;
    logic cy;
  } flags_t;

  // 3-bit register codes (SSS / DDD).
  localparam logic [2:0] R_B = 3'b000, R_C = 3'b001, R_D = 3'b010, R_E = 3'b011,
                         R_H = 3'b100, R_L = 3'b101, R_M = 3'b110, R_A = 3'b111;

  // Register-pair codes (RP).
  localparam logic [1:0] RP_BC = 2'b00, RP_DE = 2'b01, RP_HL = 2'b10, RP_SP = 2'b11;

  // 8-bit write targets of the register array.
  typedef enum logic [3:0] {
    W8_B = 4'd0, W8_C = 4'd1, W8_D = 4'd2, W8_E = 4'd3,
    W8_H = 4'd4, W8_L = 4'd5, W8_W = 4'd6, W8_Z = 4'd7
  } w8_e;

  // 16-bit write targets of the register array.
  typedef enum logic [2:0] {
    W16_BC = 3'd0, W16_DE = 3'd1, W16_HL = 3'd2, W16_SP = 3'd3,
    W16_PC = 3'd4, W16_WZ = 3'd5
  } w16_e;

  // Instruction classes.
  typedef enum logic [5:0] {
    I_NOP,   I_MOV_RR, I_MOV_RM, I_MOV_MR, I_MVI_R, I_MVI_M,
    I_ALU_R, I_ALU_M,  I_ALU_I,  I_INR_R,  I_INR_M, I_ACC,
    I_LXI,   I_INX,    I_DAD,    I_LDAX,   I_STAX,  I_LDA,
    I_STA,   I_LHLD,   I_SHLD,   I_PUSH,   I_POP,   I_JMP,
    I_CALL,  I_RET,    I_RST,    I_PCHL,   I_SPHL,  I_XCHG,
    I_XTHL,  I_IN,     I_OUT,    I_EI,     I_DI,    I_HLT,
    I_RIM,   I_SIM,    I_VINT
  } iclass_e;

  // Plan of one machine cycle after the opcode fetch.
  typedef struct packed {
    mc_type_e  kind;
    addr_src_e src;
    idact_e    idact;
  } mc_plan_t;

  // Decoded instruction.
  typedef struct packed {
    iclass_e      cls;
    logic         cc6;        // opcode fetch takes six T-states
    logic [2:0]   nmc;        // machine cycles, opcode fetch included
    logic         cond;       // conditional (Jcc, Ccc, Rcc)
    logic         sp_predec;  // SP decremented in T5 (PUSH, CALL, RST)
    alu_op_e      alu_op;
    logic [2:0]   ddd;        // opcode bits 5:3
    logic [2:0]   sss;        // opcode bits 2:0
    logic [1:0]   rp;         // opcode bits 5:4
    mc_plan_t [3:0] mc;       // machine cycles 2..5 in entries 0..3
  } decoded_t;

  // Interrupt vectors of the restart inputs.
  localparam logic [15:0] VEC_TRAP  = 16'h0024;
  localparam logic [15:0] VEC_RST75 = 16'h003C;
  localparam logic [15:0] VEC_RST65 = 16'h0034;
  localparam logic [15:0] VEC_RST55 = 16'h002C;

endpackage
