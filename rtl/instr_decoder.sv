// instr_decoder -- instruction register and instruction decoder / machine
// cycle encoder of the 8085A.
//
// The opcode read in T3 of an opcode fetch is clocked into the instruction
// register (`ir_we`).  The decoder looks at the held opcode and tells the
// timing and control unit what kind of instruction it is, whether the opcode
// fetch needs six T-states instead of four, how many machine cycles the
// instruction takes (1 to 5) and, for each machine cycle after the fetch, its
// kind (memory read/write, I/O read/write, bus idle), where its address comes
// from and whether that register is incremented or decremented in T2.  The
// opcode's operand fields (DDD, SSS, RP) and the ALU operation are passed on.
// `vint` marks the internal restart cycle of a vectored interrupt.
//
// The opcode map is that of the 8085A: 01DDDSSS is MOV, 76h HLT, C6h ADI,
// 32h STA and so on; the machine-cycle sequences follow the 8085A as well.
// Conditional jumps and calls are decoded with their full length; the
// control unit shortens conditional returns and calls that are not taken.
// Unused opcodes decode as NOP (own choice).
module instr_decoder
  import i8085_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ir_we,
  input  logic [7:0] ir_din,
  input  logic       vint,
  output logic [7:0] ir,
  output decoded_t   dec
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ir <= 8'h00;
    else if (ir_we)
      ir <= ir_din;
  end

  function automatic mc_plan_t mk(mc_type_e k, addr_src_e s, idact_e i);
    mc_plan_t p;
    p.kind  = k;
    p.src   = s;
    p.idact = i;
    return p;
  endfunction

  localparam mc_plan_t MR_PC  = '{kind: MC_MR, src: AS_PC, idact: ID_INC};
  localparam mc_plan_t MR_HL  = '{kind: MC_MR, src: AS_HL, idact: ID_NONE};
  localparam mc_plan_t MW_HL  = '{kind: MC_MW, src: AS_HL, idact: ID_NONE};
  localparam mc_plan_t MR_SPI = '{kind: MC_MR, src: AS_SP, idact: ID_INC};
  localparam mc_plan_t MR_SP  = '{kind: MC_MR, src: AS_SP, idact: ID_NONE};
  localparam mc_plan_t MW_SPD = '{kind: MC_MW, src: AS_SP, idact: ID_DEC};
  localparam mc_plan_t MW_SP  = '{kind: MC_MW, src: AS_SP, idact: ID_NONE};
  localparam mc_plan_t MR_WZI = '{kind: MC_MR, src: AS_WZ, idact: ID_INC};
  localparam mc_plan_t MR_WZ  = '{kind: MC_MR, src: AS_WZ, idact: ID_NONE};
  localparam mc_plan_t MW_WZI = '{kind: MC_MW, src: AS_WZ, idact: ID_INC};
  localparam mc_plan_t MW_WZ  = '{kind: MC_MW, src: AS_WZ, idact: ID_NONE};
  localparam mc_plan_t BI     = '{kind: MC_BI, src: AS_PC, idact: ID_NONE};

  always_comb begin
    dec           = '0;
    dec.cls       = I_NOP;
    dec.nmc       = 3'd1;
    dec.alu_op    = ALU_ADD;
    dec.ddd       = ir[5:3];
    dec.sss       = ir[2:0];
    dec.rp        = ir[5:4];
    for (int i = 0; i < 4; i++) dec.mc[i] = BI;

    if (vint) begin
      dec.cls       = I_VINT;
      dec.cc6       = 1'b1;
      dec.sp_predec = 1'b1;
      dec.nmc       = 3'd3;
      dec.mc[0]     = MW_SPD;
      dec.mc[1]     = MW_SP;
    end else begin
      unique case (ir[7:6])
        2'b01: begin
          if (ir == 8'h76) begin
            dec.cls = I_HLT;
          end else if (ir[2:0] == R_M) begin
            dec.cls   = I_MOV_RM;
            dec.nmc   = 3'd2;
            dec.mc[0] = MR_HL;
          end else if (ir[5:3] == R_M) begin
            dec.cls   = I_MOV_MR;
            dec.nmc   = 3'd2;
            dec.mc[0] = MW_HL;
          end else begin
            dec.cls = I_MOV_RR;
          end
        end
        2'b10: begin
          dec.alu_op = alu_op_e'({2'b00, ir[5:3]});
          if (ir[2:0] == R_M) begin
            dec.cls   = I_ALU_M;
            dec.nmc   = 3'd2;
            dec.mc[0] = MR_HL;
          end else begin
            dec.cls = I_ALU_R;
          end
        end
        2'b00: begin
          unique case (ir[2:0])
            3'b000: begin
              if (ir == 8'h20)      dec.cls = I_RIM;
              else if (ir == 8'h30) dec.cls = I_SIM;
              else                  dec.cls = I_NOP;
            end
            3'b001: begin
              if (!ir[3]) begin
                dec.cls   = I_LXI;
                dec.nmc   = 3'd3;
                dec.mc[0] = MR_PC;
                dec.mc[1] = MR_PC;
              end else begin
                dec.cls   = I_DAD;
                dec.nmc   = 3'd3;
                dec.mc[0] = BI;
                dec.mc[1] = BI;
              end
            end
            3'b010: begin
              unique case (ir[5:3])
                3'b000, 3'b010: begin
                  dec.cls   = I_STAX;
                  dec.nmc   = 3'd2;
                  dec.mc[0] = mk(MC_MW, ir[4] ? AS_DE : AS_BC, ID_NONE);
                end
                3'b001, 3'b011: begin
                  dec.cls   = I_LDAX;
                  dec.nmc   = 3'd2;
                  dec.mc[0] = mk(MC_MR, ir[4] ? AS_DE : AS_BC, ID_NONE);
                end
                3'b100: begin
                  dec.cls   = I_SHLD;
                  dec.nmc   = 3'd5;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = MR_PC;
                  dec.mc[2] = MW_WZI;
                  dec.mc[3] = MW_WZ;
                end
                3'b101: begin
                  dec.cls   = I_LHLD;
                  dec.nmc   = 3'd5;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = MR_PC;
                  dec.mc[2] = MR_WZI;
                  dec.mc[3] = MR_WZ;
                end
                3'b110: begin
                  dec.cls   = I_STA;
                  dec.nmc   = 3'd4;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = MR_PC;
                  dec.mc[2] = MW_WZ;
                end
                default: begin
                  dec.cls   = I_LDA;
                  dec.nmc   = 3'd4;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = MR_PC;
                  dec.mc[2] = MR_WZ;
                end
              endcase
            end
            3'b011: begin
              dec.cls = I_INX;          // bit 3 set: DCX
              dec.cc6 = 1'b1;
            end
            3'b100, 3'b101: begin
              dec.alu_op = ir[0] ? ALU_DCR : ALU_INR;
              if (ir[5:3] == R_M) begin
                dec.cls   = I_INR_M;
                dec.nmc   = 3'd3;
                dec.mc[0] = MR_HL;
                dec.mc[1] = MW_HL;
              end else begin
                dec.cls = I_INR_R;
              end
            end
            3'b110: begin
              if (ir[5:3] == R_M) begin
                dec.cls   = I_MVI_M;
                dec.nmc   = 3'd3;
                dec.mc[0] = MR_PC;
                dec.mc[1] = MW_HL;
              end else begin
                dec.cls   = I_MVI_R;
                dec.nmc   = 3'd2;
                dec.mc[0] = MR_PC;
              end
            end
            default: begin
              dec.cls    = I_ACC;
              dec.alu_op = alu_op_e'({2'b01, ir[5:3]});
            end
          endcase
        end
        default: begin   // 2'b11
          unique case (ir[2:0])
            3'b000: begin
              dec.cls   = I_RET;
              dec.cond  = 1'b1;
              dec.cc6   = 1'b1;
              dec.nmc   = 3'd3;
              dec.mc[0] = MR_SPI;
              dec.mc[1] = MR_SPI;
            end
            3'b001: begin
              unique case (ir[5:3])
                3'b001, 3'b011: begin
                  dec.cls   = I_RET;
                  dec.nmc   = 3'd3;
                  dec.mc[0] = MR_SPI;
                  dec.mc[1] = MR_SPI;
                end
                3'b101: begin
                  dec.cls = I_PCHL;
                  dec.cc6 = 1'b1;
                end
                3'b111: begin
                  dec.cls = I_SPHL;
                  dec.cc6 = 1'b1;
                end
                default: begin
                  dec.cls   = I_POP;
                  dec.nmc   = 3'd3;
                  dec.mc[0] = MR_SPI;
                  dec.mc[1] = MR_SPI;
                end
              endcase
            end
            3'b010: begin
              dec.cls   = I_JMP;
              dec.cond  = 1'b1;
              dec.nmc   = 3'd3;
              dec.mc[0] = MR_PC;
              dec.mc[1] = MR_PC;
            end
            3'b011: begin
              unique case (ir[5:3])
                3'b000, 3'b001: begin    // JMP (and its unused alias)
                  dec.cls   = I_JMP;
                  dec.nmc   = 3'd3;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = MR_PC;
                end
                3'b010: begin
                  dec.cls   = I_OUT;
                  dec.nmc   = 3'd3;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = mk(MC_IOW, AS_IO, ID_NONE);
                end
                3'b011: begin
                  dec.cls   = I_IN;
                  dec.nmc   = 3'd3;
                  dec.mc[0] = MR_PC;
                  dec.mc[1] = mk(MC_IOR, AS_IO, ID_NONE);
                end
                3'b100: begin
                  dec.cls   = I_XTHL;
                  dec.nmc   = 3'd5;
                  dec.mc[0] = MR_SPI;
                  dec.mc[1] = MR_SP;
                  dec.mc[2] = MW_SPD;
                  dec.mc[3] = MW_SP;
                end
                3'b101: dec.cls = I_XCHG;
                3'b110: dec.cls = I_DI;
                default: dec.cls = I_EI;
              endcase
            end
            3'b100: begin
              dec.cls       = I_CALL;
              dec.cond      = 1'b1;
              dec.cc6       = 1'b1;
              dec.sp_predec = 1'b1;
              dec.nmc       = 3'd5;
              dec.mc[0]     = MR_PC;
              dec.mc[1]     = MR_PC;
              dec.mc[2]     = MW_SPD;
              dec.mc[3]     = MW_SP;
            end
            3'b101: begin
              if (!ir[3]) begin
                dec.cls       = I_PUSH;
                dec.cc6       = 1'b1;
                dec.sp_predec = 1'b1;
                dec.nmc       = 3'd3;
                dec.mc[0]     = MW_SPD;
                dec.mc[1]     = MW_SP;
              end else begin           // CALL (and its unused aliases)
                dec.cls       = I_CALL;
                dec.cc6       = 1'b1;
                dec.sp_predec = 1'b1;
                dec.nmc       = 3'd5;
                dec.mc[0]     = MR_PC;
                dec.mc[1]     = MR_PC;
                dec.mc[2]     = MW_SPD;
                dec.mc[3]     = MW_SP;
              end
            end
            3'b110: begin
              dec.cls    = I_ALU_I;
              dec.alu_op = alu_op_e'({2'b00, ir[5:3]});
              dec.nmc    = 3'd2;
              dec.mc[0]  = MR_PC;
            end
            default: begin
              dec.cls       = I_RST;
              dec.cc6       = 1'b1;
              dec.sp_predec = 1'b1;
              dec.nmc       = 3'd3;
              dec.mc[0]     = MW_SPD;
              dec.mc[1]     = MW_SP;
            end
          endcase
        end
      endcase
    end
  end

endmodule
