// tb_instr_decoder -- loads every opcode into the instruction register and
// checks the decoder's machine-cycle plan: the T-states it implies (4 or 6
// for the fetch plus 3 per further machine cycle) against the 8085A timing
// of each documented opcode (taken branches), the STA sequence OFMC, MRMC,
// MRMC, MWRMC with the address bytes read through PC and the write through
// WZ, MOV's 01DDDSSS fields, and the vectored-interrupt restart cycle.
module tb_instr_decoder;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic clk = 0, rst_n, ir_we, vint;
  logic [7:0] ir_din, ir;
  decoded_t dec;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instr_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int states_8085(input logic [7:0] o);
    if (o == 8'h76) return 4;
    if (o[7:6] == 2'b01) return (o[2:0] == 3'b110 || o[5:3] == 3'b110) ? 7 : 4;
    if (o[7:6] == 2'b10) return (o[2:0] == 3'b110) ? 7 : 4;
    if (o[7:6] == 2'b00) begin
      case (o[2:0])
        3'b000: return 4;
        3'b001: return 10;                                  // DAD / LXI
        3'b010: case (o[5:3])
                  3'b100, 3'b101: return 16;               // SHLD LHLD
                  3'b110, 3'b111: return 13;               // STA LDA
                  default:        return 7;                // STAX LDAX
                endcase
        3'b011: return 6;                                  // INX DCX
        3'b100, 3'b101: return (o[5:3] == 3'b110) ? 10 : 4;
        3'b110: return (o[5:3] == 3'b110) ? 10 : 7;
        default: return 4;
      endcase
    end
    case (o[2:0])
      3'b000: return 12;                                   // Rcc taken
      3'b001: case (o[5:3])
                3'b101, 3'b111: return 6;                  // PCHL SPHL
                3'b001, 3'b011: return 10;                 // RET
                default:        return 10;                 // POP
              endcase
      3'b010: return 10;                                   // Jcc
      3'b011: case (o[5:3])
                3'b000, 3'b001, 3'b010, 3'b011: return 10; // JMP OUT IN
                3'b100: return 16;                         // XTHL
                default: return 4;                         // XCHG DI EI
              endcase
      3'b100: return 18;                                   // Ccc taken
      3'b101: return o[3] ? 18 : 12;                       // CALL / PUSH
      3'b110: return 7;                                    // ALU immediate
      default: return 12;                                  // RST
    endcase
  endfunction

  task automatic load(input logic [7:0] o);
    ir_we = 1; ir_din = o; @(posedge clk); #1; ir_we = 0;
  endtask

  initial begin
    ir_we = 0; ir_din = 0; vint = 0;
    rst_n = 0; #12; rst_n = 1;
    for (int o = 0; o < 256; o++) begin
      int st;
      load(8'(o));
      st = (dec.cc6 ? 6 : 4) + 3 * (int'(dec.nmc) - 1);
      check(ir == 8'(o), "IR holds the opcode");
      check(st == states_8085(8'(o)), $sformatf("opcode %02h: %0d T-states, want %0d", o, st, states_8085(8'(o))));
    end
    load(8'h32);   // STA
    check(dec.cls == I_STA && dec.nmc == 4, "STA has four machine cycles");
    check(dec.mc[0].kind == MC_MR && dec.mc[0].src == AS_PC && dec.mc[0].idact == ID_INC, "STA MC2: MRMC at PC");
    check(dec.mc[1].kind == MC_MR && dec.mc[1].src == AS_PC, "STA MC3: MRMC at PC");
    check(dec.mc[2].kind == MC_MW && dec.mc[2].src == AS_WZ, "STA MC4: MWRMC at WZ");
    load(8'h7C);   // MOV A,H
    check(dec.cls == I_MOV_RR && dec.ddd == R_A && dec.sss == R_H && dec.nmc == 1, "MOV A,H fields");
    load(8'h56);   // MOV D,M
    check(dec.cls == I_MOV_RM && dec.ddd == R_D && dec.mc[0].src == AS_HL, "MOV D,M reads at (H,L)");
    load(8'hC6);   // ADI
    check(dec.cls == I_ALU_I && dec.alu_op == ALU_ADD && dec.nmc == 2, "ADI: one extra memory read");
    load(8'hC5);   // PUSH B
    check(dec.cls == I_PUSH && dec.sp_predec && dec.mc[0].kind == MC_MW && dec.mc[0].idact == ID_DEC, "PUSH writes below SP");
    load(8'h76);
    check(dec.cls == I_HLT, "76h is HLT");
    vint = 1; #1;
    check(dec.cls == I_VINT && dec.cc6 && dec.nmc == 3 && dec.mc[0].kind == MC_MW, "restart cycle of a vectored interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
