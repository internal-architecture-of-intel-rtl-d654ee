// tb_i8085a -- runs a test program on the 8085A processor and checks the
// results it leaves in memory, the number of T-states each instruction
// takes, and the pin sequence of an opcode fetch.
//
// The program exercises data moves (MOV, MVI, LXI, LDA/STA, LHLD/SHLD,
// XCHG, XTHL), the stack (PUSH/POP including PSW, CALL/RET), arithmetic and
// logic with the flag values worked out by hand (9Bh+A5h = 40h flags 11h;
// A5h-9Bh = 0Ah flags 04h; 9Bh-A5h = F6h flags 95h; DCR of D2h gives flags
// 84h), BCD adjust, rotates, 16-bit add and increment, jumps and calls,
// taken and not taken, and I/O reads and writes, and ends with HLT.
// Expected T-state counts are those of the 8085A (STA = 13, CALL = 18,
// opcode fetch 4 or 6, other machine cycles 3); HLT must reach THALT five
// states after its T1.  A monitor checks the pins in the middle of every
// state of every machine cycle (ALE and address in T1, RD or WR with the AD
// bus floated or driven in T2/T3, status held, no strobe in T4-T6).  Finally the processor is reset and HOLD is raised
// during the first opcode fetch: HLDA must stay low until that machine
// cycle ends, then go high with the buses floated in THOLD, and the next
// machine cycle must resume where the fetch left off once HOLD drops.
module tb_i8085a;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       reset_in_n;
  logic       hold = 1'b0;
  logic       reset_out, hlda, inta_n, sod;
  logic [7:0] a_hi, ad_out, ad_in;
  logic       a_hi_oe, ad_oe, ale, rd_n, wr_n, io_m, s1, s0, ctl_oe;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  i8085a dut (
    .clk, .reset_in_n, .reset_out, .ready(1'b1), .hold, .hlda,
    .trap(1'b0), .rst75(1'b0), .rst65(1'b0), .rst55(1'b0), .intr(1'b0),
    .inta_n, .sid(1'b0), .sod, .a_hi, .a_hi_oe, .ad_out, .ad_oe, .ad_in, .ale,
    .rd_n, .wr_n, .io_m, .s1, .s0, .ctl_oe
  );

  sys_mem mem (
    .clk, .ale, .rd_n, .wr_n, .inta_n, .io_m, .a_hi, .ad_out,
    .inta_opcode(8'h00), .ad_in
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // --- tiny assembler
  int unsigned org;
  task automatic db(input logic [7:0] x);
    mem.mem[org] = x;
    org++;
  endtask
  task automatic dw(input logic [7:0] op, input logic [15:0] w);
    db(op); db(w[7:0]); db(w[15:8]);
  endtask

  // --- record the start of every instruction (T1 of an opcode fetch)
  int unsigned of_cyc[$];
  logic [7:0]  of_op[$];
  always @(posedge clk) begin
    if (ale && !io_m && s1 && s0) begin
      of_cyc.push_back(cyc);
      of_op.push_back(mem.mem[{a_hi, ad_out}]);
    end
  end

  // --- bus rules
  always @(posedge clk) begin
    if (reset_in_n) begin
      assert (rd_n || wr_n) else begin failures++; $display("FAIL: RD and WR low together"); end
      if (ale) assert (ad_oe) else begin failures++; $display("FAIL: ALE without address"); end
    end
  end

  // --- pin timing of every machine cycle, sampled in the middle of each
  // state: T1 address + ALE; T2/T3 RD low with AD floated (reads) or WR low
  // with data driven (writes); status and A15-A8 held through the cycle;
  // T4-T6 no strobe and AD floated.
  i8085_pkg::tstate_e st;
  assign st = dut.u_state.state;
  logic [2:0] cyc_status;
  logic [7:0] cyc_ahi;
  int n_pin_checks = 0;
  task automatic pin_check(input bit ok, input string what);
    checks++; n_pin_checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  always @(negedge clk) begin
    if (reset_in_n && !hlda) begin
      unique case (st)
        i8085_pkg::ST_T1: if (ctl_oe) begin
          cyc_status = {io_m, s1, s0};
          cyc_ahi    = a_hi;
          if ({io_m, s1, s0} != 3'b000)           // bus idle: no address, no ALE
            pin_check(ale && ad_oe && a_hi_oe && rd_n && wr_n && inta_n, "T1: ALE, address out, no strobe");
          else
            pin_check(!ale && rd_n && wr_n && !ad_oe, "bus idle T1: no ALE, no strobe");
        end
        i8085_pkg::ST_T2, i8085_pkg::ST_T3, i8085_pkg::ST_WAIT: begin
          pin_check(!ale && {io_m, s1, s0} == cyc_status && a_hi == cyc_ahi, "T2/T3: status and A15-A8 held, ALE low");
          case (cyc_status)
            3'b011, 3'b010, 3'b110: pin_check(!rd_n && wr_n && !ad_oe, "read cycle: RD low, AD floated");
            3'b001, 3'b101:         pin_check(rd_n && !wr_n && ad_oe, "write cycle: WR low, data driven");
            default: ;
          endcase
        end
        i8085_pkg::ST_T4, i8085_pkg::ST_T5, i8085_pkg::ST_T6:
          pin_check(rd_n && wr_n && !ad_oe && !ale, "T4-T6: no strobe, AD floated");
        default: ;
      endcase
    end
  end

  function automatic int expected_states(input logic [7:0] op);
    case (op)
      8'h31, 8'h21, 8'h01, 8'h11: return 10;  // LXI
      8'h3E, 8'h06, 8'h0E:        return 7;   // MVI r
      8'h80, 8'h90, 8'hB7, 8'h0D: return 4;   // ADD, SUB, ORA, DCR
      8'h79, 8'h7A, 8'h78, 8'h7B: return 4;   // MOV r,r
      8'h32:                      return 13;  // STA
      8'hF5, 8'hC5, 8'hD5:        return 12;  // PUSH
      8'hD1, 8'hC1:               return 10;  // POP
      8'h56:                      return 7;   // MOV r,M
      8'hCD:                      return 18;  // CALL
      8'hC6:                      return 7;   // ADI
      8'h27, 8'h07, 8'h1F, 8'h2F: return 4;   // DAA, rotates, CMA
      8'h23:                      return 6;   // INX
      8'h34:                      return 10;  // INR M
      8'h09:                      return 10;  // DAD
      8'h22:                      return 16;  // SHLD
      8'hC9:                      return 10;  // RET
      8'hD3, 8'hDB:               return 10;  // OUT, IN
      8'hEB:                      return 4;   // XCHG
      8'hE3:                      return 16;  // XTHL
      8'hC3, 8'hC2, 8'hCA:        return 10;  // JMP, Jcc
      8'hCC:                      return 12;  // Ccc not taken
      default:                    return -1;
    endcase
  endfunction

  initial begin
    // watchdog
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned halt_t1, halt_at;
    reset_in_n = 1'b0;
    #1;
    org = 16'h0000;
    dw(8'h31, 16'h2700);            // LXI SP,2700h
    db(8'h3E); db(8'h9B);           // MVI A,9Bh
    db(8'h06); db(8'hA5);           // MVI B,A5h
    db(8'h80);                      // ADD B
    dw(8'h32, 16'h3000);            // STA 3000h
    db(8'hF5);                      // PUSH PSW
    db(8'h3E); db(8'hA5);           // MVI A,A5h
    db(8'h06); db(8'h9B);           // MVI B,9Bh
    db(8'h90);                      // SUB B
    db(8'hF5);                      // PUSH PSW
    db(8'h3E); db(8'h9B);           // MVI A,9Bh
    db(8'h06); db(8'hA5);           // MVI B,A5h
    db(8'h90);                      // SUB B
    db(8'hF5);                      // PUSH PSW
    db(8'hB7);                      // ORA A (clears CY)
    db(8'h0E); db(8'hD2);           // MVI C,D2h
    db(8'h0D);                      // DCR C
    db(8'hF5);                      // PUSH PSW
    db(8'h79);                      // MOV A,C
    dw(8'h32, 16'h3001);            // STA 3001h
    dw(8'h21, 16'h3000);            // LXI H,3000h
    db(8'h56);                      // MOV D,M
    db(8'h7A);                      // MOV A,D
    dw(8'h32, 16'h3002);            // STA 3002h
    dw(8'h01, 16'h1122);            // LXI B,1122h
    dw(8'h11, 16'h3344);            // LXI D,3344h
    db(8'hC5);                      // PUSH B
    db(8'hD5);                      // PUSH D
    dw(8'h01, 16'h0000);            // LXI B,0
    dw(8'h11, 16'h0000);            // LXI D,0
    db(8'hD1);                      // POP D
    db(8'hC1);                      // POP B
    db(8'h78);                      // MOV A,B
    dw(8'h32, 16'h3003);            // STA 3003h
    db(8'h7B);                      // MOV A,E
    dw(8'h32, 16'h3004);            // STA 3004h
    dw(8'hCD, 16'h0200);            // CALL 0200h
    dw(8'h32, 16'h3005);            // STA 3005h
    db(8'hD3); db(8'h10);           // OUT 10h
    db(8'hDB); db(8'h20);           // IN 20h
    dw(8'h32, 16'h3006);            // STA 3006h
    db(8'hEB);                      // XCHG
    db(8'hE3);                      // XTHL
    dw(8'h22, 16'h3012);            // SHLD 3012h
    dw(8'hC3, 16'h0060);            // JMP 0060h
    while (org < 16'h0060) db(8'h76);
    db(8'h3E); db(8'h01);           // MVI A,01h
    db(8'h07);                      // RLC
    db(8'h1F);                      // RAR
    db(8'h2F);                      // CMA
    dw(8'h32, 16'h3007);            // STA 3007h
    dw(8'hCA, 16'h0100);            // JZ 0100h (not taken)
    dw(8'hCC, 16'h0100);            // CZ 0100h (not taken)
    dw(8'hC2, 16'h0080);            // JNZ 0080h (taken)
    db(8'h76);
    org = 16'h0080;
    db(8'h3E); db(8'h77);           // MVI A,77h
    dw(8'h32, 16'h3008);            // STA 3008h
    db(8'h76);                      // HLT
    org = 16'h0100;
    db(8'h3E); db(8'hEE); dw(8'h32, 16'h3008); db(8'hC9);
    org = 16'h0200;
    db(8'h3E); db(8'h38);           // MVI A,38h
    db(8'hC6); db(8'h45);           // ADI 45h
    db(8'h27);                      // DAA
    db(8'h23);                      // INX H
    db(8'h34);                      // INR M
    db(8'h09);                      // DAD B
    dw(8'h22, 16'h3010);            // SHLD 3010h
    db(8'hC9);                      // RET
    mem.io[8'h20] = 8'h5A;

    repeat (3) @(posedge clk);
    check(reset_out == 1'b1, "RESET OUT high during reset");
    check(!ctl_oe && !a_hi_oe && !ad_oe, "buses float during reset");
    @(negedge clk) reset_in_n = 1'b1;

    // Pin sequence of the first opcode fetch (T1..T4), sampled mid-state.
    @(posedge clk); @(negedge clk);         // TRESET -> T1
    check(ale && ad_oe && ad_out == 8'h00 && a_hi == 8'h00 && a_hi_oe, "T1: ALE, PC on A15-A8 and AD7-AD0");
    check({io_m, s1, s0} == 3'b011, "T1: opcode fetch status IO/M=0 S1=1 S0=1");
    check(rd_n && wr_n, "T1: RD and WR high");
    @(negedge clk);
    check(!ale && !rd_n && !ad_oe, "T2: RD low, AD floated, ALE low");
    @(negedge clk);
    check(!rd_n && ad_in == 8'h31, "T3: RD low, opcode on the bus");
    @(negedge clk);
    check(rd_n && !ad_oe && {io_m, s1, s0} == 3'b011, "T4: RD high, AD floated, status held");
    @(negedge clk);
    check(ale && ad_out == 8'h01, "next machine cycle addresses PC+1");
    check({io_m, s1, s0} == 3'b010, "memory read status IO/M=0 S1=1 S0=0");

    // Run to HLT.
    halt_at = 0;
    while (halt_at == 0) begin
      @(negedge clk);
      if (!ctl_oe && !hlda && !reset_out) halt_at = cyc;
    end
    // The T1 that finds the HALT flip-flop set also issues ALE.
    halt_t1 = of_cyc[of_cyc.size()-2];
    check(of_op[of_op.size()-2] == 8'h76, "program ended on HLT");
    check(halt_at - halt_t1 == 5, $sformatf("HLT reaches THALT 5 states after T1 (got %0d)", halt_at - halt_t1));
    check(!a_hi_oe && !ad_oe && !ctl_oe, "buses float in THALT");

    // Results in memory.
    check(mem.mem[16'h3000] == 8'h40, "ADD B: 9Bh + A5h = 40h");
    check(mem.mem[16'h26FF] == 8'h40 && mem.mem[16'h26FE] == 8'h11, "ADD B flags 11h (PUSH PSW)");
    check(mem.mem[16'h26FD] == 8'h0A && mem.mem[16'h26FC] == 8'h04, "SUB B: A5h - 9Bh = 0Ah flags 04h");
    check(mem.mem[16'h26FB] == 8'hF6 && mem.mem[16'h26FA] == 8'h95, "SUB B: 9Bh - A5h = F6h flags 95h");
    check(mem.mem[16'h3012] == 8'h84 && mem.mem[16'h3013] == 8'hF6, "DCR C flags 84h, XTHL took stack top");
    check(mem.mem[16'h26F8] == 8'h44 && mem.mem[16'h26F9] == 8'h33, "XTHL wrote HL to stack top");
    check(mem.mem[16'h3001] == 8'hD2, "DCR C gives D1h, INR M makes it D2h");
    check(mem.mem[16'h3002] == 8'h40, "MOV D,M reads memory at (H,L)");
    check(mem.mem[16'h26F5] == 8'h33 && mem.mem[16'h26F4] == 8'h44, "PUSH D stores D then E below it");
    check(mem.mem[16'h3003] == 8'h11 && mem.mem[16'h3004] == 8'h44, "POP D then POP B restore the pairs");
    check(mem.mem[16'h26F7] == 8'h00 && mem.mem[16'h26F6] == 8'h44, "CALL pushed return address 0044h");
    check(mem.mem[16'h3005] == 8'h83, "ADI 45h + DAA: 38h + 45h = 83 BCD");
    check(mem.mem[16'h3010] == 8'h23 && mem.mem[16'h3011] == 8'h41, "INX H, DAD B: 3001h + 1122h = 4123h");
    check(mem.io[8'h10] == 8'h83, "OUT 10h wrote the port");
    check(mem.mem[16'h3006] == 8'h5A, "IN 20h read the port");
    check(mem.mem[16'h3007] == 8'hFE, "RLC, RAR, CMA: 01h -> 02h -> 01h -> FEh");
    check(mem.mem[16'h3008] == 8'h77, "JZ/CZ not taken, JNZ taken");

    // T-states per instruction.
    for (int i = 0; i + 1 < of_cyc.size(); i++) begin
      int e;
      e = expected_states(of_op[i]);
      if (e > 0)
        check(int'(of_cyc[i+1] - of_cyc[i]) == e,
              $sformatf("opcode %02h takes %0d T-states (got %0d)", of_op[i], e, of_cyc[i+1] - of_cyc[i]));
    end

    // HOLD during the opcode fetch after a reset.
    @(negedge clk) reset_in_n = 1'b0;
    repeat (2) @(negedge clk);
    reset_in_n = 1'b1;
    while (!ale) @(negedge clk);            // T1
    hold = 1'b1;
    @(negedge clk);                         // T2: HOLD sampled at its end
    @(negedge clk);                         // T3
    check(!hlda && !rd_n, "T3: fetch continues, HLDA still low");
    @(negedge clk);                         // T4
    check(!hlda, "T4: HLDA low until the machine cycle ends");
    @(negedge clk);
    check(hlda && !ctl_oe && !ad_oe && !a_hi_oe, "THOLD: HLDA high, buses floated");
    hold = 1'b0;
    @(negedge clk);
    check(!hlda && ale && ad_out == 8'h01, "HOLD released: next machine cycle reads PC+1");

    check(n_pin_checks > 200, $sformatf("pin timing checked in every state (%0d)", n_pin_checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
