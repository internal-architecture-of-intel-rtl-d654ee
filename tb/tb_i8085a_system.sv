// tb_i8085a_system -- end-to-end test of the 8085A board: processor plus
// one-WAIT-state circuit, with memory, I/O ports, interrupts, a DMA device
// using HOLD, and the serial pins.
//
// The program sets the interrupt masks and the SOD pin with SIM, reads SID
// with RIM, then halts five times and is woken each time by a different
// interrupt: RST7.5 (edge), RST6.5 and RST5.5 (levels), INTR answered with
// an RST 5 opcode in the acknowledge cycle, and TRAP, which must work with
// interrupts disabled.  Each service routine leaves a value in A that the
// main program stores, proving the right vector was taken and the return
// address was right.  It then does I/O, a memory-fill loop during which the
// DMA device takes the bus with HOLD, a DAD (bus-idle cycles) and a final
// HLT, during which HOLD is raised again.  The wait circuit is on in every
// machine cycle for the first half, where STA must take 13 + 4 = 17
// T-states, then only in opcode fetches, where STA takes 13 + 1 = 14, and
// off for the rest, where LXI takes 10.  A slow I/O port holds the board
// READY low for two states, so IN gets two more WAIT states.  Finally RESET IN restarts the processor at 0000h.
// Every mechanism is counted and must have happened at least once.
module tb_i8085a_system;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic       clk = 1'b0;
  logic       clk_out, reset_in_n, reset_out, wait_en, wait_of_only, ready_in, hold, hlda;
  logic       trap, rst75, rst65, rst55, intr, inta_n, sid, sod;
  logic [7:0] a_hi, ad_out, ad_in;
  logic       a_hi_oe, ad_oe, ale, rd_n, wr_n, io_m, s1, s0, ctl_oe, ready_ws;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  i8085a_system dut (.*);

  sys_mem mem (
    .clk, .ale, .rd_n, .wr_n, .inta_n, .io_m, .a_hi, .ad_out,
    .inta_opcode(8'hEF), .ad_in
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned org;
  task automatic db(input logic [7:0] x);
    mem.mem[org] = x;
    org++;
  endtask
  task automatic dw(input logic [7:0] op, input logic [15:0] w);
    db(op); db(w[7:0]); db(w[15:8]);
  endtask

  // ------------------------------------------------ mechanism counters
  tstate_e st;
  assign st = dut.u_cpu.u_state.state;
  int n_wait, n_hold, n_halt, n_of4, n_of6, n_mr, n_mw, n_ior, n_iow, n_inta, n_bi, n_reset;
  tstate_e st_prev;
  always @(posedge clk) begin
    st_prev <= st;
    if (st == ST_WAIT) n_wait++;
    if (st == ST_HOLD && st_prev != ST_HOLD) n_hold++;
    if (st == ST_HALT && st_prev != ST_HALT) n_halt++;
    if (st == ST_RESET && st_prev != ST_RESET) n_reset++;
    if (st == ST_T6) n_of6++;
    if (st == ST_T4 && st_prev == ST_T3) n_of4++;
    if (ale) begin
      case ({io_m, s1, s0})
        3'b010: n_mr++;
        3'b001: n_mw++;
        3'b110: n_ior++;
        3'b101: n_iow++;
        default: ;
      endcase
    end
    if (st == ST_T2 && {io_m, s1, s0} == 3'b111) n_inta++;
    if (st == ST_T1 && ctl_oe && {io_m, s1, s0} == 3'b000) n_bi++;
  end

  // A slow I/O port: on an I/O read it holds the board READY low from the
  // middle of T2 for two clock periods, so two WAIT states follow T2.
  int n_slow = 0, n_wait_io = 0;
  always @(posedge clk) begin
    if (ale && {io_m, s1, s0} == 3'b110) begin
      n_slow++;
      @(negedge clk) ready_in = 1'b0;
      repeat (2) @(posedge clk);
      #1 ready_in = 1'b1;
    end
  end
  always @(posedge clk) if (st == ST_WAIT && io_m && s1 && !s0) n_wait_io++;

  // bus rules while the processor is off the bus
  always @(posedge clk) begin
    if (hlda) begin
      checks++;
      if (a_hi_oe || ad_oe || ctl_oe) begin
        failures++;
        $display("FAIL: buses driven during HLDA");
      end
    end
  end

  // start of every instruction
  int unsigned of_cyc[$];
  logic [15:0] of_addr[$];
  always @(posedge clk) begin
    if (ale && !io_m && s1 && s0) begin
      of_cyc.push_back(cyc);
      of_addr.push_back({a_hi, ad_out});
    end
  end

  function automatic int states_at(input logic [15:0] addr);
    for (int i = 0; i + 1 < of_addr.size(); i++)
      if (of_addr[i] == addr) return int'(of_cyc[i+1] - of_cyc[i]);
    return -1;
  endfunction

  task automatic wait_halt();
    int unsigned t0;
    t0 = cyc;
    while (st != ST_HALT && cyc - t0 < 2000) @(posedge clk);
    check(st == ST_HALT, "processor reached THALT");
  endtask

  task automatic wait_running();
    int unsigned t0;
    t0 = cyc;
    while (st == ST_HALT && cyc - t0 < 200) @(posedge clk);
    check(st != ST_HALT, "interrupt woke the processor");
  endtask

  initial begin
    #400us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] a_sta1, a_sta2, a_in, a_lxi, a_loop;

  initial begin
    {trap, rst75, rst65, rst55, intr, hold} = '0;
    sid = 1'b1; ready_in = 1'b1; wait_en = 1'b1; wait_of_only = 1'b0;
    reset_in_n = 1'b0;
    #1;
    // vectors: each service routine loads A and returns
    org = 16'h0000; dw(8'hC3, 16'h0040);                 // JMP 0040h
    org = 16'h0024; db(8'h3E); db(8'h11); db(8'hC9);      // TRAP
    org = 16'h0028; db(8'h3E); db(8'h22); db(8'hC9);      // RST 5 (via INTR)
    org = 16'h002C; db(8'h3E); db(8'h33); db(8'hC9);      // RST5.5
    org = 16'h0034; db(8'h3E); db(8'h44); db(8'hC9);      // RST6.5
    org = 16'h003C; db(8'h3E); db(8'h55); db(8'hC9);      // RST7.5
    org = 16'h0040;
    dw(8'h31, 16'h2700);               // LXI SP,2700h
    db(8'h3E); db(8'h08); db(8'h30);   // MVI A,08h ; SIM  (unmask all)
    db(8'h3E); db(8'hC0); db(8'h30);   // MVI A,C0h ; SIM  (SOD = 1)
    db(8'h20);                         // RIM
    a_sta1 = 16'(org);
    dw(8'h32, 16'h3100);               // STA 3100h
    db(8'hFB); db(8'h76);              // EI ; HLT   <- RST7.5
    dw(8'h32, 16'h3101);
    db(8'hFB); db(8'h76);              // EI ; HLT   <- RST6.5
    dw(8'h32, 16'h3102);
    db(8'hFB); db(8'h76);              // EI ; HLT   <- RST5.5
    dw(8'h32, 16'h3103);
    db(8'hFB); db(8'h76);              // EI ; HLT   <- INTR (RST 5)
    dw(8'h32, 16'h3104);
    db(8'h76);                         // HLT        <- TRAP, INTE = 0
    dw(8'h32, 16'h3105);
    db(8'h20);                         // RIM (IE must read 0)
    dw(8'h32, 16'h3107);
    db(8'h3E); db(8'h40); db(8'h30);   // MVI A,40h ; SIM  (SOD = 0)
    db(8'hD3); db(8'h10);              // OUT 10h
    a_in = 16'(org);
    db(8'hDB); db(8'h20);              // IN 20h (slow port: two more WAITs)
    a_sta2 = 16'(org);
    dw(8'h32, 16'h3106);               // STA 3106h
    a_lxi = 16'(org);
    dw(8'h21, 16'h3200);               // LXI H,3200h
    db(8'h0E); db(8'h10);              // MVI C,10h
    a_loop = 16'(org);
    db(8'h71);                         // MOV M,C
    db(8'h23);                         // INX H
    db(8'h0D);                         // DCR C
    dw(8'hC2, a_loop);                 // JNZ loop
    dw(8'h01, 16'h0100);               // LXI B,0100h
    db(8'h09);                         // DAD B  -> HL = 3310h
    dw(8'h22, 16'h3108);               // SHLD 3108h
    db(8'h76);                         // HLT
    mem.io[8'h20] = 8'h9C;

    repeat (3) @(posedge clk);
    check(reset_out, "RESET OUT during reset");
    @(negedge clk) reset_in_n = 1'b1;

    wait_halt();
    check(sod == 1'b1, "SIM set SOD");
    check(mem.mem[16'h3100] == 8'h80, $sformatf("RIM: SID=1, nothing pending, masks clear (got %02h)", mem.mem[16'h3100]));
    repeat (5) @(posedge clk);
    @(negedge clk) rst75 = 1'b1;
    @(negedge clk) rst75 = 1'b0;
    wait_running();

    wait_halt();
    check(mem.mem[16'h3101] == 8'h55, "RST7.5 served at 003Ch");
    @(negedge clk) rst65 = 1'b1;
    wait_running();
    @(negedge clk) rst65 = 1'b0;

    wait_halt();
    check(mem.mem[16'h3102] == 8'h44, "RST6.5 served at 0034h");
    @(negedge clk) rst55 = 1'b1;
    wait_running();
    @(negedge clk) rst55 = 1'b0;

    wait_halt();
    check(mem.mem[16'h3103] == 8'h33, "RST5.5 served at 002Ch");
    @(negedge clk) intr = 1'b1;
    wait_running();
    @(negedge clk) intr = 1'b0;

    wait_halt();
    check(mem.mem[16'h3104] == 8'h22, "INTR answered with RST 5, served at 0028h");
    // interrupts are disabled now: a maskable request must not wake it
    @(negedge clk) rst55 = 1'b1;
    repeat (20) @(posedge clk);
    check(st == ST_HALT, "RST5.5 ignored while INTE is clear");
    @(negedge clk) rst55 = 1'b0;
    @(negedge clk) trap = 1'b1;
    wait_running();
    @(negedge clk) trap = 1'b0;
    wait_of_only = 1'b1;
    // turn the circuit off during the memory write of the second STA
    while (!(ale && {io_m, s1, s0} == 3'b001 && {a_hi, ad_out} == 16'h3106)) @(posedge clk);
    repeat (2) @(posedge clk);
    @(negedge clk) wait_en = 1'b0;

    // DMA: take the bus in the middle of the fill loop
    while (!(ale && {a_hi, ad_out} == a_loop)) @(posedge clk);
    repeat (7) @(posedge clk);
    @(negedge clk) hold = 1'b1;
    while (!hlda) @(posedge clk);
    mem.mem[16'h3300] = 8'hA5;         // the DMA device uses the memory
    repeat (10) @(posedge clk);
    check(hlda, "HLDA held while HOLD is high");
    @(negedge clk) hold = 1'b0;

    wait_halt();
    // HOLD while halted: HOLD state, then back to THALT
    @(negedge clk) hold = 1'b1;
    repeat (4) @(posedge clk);
    check(hlda && st == ST_HOLD, "HOLD taken from THALT");
    @(negedge clk) hold = 1'b0;
    repeat (3) @(posedge clk);
    check(!hlda && st == ST_HALT, "back to THALT after HOLD");

    check(mem.mem[16'h3105] == 8'h11, "TRAP served at 0024h with interrupts disabled");
    check(mem.mem[16'h3107] == 8'h80, $sformatf("RIM after TRAP: IE clear (got %02h)", mem.mem[16'h3107]));
    check(sod == 1'b0, "SIM cleared SOD");
    check(mem.io[8'h10] == 8'h40, "OUT 10h");
    check(mem.mem[16'h3106] == 8'h9C, "IN 20h");
    for (int i = 0; i < 16; i++)
      check(mem.mem[16'h3200 + 16'(i)] == 8'(16 - i), $sformatf("fill loop byte %0d", i));
    check(mem.mem[16'h3300] == 8'hA5, "DMA write kept");
    check(mem.mem[16'h3108] == 8'h10 && mem.mem[16'h3109] == 8'h33, "DAD B: 3210h + 0100h = 3310h");
    check(states_at(a_sta1) == 17, $sformatf("STA with one WAIT per machine cycle takes 17 states (got %0d)", states_at(a_sta1)));
    check(states_at(a_sta2) == 14, $sformatf("STA with a WAIT in the opcode fetch only takes 14 states (got %0d)", states_at(a_sta2)));
    check(states_at(a_in) == 13, $sformatf("IN with one WAIT in the fetch and two from the slow port takes 10 + 3 = 13 states (got %0d)", states_at(a_in)));
    check(n_slow == 1 && n_wait_io == 2, $sformatf("slow port held READY low for exactly two WAIT states (%0d)", n_wait_io));
    check(states_at(a_lxi) == 10, $sformatf("LXI without WAIT takes 10 states (got %0d)", states_at(a_lxi)));
    check(mem.mem[16'h26FF] == 8'h00 && mem.mem[16'h26FE] == 8'h62, "TRAP pushed its return address");

    // RESET IN restarts at 0000h
    @(negedge clk) reset_in_n = 1'b0;
    repeat (2) @(posedge clk);
    check(reset_out && !ctl_oe, "RESET IN forces TRESET, buses float");
    @(negedge clk) reset_in_n = 1'b1;
    while (!ale) @(posedge clk);
    check({a_hi, ad_out} == 16'h0000, "first fetch after reset from 0000h");

    $display("mechanisms: wait=%0d hold=%0d halt=%0d reset=%0d of4=%0d of6=%0d mr=%0d mw=%0d ior=%0d iow=%0d inta=%0d bi=%0d",
             n_wait, n_hold, n_halt, n_reset, n_of4, n_of6, n_mr, n_mw, n_ior, n_iow, n_inta, n_bi);
    check(n_wait > 0, "WAIT state happened");
    check(n_hold >= 2, "HOLD state happened (running and halted)");
    check(n_halt >= 6, "HALT state happened");
    check(n_reset > 0, "RESET state happened");
    check(n_of4 > 0, "4-state opcode fetch happened");
    check(n_of6 > 0, "6-state opcode fetch happened");
    check(n_mr > 0 && n_mw > 0, "memory read and write cycles happened");
    check(n_ior > 0 && n_iow > 0, "I/O read and write cycles happened");
    check(n_inta > 0, "interrupt acknowledge cycle happened");
    check(n_bi > 0, "bus idle cycle happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
