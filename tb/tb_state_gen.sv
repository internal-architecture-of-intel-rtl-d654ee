// tb_state_gen -- walks the T-state generator through every arc of the
// 8085A state transition diagram: reset, four- and six-state opcode fetches,
// three-state memory cycles, WAIT insertion while READY is low, HOLD sampled
// in T2 and T4 leading to THOLD at the end of the machine cycle, HALT entered
// from T1 and left by an interrupt or through THOLD, and interrupt
// acceptance after the last machine cycle of an instruction.  Inputs change
// 1 ns after a rising clock edge and the state is checked there.
module tb_state_gen;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic clk = 0, rst_n;
  logic ready, hold, bus_cycle, cc6, last_mc, valid_int, halt_set, inta_clr;
  tstate_e state;
  logic [2:0] mc;
  logic mc_end, int_accept, halt_ff, hlda_ff, inta_ff;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  state_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (state %s mc %0d)", $time, what, state.name(), mc); end
  endtask

  task automatic step(input tstate_e want, input string what);
    @(posedge clk); #1;
    check(state == want, $sformatf("%s: want %s", what, want.name()));
  endtask

  initial begin
    ready = 1; hold = 0; bus_cycle = 1; cc6 = 0; last_mc = 1;
    valid_int = 0; halt_set = 0; inta_clr = 0;
    rst_n = 0; #12;
    check(state == ST_RESET && mc == 1 && !halt_ff && !hlda_ff && !inta_ff, "TRESET while RESET IN is low");
    @(posedge clk); #1; check(state == ST_RESET, "TRESET held");
    rst_n = 1;
    step(ST_T1, "reset released");
    // one-cycle, four-state instruction
    step(ST_T2, "4-state fetch"); step(ST_T3, "4-state fetch"); step(ST_T4, "4-state fetch");
    check(mc_end, "T4 ends a four-state fetch");
    step(ST_T1, "next instruction");
    // six-state fetch
    cc6 = 1;
    step(ST_T2, "6-state"); step(ST_T3, "6-state"); step(ST_T4, "6-state");
    check(!mc_end, "T4 does not end a six-state fetch");
    step(ST_T5, "6-state"); step(ST_T6, "6-state");
    check(mc_end, "T6 ends the fetch");
    cc6 = 0;
    step(ST_T1, "after T6");
    // two-cycle instruction: fetch then a three-state read
    last_mc = 0;
    step(ST_T2, "MC1"); step(ST_T3, "MC1"); step(ST_T4, "MC1");
    step(ST_T1, "MC2 T1");
    last_mc = 1;
    check(mc == 2, "machine cycle counter advances");
    step(ST_T2, "MC2"); step(ST_T3, "MC2");
    check(mc_end, "T3 ends a non-fetch cycle");
    step(ST_T1, "back to fetch");
    check(mc == 1, "counter back to 1 after the last cycle");
    // WAIT states
    step(ST_T2, "wait cycle");
    ready = 0;
    step(ST_WAIT, "READY low in T2"); step(ST_WAIT, "READY still low");
    ready = 1;
    step(ST_T3, "READY high"); step(ST_T4, "after wait");
    // READY is ignored in a cycle without bus transfer
    step(ST_T1, "bus-idle check"); bus_cycle = 0; ready = 0;
    step(ST_T2, "idle"); step(ST_T3, "no WAIT without a bus transfer");
    bus_cycle = 1; ready = 1;
    step(ST_T4, "idle"); step(ST_T1, "idle end");
    // HOLD sampled in T2
    step(ST_T2, "hold"); hold = 1;
    step(ST_T3, "HOLD seen"); check(hlda_ff, "HLDA flip-flop set by HOLD in T2");
    step(ST_T4, "cycle completes"); step(ST_HOLD, "THOLD after the machine cycle");
    step(ST_HOLD, "THOLD while HOLD");
    hold = 0;
    step(ST_T1, "HOLD released"); check(!hlda_ff, "HLDA cleared");
    // HOLD sampled in T4 of a six-state fetch
    cc6 = 1;
    step(ST_T2, "h6"); step(ST_T3, "h6"); step(ST_T4, "h6"); hold = 1;
    step(ST_T5, "h6"); check(hlda_ff, "HOLD sampled in T4 when six states");
    step(ST_T6, "h6"); step(ST_HOLD, "THOLD after T6");
    hold = 0; cc6 = 0;
    step(ST_T1, "resume");
    // interrupt after the last machine cycle
    step(ST_T2, "int"); step(ST_T3, "int"); step(ST_T4, "int");
    valid_int = 1; #0;
    #1; check(int_accept, "valid interrupt accepted at end of instruction");
    step(ST_T1, "interrupt fetch"); check(inta_ff, "INTA flip-flop set");
    valid_int = 0; inta_clr = 1;
    step(ST_T2, "acknowledge fetch"); inta_clr = 0;
    check(!inta_ff, "INTA flip-flop cleared");
    // no acceptance at end of a non-last machine cycle
    step(ST_T3, "x"); step(ST_T4, "x");
    last_mc = 0; valid_int = 1; #1;
    check(!int_accept, "no interrupt before the last machine cycle");
    step(ST_T1, "MC2"); valid_int = 0; last_mc = 1;
    step(ST_T2, "MC2"); step(ST_T3, "MC2"); step(ST_T1, "end");
    // HALT
    halt_set = 1; @(posedge clk); #1; halt_set = 0;
    check(halt_ff && state == ST_T2, "HALT flip-flop set");
    step(ST_T3, "halt"); step(ST_T4, "halt"); step(ST_T1, "halt T1");
    step(ST_HALT, "THALT from T1"); step(ST_HALT, "THALT stays");
    hold = 1;
    step(ST_HOLD, "HOLD in THALT"); check(hlda_ff, "HLDA in THALT");
    hold = 0;
    step(ST_HALT, "back to THALT after HOLD");
    valid_int = 1; #1; check(int_accept, "interrupt leaves THALT");
    step(ST_T1, "T1 after HALT"); check(!halt_ff && inta_ff, "HALT cleared, INTA set");
    valid_int = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
