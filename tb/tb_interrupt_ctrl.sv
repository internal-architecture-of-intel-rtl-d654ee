// tb_interrupt_ctrl -- checks the interrupt control section: reset state
// (masks set, INTE clear), EI/DI, TRAP taken without INTE, rising-edge
// latching of TRAP and RST7.5 (a held-high input is taken once), level
// sensing of RST6.5/5.5/INTR, SIM masking and RST7.5 reset, the priority
// TRAP > RST7.5 > RST6.5 > RST5.5 > INTR with the restart addresses, INTE
// cleared on acceptance, and the RIM bit layout.  Inputs change 1 ns after
// a rising clock edge.
module tb_interrupt_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic clk = 0, rst_n;
  logic trap, rst75, rst65, rst55, intr, ei, di, sim_we, int_accept;
  logic [7:0] sim_data;
  logic valid_int, inte, ack_intr;
  logic [15:0] ack_vector;
  logic [6:0] rim_bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  interrupt_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic tick; @(posedge clk); #1; endtask
  task automatic do_ei;  ei = 1; tick; ei = 0; endtask
  task automatic do_sim(input logic [7:0] v); sim_we = 1; sim_data = v; tick; sim_we = 0; endtask
  task automatic accept(input logic [15:0] vec, input bit is_intr, input string what);
    check(valid_int, {what, ": valid interrupt"});
    int_accept = 1; tick; int_accept = 0;
    check(ack_intr == is_intr, {what, ": INTR flag"});
    if (!is_intr) check(ack_vector == vec, $sformatf("%s: vector %04h", what, ack_vector));
    check(!inte, {what, ": INTE cleared"});
  endtask

  initial begin
    {trap, rst75, rst65, rst55, intr, ei, di, sim_we, int_accept} = '0;
    sim_data = 0;
    rst_n = 0; #12;
    check(rim_bits == 7'b000_0111 && !inte && !valid_int, "reset: masks set, INTE clear");
    rst_n = 1; tick;
    // unmasked inputs need INTE
    intr = 1; tick; check(!valid_int, "INTR ignored while INTE clear");
    do_ei; check(inte && valid_int, "EI enables INTR");
    di = 1; tick; di = 0; check(!inte && !valid_int, "DI disables");
    do_ei; accept(16'h0, 1, "INTR"); intr = 0;
    // restart inputs are masked after reset
    rst65 = 1; rst55 = 1; do_ei;
    check(!valid_int, "RST6.5/5.5 masked after reset");
    check(rim_bits[5:3] == 3'b111, "RIM shows pending 6.5, 5.5 and IE");
    do_sim(8'h08);   // MSE, all masks clear
    check(rim_bits[2:0] == 3'b000 && valid_int, "SIM clears masks");
    accept(VEC_RST65, 0, "RST6.5 over RST5.5");
    rst65 = 0; do_ei; accept(VEC_RST55, 0, "RST5.5"); rst55 = 0;
    do_sim(8'h02);   // MSE clear: masks unchanged
    check(rim_bits[2:0] == 3'b000, "SIM without MSE leaves masks");
    // RST7.5 edge latch
    do_ei; rst75 = 1; tick; tick;
    check(rim_bits[6] && valid_int, "RST7.5 rising edge latched");
    rst75 = 0; tick; check(rim_bits[6], "RST7.5 stays pending after the pulse");
    rst65 = 1; rst55 = 1; intr = 1;
    accept(VEC_RST75, 0, "RST7.5 highest maskable");
    check(!rim_bits[6], "RST7.5 flip-flop cleared when taken");
    do_ei; accept(VEC_RST65, 0, "RST6.5 next");
    rst65 = 0; rst55 = 0; do_ei; accept(16'h0, 1, "INTR lowest"); intr = 0;
    // RST7.5 held high is taken once
    rst75 = 1; tick; tick; do_ei; accept(VEC_RST75, 0, "RST7.5 again");
    do_ei; tick; check(!valid_int, "held-high RST7.5 not taken twice");
    rst75 = 0; tick; rst75 = 1; tick; tick; check(valid_int, "new RST7.5 edge");
    do_sim(8'h10); check(!rim_bits[6] && !valid_int, "SIM bit 4 resets RST7.5");
    rst75 = 0;
    // mask RST7.5
    do_sim(8'h0C); tick; rst75 = 1; tick; tick;
    check(rim_bits[6] && !valid_int && rim_bits[2], "masked RST7.5 remembered but not taken");
    do_sim(8'h08); check(valid_int, "unmasked RST7.5 taken");
    accept(VEC_RST75, 0, "RST7.5 after unmask"); rst75 = 0;
    // TRAP: not maskable, edge-sensed, above everything
    di = 1; tick; di = 0; do_sim(8'h0F);
    trap = 1; tick; tick;
    check(valid_int, "TRAP with INTE clear and masks set");
    accept(VEC_TRAP, 0, "TRAP");
    tick; check(!valid_int, "held TRAP taken once");
    trap = 0; tick; do_sim(8'h08); rst65 = 1; do_ei; trap = 1; tick; tick;
    accept(VEC_TRAP, 0, "TRAP above RST6.5");
    trap = 0; do_ei; accept(VEC_RST65, 0, "RST6.5 after TRAP"); rst65 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
