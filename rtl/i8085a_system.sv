// i8085a_system -- an 8085A processor with the one-WAIT-state READY circuit
// on its board.
//
// CLK(OUT) is the processor clock inverted, as on the 8085A where it runs
// 180 degrees out of phase with the internal clock; it clocks the wait-state
// circuit.  With `wait_en` high, every machine cycle that issues ALE gets one
// WAIT state from that circuit; with `wait_of_only` also high, only opcode
// fetch cycles (status IO/M=0, S1=1, S0=1 during ALE) get it, which is the
// use the circuit is drawn for.  Gating the circuit's D input with ALE and
// these status lines is this design's choice.  The board's own READY input
// `ready_in` can stretch cycles further (the two are ANDed).  All other pins are those of
// the processor, with three-state pins split into value and output enable.
module i8085a_system
  import i8085_pkg::*;
(
  input  logic       clk,
  output logic       clk_out,
  input  logic       reset_in_n,
  output logic       reset_out,
  input  logic       wait_en,
  input  logic       wait_of_only,
  input  logic       ready_in,
  input  logic       hold,
  output logic       hlda,
  input  logic       trap,
  input  logic       rst75,
  input  logic       rst65,
  input  logic       rst55,
  input  logic       intr,
  output logic       inta_n,
  input  logic       sid,
  output logic       sod,
  output logic [7:0] a_hi,
  output logic       a_hi_oe,
  output logic [7:0] ad_out,
  output logic       ad_oe,
  input  logic [7:0] ad_in,
  output logic       ale,
  output logic       rd_n,
  output logic       wr_n,
  output logic       io_m,
  output logic       s1,
  output logic       s0,
  output logic       ctl_oe,
  output logic       ready_ws
);

  logic ready, arm;

  assign clk_out = ~clk;
  assign ready   = ready_in & ready_ws;
  assign arm     = ale && wait_en && (!wait_of_only || (!io_m && s1 && s0));

  wait_state_gen u_wait (
    .clk_out, .rst_n(reset_in_n), .arm, .q1(), .q2(), .ready(ready_ws)
  );

  i8085a u_cpu (
    .clk, .reset_in_n, .reset_out, .ready, .hold, .hlda, .trap, .rst75, .rst65,
    .rst55, .intr, .inta_n, .sid, .sod, .a_hi, .a_hi_oe, .ad_out, .ad_oe,
    .ad_in, .ale, .rd_n, .wr_n, .io_m, .s1, .s0, .ctl_oe
  );

endmodule
