// wait_state_gen -- external logic that makes an 8085A insert one WAIT state
// in a machine cycle.
//
// Two D flip-flops and an inverter.  Both flip-flops are clocked by the
// processor's CLK(OUT), whose rising edges fall in the middle of each
// T-state because CLK(OUT) is 180 degrees out of phase with the clock that
// steps the processor.  The first flip-flop takes its D input `arm` in the
// middle of T1 (Q1 = 1); the second copies Q1 half-way through T2 (Q2 = 1),
// which drives READY low through the inverter just before the processor
// samples it at the end of T2, and, through the active-low clear wired to
// /Q2, clears Q1 at once.  Half-way through TWAIT Q2 copies the cleared Q1,
// READY returns high and the processor proceeds to T3: exactly one WAIT
// state.  The published circuit ties D of the first flip-flop to +5 V; here
// D is the `arm` input so the board can restrict the wait to chosen cycles
// (the system ties it to ALE gated by an enable), which is this design's
// choice.  Both flip-flops clear on reset.
module wait_state_gen (
  input  logic clk_out,   // CLK(OUT) of the processor
  input  logic rst_n,
  input  logic arm,       // D input of the first flip-flop
  output logic q1,
  output logic q2,
  output logic ready
);

  logic clr1_n;   // active-low clear of flip-flop 1: /Q2, and reset

  assign clr1_n = rst_n & ~q2;

  always_ff @(posedge clk_out or negedge clr1_n) begin
    if (!clr1_n)
      q1 <= 1'b0;
    else
      q1 <= arm;
  end

  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n)
      q2 <= 1'b0;
    else
      q2 <= q1;
  end

  assign ready = ~q2;

endmodule
