// state_gen -- T-state generator of the 8085A timing and control unit.
//
// A multi-mode counter over ten states: T1..T6, TRESET, THALT, TWAIT and
// THOLD, one state per clock period.  It follows the processor's state
// transition diagram:
//   * TRESET while RESET IN is low, then T1.
//   * T1 -> THALT if the HALT flip-flop is set, else T2.
//   * T2 -> TWAIT while READY is low (only in cycles that use the bus),
//     otherwise T3; TWAIT repeats until READY is high, then T3.  HOLD is
//     sampled on the way to T3 and sets the HLDA flip-flop.
//   * T3 -> T4 in the first machine cycle of an instruction, else end of
//     the machine cycle.  T4 -> T5 -> T6 when the fetch takes six states
//     (HOLD sampled again in T4), else T4 ends the machine cycle.
//   * At the end of a machine cycle: THOLD if the HLDA flip-flop is set;
//     else, after the last machine cycle of an instruction, a valid
//     interrupt clears INTE (via `int_accept`) and sets the INTA flip-flop;
//     then T1.
//   * THOLD while HOLD is high; when it drops HLDA is cleared and the state
//     goes to THALT if the HALT flip-flop is set, else T1.
//   * THALT: HOLD high sets HLDA and goes to THOLD; a valid interrupt
//     clears INTE, sets INTA, clears HALT and goes to T1; else it stays.
// The HALT flip-flop is set by `halt_set` (HLT decoded in T4); the INTA
// flip-flop is cleared by `inta_clr` when the acknowledge cycle is over.
// The generator also counts machine cycles within the instruction (`mc`,
// 1 = opcode fetch).  Inputs are sampled on the rising clock edge.
module state_gen
  import i8085_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,       // RESET IN, active low
  input  logic       ready,
  input  logic       hold,
  input  logic       bus_cycle,   // present machine cycle uses RD/WR/INTA
  input  logic       cc6,         // six-state opcode fetch
  input  logic       last_mc,     // present machine cycle ends the instruction
  input  logic       valid_int,
  input  logic       halt_set,
  input  logic       inta_clr,
  output tstate_e    state,
  output logic [2:0] mc,
  output logic       mc_end,      // this state ends a machine cycle
  output logic       int_accept,  // interrupt taken at this clock edge
  output logic       halt_ff,
  output logic       hlda_ff,
  output logic       inta_ff
);

  tstate_e next;
  logic    hold_seen;   // HOLD sampled high in this state
  logic    hlda_clr;

  always_comb begin
    next       = state;
    mc_end     = 1'b0;
    hold_seen  = 1'b0;
    int_accept = 1'b0;
    hlda_clr   = 1'b0;
    unique case (state)
      ST_RESET: next = ST_T1;
      ST_T1:    next = halt_ff ? ST_HALT : ST_T2;
      ST_T2, ST_WAIT: begin
        if (bus_cycle && !ready) begin
          next = ST_WAIT;
        end else begin
          next      = ST_T3;
          hold_seen = hold;
        end
      end
      ST_T3: begin
        if (mc == 3'd1) next = ST_T4;
        else            mc_end = 1'b1;
      end
      ST_T4: begin
        if (cc6) begin
          next      = ST_T5;
          hold_seen = hold;
        end else begin
          mc_end = 1'b1;
        end
      end
      ST_T5: next = ST_T6;
      ST_T6: mc_end = 1'b1;
      ST_HOLD: begin
        if (!hold) begin
          hlda_clr = 1'b1;
          next     = halt_ff ? ST_HALT : ST_T1;
        end
      end
      ST_HALT: begin
        if (hold) begin
          hold_seen = 1'b1;
          next      = ST_HOLD;
        end else if (valid_int) begin
          int_accept = 1'b1;
          next       = ST_T1;
        end
      end
      default: next = ST_RESET;
    endcase

    if (mc_end) begin
      if (hlda_ff) begin
        next = ST_HOLD;
      end else begin
        next = ST_T1;
        if (last_mc && valid_int) int_accept = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_RESET;
      mc      <= 3'd1;
      halt_ff <= 1'b0;
      hlda_ff <= 1'b0;
      inta_ff <= 1'b0;
    end else begin
      state <= next;
      if (mc_end) mc <= last_mc ? 3'd1 : mc + 3'd1;
      if (hold_seen)     hlda_ff <= 1'b1;
      else if (hlda_clr) hlda_ff <= 1'b0;
      if (int_accept)    halt_ff <= 1'b0;
      else if (halt_set) halt_ff <= 1'b1;
      if (int_accept)    inta_ff <= 1'b1;
      else if (inta_clr) inta_ff <= 1'b0;
    end
  end

endmodule
