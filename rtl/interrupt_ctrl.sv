// interrupt_ctrl -- interrupt control section of the 8085A.
//
// Collects the five interrupt inputs TRAP, RST7.5, RST6.5, RST5.5 and INTR
// and tells the state generator when a valid interrupt is waiting
// (`valid_int`).  TRAP cannot be masked or disabled; the other four need the
// interrupt-enable flip-flop INTE (set by EI, cleared by DI, by reset and
// when an interrupt is taken), and the three restart inputs can each be
// masked by SIM.  Priority is TRAP, RST7.5, RST6.5, RST5.5, INTR.
// TRAP and RST7.5 are caught on a rising edge and held in a flip-flop until
// taken (RST7.5 can also be cleared by SIM bit 4); RST6.5, RST5.5 and INTR
// are levels.  When the state generator takes an interrupt (`int_accept`)
// the winner is recorded: `ack_intr` says the INTR input was taken, which
// the processor answers with an interrupt acknowledge cycle, otherwise
// `ack_vector` holds the restart address (TRAP 0024h, RST7.5 003Ch, RST6.5
// 0034h, RST5.5 002Ch).  `rim_bits` gives RIM bits 6..0: pending I7.5,
// I6.5, I5.5, IE and the masks M7.5, M6.5, M5.5.  SIM (`sim_we`) takes the
// accumulator: bit 3 enables loading masks from bits 2..0, bit 4 resets the
// RST7.5 flip-flop.  Reset sets all masks and clears INTE.  Vectors,
// priority, edge/level sensing and the SIM/RIM bit layout are those of the
// 8085A part, which the architecture description only names.
module interrupt_ctrl
  import i8085_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trap,
  input  logic        rst75,
  input  logic        rst65,
  input  logic        rst55,
  input  logic        intr,
  input  logic        ei,
  input  logic        di,
  input  logic        sim_we,
  input  logic [7:0]  sim_data,
  input  logic        int_accept,
  output logic        valid_int,
  output logic        inte,
  output logic        ack_intr,
  output logic [15:0] ack_vector,
  output logic [6:0]  rim_bits
);

  logic trap_q, trap_ff, r75_q, r75_ff;
  logic m75, m65, m55;
  logic p75, p65, p55, pintr;

  assign p75   = inte && r75_ff && !m75;
  assign p65   = inte && rst65 && !m65;
  assign p55   = inte && rst55 && !m55;
  assign pintr = inte && intr;

  assign valid_int = trap_ff || p75 || p65 || p55 || pintr;
  assign rim_bits  = {r75_ff, rst65, rst55, inte, m75, m65, m55};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trap_q     <= 1'b0;
      trap_ff    <= 1'b0;
      r75_q      <= 1'b0;
      r75_ff     <= 1'b0;
      {m75, m65, m55} <= 3'b111;
      inte       <= 1'b0;
      ack_intr   <= 1'b0;
      ack_vector <= 16'h0000;
    end else begin
      trap_q <= trap;
      r75_q  <= rst75;
      if (trap && !trap_q) trap_ff <= 1'b1;
      if (rst75 && !r75_q) r75_ff  <= 1'b1;

      if (ei) inte <= 1'b1;
      if (di) inte <= 1'b0;

      if (sim_we) begin
        if (sim_data[3]) {m75, m65, m55} <= sim_data[2:0];
        if (sim_data[4]) r75_ff <= 1'b0;
      end

      if (int_accept) begin
        inte     <= 1'b0;
        ack_intr <= 1'b0;
        if (trap_ff) begin
          trap_ff    <= 1'b0;
          ack_vector <= VEC_TRAP;
        end else if (p75) begin
          r75_ff     <= 1'b0;
          ack_vector <= VEC_RST75;
        end else if (p65) begin
          ack_vector <= VEC_RST65;
        end else if (p55) begin
          ack_vector <= VEC_RST55;
        end else begin
          ack_intr   <= 1'b1;
        end
      end
    end
  end

endmodule
