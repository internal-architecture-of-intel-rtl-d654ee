// arith_section -- accumulator, temporary register and flag register around
// the ALU of the 8085A.
//
// The accumulator (A) and temporary register (TR) feed the two operand inputs
// of the ALU through their always-visible outputs.  The timing and control
// unit loads TR with the second operand, then asserts `alu_commit` for one
// clock: the flag register takes the ALU's flags and, when `commit_a` is set,
// A takes the ALU result (other destinations read `alu_result` instead).
// A and the flag register can also be loaded straight from the internal bus
// (`a_we`, `fr_we`), e.g. for MOV A,r or POP PSW; the unused flag bits are
// forced to 0 on every load.  A bus load of A wins over a commit in the same
// clock.  All three registers clear on reset (own choice, the 8085A leaves
// them undefined).  Every load takes effect on the rising clock edge.
module arith_section
  import i8085_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_we,
  input  logic [7:0] a_din,
  input  logic       tr_we,
  input  logic [7:0] tr_din,
  input  logic       fr_we,
  input  logic [7:0] fr_din,
  input  alu_op_e    alu_op,
  input  logic       alu_commit,
  input  logic       commit_a,
  output logic [7:0] acc,
  output logic [7:0] tr,
  output flags_t     flags,
  output logic [7:0] alu_result,
  output flags_t     alu_flags
);

  alu u_alu (
    .a        (acc),
    .b        (tr),
    .op       (alu_op),
    .flags_in (flags),
    .result   (alu_result),
    .flags_out(alu_flags)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      tr    <= '0;
      flags <= '0;
    end else begin
      if (a_we)
        acc <= a_din;
      else if (alu_commit && commit_a)
        acc <= alu_result;
      if (tr_we)
        tr <= tr_din;
      if (fr_we)
        flags <= flags_t'(fr_din & 8'hD5);
      else if (alu_commit)
        flags <= alu_flags;
    end
  end

endmodule
