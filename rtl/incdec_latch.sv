// incdec_latch -- increment/decrement address latch of the 8085A.
//
// A 16-bit latch that takes the address chosen by the timing and control unit
// (PC, SP, a register pair or WZ) and holds it on the address lines for the
// rest of the machine cycle.  It is transparent while `load` is high (the
// address appears on `addr` in the same state, T1) and captures it on the
// rising clock edge that ends that state.  Its incrementer and decrementer
// outputs (`inc`, `dec`) give the held value plus and minus one, which the
// control unit writes back to the source register, e.g. PC+1 in T2 or the SP
// updates of PUSH and POP; this is how any 16-bit register is incremented or
// decremented.  Clears on reset (own choice).
module incdec_latch (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] din,
  output logic [15:0] addr,
  output logic [15:0] inc,
  output logic [15:0] dec
);

  logic [15:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (load)
      q <= din;
  end

  assign addr = load ? din : q;
  assign inc  = q + 16'd1;
  assign dec  = q - 16'd1;

endmodule
