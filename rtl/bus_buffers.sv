// bus_buffers -- address buffer and address/data buffer of the 8085A.
//
// The address buffer drives A15-A8 with the high byte of the address latch.
// The address/data buffer time-multiplexes AD7-AD0: in T1 (`addr_phase`) it
// drives the low address byte, which external logic latches with ALE; in
// write cycles it then drives the 8-bit data output latch, loaded from the
// internal data bus with `data_load` on a rising clock edge; otherwise it is
// floated so memory or I/O can drive it, and `data_in` carries the pins to
// the internal bus.  The three-state pins are split into a value and an
// output enable (`*_oe` high = driven), since the design has no tri-state
// nets inside; a pad ring or the board joins them.  The control unit floats
// both buses in THALT, THOLD and TRESET by clearing the enables.
// A15-A8, their enable and `data_in` are plain wires from the inputs: on
// those lines the buffer only drives or floats the pins, and the
// multiplexing and the data latch are its only logic.
module bus_buffers (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        a_hi_en,
  input  logic        addr_phase,
  input  logic        data_load,
  input  logic [7:0]  data_int,
  input  logic        data_drive,
  output logic [7:0]  a_hi,
  output logic        a_hi_oe,
  output logic [7:0]  ad_out,
  output logic        ad_oe,
  input  logic [7:0]  ad_in,
  output logic [7:0]  data_in
);

  logic [7:0] data_latch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      data_latch <= '0;
    else if (data_load)
      data_latch <= data_int;
  end

  assign a_hi    = addr[15:8];
  assign a_hi_oe = a_hi_en;
  assign ad_out  = addr_phase ? addr[7:0] : data_latch;
  assign ad_oe   = addr_phase || data_drive;
  assign data_in = ad_in;

endmodule
