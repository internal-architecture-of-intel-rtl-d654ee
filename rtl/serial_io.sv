// serial_io -- serial I/O control of the 8085A.
//
// One bit of serial data in each direction, moved by program: SIM writes
// the SOD output latch and RIM reads the SID input, so software shifts bits
// in and out one at a time to convert between serial and parallel form.
// On SIM (`sim_we`) the accumulator's bit 6 (serial data enable) decides
// whether bit 7 is copied to the SOD latch.  `rim_sid` is the SID pin for
// RIM bit 7; it passes through two flip-flops to synchronise the
// asynchronous pin (own choice).  SOD clears on reset.  The bit positions
// are those of the 8085A SIM/RIM instructions.
module serial_io (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sid,
  input  logic       sim_we,
  input  logic [7:0] sim_data,
  output logic       sod,
  output logic       rim_sid
);

  logic sid_meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sod      <= 1'b0;
      sid_meta <= 1'b0;
      rim_sid  <= 1'b0;
    end else begin
      sid_meta <= sid;
      rim_sid  <= sid_meta;
      if (sim_we && sim_data[6]) sod <= sim_data[7];
    end
  end

endmodule
