// sys_mem -- behavioural board model for testing an 8085A: 64 KiB memory,
// 256 I/O ports, the address latch that demultiplexes AD7-AD0 on ALE, and
// an interrupt-acknowledge responder.
//
// While ALE is high the model copies A15-A8 and AD7-AD0 into its address
// latch, as a 74LS373 would.  With RD low it drives the addressed memory
// byte (IO/M = 0) or port (IO/M = 1, port number = low address byte) onto
// `ad_in`; with INTA low it drives `inta_opcode`.  Writes are taken on every
// rising clock edge on which WR is low, from the processor's AD7-AD0.
// Memory and ports are plain arrays the testbench fills and inspects.
module sys_mem (
  input  logic       clk,
  input  logic       ale,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic       inta_n,
  input  logic       io_m,
  input  logic [7:0] a_hi,
  input  logic [7:0] ad_out,
  input  logic [7:0] inta_opcode,
  output logic [7:0] ad_in
);

  logic [7:0]  mem [0:65535];
  logic [7:0]  io  [0:255];
  logic [15:0] addr_q;
  int unsigned n_writes;

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    for (int i = 0; i < 256; i++)   io[i]  = 8'h00;
    addr_q   = 16'h0000;
    n_writes = 0;
  end

  always @(posedge clk) begin
    if (!wr_n) begin
      if (io_m) io[addr_q[7:0]] <= ad_out;
      else      mem[addr_q]     <= ad_out;
      n_writes <= n_writes + 1;
    end
  end

  always_latch begin
    if (ale) addr_q = {a_hi, ad_out};
  end

  always_comb begin
    if (!inta_n)     ad_in = inta_opcode;
    else if (!rd_n)  ad_in = io_m ? io[addr_q[7:0]] : mem[addr_q];
    else             ad_in = 8'hFF;
  end

endmodule
