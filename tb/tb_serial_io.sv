// tb_serial_io -- checks the serial I/O control: SOD clears on reset, SIM
// with bit 6 set copies bit 7 to SOD, SIM with bit 6 clear leaves it, and
// the SID pin reaches the RIM bit two clocks later through the
// synchroniser.  A random sequence is compared with a reference model.
module tb_serial_io;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n, sid, sim_we, sod, rim_sid;
  logic [7:0] sim_data;
  logic exp_sod;
  logic [1:0] sid_pipe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_io dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    sid = 1; sim_we = 0; sim_data = 0;
    rst_n = 0; #12;
    check(sod == 0 && rim_sid == 0, "reset clears SOD and the SID synchroniser");
    rst_n = 1;
    @(posedge clk); #1; sim_we = 1; sim_data = 8'hC0;
    @(posedge clk); #1; sim_we = 0;
    check(sod == 1, "SIM C0h sets SOD");
    sim_we = 1; sim_data = 8'h00; @(posedge clk); #1; sim_we = 0;
    check(sod == 1, "SIM with SDE clear keeps SOD");
    sim_we = 1; sim_data = 8'h40; @(posedge clk); #1; sim_we = 0;
    check(sod == 0, "SIM 40h clears SOD");
    exp_sod = 0; sid_pipe = {rim_sid, dut.sid_meta};
    for (int i = 0; i < 400; i++) begin
      sid = 1'($urandom); sim_we = 1'($urandom); sim_data = 8'($urandom);
      @(posedge clk);
      if (sim_we && sim_data[6]) exp_sod = sim_data[7];
      sid_pipe = {sid_pipe[0], sid};
      #1;
      check(sod == exp_sod, "SOD follows SIM");
      check(rim_sid == sid_pipe[1], "SID delayed two clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
