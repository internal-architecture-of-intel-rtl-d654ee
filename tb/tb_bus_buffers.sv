// tb_bus_buffers -- checks the address and address/data buffers: A15-A8
// follow the address high byte with their enable, AD7-AD0 carry the low
// address byte during the address phase, the data output latch (loaded on a
// rising edge) while writing, and float otherwise; data in passes the pins
// through.  Random stimulus against a reference model.
module tb_bus_buffers;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n;
  logic [15:0] addr;
  logic a_hi_en, addr_phase, data_load, data_drive;
  logic [7:0] data_int, a_hi, ad_out, ad_in, data_in;
  logic a_hi_oe, ad_oe;
  logic [7:0] latch;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_buffers dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    {addr, a_hi_en, addr_phase, data_load, data_drive, data_int, ad_in} = '0;
    rst_n = 0; #12;
    check(!ad_oe && !a_hi_oe && ad_out == 0, "reset: buses floated, latch clear");
    rst_n = 1; latch = 0;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      if (data_load) latch = data_int;
      #1;
      addr = 16'($urandom); a_hi_en = 1'($urandom); addr_phase = 1'($urandom);
      data_load = 1'($urandom); data_drive = 1'($urandom);
      data_int = 8'($urandom); ad_in = 8'($urandom);
      #1;
      check(a_hi == addr[15:8] && a_hi_oe == a_hi_en, "A15-A8");
      check(ad_oe == (addr_phase | data_drive), "AD enable");
      check(ad_out == (addr_phase ? addr[7:0] : latch), "AD value");
      check(data_in == ad_in, "data in");
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
