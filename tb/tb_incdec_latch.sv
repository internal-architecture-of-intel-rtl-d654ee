// tb_incdec_latch -- checks that the address latch is transparent while
// loading, holds the address afterwards, and that its incrementer and
// decrementer give the held value plus and minus one, wrapping at 16 bits.
module tb_incdec_latch;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n, load;
  logic [15:0] din, addr, inc, dec;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  incdec_latch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    load = 0; din = 0;
    rst_n = 0; #12; rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [15:0] v;
      v = (n == 0) ? 16'hFFFF : (n == 1) ? 16'h0000 : 16'($urandom);
      load = 1; din = v; #1;
      check(addr == v, "transparent while loading");
      @(posedge clk); #1;
      load = 0; din = ~v; #1;
      check(addr == v, "address held");
      check(inc == 16'(v + 1) && dec == 16'(v - 1), $sformatf("inc/dec of %04h", v));
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
