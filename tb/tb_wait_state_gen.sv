// tb_wait_state_gen -- checks the one-WAIT-state circuit with the processor
// timing it was designed for: the processor steps on the rising edge of
// `clk`, the circuit is clocked by CLK(OUT) = ~clk, and `arm` is high for
// one processor state (T1, as ALE).  READY must be low at exactly one
// processor sampling edge (end of T2) per armed cycle and high at all
// others, and nothing happens when not armed.
module tb_wait_state_gen;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, clk_out, rst_n, arm, q1, q2, ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign clk_out = ~clk;

  wait_state_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // count READY-low samples at the processor's rising edges over n states
  task automatic run(input int n, input bit armed, output int lows, output int first_low);
    lows = 0; first_low = -1;
    for (int s = 0; s < n; s++) begin
      arm = armed && (s == 0);       // T1
      @(posedge clk);
      if (!ready) begin lows++; if (first_low < 0) first_low = s; end
      #1;
    end
    arm = 0;
  endtask

  initial begin
    int lows, first;
    arm = 0;
    rst_n = 0; #12;
    check(ready && !q1 && !q2, "reset: READY high");
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 20; k++) begin
      run(5 + k % 3, 1, lows, first);
      check(lows == 1, $sformatf("cycle %0d: one READY-low sample (%0d)", k, lows));
      check(first == 1, "READY low at the end of T2");
      check(ready, "READY high again");
      run(4, 0, lows, first);
      check(lows == 0, "no wait when not armed");
    end
    // arm held high: one wait per arming edge sequence, never stuck low
    arm = 1;
    repeat (12) begin @(posedge clk); check(!q1 || !q2, "Q2 clears Q1"); end
    arm = 0;
    repeat (3) @(posedge clk);
    check(ready, "READY high after arm drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
