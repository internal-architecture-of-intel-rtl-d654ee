// tb_arith_section -- checks the accumulator, temporary register and flag
// register: bus loads, ALU commits into A and flags, CMP-style commits that
// keep A, flag loads with the unused bits forced to 0, and reset.
module tb_arith_section;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic clk = 0, rst_n;
  logic a_we, tr_we, fr_we, alu_commit, commit_a;
  logic [7:0] a_din, tr_din, fr_din, acc, tr, alu_result;
  alu_op_e alu_op;
  flags_t flags, alu_flags;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arith_section dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(posedge clk); #1;
    {a_we, tr_we, fr_we, alu_commit, commit_a} = '0;
  endtask

  initial begin
    {a_we, tr_we, fr_we, alu_commit, commit_a} = '0;
    a_din = 0; tr_din = 0; fr_din = 0; alu_op = ALU_ADD;
    rst_n = 0; #12; rst_n = 1;
    check(acc == 0 && tr == 0 && flags == 0, "reset clears A, TR, flags");
    a_we = 1; a_din = 8'h9B; tr_we = 1; tr_din = 8'hA5; step();
    check(acc == 8'h9B && tr == 8'hA5, "A and TR loaded from the bus");
    check(flags == 0, "data transfer leaves flags alone");
    alu_op = ALU_ADD; alu_commit = 1; commit_a = 1; step();
    check(acc == 8'h40 && flags == 8'h11, "ADD commit: A=40h flags=11h");
    check(tr == 8'hA5, "TR kept");
    a_we = 1; a_din = 8'h05; tr_we = 1; tr_din = 8'h05; step();
    alu_op = ALU_CMP; alu_commit = 1; commit_a = 0; step();
    check(acc == 8'h05 && flags.z && !flags.cy, "CMP commit sets Z, keeps A");
    fr_we = 1; fr_din = 8'hFF; step();
    check(flags == 8'hD5, "flag load forces unused bits to 0");
    for (int i = 0; i < 200; i++) begin
      logic [7:0] x;
      x = 8'($urandom);
      a_we = 1; a_din = x; step();
      alu_op = ALU_CMA; alu_commit = 1; commit_a = 1; step();
      check(acc == ~x, "CMA commit complements A");
    end
    rst_n = 0; #1;
    check(acc == 0 && flags == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
