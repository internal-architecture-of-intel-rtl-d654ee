// tb_reg_array -- checks the register array against a reference copy kept
// here: 8-bit writes to B..L, W, Z; 16-bit writes to BC, DE, HL, SP, PC and
// WZ; XCHG; the SSS and RP read ports; pair byte order (B high, C low);
// PC = 0000h after reset.
module tb_reg_array;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic clk = 0, rst_n;
  logic [2:0] rd_sel;
  logic [7:0] rd_data, w8_data;
  logic [1:0] rp_sel;
  logic [15:0] rp_data, w16_data, pc, sp, bc, de, hl, wz;
  logic we8, we16, xchg;
  w8_e w8_sel;
  w16_e w16_sel;
  int checks = 0, failures = 0;
  logic [7:0] r [0:7];   // B C D E H L W Z
  logic [15:0] rsp, rpc;

  always #5 clk = ~clk;

  reg_array dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we8 = 0; we16 = 0; xchg = 0; rd_sel = 0; rp_sel = 0;
    w8_sel = W8_B; w16_sel = W16_BC; w8_data = 0; w16_data = 0;
    rst_n = 0; #12; rst_n = 1;
    check(pc == 16'h0000, "PC = 0000h after reset");
    for (int i = 0; i < 8; i++) r[i] = 0;
    rsp = 0; rpc = 0;
    for (int n = 0; n < 600; n++) begin
      int k;
      k = $urandom_range(0, 2);
      we8 = (k == 0); we16 = (k == 1); xchg = (k == 2);
      w8_sel = w8_e'($urandom_range(0, 7)); w8_data = 8'($urandom);
      w16_sel = w16_e'($urandom_range(0, 5)); w16_data = 16'($urandom);
      @(posedge clk); #1;
      if (k == 0) r[w8_sel] = w8_data;
      if (k == 1) case (w16_sel)
        W16_BC: {r[0], r[1]} = w16_data;
        W16_DE: {r[2], r[3]} = w16_data;
        W16_HL: {r[4], r[5]} = w16_data;
        W16_SP: rsp = w16_data;
        W16_PC: rpc = w16_data;
        default: {r[6], r[7]} = w16_data;
      endcase
      if (k == 2) begin
        logic [15:0] t; t = {r[2], r[3]}; {r[2], r[3]} = {r[4], r[5]}; {r[4], r[5]} = t;
      end
      we8 = 0; we16 = 0; xchg = 0;
      rd_sel = 3'($urandom_range(0, 5)); rp_sel = 2'($urandom); #1;
      check(rd_data == r[rd_sel], "SSS read port");
      check(rp_data == (rp_sel == 3 ? rsp : {r[2*rp_sel], r[2*rp_sel+1]}), "RP read port");
      check(bc == {r[0], r[1]} && de == {r[2], r[3]} && hl == {r[4], r[5]} && wz == {r[6], r[7]}, "pair outputs");
      check(sp == rsp && pc == rpc, "SP and PC");
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
