// tb_alu -- checks the 8085A ALU against the worked examples (ADD B with
// 9Bh+A5h -> 40h flags 11h; SUB B both ways -> 0Ah/04h and F6h/95h; DCR of
// D2h -> D1h with S, P set and AC clear) and against a reference model
// written here for random operands of every operation.
module tb_alu;
  timeunit 1ns; timeprecision 1ps;
  import i8085_pkg::*;

  logic [7:0] a, b, result;
  alu_op_e    op;
  flags_t     fi, fo;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .flags_in(fi), .result, .flags_out(fo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit par(input logic [7:0] v);
    return ~^v;
  endfunction

  // reference: returns {result, flags}
  function automatic logic [15:0] ref_model(input alu_op_e o, input logic [7:0] x, input logic [7:0] y, input flags_t f);
    int r; logic [7:0] res; flags_t n; bit szp; int lo;
    n = f; szp = 1; res = x;
    case (o)
      ALU_ADD, ALU_ADC: begin
        r = x + y + ((o == ALU_ADC) ? f.cy : 0);
        lo = (x & 15) + (y & 15) + ((o == ALU_ADC) ? f.cy : 0);
        res = r[7:0]; n.cy = r > 255; n.ac = lo > 15;
      end
      ALU_SUB, ALU_SBB, ALU_CMP: begin
        int c; c = (o == ALU_SBB) ? !f.cy : 1;
        r = x + (255 - y) + c;
        lo = (x & 15) + (15 - (y & 15)) + c;
        res = r[7:0]; n.cy = !(r > 255); n.ac = lo > 15;
      end
      ALU_ANA: begin res = x & y; n.cy = 0; n.ac = x[3] | y[3]; end
      ALU_XRA: begin res = x ^ y; n.cy = 0; n.ac = 0; end
      ALU_ORA: begin res = x | y; n.cy = 0; n.ac = 0; end
      ALU_INR: begin res = y + 1; n.ac = (y & 15) == 15; end
      ALU_DCR: begin res = y - 1; n.ac = (y & 15) == 0; end
      ALU_RLC: begin res = {x[6:0], x[7]}; n.cy = x[7]; szp = 0; end
      ALU_RRC: begin res = {x[0], x[7:1]}; n.cy = x[0]; szp = 0; end
      ALU_RAL: begin res = {x[6:0], f.cy}; n.cy = x[7]; szp = 0; end
      ALU_RAR: begin res = {f.cy, x[7:1]}; n.cy = x[0]; szp = 0; end
      ALU_CMA: begin res = ~x; szp = 0; end
      ALU_STC: begin n.cy = 1; szp = 0; end
      ALU_CMC: begin n.cy = !f.cy; szp = 0; end
      ALU_DAA: begin
        int v, add; add = 0; v = x;
        if ((x & 15) > 9 || f.ac) add += 6;
        if ((x >> 4) > 9 || f.cy || ((x >> 4) >= 9 && (x & 15) > 9)) begin add += 8'h60; n.cy = 1; end
        n.ac = ((x & 15) + (add & 15)) > 15;
        v = x + add; res = v[7:0];
      end
      default: ;
    endcase
    if (szp) begin n.s = res[7]; n.z = res == 0; n.p = par(res); end
    n.x5 = 0; n.x3 = 0; n.x1 = 0;
    return {res, n};
  endfunction

  initial begin
    fi = '0;
    a = 8'h9B; b = 8'hA5; op = ALU_ADD; #1;
    check(result == 8'h40 && fo == 8'h11, $sformatf("ADD 9B+A5 -> %02h flags %02h", result, fo));
    a = 8'hA5; b = 8'h9B; op = ALU_SUB; #1;
    check(result == 8'h0A && fo == 8'h04, $sformatf("SUB A5-9B -> %02h flags %02h", result, fo));
    a = 8'h9B; b = 8'hA5; op = ALU_SUB; #1;
    check(result == 8'hF6 && fo == 8'h95, $sformatf("SUB 9B-A5 -> %02h flags %02h", result, fo));
    b = 8'hD2; op = ALU_DCR; #1;
    check(result == 8'hD1 && fo == 8'h84, $sformatf("DCR D2 -> %02h flags %02h", result, fo));
    b = 8'h01; op = ALU_DCR; #1;
    check(result == 8'h00 && fo.z, "DCR 01 -> 00 sets Z");
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] exp;
      a  = 8'($urandom); b = 8'($urandom); fi = flags_t'(8'($urandom) & 8'hD5);
      op = alu_op_e'($urandom_range(0, 17)); #1;
      exp = ref_model(op, a, b, fi);
      check({result, fo} == exp, $sformatf("op %0d a=%02h b=%02h f=%02h: got %02h/%02h want %02h/%02h",
            op, a, b, fi, result, fo, exp[15:8], exp[7:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
