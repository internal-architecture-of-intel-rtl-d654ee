// alu -- arithmetic logic unit of the 8085A.
//
// Purely combinational.  Operand `a` is the accumulator and operand `b` the
// temporary register; the operation comes from the timing and control unit.
// It adds, subtracts (with and without carry/borrow), compares, increments
// and decrements (of `b`), ANDs, ORs, XORs, complements, rotates and
// decimal-adjusts, and returns the result with the new flag register.
//
// Flags follow the behaviour the 8085A is known for: S is bit 7 of the
// result, Z is set for a zero result, P is set for an even number of ones,
// CY is the carry out of bit 7 for additions and its complement (a borrow)
// for subtractions, which are done as a + ~b + 1.  AC is the carry from bit 3
// into bit 4 of that same addition, so A5h-9Bh gives AC=0 and 9Bh-A5h AC=1.
// Decrement sets AC only when the low nibble borrows (D2h-1 gives flags 84h
// with CY clear); increment sets it on a carry out of the low nibble.
// INR/DCR leave CY alone; rotates change only CY; CMA changes no flag.
// AND sets AC to a3|b3 and clears CY; OR and XOR clear both (own choice).
// The three unused flag bits are always 0.
module alu
  import i8085_pkg::*;
(
  input  logic [7:0] a,        // accumulator
  input  logic [7:0] b,        // temporary register
  input  alu_op_e    op,
  input  flags_t     flags_in, // present flag register
  output logic [7:0] result,
  output flags_t     flags_out
);

  logic [8:0] sum;
  logic [4:0] nib;
  logic       cin;
  logic [7:0] adj;
  logic       set_szp;
  logic       daa_lo, daa_hi;

  always_comb begin
    flags_out     = flags_in;
    result        = a;
    set_szp       = 1'b1;
    sum           = '0;
    nib           = '0;
    cin           = 1'b0;
    adj           = '0;
    daa_lo        = 1'b0;
    daa_hi        = 1'b0;

    unique case (op)
      ALU_ADD, ALU_ADC: begin
        cin           = (op == ALU_ADC) ? flags_in.cy : 1'b0;
        sum           = {1'b0, a} + {1'b0, b} + {8'd0, cin};
        nib           = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'd0, cin};
        result        = sum[7:0];
        flags_out.cy  = sum[8];
        flags_out.ac  = nib[4];
      end
      ALU_SUB, ALU_SBB, ALU_CMP: begin
        cin           = (op == ALU_SBB) ? ~flags_in.cy : 1'b1;
        sum           = {1'b0, a} + {1'b0, ~b} + {8'd0, cin};
        nib           = {1'b0, a[3:0]} + {1'b0, ~b[3:0]} + {4'd0, cin};
        result        = sum[7:0];
        flags_out.cy  = ~sum[8];
        flags_out.ac  = nib[4];
      end
      ALU_ANA: begin
        result        = a & b;
        flags_out.cy  = 1'b0;
        flags_out.ac  = a[3] | b[3];
      end
      ALU_XRA: begin
        result        = a ^ b;
        flags_out.cy  = 1'b0;
        flags_out.ac  = 1'b0;
      end
      ALU_ORA: begin
        result        = a | b;
        flags_out.cy  = 1'b0;
        flags_out.ac  = 1'b0;
      end
      ALU_INR: begin
        result        = b + 8'd1;
        flags_out.ac  = (b[3:0] == 4'hF);
      end
      ALU_DCR: begin
        result        = b - 8'd1;
        flags_out.ac  = (b[3:0] == 4'h0);
      end
      ALU_RLC: begin
        result        = {a[6:0], a[7]};
        flags_out.cy  = a[7];
        set_szp       = 1'b0;
      end
      ALU_RRC: begin
        result        = {a[0], a[7:1]};
        flags_out.cy  = a[0];
        set_szp       = 1'b0;
      end
      ALU_RAL: begin
        result        = {a[6:0], flags_in.cy};
        flags_out.cy  = a[7];
        set_szp       = 1'b0;
      end
      ALU_RAR: begin
        result        = {flags_in.cy, a[7:1]};
        flags_out.cy  = a[0];
        set_szp       = 1'b0;
      end
      ALU_DAA: begin
        daa_lo        = (a[3:0] > 4'd9) || flags_in.ac;
        daa_hi        = (a[7:4] > 4'd9) || flags_in.cy ||
                        ((a[7:4] == 4'd9) && (a[3:0] > 4'd9));
        adj           = {daa_hi ? 4'h6 : 4'h0, daa_lo ? 4'h6 : 4'h0};
        nib           = {1'b0, a[3:0]} + {1'b0, adj[3:0]};
        result        = a + adj;
        flags_out.ac  = nib[4];
        flags_out.cy  = flags_in.cy | daa_hi;
      end
      ALU_CMA: begin
        result        = ~a;
        set_szp       = 1'b0;
      end
      ALU_STC: begin
        flags_out.cy  = 1'b1;
        set_szp       = 1'b0;
      end
      ALU_CMC: begin
        flags_out.cy  = ~flags_in.cy;
        set_szp       = 1'b0;
      end
      default: set_szp = 1'b0;
    endcase

    if (set_szp) begin
      flags_out.s = result[7];
      flags_out.z = (result == 8'd0);
      flags_out.p = ~^result;
    end
    flags_out.x5 = 1'b0;
    flags_out.x3 = 1'b0;
    flags_out.x1 = 1'b0;
  end

endmodule
