// reg_array -- register section of the 8085A: B, C, D, E, H, L, the internal
// W and Z registers, the stack pointer SP and the program counter PC.
//
// Reads are combinational: one 8-bit register chosen by a 3-bit SSS code
// (B=000 .. L=101; codes 110 and 111, M and A, read 0 here because M is
// memory and A lives in the arithmetic section), one register pair chosen by
// the 2-bit RP code (BC, DE, HL, SP), and the pairs PC, SP, HL, BC, DE and WZ
// on their own ports.  In every pair the first-named register is the high
// byte.  Writes happen on the rising clock edge: one 8-bit write (`we8`) and
// one 16-bit write (`we16`) per clock, the 8-bit one winning where they
// overlap, and `xchg` swaps DE with HL.  Reset loads PC with 0000h, as the
// 8085A does; the other registers clear too (own choice).
module reg_array
  import i8085_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  rd_sel,
  output logic [7:0]  rd_data,
  input  logic [1:0]  rp_sel,
  output logic [15:0] rp_data,
  input  logic        we8,
  input  w8_e         w8_sel,
  input  logic [7:0]  w8_data,
  input  logic        we16,
  input  w16_e        w16_sel,
  input  logic [15:0] w16_data,
  input  logic        xchg,
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [15:0] bc,
  output logic [15:0] de,
  output logic [15:0] hl,
  output logic [15:0] wz
);

  logic [7:0] b_q, c_q, d_q, e_q, h_q, l_q, w_q, z_q;

  assign bc = {b_q, c_q};
  assign de = {d_q, e_q};
  assign hl = {h_q, l_q};
  assign wz = {w_q, z_q};

  always_comb begin
    unique case (rd_sel)
      R_B:     rd_data = b_q;
      R_C:     rd_data = c_q;
      R_D:     rd_data = d_q;
      R_E:     rd_data = e_q;
      R_H:     rd_data = h_q;
      R_L:     rd_data = l_q;
      default: rd_data = 8'h00;
    endcase
    unique case (rp_sel)
      RP_BC:   rp_data = bc;
      RP_DE:   rp_data = de;
      RP_HL:   rp_data = hl;
      default: rp_data = sp;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {b_q, c_q, d_q, e_q, h_q, l_q, w_q, z_q} <= '0;
      sp <= '0;
      pc <= '0;
    end else begin
      if (xchg) begin
        {d_q, e_q} <= {h_q, l_q};
        {h_q, l_q} <= {d_q, e_q};
      end
      if (we16) begin
        unique case (w16_sel)
          W16_BC:  {b_q, c_q} <= w16_data;
          W16_DE:  {d_q, e_q} <= w16_data;
          W16_HL:  {h_q, l_q} <= w16_data;
          W16_SP:  sp         <= w16_data;
          W16_PC:  pc         <= w16_data;
          default: {w_q, z_q} <= w16_data;
        endcase
      end
      if (we8) begin
        unique case (w8_sel)
          W8_B:    b_q <= w8_data;
          W8_C:    c_q <= w8_data;
          W8_D:    d_q <= w8_data;
          W8_E:    e_q <= w8_data;
          W8_H:    h_q <= w8_data;
          W8_L:    l_q <= w8_data;
          W8_W:    w_q <= w8_data;
          default: z_q <= w8_data;
        endcase
      end
    end
  end

endmodule
