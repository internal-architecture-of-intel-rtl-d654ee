// i8085a -- the 8085A 8-bit microprocessor: arithmetic and logic section,
// register section, interrupt control, serial I/O, timing and control unit
// and bus buffers, joined by an 8-bit internal data path.
//
// One clock period is one T-state; state changes and register loads happen
// on the rising edge of `clk`.  RESET IN (`reset_in_n`, active low,
// asynchronous) holds the processor in TRESET with PC = 0000h; execution
// starts at 0000h when it is released.  Each machine cycle puts the address
// on A15-A8 and AD7-AD0 in T1 with ALE high, then uses AD7-AD0 for data in
// T2/T3 with RD, WR or INTA low; READY low in T2 adds WAIT states, HOLD
// gives the buses away after the current machine cycle (HLDA high in THOLD),
// HLT stops in THALT, and TRAP, RST7.5/6.5/5.5 and INTR are served at the
// end of an instruction.  Every three-state pin group is brought out as a
// value plus an output enable (`a_hi_oe`, `ad_oe`, `ctl_oe` for RD, WR and
// IO/M), and the bidirectional AD bus as separate `ad_out`/`ad_in`.
// The internal tri-state data bus is modelled as multiplexers in the control
// unit.  RESET OUT is high while the processor is in TRESET.
// Assertions check the bus rules at every clock outside TRESET: one strobe
// at a time, ALE only in T1, all pins floated while HLDA is high.  The block
// structure and state behaviour follow the architecture description; the
// instruction set details come from the 8085A part (see the blocks).
module i8085a
  import i8085_pkg::*;
(
  input  logic       clk,
  input  logic       reset_in_n,
  output logic       reset_out,
  input  logic       ready,
  input  logic       hold,
  output logic       hlda,
  input  logic       trap,
  input  logic       rst75,
  input  logic       rst65,
  input  logic       rst55,
  input  logic       intr,
  output logic       inta_n,
  input  logic       sid,
  output logic       sod,
  output logic [7:0] a_hi,
  output logic       a_hi_oe,
  output logic [7:0] ad_out,
  output logic       ad_oe,
  input  logic [7:0] ad_in,
  output logic       ale,
  output logic       rd_n,
  output logic       wr_n,
  output logic       io_m,
  output logic       s1,
  output logic       s0,
  output logic       ctl_oe
);

  // state generator
  tstate_e    state;
  logic [2:0] mc;
  logic       mc_end, int_accept, inta_ff;
  logic       bus_cycle, cc6, last_mc, halt_set, inta_clr;
  // decoder
  decoded_t   dec;
  logic       ir_we, vint;
  // interrupt / serial
  logic        valid_int, ack_intr, ei, di, sim_we, rim_sid;
  logic [15:0] ack_vector;
  logic [6:0]  rim_bits;
  // arithmetic section
  logic [7:0] acc, tr, alu_result, a_din, tr_din, fr_din;
  flags_t     flags;
  logic       a_we, tr_we, fr_we, alu_commit, commit_a;
  alu_op_e    alu_op;
  // register array
  logic [7:0]  rd_data, w8_data;
  logic [15:0] rp_data, pc, sp, bc, de, hl, wz, w16_data;
  logic [2:0]  rd_sel;
  logic [1:0]  rp_sel;
  logic        we8, we16, xchg;
  w8_e         w8_sel;
  w16_e        w16_sel;
  // address latch and buffers
  logic [15:0] lat_addr, lat_inc, lat_dec, lat_din;
  logic        lat_load;
  logic [7:0]  data_in, data_out;
  logic        a_hi_en, addr_phase, data_load, data_drive;

  assign reset_out = (state == ST_RESET);
  assign hlda      = (state == ST_HOLD);

  state_gen u_state (
    .clk, .rst_n(reset_in_n), .ready, .hold, .bus_cycle, .cc6, .last_mc,
    .valid_int, .halt_set, .inta_clr, .state, .mc, .mc_end, .int_accept,
    .halt_ff(), .hlda_ff(), .inta_ff
  );

  instr_decoder u_dec (
    .clk, .rst_n(reset_in_n), .ir_we, .ir_din(data_in), .vint, .ir(), .dec
  );

  interrupt_ctrl u_int (
    .clk, .rst_n(reset_in_n), .trap, .rst75, .rst65, .rst55, .intr, .ei, .di,
    .sim_we, .sim_data(acc), .int_accept, .valid_int, .inte(), .ack_intr,
    .ack_vector, .rim_bits
  );

  serial_io u_sio (
    .clk, .rst_n(reset_in_n), .sid, .sim_we, .sim_data(acc), .sod, .rim_sid
  );

  arith_section u_arith (
    .clk, .rst_n(reset_in_n), .a_we, .a_din, .tr_we, .tr_din, .fr_we, .fr_din,
    .alu_op, .alu_commit, .commit_a, .acc, .tr, .flags, .alu_result, .alu_flags()
  );

  reg_array u_regs (
    .clk, .rst_n(reset_in_n), .rd_sel, .rd_data, .rp_sel, .rp_data, .we8,
    .w8_sel, .w8_data, .we16, .w16_sel, .w16_data, .xchg, .pc, .sp, .bc, .de,
    .hl, .wz
  );

  incdec_latch u_latch (
    .clk, .rst_n(reset_in_n), .load(lat_load), .din(lat_din), .addr(lat_addr),
    .inc(lat_inc), .dec(lat_dec)
  );

  bus_buffers u_bus (
    .clk, .rst_n(reset_in_n), .addr(lat_addr), .a_hi_en, .addr_phase,
    .data_load, .data_int(data_out), .data_drive, .a_hi, .a_hi_oe, .ad_out,
    .ad_oe, .ad_in, .data_in
  );

  control_unit u_ctl (
    .clk, .rst_n(reset_in_n),
    .state, .mc, .mc_end, .inta_ff, .bus_cycle, .cc6, .last_mc, .halt_set,
    .inta_clr, .dec, .ir_we, .vint,
    .ack_intr, .ack_vector, .rim_bits, .rim_sid, .ei, .di, .sim_we,
    .acc, .tr, .flags, .alu_result, .a_we, .a_din, .tr_we, .tr_din, .fr_we,
    .fr_din, .alu_op, .alu_commit, .commit_a,
    .rd_data, .rp_data, .pc, .sp, .bc, .de, .hl, .wz, .rd_sel, .rp_sel, .we8,
    .w8_sel, .w8_data, .we16, .w16_sel, .w16_data, .xchg,
    .lat_addr, .lat_inc, .lat_dec, .lat_load, .lat_din,
    .data_in, .a_hi_en, .addr_phase, .data_load, .data_out, .data_drive,
    .ale, .rd_n, .wr_n, .inta_n, .io_m, .s1, .s0, .ctl_oe
  );

  // Bus rules: at most one of RD, WR and INTA is active, ALE comes only in
  // T1, and the processor drives no pin while it has granted HOLD.
  a_one_strobe: assert property (@(posedge clk) disable iff (reset_out)
    $onehot0({!rd_n, !wr_n, !inta_n}));
  a_ale_in_t1: assert property (@(posedge clk) disable iff (reset_out)
    ale |-> state == ST_T1);
  a_float_in_hold: assert property (@(posedge clk) disable iff (reset_out)
    hlda |-> !(a_hi_oe || ad_oe || ctl_oe));

endmodule
