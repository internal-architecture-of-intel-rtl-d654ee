// control_unit -- machine-cycle sequencing of the 8085A timing and control
// unit.
//
// Given the present T-state and machine-cycle number from the state
// generator and the decoded instruction, it drives every control signal of
// the datapath and the bus pins.  Each machine cycle follows the micro-RTL
// flow of its kind:
//   T1: status {IO/M,S1,S0} for the cycle, ALE, the address from PC, a
//       register pair, SP or WZ through the address latch to A15-A8 and
//       AD7-AD0; write data goes into the data output latch.
//   T2: RD, WR or INTA low; the source register is written back from the
//       incrementer/decrementer (PC+1 after every byte fetched through PC,
//       SP+-1 for the stack, WZ+1 for LHLD/SHLD); READY low inserts TWAIT.
//   T3: the byte on AD7-AD0 is taken in (into IR in an opcode fetch).
//   T4..T6 of an opcode fetch: decode and internal register operations.
// ALU results are written one clock after the temporary register is loaded
// (a pending operation finished in the next state, usually T1 of the next
// machine cycle), so the ALU always works on A and TR.  Register-to-register
// instructions finish in T4, 16-bit ones in T5.  Conditional calls and
// returns that are not taken end early; conditional jumps always read their
// address bytes (own choice).  After an interrupt is taken, the next opcode
// fetch is replaced by an INTA cycle (INTR: the opcode, normally RST n, is
// read with INTA low and PC is not incremented) or by a six-state bus-idle
// cycle (TRAP, RST7.5/6.5/5.5) followed by two memory writes that push PC,
// after which PC takes the restart address.
// The tri-state pins are represented by values plus enables (`ctl_oe` for
// RD, WR, IO/M); they float in TRESET, THALT and THOLD.
module control_unit
  import i8085_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // state generator
  input  tstate_e     state,
  input  logic [2:0]  mc,
  input  logic        mc_end,
  input  logic        inta_ff,
  output logic        bus_cycle,
  output logic        cc6,
  output logic        last_mc,
  output logic        halt_set,
  output logic        inta_clr,
  // instruction register / decoder
  input  decoded_t    dec,
  output logic        ir_we,
  output logic        vint,
  // interrupt control and serial I/O
  input  logic        ack_intr,
  input  logic [15:0] ack_vector,
  input  logic [6:0]  rim_bits,
  input  logic        rim_sid,
  output logic        ei,
  output logic        di,
  output logic        sim_we,
  // arithmetic section
  input  logic [7:0]  acc,
  input  logic [7:0]  tr,
  input  flags_t      flags,
  input  logic [7:0]  alu_result,
  output logic        a_we,
  output logic [7:0]  a_din,
  output logic        tr_we,
  output logic [7:0]  tr_din,
  output logic        fr_we,
  output logic [7:0]  fr_din,
  output alu_op_e     alu_op,
  output logic        alu_commit,
  output logic        commit_a,
  // register array
  input  logic [7:0]  rd_data,
  input  logic [15:0] rp_data,
  input  logic [15:0] pc,
  input  logic [15:0] sp,
  input  logic [15:0] bc,
  input  logic [15:0] de,
  input  logic [15:0] hl,
  input  logic [15:0] wz,
  output logic [2:0]  rd_sel,
  output logic [1:0]  rp_sel,
  output logic        we8,
  output w8_e         w8_sel,
  output logic [7:0]  w8_data,
  output logic        we16,
  output w16_e        w16_sel,
  output logic [15:0] w16_data,
  output logic        xchg,
  // address latch
  input  logic [15:0] lat_addr,
  input  logic [15:0] lat_inc,
  input  logic [15:0] lat_dec,
  output logic        lat_load,
  output logic [15:0] lat_din,
  // bus buffers
  input  logic [7:0]  data_in,
  output logic        a_hi_en,
  output logic        addr_phase,
  output logic        data_load,
  output logic [7:0]  data_out,
  output logic        data_drive,
  // control and status pins
  output logic        ale,
  output logic        rd_n,
  output logic        wr_n,
  output logic        inta_n,
  output logic        io_m,
  output logic        s1,
  output logic        s0,
  output logic        ctl_oe
);

  // ---------------------------------------------------------------- state
  logic       vint_q, intack_q;       // interrupt instruction in progress
  logic       pend_q;                 // ALU result waits to be written
  logic       pend_a_q, pend_r_q;     // ... into A / into register pend_dst_q
  logic [2:0] pend_dst_q;
  alu_op_e    alu_op_q;

  // ------------------------------------------------------- present cycle
  mc_plan_t   plan;
  logic       active;                 // T1..T6 or TWAIT
  logic       rw_phase;               // T2, TWAIT, T3
  logic       is_read, is_write;
  logic       cond_true;
  logic [2:0] nmc_eff;
  logic [7:0] src8;
  logic [15:0] src_addr;
  logic [16:0] dad_sum;
  logic       instr_end;

  assign vint   = vint_q;
  assign alu_op = alu_op_q;

  always_comb begin
    unique case (dec.ddd)
      3'b000: cond_true = !flags.z;
      3'b001: cond_true =  flags.z;
      3'b010: cond_true = !flags.cy;
      3'b011: cond_true =  flags.cy;
      3'b100: cond_true = !flags.p;
      3'b101: cond_true =  flags.p;
      3'b110: cond_true = !flags.s;
      default: cond_true = flags.s;
    endcase
    if (!dec.cond) cond_true = 1'b1;

    nmc_eff = dec.nmc;
    if (dec.cond && !cond_true) begin
      if (dec.cls == I_RET)  nmc_eff = 3'd1;
      if (dec.cls == I_CALL) nmc_eff = 3'd3;
    end

    if (mc == 3'd1) begin
      plan.src   = AS_PC;
      plan.idact = ID_NONE;
      if (inta_ff)
        plan.kind = ack_intr ? MC_INTA : MC_BI;
      else begin
        plan.kind  = MC_OF;
        plan.idact = ID_INC;
      end
    end else begin
      plan = dec.mc[2'(mc - 3'd2)];
      if (intack_q && plan.kind == MC_MR && plan.src == AS_PC) begin
        plan.kind  = MC_INTA;
        plan.idact = ID_NONE;
      end
    end

    unique case (plan.src)
      AS_PC:   src_addr = pc;
      AS_HL:   src_addr = hl;
      AS_BC:   src_addr = bc;
      AS_DE:   src_addr = de;
      AS_SP:   src_addr = sp;
      AS_WZ:   src_addr = wz;
      default: src_addr = {wz[7:0], wz[7:0]};
    endcase

    active    = state inside {ST_T1, ST_T2, ST_T3, ST_T4, ST_T5, ST_T6, ST_WAIT};
    rw_phase  = state inside {ST_T2, ST_WAIT, ST_T3};
    is_read   = plan.kind inside {MC_OF, MC_MR, MC_IOR, MC_INTA};
    is_write  = plan.kind inside {MC_MW, MC_IOW};
    bus_cycle = plan.kind != MC_BI;
    cc6       = dec.cc6;
    last_mc   = (mc >= nmc_eff);
    instr_end = mc_end && last_mc;

    rd_sel = (dec.cls == I_INR_R) ? dec.ddd : dec.sss;
    rp_sel = dec.rp;
    src8   = (rd_sel == R_A) ? acc : rd_data;
    dad_sum = {1'b0, hl} + {1'b0, rp_data};
  end

  // ------------------------------------------------------------- pins
  always_comb begin
    ctl_oe     = active;
    {io_m, s1, s0} = active ? mc_status(plan.kind) : 3'b000;
    ale        = (state == ST_T1) && bus_cycle;
    rd_n       = !(rw_phase && plan.kind inside {MC_OF, MC_MR, MC_IOR});
    wr_n       = !(rw_phase && is_write);
    inta_n     = !(rw_phase && plan.kind == MC_INTA);
    a_hi_en    = active && bus_cycle;
    addr_phase = (state == ST_T1) && bus_cycle;
    data_drive = rw_phase && is_write;
  end

  // Write data for the memory/I-O write cycles, loaded in T1.
  always_comb begin
    data_out = acc;
    unique case (dec.cls)
      I_MOV_MR: data_out = src8;
      I_MVI_M:  data_out = tr;
      I_INR_M:  data_out = alu_result;
      I_SHLD:   data_out = (mc == 3'd4) ? hl[7:0] : hl[15:8];
      I_XTHL:   data_out = (mc == 3'd4) ? hl[15:8] : hl[7:0];
      I_PUSH: begin
        if (dec.rp == RP_SP) data_out = (mc == 3'd2) ? acc : flags;
        else                 data_out = (mc == 3'd2) ? rp_data[15:8] : rp_data[7:0];
      end
      I_CALL:   data_out = (mc == 3'd4) ? pc[15:8] : pc[7:0];
      I_RST, I_VINT: data_out = (mc == 3'd2) ? pc[15:8] : pc[7:0];
      default:  data_out = acc;
    endcase
    data_load = (state == ST_T1) && is_write;
  end

  // ------------------------------------------------- datapath controls
  // Write one 8-bit register given its SSS/DDD code (A or B..L).
  task automatic put_r8(input logic [2:0] code, input logic [7:0] val);
    if (code == R_A) begin
      a_we  = 1'b1;
      a_din = val;
    end else begin
      we8     = 1'b1;
      w8_sel  = w8_e'({1'b0, code});
      w8_data = val;
    end
  endtask

  task automatic put_r16(input w16_e sel, input logic [15:0] val);
    we16     = 1'b1;
    w16_sel  = sel;
    w16_data = val;
  endtask

  logic       pend_set, pend_a, pend_r;
  logic [2:0] pend_dst;

  always_comb begin
    a_we = 1'b0;  a_din = 8'h00;
    tr_we = 1'b0; tr_din = 8'h00;
    fr_we = 1'b0; fr_din = 8'h00;
    we8 = 1'b0;   w8_sel = W8_B;  w8_data = 8'h00;
    we16 = 1'b0;  w16_sel = W16_BC; w16_data = 16'h0000;
    xchg = 1'b0;
    ir_we = 1'b0;
    halt_set = 1'b0;
    ei = 1'b0; di = 1'b0; sim_we = 1'b0;
    lat_load = 1'b0; lat_din = src_addr;
    pend_set = 1'b0; pend_a = 1'b0; pend_r = 1'b0; pend_dst = dec.ddd;
    inta_clr = inta_ff && mc_end && (mc == 3'd1);

    // Pending ALU result from the previous clock.
    alu_commit = pend_q;
    commit_a   = pend_a_q;
    if (pend_q && pend_r_q) put_r8(pend_dst_q, alu_result);

    // T1: address into the latch.
    if (state == ST_T1 && bus_cycle) begin
      lat_load = 1'b1;
      lat_din  = src_addr;
    end

    // T2: increment / decrement the address source.
    if (state == ST_T2 && bus_cycle && plan.idact != ID_NONE) begin
      unique case (plan.src)
        AS_PC:   put_r16(W16_PC, plan.idact == ID_INC ? lat_inc : lat_dec);
        AS_SP:   put_r16(W16_SP, plan.idact == ID_INC ? lat_inc : lat_dec);
        default: put_r16(W16_WZ, plan.idact == ID_INC ? lat_inc : lat_dec);
      endcase
    end

    // T3 of a read cycle: take the byte in.
    if (state == ST_T3 && is_read) begin
      if (mc == 3'd1) begin
        ir_we = 1'b1;
      end else begin
        unique case (dec.cls)
          I_MOV_RM, I_MVI_R: put_r8(dec.ddd, data_in);
          I_MVI_M: begin tr_we = 1'b1; tr_din = data_in; end
          I_ALU_M, I_ALU_I: begin
            tr_we = 1'b1; tr_din = data_in;
            pend_set = 1'b1; pend_a = (dec.alu_op != ALU_CMP);
          end
          I_INR_M: begin
            tr_we = 1'b1; tr_din = data_in;
            pend_set = 1'b1;
          end
          I_LXI: begin
            if (mc == 3'd2) begin we8 = 1'b1; w8_sel = W8_Z; w8_data = data_in; end
            else            put_r16(w16_e'({1'b0, dec.rp}), {data_in, wz[7:0]});
          end
          I_LDA, I_STA, I_LHLD, I_SHLD, I_CALL, I_XTHL: begin
            if (mc == 3'd2)      begin we8 = 1'b1; w8_sel = W8_Z; w8_data = data_in; end
            else if (mc == 3'd3) begin we8 = 1'b1; w8_sel = W8_W; w8_data = data_in; end
            else if (dec.cls == I_LDA) put_r8(R_A, data_in);
            else if (mc == 3'd4) put_r8(R_L, data_in);
            else                 put_r8(R_H, data_in);
          end
          I_JMP: begin
            if (mc == 3'd2) begin we8 = 1'b1; w8_sel = W8_Z; w8_data = data_in; end
            else if (cond_true) put_r16(W16_PC, {data_in, wz[7:0]});
            else begin we8 = 1'b1; w8_sel = W8_W; w8_data = data_in; end
          end
          I_RET: begin
            if (mc == 3'd2) begin we8 = 1'b1; w8_sel = W8_Z; w8_data = data_in; end
            else            put_r16(W16_PC, {data_in, wz[7:0]});
          end
          I_LDAX, I_IN: begin
            if (dec.cls == I_IN && mc == 3'd2) put_r16(W16_WZ, {data_in, data_in});
            else                               put_r8(R_A, data_in);
          end
          I_OUT: put_r16(W16_WZ, {data_in, data_in});
          I_POP: begin
            if (dec.rp == RP_SP) begin
              if (mc == 3'd2) begin fr_we = 1'b1; fr_din = data_in; end
              else            put_r8(R_A, data_in);
            end else begin
              put_r8({dec.rp, (mc == 3'd2)}, data_in);
            end
          end
          default: ;
        endcase
      end
    end

    // T4 of the opcode fetch: single-cycle work and 16-bit set-up.
    if (state == ST_T4 && mc == 3'd1) begin
      unique case (dec.cls)
        I_MOV_RR: put_r8(dec.ddd, src8);
        I_ALU_R: begin
          tr_we = 1'b1; tr_din = src8;
          pend_set = 1'b1; pend_a = (dec.alu_op != ALU_CMP);
        end
        I_INR_R: begin
          tr_we = 1'b1; tr_din = src8;
          pend_set = 1'b1;
          pend_a   = (dec.ddd == R_A);
          pend_r   = (dec.ddd != R_A);
        end
        I_ACC: begin pend_set = 1'b1; pend_a = 1'b1; end
        I_XCHG: xchg = 1'b1;
        I_EI:   ei = 1'b1;
        I_DI:   di = 1'b1;
        I_HLT:  halt_set = 1'b1;
        I_SIM:  sim_we = 1'b1;
        I_RIM:  put_r8(R_A, {rim_sid, rim_bits});
        I_INX: begin lat_load = 1'b1; lat_din = rp_data; end
        I_PCHL, I_SPHL: begin lat_load = 1'b1; lat_din = hl; end
        default: begin
          if (dec.sp_predec && cond_true) begin
            lat_load = 1'b1; lat_din = sp;
          end
        end
      endcase
    end

    // T5: 16-bit write-backs.
    if (state == ST_T5 && mc == 3'd1) begin
      unique case (dec.cls)
        I_INX:  put_r16(w16_e'({1'b0, dec.rp}), dec.ddd[0] ? lat_dec : lat_inc);
        I_PCHL: put_r16(W16_PC, lat_addr);
        I_SPHL: put_r16(W16_SP, lat_addr);
        default: if (dec.sp_predec && cond_true) put_r16(W16_SP, lat_dec);
      endcase
    end

    // End of the last machine cycle.
    if (instr_end && mc != 3'd1) begin
      unique case (dec.cls)
        I_CALL: if (cond_true) put_r16(W16_PC, wz);
        I_RST:  put_r16(W16_PC, {10'd0, dec.ddd, 3'd0});
        I_VINT: put_r16(W16_PC, ack_vector);
        I_XTHL: put_r16(W16_HL, wz);
        I_DAD: begin
          put_r16(W16_HL, dad_sum[15:0]);
          fr_we  = 1'b1;
          fr_din = {flags[7:1], dad_sum[16]};
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vint_q     <= 1'b0;
      intack_q   <= 1'b0;
      pend_q     <= 1'b0;
      pend_a_q   <= 1'b0;
      pend_r_q   <= 1'b0;
      pend_dst_q <= 3'd0;
      alu_op_q   <= ALU_ADD;
    end else begin
      if (state == ST_T1 && mc == 3'd1 && inta_ff) begin
        vint_q   <= !ack_intr;
        intack_q <=  ack_intr;
      end else if (instr_end) begin
        vint_q   <= 1'b0;
        intack_q <= 1'b0;
      end
      pend_q   <= pend_set;
      pend_a_q <= pend_a;
      pend_r_q <= pend_r;
      if (pend_set) begin
        pend_dst_q <= pend_dst;
        alu_op_q   <= dec.alu_op;
      end
    end
  end

endmodule
