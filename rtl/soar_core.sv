// soar_core: the SOAR processor pipeline at machine-cycle level.
//
// SOAR is a 32-bit RISC for compiled Smalltalk: register windows, tag_op
// 31-bit integers checked by hardware, single-cycle calls and jumps through
// the off-chip "fast shuffle" address path, and traps that leave the
// trapping instruction's operands in shadow registers for software to
// emulate it. Every instruction takes three cycles, overlapped:
//   fetch   - memory address latch MAL drives the pads; the word arrives at
//             the end of the cycle into the instruction latches (CPIPE1m,
//             SRC1m, SRC2m, DST1m, DIL);
//   execute - the instruction sits in CPIPE1s; operands are read (A bus:
//             S1, special registers, zero; B bus: S2; L bus: immediate),
//             the ALU result goes to the DST latch, PC and MAL are updated;
//   write   - the instruction sits in CPIPE2s/DST2s; its result (ALU value,
//             nil, load data or the saved PC) is written to the register
//             file, or to a special register.
// A result in its write cycle is forwarded to the instruction in execute.
// Loads and stores add a memory data cycle: the control pipe is jammed with
// load0/store0 (load1..7/store1..7 for the multiple forms, counting down the
// DST or SRC2 field) while the next instruction waits in CPIPE1m.
// ret and the forced TRAP flush the instruction being fetched; a successful
// skip squashes the next instruction into SKIP; a trap replaces the next
// instruction with TRAP and cancels the trapping one's write cycle. TRAP
// saves the PC chain (lastPC) into register 7 and sends MAL to the vector
// {TB<27:10>, reason<3:0>, opcode<5:0>}, disabling external interrupts.
//
// Timing model: the chip's three-phase latches are collapsed into registers
// clocked at the end of each machine cycle (clk with clock enable en, one
// enable per machine cycle). Memory is read combinationally within the
// cycle (data_in must be valid for address addr_o before the cycle ends).
// The phase-level precharged buses are modelled as multiplexers. WAIT is
// sampled at the end of a cycle and freezes all state in the next cycle;
// wait_ack follows one cycle later. reset_in is sampled the same way.
// These are choices of this model; the register transfers themselves follow
// the document's node descriptions.
module soar_core
  import soar_pkg::*;
#(
  // PC and MAL value forced by RESET (the document's #x0ffff0)
  parameter logic [27:0] RESET_PC  = 28'h00F_FFF0,
  // nil: the Emeritus tag 1011 on a zero value
  parameter logic [31:0] NIL_VALUE = 32'hB000_0000
) (
  input  logic        clk,
  input  logic        en,
  input  logic        reset_in,
  input  logic        wait_in,
  input  logic        ioint_in,
  input  logic        pagef_in,
  input  logic [31:0] data_in,
  output logic [27:0] mal_o,
  output logic [31:0] data_out,
  output logic        rd_wr,
  output logic        i_d,
  output logic        fshcntl,
  output logic        wait_q,
  output logic        wait_ack,
  output logic [27:0] pc_o,
  output logic [2:0]  cwp_o,
  output logic [1:0]  psw_o,
  output logic        trap_o,
  output logic [3:0]  trap_reason_o
);

  // ---------------------------------------------------------------- state
  logic        reset_q;
  // instruction (fetch) latches: CPIPE1m, SRC1m, SRC2m, DST1m, DIL
  cpipe1_t     cp1m;
  logic [4:0]  src1m, src2m, dst1m;
  logic [31:0] dil;
  // execute-stage latches
  cpipe1_t     cp1s;
  logic [4:0]  src1s, src2s, dst1s;
  // write-stage latches
  cpipe2_t     cp2s;
  logic [4:0]  dst2s;
  logic [31:0] dst_q;        // DST latch (ALU result)
  logic [31:0] inb_q;        // B input latch (held in data cycles)
  logic [31:0] loadl_q;      // LOADL: load data in, store data out
  // program counter chain and memory address
  logic [27:0] pc_q, mal_q;
  logic [31:0] lastpc_q;
  // special registers
  logic [31:0] tb_q, swp_q, sha_q, shb_q;
  logic [1:0]  psw_q;
  logic [7:0]  shopc_q;
  logic [4:0]  shdst_q;
  // trap / skip state
  logic        trap_q, skip_q;
  logic [3:0]  reason_q;
  logic        decode_ea_q;
  logic [2:0]  nil_win_q;

  // ------------------------------------------------------------- decoding
  ctl1_t c1;
  ctl2_t c2;
  soar_ctrl_pla1 u_pla1 (.cp1(cp1s), .ctl(c1));
  soar_ctrl_pla2 u_pla2 (.cp2(cp2s), .ctl(c2));

  logic run;                 // state advances this cycle
  assign run = en & ~wait_q;

  // --------------------------------------------------------- incoming word
  logic        cpipe1_load;
  cpipe1_t     in_cp;
  cpipe1_t     cp1m_eff;
  logic [4:0]  src1m_eff, src2m_eff, dst1m_eff;
  logic [31:0] databus_in;

  assign databus_in = rd_wr ? data_in : loadl_q;   // a store cycle sees its own data
  assign cpipe1_load = ~reset_q & ~c1.data_access;
  assign in_cp = {databus_in[31], databus_in[12], databus_in[30:23]};
  assign cp1m_eff  = reset_q ? CP1_FLUSH : (cpipe1_load ? in_cp : cp1m);
  assign src1m_eff = cpipe1_load ? databus_in[17:13] : src1m;
  assign src2m_eff = cpipe1_load ? databus_in[11:7]  : src2m;
  assign dst1m_eff = cpipe1_load ? databus_in[22:18] : dst1m;

  // --------------------------------------------------------- window logic
  logic [2:0] cwp;
  logic       win_ovf, win_unf;
  logic       trap_fire;
  logic       write_to_cwp;

  soar_cwp u_cwp (
    .clk(clk), .en(run), .rst(reset_q),
    .dec(c1.change_cwp_dec), .inc(c1.change_cwp_inc),
    .write(write_to_cwp), .wdata(dst_q[6:4]), .hold(trap_fire),
    .swp_win(swp_q[6:4]), .cwp(cwp),
    .overflow(win_ovf), .underflow(win_unf)
  );

  // --------------------------------------------------------- operand read
  logic        src_valid, dst_valid;
  logic        fwd_a, fwd_b, azero;
  logic [31:0] wb_alu;          // D bus value of the write-stage instruction
  logic [31:0] fwd_val;
  logic [31:0] rf_qa, rf_qb;
  logic [6:0]  rf_ra, rf_rb;
  logic [31:0] bus_a, bus_b, bus_l, sxt_y;
  logic [31:0] ina, inb;
  logic        pbus_b_to_inb;
  logic        rf_we;          // register file write port (third cycle)
  logic [6:0]  rf_wa;
  logic [31:0] rf_wd;

  assign dst_valid = c2.dst_valid;
  assign src_valid = ~c1.azero_force & ~c2.busd_to_ina;
  assign wb_alu    = c2.nil_on_return ? NIL_VALUE : dst_q;
  assign fwd_val   = c2.opc2_load ? loadl_q : wb_alu;
  assign fwd_a = (src1s != R_ZERO) && (src1s == dst2s) && dst_valid && src_valid;
  assign fwd_b = (src2s != R_ZERO) && (src2s == dst2s) && dst_valid && src_valid;
  assign azero = c1.azero_force | (src1s == R_ZERO && src_valid);

  assign rf_ra = regdecode(cwp, src1s);
  assign rf_rb = decode_ea_q ? regdecode(dst_q[6:4], {1'b0, dst_q[3:0]}) : regdecode(cwp, src2s);

  always_comb begin
    if (azero)                         bus_a = 32'd0;
    else if (fwd_a)                    bus_a = fwd_val;
    else begin
      unique case (src1s)
        R_PC:    bus_a = {4'd0, pc_q};
        R_SHB:   bus_a = shb_q;
        R_SHA:   bus_a = sha_q;
        R_SWP:   bus_a = swp_q;
        R_TB:    bus_a = tb_q;
        R_CWP:   bus_a = {25'd0, cwp, 4'd0};
        R_PSW:   bus_a = {16'd0, shopc_q, 1'b0, psw_q, shdst_q};
        default: bus_a = rf_qa;
      endcase
    end
  end

  assign bus_b = (!decode_ea_q && fwd_b) ? fwd_val : rf_qb;

  soar_sxt u_sxt (.dil_hi(dil[22:18]), .dil_lo(dil[11:0]), .store_fmt(c1.store_sxt), .y(sxt_y));

  always_comb begin
    if (c1.sxt_to_busl)        bus_l = sxt_y;
    else if (c1.azero_force)   bus_l = dil;
    else                       bus_l = loadl_q;
  end

  assign pbus_b_to_inb = ~c1.busl_to_inb & ~c2.busd_to_ina;
  assign ina = c2.busd_to_ina ? wb_alu : bus_a;
  assign inb = c1.busl_to_inb ? bus_l : (pbus_b_to_inb ? bus_b : inb_q);

  soar_regfile #(.NWORDS(80), .NIL_COUNT(6), .NIL_VALUE(NIL_VALUE)) u_rf (
    .clk(clk), .en(run),
    .ra(rf_ra), .rb(rf_rb), .qa(rf_qa), .qb(rf_qb),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd),
    .nil_en(c2.nil_on_return), .nil_win(nil_win_q)
  );

  // ------------------------------------------------------------------ ALU
  logic [31:0] aproc, alu_y;
  logic        a_msb, b_msb, y_msb, alu_z, a_zero;
  logic        tag_op;
  assign tag_op = cp1s[6];

  soar_byte_exins u_exins (
    .a(ina), .byteno(inb[1:0]), .ex(c1.byte_ex), .ins(c1.byte_ins),
    .pass(c1.ex_ins_pass), .y(aproc)
  );

  soar_alu u_alu (
    .a(aproc), .b(inb), .tag_op(tag_op), .sel_bi_bar(c1.sel_bi_bar), .cin(c1.alu_cin),
    .sel_sum(c1.sel_sum), .sel_xor(c1.sel_xor), .sel_or(c1.sel_or), .sel_and(c1.sel_and),
    .sel_sr(c1.sel_sr), .op_sra(c1.op_sra), .sel_pass(~c1.ex_ins_pass),
    .y(alu_y), .a_msb(a_msb), .b_msb(b_msb), .y_msb(y_msb), .zero(alu_z), .a_zero(a_zero)
  );

  // ------------------------------------------------- conditions and traps
  logic cond_valid, vout, cout_unused;
  soar_condpla u_cond (
    .sel_sum(c1.sel_sum), .a_msb(a_msb), .b_msb(b_msb), .y_msb(y_msb), .zero(alu_z),
    .a_zero(a_zero), .cond(dst1s), .cout(cout_unused), .vout(vout),
    .valid(cond_valid)
  );

  logic tag_trap, gs_trap, ov_pred;
  soar_tagtrap u_tag (
    .a(bus_a[31:28]), .b(bus_b[31:28]), .tag_op(tag_op), .imm(cp1s[8]),
    .op_arith(c1.tag_arith), .op_load(c1.tag_load), .op_store(c1.tag_store),
    .op_ret(c1.tag_ret), .op_ovf(c1.tag_ovf),
    .tag_trap(tag_trap), .gs_trap(gs_trap), .ov_pred(ov_pred)
  );

  logic skip_fire, swi, io_int, ipagef, dpagef;
  logic [3:0] reason;
  assign skip_fire = cond_valid & c1.skip_cond_enable;
  assign swi    = c1.soft_int & psw_q[0];
  assign io_int = ioint_in & psw_q[1];
  assign dpagef = pagef_in & c2.busd_to_ina;
  assign ipagef = pagef_in & ~c2.busd_to_ina;

  soar_trap_encoder u_trapenc (
    .late_trap(trap_q), .valid_trapi(cond_valid & c1.trap_instr), .gs_trap(gs_trap),
    .int_tag_trap(tag_trap | (vout & ov_pred)), .illegal(c1.illegal), .swi(swi),
    .win_overflow(win_ovf), .win_underflow(win_unf), .ipagef(ipagef), .io_int(io_int),
    .dpagef(dpagef), .trap(trap_fire), .reason(reason)
  );

  // ------------------------------------------------ pointer to register
  logic ptr_to_reg;
  soar_ptr_detect u_ptr (.mal(mal_q[27:3]), .swp(swp_q[27:4]), .ptr_to_reg(ptr_to_reg));

  // -------------------------------------------------- write-stage control
  logic write_to_pc, write_to_shb, write_to_sha, write_to_swp, write_to_tb, write_to_psw;
  logic store_write;

  assign write_to_pc  = dst_valid && dst2s == R_PC;
  assign write_to_shb = dst_valid && dst2s == R_SHB;
  assign write_to_sha = dst_valid && dst2s == R_SHA;
  assign write_to_swp = dst_valid && dst2s == R_SWP;
  assign write_to_tb  = dst_valid && dst2s == R_TB;
  assign write_to_cwp = dst_valid && dst2s == R_CWP;
  assign write_to_psw = dst_valid && dst2s == R_PSW;
  assign store_write  = ptr_to_reg & c1.store_write;

  always_comb begin
    if (store_write) begin
      rf_we = 1'b1;
      rf_wa = regdecode(dst_q[6:4], {1'b0, dst_q[3:0]});
      rf_wd = loadl_q;
    end else begin
      rf_we = c2.write_rf;
      rf_wa = regdecode(cwp, dst2s);
      if (c2.last_pc_to_busd)   rf_wd = lastpc_q;
      else if (c2.load_write)   rf_wd = loadl_q;
      else                      rf_wd = wb_alu;
    end
  end

  // ----------------------------------------------------- PC and MAL next
  logic [27:0] pc_next, mal_next, trap_vector;
  assign trap_vector = {tb_q[27:10], reason_q, shopc_q[5:0]};

  always_comb begin
    if (reset_q)                 pc_next = RESET_PC;
    else if (c1.alu_to_pc)       pc_next = alu_y[27:0];
    else if (write_to_pc)        pc_next = dst_q[27:0];
    else if (c1.pc_incr)         pc_next = pc_q + 28'd1;
    else                         pc_next = pc_q;

    if (reset_q)                 mal_next = RESET_PC;
    else if (c1.is_trap_op)      mal_next = trap_vector;
    else if (c1.alu_to_mal)      mal_next = alu_y[27:0];
    else if (c1.pc_to_mal)       mal_next = pc_next;
    else                         mal_next = mal_q;
  end

  // ------------------------------------------------------- state update
  logic bus_shadow;
  assign bus_shadow = c1.pbus_shadow & ~trap_q & psw_q[1];

  always_ff @(posedge clk) begin
    if (en) begin
      reset_q  <= reset_in;
      wait_q   <= wait_in;
      wait_ack <= wait_q;
    end
    if (run) begin
      // instruction latches
      if (reset_q)           cp1m <= CP1_FLUSH;
      else if (cpipe1_load)  cp1m <= in_cp;
      if (cpipe1_load) begin
        src1m <= databus_in[17:13];
        src2m <= databus_in[11:7];
        dst1m <= databus_in[22:18];
        dil   <= databus_in;
      end

      // execute-stage control pipe
      if (reset_q)                cp1s <= CP1_FLUSH;
      else if (trap_fire)         cp1s <= CP1_TRAP;
      else if (c1.cpipe1_flush)   cp1s <= CP1_SKIP;
      else if (skip_fire)         cp1s <= CP1_SKIP;
      else if (c1.cpipe1_step)    cp1s <= cp1m_eff;
      else if (c1.cpipe1_loadc)   cp1s <= CP1_LOAD0;
      else if (c1.cpipe1_store)   cp1s <= CP1_STORE0;
      else if (c1.cpipe1_loadm)   cp1s <= CP1_LOAD0 | cpipe1_t'(3'(dst1s - 5'd1));
      else if (c1.cpipe1_storem)  cp1s <= CP1_STORE0 | cpipe1_t'(src2s[2:0]);

      if (c1.cpipe1_step || reset_q) begin
        src1s <= src1m_eff;
        src2s <= src2m_eff;
        dst1s <= dst1m_eff;
      end else begin
        if (c1.src2_min) src2s <= src2s - 5'd1;
        if (c1.dst1_min) dst1s <= dst1s - 5'd1;
      end

      // write-stage pipe
      if (reset_q)                cp2s <= OP_FLUSH;
      else if (trap_fire)         cp2s <= OP_FLUSH;
      else                        cp2s <= opc_of(cp1s[7], cp1s[5:0]);
      if (reset_q)                   dst2s <= '0;
      else if (c1.pc_stuff_on_call)  dst2s <= 5'd15;
      else if (c1.is_trap_op)        dst2s <= 5'd7;
      else if (c1.dst2_step)         dst2s <= dst1s;

      // datapath latches
      dst_q <= alu_y;
      inb_q <= inb;
      if (c1.databus_into_loadl && !ptr_to_reg) loadl_q <= databus_in;
      else                                      loadl_q <= bus_b;

      // PC chain and MAL
      pc_q  <= pc_next;
      mal_q <= mal_next;
      if (!c1.is_trap_op) lastpc_q <= {4'd0, pc_q};

      // special registers
      if (write_to_tb)  tb_q  <= {dst_q[31:10], 10'd0};
      if (write_to_swp) swp_q <= dst_q;
      if (write_to_sha)     sha_q <= dst_q;
      else if (bus_shadow)  sha_q <= bus_a;
      if (write_to_shb)     shb_q <= dst_q;
      else if (bus_shadow)  shb_q <= c1.busl_to_inb ? bus_l : bus_b;

      if (reset_q)                psw_q <= 2'b00;
      else if (write_to_psw)      psw_q <= dst_q[6:5];
      else if (c1.enable_ints)    psw_q <= psw_q | 2'b10;
      else if (c1.is_trap_op)     psw_q <= psw_q & 2'b01;

      if (reset_q)                shdst_q <= '0;
      else if (write_to_psw)      shdst_q <= dst_q[4:0];
      else if (bus_shadow)        shdst_q <= dst1s;
      if (reset_q)                shopc_q <= '0;
      else if (bus_shadow)        shopc_q <= cp1s[7:0];

      // trap and skip
      trap_q      <= trap_fire & ~reset_q;
      reason_q    <= reason;
      skip_q      <= skip_fire & ~reset_q;
      decode_ea_q <= c1.predecode_ea & ~reset_q;
      nil_win_q   <= cwp;
    end
  end

  // -------------------------------------------------------------- pins
  assign mal_o    = mal_q;
  assign data_out = loadl_q;
  assign rd_wr    = c1.rd_wr;
  assign i_d      = ~c1.data_access;
  assign fshcntl  = cp1s[7] | skip_q;
  assign pc_o     = pc_q;
  assign cwp_o    = cwp;
  assign psw_o    = psw_q;
  assign trap_o   = trap_q;
  assign trap_reason_o = reason_q;

  // A call or jmp in execute, not squashed, must take its target from the
  // external latch; one control line at a time drives the PC.
  a_fsh_on_branch: assert property (@(posedge clk) disable iff (reset_q)
      (c1.is_call || c1.is_jmp) && !skip_q |-> !fshcntl);
  a_one_pc_source: assert property (@(posedge clk) disable iff (reset_q)
      !(c1.alu_to_pc && c1.pc_incr));

endmodule
