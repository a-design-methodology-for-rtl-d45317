// soar_ctrl_pla1: first-stage control PLA.
//
// Decodes the instruction held in the slave of the first control-pipe latch
// (CPIPE1s) into the control signals of the fetch and execute cycles and of
// the memory data cycle of loads and stores. It is purely combinational; the
// core qualifies the outputs with the WAIT and RESET state. The product terms
// follow the document's PLA equations and control-signal descriptions
// opcode by opcode (cpla1, xcpla1, apla, tpla opcode predicates and the
// illegal-opcode PLA). The decoding into one-hot opcode flags is this
// design's own way of writing the PLA.
//
// Interface: cp1 is the 10-bit CPIPE1s value (see soar_pkg); ctl is the
// decoded control struct.
module soar_ctrl_pla1
  import soar_pkg::*;
(
  input  cpipe1_t cp1,
  output ctl1_t   ctl
);

  opc_t op;
  logic call_op, jmp_op, fs;
  logic ret_any, ld_n, st_n, ld_17, st_17, st_27, trapn;
  logic arith, logic_op, legal;

  always_comb begin
    op      = opc_of(cp1[7], cp1[5:0]);
    fs      = ~cp1[7];                       // fast shuffle format
    call_op = fs & ~cp1[5];
    jmp_op  = fs &  cp1[5];
    ret_any = ~fs && op[6:3] == OP_RET0[6:3];     // 110..117
    trapn   = ~fs && op[6:3] == OP_TRAP1[6:3] && op[2:0] != 3'd0; // 121..127
    ld_n    = ~fs && op[6:3] == 4'b1110;     // load0..7
    st_n    = ~fs && op[6:3] == 4'b1111;     // store0..7
    ld_17   = ld_n & (op[2:0] != 3'd0);
    st_17   = st_n & (op[2:0] != 3'd0);
    st_27   = st_n & (op[2:0] >= 3'd2);
    arith   = ~fs && (op == OP_ADD || op == OP_SUB || op == OP_SLL || op == OP_SRL ||
                      op == OP_SRA);
    logic_op= ~fs && (op == OP_AND || op == OP_OR || op == OP_XOR);

    legal = fs | (op == OP_FLUSH) | (op == OP_TRAPX) | (op == OP_SKIPX) | ret_any |
            ld_n | st_n | arith | logic_op | (op == OP_EXTRACT) | (op == OP_INSERT) |
            (op == OP_SKIP) | trapn | (op == OP_LOAD) | (op == OP_LOADM) |
            (op == OP_LOADC) | (op == OP_STORE) | (op == OP_STOREM);

    ctl = '0;
    ctl.is_call       = call_op;
    ctl.is_jmp        = jmp_op;
    ctl.is_trap_op    = ~fs & (op == OP_TRAPX);
    ctl.data_access   = ld_n | st_n;
    ctl.cpipe1_step   = ~(ld_17 | st_17 | ret_any | (~fs & (op == OP_LOAD || op == OP_LOADC ||
                          op == OP_LOADM || op == OP_STORE || op == OP_STOREM || op == OP_TRAPX)));
    ctl.cpipe1_loadc  = ~fs & (op == OP_LOAD || op == OP_LOADC);
    ctl.cpipe1_store  = ~fs & (op == OP_STORE);
    ctl.cpipe1_loadm  = (~fs & (op == OP_LOADM)) | ld_17;
    ctl.cpipe1_storem = (~fs & (op == OP_STOREM)) | st_17;
    ctl.cpipe1_flush  = ret_any | (~fs & (op == OP_TRAPX));
    ctl.dst1_min      = ld_17;
    ctl.src2_min      = (~fs & (op == OP_STOREM)) | st_27;
    ctl.pc_incr       = (~fs & (op == OP_FLUSH || op == OP_TRAPX || op == OP_SKIPX ||
                          op == OP_EXTRACT || op == OP_INSERT || op == OP_SKIP)) |
                        arith | logic_op | trapn |
                        (~fs & (op == OP_LOAD0 || op == OP_STORE0));
    ctl.alu_to_pc     = ret_any | fs;
    ctl.alu_to_mal    = ret_any | fs | ld_17 | st_17 |
                        (~fs & (op == OP_LOADM || op == OP_LOADC || op == OP_LOAD ||
                                op == OP_STOREM || op == OP_STORE));
    ctl.pc_to_mal     = (~fs & (op == OP_FLUSH || op == OP_SKIPX || op == OP_LOAD0 ||
                          op == OP_STORE0 || op == OP_SKIP || op == OP_EXTRACT ||
                          op == OP_INSERT)) | trapn | arith | logic_op;
    ctl.dst2_step     = ~call_op & ~(~fs & (op == OP_TRAPX));
    ctl.pc_stuff_on_call = call_op;
    ctl.change_cwp_dec= call_op;
    ctl.change_cwp_inc= ret_any & op[0];     // W option
    ctl.enable_ints   = ret_any & op[2];     // I option
    ctl.rd_wr         = ~st_n;
    ctl.store_sxt     = ~fs & (op == OP_STORE || op == OP_STOREM);
    ctl.sxt_to_busl   = cp1[8] & ~fs & ~st_n;
    ctl.azero_force   = fs;
    ctl.soft_int      = fs & cp1[6];
    ctl.busl_to_inb   = (cp1[8] & ~fs & ~st_n) | fs;
    ctl.store_write   = ~fs & (op == OP_STORE0);
    ctl.databus_into_loadl = ~(st_17 | (~fs & (op == OP_STORE || op == OP_STOREM)));
    ctl.byte_ex       = ~fs & (op == OP_EXTRACT);
    ctl.byte_ins      = ~fs & (op == OP_INSERT);
    ctl.ex_ins_pass   = ~(~fs & (op == OP_EXTRACT || op == OP_INSERT));
    ctl.sel_bi_bar    = (~fs & (op == OP_SUB || op == OP_STOREM || op == OP_LOADM ||
                          op == OP_SKIP)) | trapn | st_17 | ld_17;
    ctl.alu_cin       = ctl.sel_bi_bar | fs;
    ctl.sel_xor       = ~fs & (op == OP_XOR);
    ctl.sel_or        = ~fs & (op == OP_OR);
    ctl.sel_and       = ~fs & (op == OP_AND);
    ctl.sel_sr        = ~fs & (op == OP_SRA || op == OP_SRL);
    ctl.op_sra        = ~fs & (op == OP_SRA);
    ctl.sel_sum       = ctl.ex_ins_pass & ~ctl.sel_xor & ~ctl.sel_or & ~ctl.sel_and & ~ctl.sel_sr;
    ctl.predecode_ea  = ~fs & (op == OP_LOAD || op == OP_LOADC || op == OP_STORE);
    ctl.pbus_shadow   = ~(ld_n | st_n);
    ctl.illegal       = cp1[9] | ~legal;
    ctl.skip_cond_enable = ~fs & (op == OP_SKIP);
    ctl.trap_instr    = trapn;
    ctl.tag_arith     = arith | logic_op | trapn | (~fs & (op == OP_SKIP));
    ctl.tag_load      = ~fs & (op == OP_LOAD || op == OP_LOADC);
    ctl.tag_store     = ~fs & (op == OP_STORE);
    ctl.tag_ret       = ret_any;
    ctl.tag_ovf       = ~fs & (op == OP_SUB || op == OP_ADD || op == OP_SLL);
  end

endmodule
