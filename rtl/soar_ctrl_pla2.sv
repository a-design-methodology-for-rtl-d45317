// soar_ctrl_pla2: second-stage control PLA.
//
// Decodes the opcode in the slave of the second control-pipe latch (CPIPE2s),
// i.e. the instruction in its register-write cycle, into the signals of that
// cycle: which value is written to the register file (ALU result, nil, load
// data or the saved PC), whether the DST field is valid for forwarding, and
// whether the ALU A input takes the D bus (effective-address update during
// the data cycles of loads and stores). Product terms follow the document's
// cpla2 equations; purely combinational.
module soar_ctrl_pla2
  import soar_pkg::*;
(
  input  cpipe2_t cp2,
  output ctl2_t   ctl
);

  opc_t op;
  logic fs, call_op, jmp_op, ret_any, ld_n, st_n, ld_17, st_17, trapn;

  always_comb begin
    op      = cp2;
    fs      = ~cp2[6];
    call_op = fs & ~cp2[5];
    jmp_op  = fs &  cp2[5];
    ret_any = ~fs && op[6:3] == OP_RET0[6:3];
    trapn   = ~fs && op[6:3] == OP_TRAP1[6:3] && op[2:0] != 3'd0;
    ld_n    = ~fs && op[6:3] == 4'b1110;
    st_n    = ~fs && op[6:3] == 4'b1111;
    ld_17   = ld_n & (op[2:0] != 3'd0);
    st_17   = st_n & (op[2:0] != 3'd0);
    ctl = '0;
    ctl.load_write    = ld_n;
    ctl.nil_on_return = ret_any & op[1];     // N option
    ctl.write_rf      = ~(st_n | jmp_op | trapn | (ret_any & ~op[1]) |
                          (~fs & (op == OP_STORE || op == OP_STOREM || op == OP_LOAD ||
                                  op == OP_LOADC || op == OP_LOADM || op == OP_FLUSH ||
                                  op == OP_SKIPX || op == OP_SKIP)));
    ctl.busd_to_ina   = ld_17 | st_17 |
                        (~fs & (op == OP_LOADM || op == OP_LOAD || op == OP_LOADC ||
                                op == OP_STORE || op == OP_STOREM));
    ctl.dst_valid     = ~(trapn | st_n | fs |
                          (~fs & (op == OP_SKIP || op == OP_FLUSH || op == OP_STORE ||
                                  op == OP_STOREM || op == OP_LOAD || op == OP_LOADC ||
                                  op == OP_LOADM || op == OP_TRAPX || op == OP_SKIPX)));
    ctl.opc2_load     = ~fs & (op == OP_LOAD0);
    ctl.last_pc_to_busd = call_op | (~fs & (op == OP_TRAPX));
  end

endmodule
