// tb_soar_ctrl_pla1: checks the first-stage control decode for every value
// of the 10-bit control pipe latch: exactly one ALU function is selected,
// only defined opcodes are legal, and the key controls of each instruction
// class match the instruction set: call/jmp (fast shuffle, PC and MAL from
// the ALU, A forced to zero, CWP decrement on call), ret (flush, W and I
// options), loads and stores (memory cycle jam, effective address to MAL,
// pointer-to-register predecode), multiples (count-down), data cycles
// (no shadowing, store cycles write), skip and conditional traps.
// Combinational; checked 1 time unit after the input changes.
module tb_soar_ctrl_pla1;
  import soar_pkg::*;
  cpipe1_t cp1;
  ctl1_t ctl;
  int checks = 0, failures = 0;

  soar_ctrl_pla1 dut (.*);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: cp1=%o %s", cp1, what);
    end
  endtask

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    opc_t op;
    bit fs, defined;
    for (int v = 0; v < 1024; v++) begin
      cp1 = cpipe1_t'(v);
      #1;
      op = opc_of(cp1[7], cp1[5:0]);
      fs = !cp1[7];
      defined = fs || op inside {OP_FLUSH, OP_TRAPX, OP_SKIPX, [7'o110:7'o117], OP_SKIP,
                                 [7'o121:7'o127], OP_STORE, OP_STOREM, OP_LOAD, OP_LOADC,
                                 OP_LOADM, OP_SRL, OP_SRA, OP_XOR, OP_AND, OP_OR, OP_ADD,
                                 OP_SLL, OP_SUB, OP_EXTRACT, OP_INSERT, [7'o160:7'o177]};
      expect_true(ctl.illegal == (cp1[9] || !defined), "illegal decode");
      expect_true($onehot({ctl.sel_sum, ctl.sel_xor, ctl.sel_or, ctl.sel_and, ctl.sel_sr,
                           !ctl.ex_ins_pass}), "one ALU function");
      expect_true(!(ctl.alu_to_pc && ctl.pc_incr), "one PC source");
      if (fs) begin
        expect_true(ctl.alu_to_pc && ctl.alu_to_mal && ctl.azero_force && ctl.busl_to_inb &&
                    ctl.cpipe1_step && ctl.alu_cin, "call/jmp controls");
        expect_true(ctl.change_cwp_dec == !cp1[5] && ctl.pc_stuff_on_call == !cp1[5],
                    "call decrements CWP and saves the PC");
        expect_true(ctl.soft_int == cp1[6], "software interrupt bit");
      end else begin
        expect_true(!ctl.azero_force && !ctl.change_cwp_dec, "no fast shuffle");
        if (op[6:3] == 4'o11) expect_true(ctl.cpipe1_flush && ctl.alu_to_pc &&
            ctl.change_cwp_inc == op[0] && ctl.enable_ints == op[2], "ret options");
        if (op == OP_LOAD || op == OP_LOADC)
          expect_true(ctl.cpipe1_loadc && ctl.alu_to_mal && ctl.predecode_ea && !ctl.cpipe1_step,
                      "load");
        if (op == OP_STORE)
          expect_true(ctl.cpipe1_store && ctl.predecode_ea && ctl.store_sxt && !ctl.databus_into_loadl,
                      "store");
        if (op == OP_LOADM) expect_true(ctl.cpipe1_loadm && ctl.sel_bi_bar, "loadm counts down");
        if (op == OP_STOREM) expect_true(ctl.cpipe1_storem && ctl.src2_min, "storem counts down");
        if (op[6:3] == 4'o16 || op[6:3] == 4'o17) begin
          expect_true(ctl.data_access && !ctl.pbus_shadow, "data cycle");
          expect_true(ctl.rd_wr == (op[6:3] == 4'o16), "read or write cycle");
          expect_true(ctl.cpipe1_step == (op[2:0] == 0), "last data cycle resumes");
        end else expect_true(ctl.rd_wr && !ctl.data_access, "not a data cycle");
        if (op == OP_SKIP) expect_true(ctl.skip_cond_enable && ctl.sel_bi_bar, "skip compares");
        if (op[6:3] == 4'o12 && op[2:0] != 0) expect_true(ctl.trap_instr && ctl.sel_bi_bar, "trapN");
        if (op == OP_ADD) expect_true(ctl.sel_sum && !ctl.sel_bi_bar && ctl.tag_ovf && ctl.pc_incr, "add");
        if (op == OP_SUB) expect_true(ctl.sel_sum && ctl.sel_bi_bar && ctl.alu_cin, "sub");
        if (op == OP_SRA) expect_true(ctl.sel_sr && ctl.op_sra, "sra");
        if (op == OP_SRL) expect_true(ctl.sel_sr && !ctl.op_sra, "srl");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
