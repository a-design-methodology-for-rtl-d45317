// tb_soar_ctrl_pla2: checks the write-stage decode for every 7-bit opcode:
// which instructions write the register file and with what (ALU result,
// nil on ret with the N option, load data in data cycles, saved PC on call
// and TRAP), which make their DST field valid for forwarding, and which put
// the D bus on the A input (effective-address update in data cycles).
// Combinational; checked 1 time unit after the input changes.
module tb_soar_ctrl_pla2;
  import soar_pkg::*;
  cpipe2_t cp2;
  ctl2_t ctl;
  int checks = 0, failures = 0;

  soar_ctrl_pla2 dut (.*);

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: op=%o %s", cp2, what);
    end
  endtask

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit fs, alu, ret, ldn, stn, mem_op;
    for (int v = 0; v < 128; v++) begin
      cp2 = cpipe2_t'(v);
      #1;
      fs  = !cp2[6];
      alu = cp2 inside {OP_ADD, OP_SUB, OP_SLL, OP_SRL, OP_SRA, OP_AND, OP_OR, OP_XOR,
                        OP_EXTRACT, OP_INSERT};
      ret = !fs && cp2[6:3] == 4'o11;
      ldn = !fs && cp2[6:3] == 4'o16;
      stn = !fs && cp2[6:3] == 4'o17;
      mem_op = cp2 inside {OP_LOAD, OP_LOADC, OP_LOADM, OP_STORE, OP_STOREM};
      if (alu) expect_true(ctl.write_rf && ctl.dst_valid && !ctl.load_write && !ctl.nil_on_return,
                           "ALU result written");
      if (fs) expect_true(ctl.write_rf == !cp2[5] && ctl.last_pc_to_busd == !cp2[5] && !ctl.dst_valid,
                          "call saves the PC, jmp writes nothing");
      if (ret) expect_true(ctl.nil_on_return == cp2[1] && ctl.write_rf == cp2[1], "ret N option");
      if (ldn) expect_true(ctl.write_rf && ctl.load_write && ctl.dst_valid, "load data written");
      if (stn) expect_true(!ctl.write_rf && !ctl.dst_valid, "store cycles write nothing");
      expect_true(ctl.opc2_load == (cp2 == OP_LOAD0), "load forwarding source");
      expect_true(ctl.busd_to_ina == (mem_op || ((ldn || stn) && cp2[2:0] != 0)),
                  "address update path");
      if (cp2 == OP_TRAPX) expect_true(ctl.write_rf && ctl.last_pc_to_busd && !ctl.dst_valid,
                                       "TRAP saves the PC");
      if (mem_op || cp2 inside {OP_SKIP, OP_FLUSH, OP_SKIPX})
        expect_true(!ctl.write_rf && !ctl.dst_valid, "no write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
