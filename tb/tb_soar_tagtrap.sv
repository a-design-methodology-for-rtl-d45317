// tb_soar_tagtrap: checks the Smalltalk tag checks by their meaning rather
// than their equations: arithmetic needs integer operands (bit 31 = 0),
// load needs one object pointer and one integer, store needs an object
// pointer base and traps (GS) when storing a context (tag 1111), return
// needs an integer return address, nothing traps outside tagged mode, and
// tagged add/sub/sll enable the overflow trap. Combinational; checked 1
// time unit after the inputs change.
module tb_soar_tagtrap;
  logic [3:0] a, b;
  logic tag_op, imm, op_arith, op_load, op_store, op_ret, op_ovf;
  logic tag_trap, gs_trap, ov_pred;
  int checks = 0, failures = 0;

  soar_tagtrap dut (.*);

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit et, eg;
    int kind;
    for (int i = 0; i < 3000; i++) begin
      a = 4'($urandom); b = 4'($urandom);
      tag_op = (i % 8 != 0); imm = $urandom_range(0, 1);
      kind = $urandom_range(0, 3);
      {op_arith, op_load, op_store, op_ret} = 4'b1000 >> kind;
      op_ovf = op_arith & $urandom_range(0, 1);
      #1;
      et = 0; eg = 0;
      if (tag_op) begin
        case (kind)
          0: et = imm ? a[3] : (a[3] | b[3]);
          1: et = imm ? !a[3] : (a[3] == b[3]);
          2: begin et = !a[3]; eg = (b == 4'hF); end
          default: eg = a[3];
        endcase
      end
      checks++;
      if (tag_trap !== et || ov_pred !== (tag_op & op_ovf) ||
          (kind != 2 && gs_trap !== eg) || (kind == 2 && eg && !gs_trap) ||
          (kind == 2 && !a[3] && b[3] == 1'b0 && gs_trap)) begin
        failures++;
        if (failures < 10) $display("FAIL: kind %0d tag %b imm %b a=%h b=%h trap=%b gs=%b", kind, tag_op, imm, a, b, tag_trap, gs_trap);
      end
    end
    // the generation check: storing a young object into an older one traps,
    // storing an integer never does
    tag_op = 1; imm = 0; {op_arith, op_load, op_store, op_ret, op_ovf} = 5'b00100;
    a = 4'b1011; b = 4'b1000; #1;   // Emeritus base, Assistant data
    checks++; if (!gs_trap) begin failures++; $display("FAIL: young into old store must trap"); end
    a = 4'b1000; b = 4'b0011; #1;   // integer data
    checks++; if (gs_trap) begin failures++; $display("FAIL: integer store must not trap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
