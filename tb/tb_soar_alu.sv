// tb_soar_alu: random test of the SOAR ALU against a reference model.
// Each iteration picks random operands, an operation (add, sub, xor, or, and,
// srl, sra, pass) and the tagged-mode bit, and compares the result, the
// MSBs seen by the condition PLA, and the zero flags. Combinational block:
// results are checked 1 time unit after the inputs change.
module tb_soar_alu;
  logic [31:0] a, b, y;
  logic tag_op, sel_bi_bar, cin, sel_sum, sel_xor, sel_or, sel_and, sel_sr, op_sra, sel_pass;
  logic a_msb, b_msb, y_msb, zero, a_zero;
  int checks = 0, failures = 0;

  soar_alu dut (.*);

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] exp_y, bi;
    int op;
    for (int i = 0; i < 4000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 7 == 0) b = a;
      op = $urandom_range(0, 7);
      tag_op = $urandom_range(0, 1);
      {sel_bi_bar, cin, sel_sum, sel_xor, sel_or, sel_and, sel_sr, op_sra, sel_pass} = '0;
      case (op)
        0: begin sel_sum = 1; end
        1: begin sel_sum = 1; sel_bi_bar = 1; cin = 1; end
        2: sel_xor = 1;
        3: sel_or = 1;
        4: sel_and = 1;
        5: sel_sr = 1;
        6: begin sel_sr = 1; op_sra = 1; end
        default: sel_pass = 1;
      endcase
      #1;
      bi = sel_bi_bar ? ~b : b;
      if (tag_op) bi[31] = 1'b0;
      case (op)
        0, 1: exp_y = a + bi + 32'(cin);
        2: exp_y = a ^ bi;
        3: exp_y = a | bi;
        4: exp_y = a & bi;
        5: exp_y = tag_op ? {a[31], 1'b0, a[30:1]} : a >> 1;
        6: exp_y = tag_op ? {a[31], a[30], a[30:1]} : {a[31], a[31:1]};
        default: exp_y = a;
      endcase
      if (tag_op) exp_y[31] = 1'b0;
      checks++;
      if (y !== exp_y || zero !== (exp_y == 0) || a_zero !== (a == 0) ||
          y_msb !== (tag_op ? exp_y[30] : exp_y[31]) || a_msb !== (tag_op ? a[30] : a[31]) ||
          b_msb !== (tag_op ? bi[30] : bi[31])) begin
        failures++;
        if (failures < 10)
          $display("FAIL: op %0d tag %0d a=%08h b=%08h y=%08h expected %08h", op, tag_op, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
