// tb_soar_condpla: checks every skip/trap condition against a subtraction
// reference. The testbench drives the MSBs and zero flag that the ALU gives
// for S1 - S2 on random (and equal, and sign-boundary) operands, and compares
// the PLA's answer with the signed/unsigned comparison of the operands.
// Combinational; checked 1 time unit after the inputs change.
module tb_soar_condpla;
  logic sel_sum, a_msb, b_msb, y_msb, zero, a_zero;
  logic [4:0] cond;
  logic cout, vout, valid;
  int checks = 0, failures = 0;

  soar_condpla dut (.*);

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] s1, s2, d;
    logic [32:0] wide;
    bit e;
    logic [4:0] codes [13] = '{5'o01, 5'o02, 5'o03, 5'o04, 5'o05, 5'o06, 5'o07,
                               5'o12, 5'o13, 5'o16, 5'o17, 5'o22, 5'o23};
    for (int i = 0; i < 3000; i++) begin
      s1 = $urandom; s2 = $urandom;
      case (i % 6)
        0: s2 = s1;
        1: s1 = 32'h8000_0000;
        2: s2 = 32'h7FFF_FFFF;
        3: s1 = 0;
        default: ;
      endcase
      wide = {1'b0, s1} + {1'b0, ~s2} + 33'd1;
      d = wide[31:0];
      sel_sum = 1; a_msb = s1[31]; b_msb = ~s2[31]; y_msb = d[31];
      zero = (d == 0); a_zero = (s1 == 0);
      cond = codes[i % 13];
      #1;
      case (cond)
        5'o01: e = 1;
        5'o02: e = $signed(s1) < $signed(s2);
        5'o03: e = $signed(s1) >= $signed(s2);
        5'o04: e = s1 == s2;
        5'o05: e = s1 != s2;
        5'o06: e = $signed(s1) <= $signed(s2);
        5'o07: e = $signed(s1) > $signed(s2);
        5'o12: e = s1 < s2;
        5'o13: e = s1 >= s2;
        5'o16: e = s1 <= s2;
        5'o17: e = s1 > s2;
        5'o22: e = (s1 <= s2) && s1 != 0;
        default: e = (s1 > s2) || s1 == 0;
      endcase
      checks++;
      if (valid !== e || cout !== wide[32]) begin
        failures++;
        if (failures < 10) $display("FAIL: cond %o s1=%08h s2=%08h valid=%b cout=%b", cond, s1, s2, valid, cout);
      end
    end
    cond = 5'o00; #1;
    checks++; if (valid !== 0) begin failures++; $display("FAIL: code 00 must be false"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
