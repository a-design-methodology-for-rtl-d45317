// tb_soar_trap_encoder: checks the trap decision and reason encoding. Every
// single cause must give its own code; random combinations must give the
// code of the highest-priority cause (illegal, tag, SWI, window overflow,
// window underflow, data page fault, trap instruction, GS, instruction page
// fault, I/O request); a pending late trap must suppress the decision.
// Combinational; checked 1 time unit after the inputs change.
module tb_soar_trap_encoder;
  import soar_pkg::*;
  logic late_trap, valid_trapi, gs_trap, int_tag_trap, illegal, swi, win_overflow,
        win_underflow, ipagef, io_int, dpagef, trap;
  logic [3:0] reason;
  int checks = 0, failures = 0;

  soar_trap_encoder dut (.*);

  // causes in priority order, with their codes
  logic [9:0] causes;
  assign {illegal, int_tag_trap, swi, win_overflow, win_underflow, dpagef, valid_trapi,
          gs_trap, ipagef, io_int} = causes;
  localparam trap_reason_e CODE [10] = '{TR_ILLEGAL, TR_TAG, TR_SWI, TR_WOVERFLOW,
      TR_WUNDERFLOW, TR_DPAGEF, TR_TRAPINSTR, TR_GS, TR_IPAGEF, TR_IOREQ};

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int top;
    for (int i = 0; i < 2000; i++) begin
      late_trap = (i % 9 == 8);
      if (i < 10) causes = 10'b10_0000_0000 >> i;
      else        causes = 10'($urandom) & 10'($urandom);
      #1;
      top = -1;
      for (int k = 9; k >= 0; k--) if (causes[k] && top < 0) top = 9 - k;
      checks++;
      if (trap !== (!late_trap && causes != 0) ||
          (top >= 0 && reason !== CODE[top])) begin
        failures++;
        if (failures < 10)
          $display("FAIL: causes=%b late=%b trap=%b reason=%b expected %b", causes, late_trap,
                   trap, reason, top >= 0 ? CODE[top] : 4'd0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
