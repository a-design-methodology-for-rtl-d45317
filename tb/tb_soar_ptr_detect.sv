// tb_soar_ptr_detect: checks pointer-to-register detection: an address is a
// register when its 16-word block is one of the eight blocks just below the
// SWP block and address bit 3 is set. Random and boundary addresses.
// Combinational; checked 1 time unit after the inputs change.
module tb_soar_ptr_detect;
  logic [27:3] mal;
  logic [27:4] swp;
  logic ptr_to_reg;
  int checks = 0, failures = 0, hits = 0;

  soar_ptr_detect dut (.*);

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int off;
      bit e;
      swp = 24'($urandom);
      off = $urandom_range(0, 11) - 2;            // block offset below SWP
      mal = {24'(swp - 24'(off)), 1'($urandom)};
      if (i % 5 == 0) mal = 25'($urandom);
      #1;
      e = ((24'(swp - mal[27:4]) >= 24'd1) && (24'(swp - mal[27:4]) <= 24'd8)) && mal[3];
      checks++;
      if (e) hits++;
      if (ptr_to_reg !== e) begin
        failures++;
        $display("FAIL: swp=%h mal=%h got %b", swp, mal, ptr_to_reg);
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL: no register addresses generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
