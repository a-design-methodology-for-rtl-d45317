// tb_soar_clockgen: checks the three-phase clock generator: after reset the
// six phase outputs are one-hot, follow phi1, phi1', phi2, phi2', phi3,
// phi3' in order, repeat every six master-clock ticks, and cycle_end equals
// phi3'.
module tb_soar_clockgen;
  logic mclk = 0, rst, phi1, phi1p, phi2, phi2p, phi3, phi3p, cycle_end;
  int checks = 0, failures = 0;

  soar_clockgen dut (.*);
  always #5 mclk = ~mclk;

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [5:0] ph;
    int last_end, ends;
    rst = 1;
    repeat (3) @(posedge mclk);
    #1 rst = 0;
    last_end = -1; ends = 0;
    for (int t = 0; t < 600; t++) begin
      @(posedge mclk); #1;
      ph = {phi1, phi1p, phi2, phi2p, phi3, phi3p};
      checks++;
      if (ph !== (6'b100000 >> (t % 6)) || cycle_end !== phi3p) begin
        failures++;
        if (failures < 10) $display("FAIL: tick %0d phases %b", t, ph);
      end
      if (cycle_end) begin
        if (last_end >= 0) begin
          checks++;
          if (t - last_end != 6) begin failures++; $display("FAIL: cycle length %0d", t - last_end); end
        end
        last_end = t; ends++;
      end
    end
    checks++; if (ends != 100) begin failures++; $display("FAIL: %0d cycles in 600 ticks", ends); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
