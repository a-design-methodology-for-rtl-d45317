// tb_soar_cwp: random test of the current window pointer: reset to 7,
// decrement on call, increment on return, load from a register write,
// hold while a trap is being taken, and the overflow/underflow flags
// (new CWP equal to the SWP window). State changes at enabled clock edges;
// the flags are combinational and checked before each edge.
module tb_soar_cwp;
  logic clk = 0, en, rst, dec, inc, write, hold, overflow, underflow;
  logic [2:0] wdata, swp_win, cwp, m;
  int checks = 0, failures = 0;

  soar_cwp dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    en = 1; rst = 1; dec = 0; inc = 0; write = 0; hold = 0; wdata = 0; swp_win = 0;
    @(posedge clk); #1;
    m = 3'd7;
    rst = 0;
    checks++; if (cwp !== 3'd7) begin failures++; $display("FAIL: reset value %0d", cwp); end
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 5) != 0);
      {dec, inc} = 2'($urandom_range(0, 2));
      write = ($urandom_range(0, 5) == 0) && !dec && !inc;
      hold = ($urandom_range(0, 7) == 0);
      wdata = 3'($urandom); swp_win = 3'($urandom);
      #1;
      checks++;
      if (cwp !== m || overflow !== (dec && 3'(m - 1) == swp_win) ||
          underflow !== (inc && 3'(m + 1) == swp_win)) begin
        failures++;
        if (failures < 10) $display("FAIL: cwp=%0d model=%0d ovf=%b unf=%b", cwp, m, overflow, underflow);
      end
      @(posedge clk);
      if (en && !hold) begin
        if (dec) m = m - 1;
        else if (inc) m = m + 1;
        else if (write) m = wdata;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
