// tb_soar_fastshuffle: checks the external call/jump address path: extMAL
// captures the low 28 bits of each instruction fetched (I_D high, not a
// WAIT cycle, clock enabled), and the address mux gives MAL while FSHCNTL
// is high and extMAL while it is low. Registered capture at the clock edge;
// the mux is combinational and checked before each edge.
module tb_soar_fastshuffle;
  logic clk = 0, en, rst, i_d, wait_q, fshcntl;
  logic [27:0] mal, data_in, addr, m;
  int checks = 0, failures = 0;

  soar_fastshuffle dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1; en = 1; i_d = 0; wait_q = 0; fshcntl = 1; mal = 0; data_in = 0;
    @(posedge clk); #1 rst = 0; m = 0;
    for (int i = 0; i < 2000; i++) begin
      en = $urandom_range(0, 1); i_d = ($urandom_range(0, 3) != 0);
      wait_q = ($urandom_range(0, 5) == 0); fshcntl = $urandom_range(0, 1);
      mal = 28'($urandom); data_in = 28'($urandom);
      #1;
      checks++;
      if (addr !== (fshcntl ? mal : m)) begin
        failures++;
        if (failures < 10) $display("FAIL: addr=%h expected %h", addr, fshcntl ? mal : m);
      end
      @(posedge clk);
      if (en && i_d && !wait_q) m = data_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
