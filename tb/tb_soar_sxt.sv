// tb_soar_sxt: checks the immediate sign extender in both formats: the
// normal 12-bit immediate (value 6:0, sign 7, tag 11:8) and the split store
// constant (value 6:0, sign 18, tag 22:19), plus a few fixed examples.
// Combinational; checked 1 time unit after the inputs change.
module tb_soar_sxt;
  logic [22:18] dil_hi;
  logic [11:0] dil_lo;
  logic store_fmt;
  logic [31:0] y;
  int checks = 0, failures = 0;

  soar_sxt dut (.*);

  task automatic expect_eq(logic [31:0] e);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL: store=%b hi=%h lo=%h y=%08h expected %08h", store_fmt, dil_hi, dil_lo, y, e);
    end
  endtask

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    store_fmt = 0; dil_hi = '0; dil_lo = 12'h005; #1 expect_eq(32'h0000_0005);
    dil_lo = 12'hFFF; #1 expect_eq(32'hFFFF_FFFF);
    dil_lo = 12'h0FF; #1 expect_eq(32'h0FFF_FFFF);
    dil_lo = 12'hB00; #1 expect_eq(32'hB000_0000);
    store_fmt = 1; dil_hi = 5'b00001; dil_lo = 12'h07F; #1 expect_eq(32'h0FFF_FFFF);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] w;
      w = $urandom; dil_hi = w[22:18]; dil_lo = w[11:0]; store_fmt = w[31];
      #1;
      if (store_fmt) expect_eq({w[22:19], {21{w[18]}}, w[6:0]});
      else           expect_eq({w[11:8], {21{w[7]}}, w[6:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
