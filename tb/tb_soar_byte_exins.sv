// tb_soar_byte_exins: exhaustive byte-number and random-data test of the
// byte extractor/inserter: extract moves the selected byte of A to bits 7:0,
// insert moves A's low byte to the selected byte, pass leaves A alone.
// Combinational; checked 1 time unit after the inputs change.
module tb_soar_byte_exins;
  logic [31:0] a, y;
  logic [1:0] byteno;
  logic ex, ins, pass;
  int checks = 0, failures = 0;

  soar_byte_exins dut (.*);

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int i = 0; i < 600; i++) begin
      a = $urandom; byteno = 2'(i);
      {ex, ins, pass} = 3'b001 << (i % 3);
      #1;
      if (pass)    e = a;
      else if (ex) e = {24'd0, a[8*byteno +: 8]};
      else begin   e = '0; e[8*byteno +: 8] = a[7:0]; end
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL: ex=%b ins=%b byte %0d a=%08h y=%08h expected %08h", ex, ins, byteno, a, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
