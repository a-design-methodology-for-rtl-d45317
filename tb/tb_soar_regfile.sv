// tb_soar_regfile: random test of the windowed register file against an
// array model: two read ports, one write port, the nil port (registers
// 0..NIL_COUNT-1 of a window), write priority over nil, word 0 always zero,
// and the clock enable. Writes take effect at the clock edge; reads are
// combinational and are checked before every edge.
module tb_soar_regfile;
  import soar_pkg::*;
  localparam int NW = 80, NILC = 6;
  logic clk = 0, en, we, nil_en;
  logic [6:0] ra, rb, wa;
  logic [31:0] qa, qb, wd;
  logic [2:0] nil_win;
  logic [31:0] model [NW];
  int checks = 0, failures = 0;

  soar_regfile dut (.*);   // document sizes: 80 words, nil fills 6

  always #5 clk = ~clk;

  initial begin
    #10_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    en = 1; we = 1; nil_en = 0; nil_win = 0; ra = 0; rb = 0; wd = 0;
    // initialise every word
    for (int i = 0; i < NW; i++) begin
      wa = 7'(i); wd = $urandom; model[i] = (i == 0) ? 32'd0 : wd;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom_range(0, 7) != 0);
      we = $urandom_range(0, 1);
      wa = 7'($urandom_range(0, NW - 1));
      wd = $urandom;
      nil_en = ($urandom_range(0, 9) == 0);
      nil_win = 3'($urandom);
      ra = 7'($urandom_range(0, NW - 1));
      rb = (i % 4 == 0) ? wa : 7'($urandom_range(0, NW - 1));
      #1;
      checks++;
      if (qa !== model[ra] || qb !== model[rb]) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d/%0d got %08h/%08h expected %08h/%08h",
                                    ra, rb, qa, qb, model[ra], model[rb]);
      end
      @(posedge clk);
      if (en) begin
        if (nil_en) for (int k = 0; k < NILC; k++) model[regdecode(nil_win, 5'(k))] = 32'hB000_0000;
        if (we && wa != 0) model[wa] = wd;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
