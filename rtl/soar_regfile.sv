// soar_regfile: the windowed register file, 80 words of 32 bits.
//
// Physical words 0..15 are the globals (architectural registers 16..31);
// words 16..79 are eight windows of eight registers, window w's lows being
// words 16+8w..23+8w. A window's highs (8..15) are the lows of the next
// window up (w+1, wrapping from 7 to 0), so caller and callee share eight
// registers and there are no locals. The address decode itself is the
// regdecode function of soar_pkg; this block takes physical indices.
//
// Two combinational read ports (A and B bus) and one write port written at
// the end of the cycle (the register-write phase). Word 0 (architectural
// register 16) always reads 0 and ignores writes. The nil port writes the
// nil value (integer 0 with the Emeritus tag) into registers 0..NIL_COUNT-1
// of window nil_win, the register "nilling" done on a return with the N
// option; an ordinary write in the same cycle takes precedence on the word
// it addresses. Contents are not reset, as in the chip.
module soar_regfile
  import soar_pkg::*;
#(
  parameter int unsigned NWORDS    = 80,
  parameter int unsigned NIL_COUNT = 6,
  parameter logic [31:0] NIL_VALUE = 32'hB000_0000
) (
  input  logic        clk,
  input  logic        en,
  input  logic [6:0]  ra,
  input  logic [6:0]  rb,
  output logic [31:0] qa,
  output logic [31:0] qb,
  input  logic        we,
  input  logic [6:0]  wa,
  input  logic [31:0] wd,
  input  logic        nil_en,
  input  logic [2:0]  nil_win
);

  logic [31:0] mem [NWORDS];

  assign qa = (ra == 7'd0 || 32'(ra) >= NWORDS) ? 32'd0 : mem[ra];
  assign qb = (rb == 7'd0 || 32'(rb) >= NWORDS) ? 32'd0 : mem[rb];

  always_ff @(posedge clk) begin
    if (en) begin
      if (nil_en) begin
        for (int i = 0; i < int'(NIL_COUNT); i++) begin
          mem[regdecode(nil_win, 5'(i))] <= NIL_VALUE;
        end
      end
      if (we && wa != 7'd0 && 32'(wa) < NWORDS) mem[wa] <= wd;
      mem[0] <= 32'd0;
    end
  end

endmodule
