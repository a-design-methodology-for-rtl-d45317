// soar_condpla: condition-code PLA for skip and conditional trap.
//
// SOAR has no condition-code register. A skip or trapN instruction makes the
// ALU compute S1 - S2 and names a condition in its DST field; this block
// derives carry, overflow and sign from the MSBs of the two ALU inputs and
// of the result (bit 30 in tagged mode, bit 31 otherwise) and evaluates the
// condition. Condition codes (octal, DST field):
//   01 always  02 LT   03 GE   04 EQ   05 NE   06 LE   07 GT
//   12 LTU/IN0 13 GEU/OUT0     16 LEU  17 GTU  22 IN1  23 OUT1
// IN1/OUT1 also look at whether the A input was zero. Carry and overflow are
// only meaningful when the adder result was selected (sel_sum). The
// equations are the document's condpla. The chip latches these inputs and
// evaluates the condition early in the following cycle; this design
// evaluates it at the end of the skip's own execute cycle instead, which
// squashes the same (next) instruction. Combinational.
module soar_condpla (
  input  logic       sel_sum,
  input  logic       a_msb,
  input  logic       b_msb,
  input  logic       y_msb,
  input  logic       zero,
  input  logic       a_zero,
  input  logic [4:0] cond,
  output logic       cout,
  output logic       vout,
  output logic       valid
);

  logic sout, lt, leu;

  always_comb begin
    cout  = sel_sum & ((a_msb & b_msb) | (a_msb & ~y_msb) | (b_msb & ~y_msb));
    vout  = sel_sum & ((~a_msb & ~b_msb & y_msb) | (a_msb & b_msb & ~y_msb));
    sout  = y_msb;
    lt    = sout ^ vout;
    leu   = ~cout | zero;
    unique case (cond)
      5'o01:   valid = 1'b1;
      5'o02:   valid = lt;
      5'o03:   valid = ~lt;
      5'o04:   valid = zero;
      5'o05:   valid = ~zero;
      5'o06:   valid = lt | zero;
      5'o07:   valid = ~(lt | zero);
      5'o12:   valid = ~cout;
      5'o13:   valid = cout;
      5'o16:   valid = leu;
      5'o17:   valid = ~leu;
      5'o22:   valid = leu & ~a_zero;
      5'o23:   valid = ~leu | a_zero;
      default: valid = 1'b0;
    endcase
  end

endmodule
