// soar_alu: the SOAR arithmetic/logic unit with its tag_op (31-bit) mode.
//
// Operands: a is the output of the byte extractor/inserter (the A input
// latch), b the B input latch. The B operand can be complemented
// (subtract, compares, effective-address decrement) and the adder has an
// explicit carry-in, as SOAR has no carry flag. Functions: sum, xor, or, and,
// shift right by one (srl/sra) and pass (byte insert/extract result). sll is
// done by the adder (the program supplies the same register twice).
// Tagged mode (% bit of the instruction): the integer is 31 bits, bit 30 is
// its most significant bit, and bit 31 of the B operand and of the result is
// forced to 0. The shift-right fill bits 30 and 31 are the document's
// "shiftAbus30/31" terms. The MSBs used by the condition logic (bit 30 in
// tag_op mode, bit 31 otherwise), zero detect and "A input is zero" are also
// produced here. Combinational.
module soar_alu (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        tag_op,
  input  logic        sel_bi_bar,
  input  logic        cin,
  input  logic        sel_sum,
  input  logic        sel_xor,
  input  logic        sel_or,
  input  logic        sel_and,
  input  logic        sel_sr,
  input  logic        op_sra,
  input  logic        sel_pass,
  output logic [31:0] y,
  output logic        a_msb,
  output logic        b_msb,
  output logic        y_msb,
  output logic        zero,
  output logic        a_zero
);

  logic [31:0] bi, sum, py;
  logic sh30, sh31;

  always_comb begin
    bi  = (sel_bi_bar ? ~b : b) & ~({tag_op, 31'd0});
    sum = a + bi + {31'd0, cin};
    sh30 = (tag_op & op_sra & a[30]) | (~tag_op & a[31]);
    sh31 = (tag_op & a[31]) | (~tag_op & op_sra & a[31]);
    if (sel_sum)       py = sum;
    else if (sel_xor)  py = a ^ bi;
    else if (sel_or)   py = a | bi;
    else if (sel_and)  py = a & bi;
    else if (sel_sr)   py = {sh31, sh30, a[30:1]};
    else if (sel_pass) py = a;
    else               py = sum;
    y      = py & ~({tag_op, 31'd0});
    a_msb  = tag_op ? a[30]  : a[31];
    b_msb  = tag_op ? bi[30] : bi[31];
    y_msb  = tag_op ? y[30]  : y[31];
    zero   = (y == 32'd0);
    a_zero = (a == 32'd0);
  end

endmodule
