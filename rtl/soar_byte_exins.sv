// soar_byte_exins: byte extractor / inserter in front of the ALU A input.
//
// Purely combinational, placed between the ALU input latches and the ALU.
// The byte number is the low two bits of the B operand (S2).
//   extract: the selected byte of A moves to bits 7:0, the other bits are 0.
//   insert:  bits 7:0 of A move to the selected byte, the other bits are 0.
//   pass:    A goes through unchanged (every other instruction).
// This follows the document's update rule for the extractor/inserter; its
// opening comment describes the bytes the other way round (upper byte), and
// the update rule is what is built here.
module soar_byte_exins (
  input  logic [31:0] a,
  input  logic [1:0]  byteno,
  input  logic        ex,
  input  logic        ins,
  input  logic        pass,
  output logic [31:0] y
);

  always_comb begin
    if (pass)      y = a;
    else if (ex)   y = {24'd0, 8'(a >> {byteno, 3'b000})};
    else if (ins)  y = {24'd0, a[7:0]} << {byteno, 3'b000};
    else           y = a;
  end

endmodule
