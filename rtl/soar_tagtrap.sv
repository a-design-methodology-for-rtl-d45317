// soar_tagtrap: tag checking for Smalltalk (the trap PLA's tag terms).
//
// In tag_op mode (% bit) a 32-bit word is an integer when bit 31 is 0 and an
// object pointer (OOP) when bit 31 is 1; the pointer tags 1000 Assistant,
// 1001 Associate, 1010 Full, 1011 Emeritus, 1111 Context sit in bits 31:28.
// The checks, on the operands read in the execute cycle:
//   notanINT  arithmetic, logical, shift, skip, trapN: an operand is not an
//             integer (only A when the instruction has an immediate)
//   loadTRAP  load/loadc: the base/offset pair is not OOP+integer (in either
//             order the document gives)
//   RXint     store: the base is an integer
//   RDcontext store: the data is a context (tag 1111)
//   S1older   store: tag comparison says the data is older than the base
//             (generation scavenging check)
//   nonLIFO   return: the return address is an OOP
// TAGtrap = tag_op & (notanINT | loadTRAP | RXint);
// GStrap  = tag_op & (S1older | nonLIFO | RDcontext);
// ov_pred = tag_op & (add | sub | sll), qualifies adder overflow as a trap.
// The B bus of the chip carries complemented data; b is the true value here
// and the equations are written on its complement where the document's are.
// The tag comparison is the document's PLA equation, read as one OR of
// B<31>, ~A<31>, A<30> and an AND term (see the design notes).
module soar_tagtrap (
  input  logic [3:0]  a,      // A operand bits 31:28
  input  logic [3:0]  b,      // B operand bits 31:28
  input  logic        tag_op,
  input  logic        imm,
  input  logic        op_arith,
  input  logic        op_load,
  input  logic        op_store,
  input  logic        op_ret,
  input  logic        op_ovf,
  output logic        tag_trap,
  output logic        gs_trap,
  output logic        ov_pred
);

  logic [3:0] bb;    // B bus as the chip sees it (complemented)
  logic tagcmp;
  logic not_an_int, load_trap, rx_int, rd_context, s1_older, non_lifo;

  always_comb begin
    bb = ~b;
    not_an_int = op_arith & ((~imm & (a[3] | ~bb[3])) | (imm & a[3]));
    load_trap  = op_load & ((~a[3] & ((bb[3] & ~imm) | imm)) |
                            (~imm & ~bb[3] & a[3]));
    rx_int     = op_store & ~a[3];
    rd_context = op_store & (bb == 4'b0000);
    tagcmp     = bb[3] | ~a[3] | a[2] |
                 (bb[2] & ~a[2] & ((~bb[1] & ~a[1]) | (~bb[0] & ~a[1]) |
                                     (~a[0] & ~bb[1]) | (~a[0] & ~a[1]) |
                                     (~bb[0] & ~bb[1])));
    s1_older   = op_store & ~tagcmp;
    non_lifo   = op_ret & a[3];
    tag_trap   = tag_op & (not_an_int | load_trap | rx_int);
    gs_trap    = tag_op & (s1_older | non_lifo | rd_context);
    ov_pred    = tag_op & op_ovf;
  end

endmodule
