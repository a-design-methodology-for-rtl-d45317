// soar_trap_encoder: trap/interrupt decision and trap-reason priority encoder.
//
// TRAP is raised when any trap or interrupt condition is present and the
// previous cycle did not already raise one (late_trap), so a trap cannot
// re-trigger while the forced TRAP instruction is in the pipe. The 4-bit
// reason ("cause") is the document's trap PLA 2 encoding:
//   0000 illegal opcode   0001 tag trap       0010 software interrupt
//   0011 window overflow  0100 window underflow 0101 data page fault
//   0110 trap instruction 0111 GS trap        1000 instruction page fault
//   1001 I/O interrupt
// with illegal opcode highest, then tag trap, SWI, window overflow, window
// underflow, data page fault, trap instruction, GS trap, instruction page
// fault and I/O request. Combinational; the core registers both outputs.
module soar_trap_encoder (
  input  logic       late_trap,
  input  logic       valid_trapi,
  input  logic       gs_trap,
  input  logic       int_tag_trap,
  input  logic       illegal,
  input  logic       swi,
  input  logic       win_overflow,
  input  logic       win_underflow,
  input  logic       ipagef,
  input  logic       io_int,
  input  logic       dpagef,
  output logic       trap,
  output logic [3:0] reason
);

  always_comb begin
    trap = ~late_trap & (valid_trapi | gs_trap | int_tag_trap | illegal | swi |
                         win_overflow | win_underflow | ipagef | io_int | dpagef);
    reason[0] = ~illegal &
                ((io_int & ~ipagef & ~valid_trapi & ~win_underflow & ~swi) |
                 (gs_trap & ~valid_trapi & ~win_underflow & ~swi) |
                 (dpagef & ~win_underflow & ~swi) |
                 (win_overflow & ~swi) |
                 int_tag_trap);
    reason[1] = ~(illegal | int_tag_trap) &
                ((gs_trap & ~dpagef & ~win_underflow) |
                 (valid_trapi & ~dpagef & ~win_underflow) |
                 win_overflow | swi);
    reason[2] = ~(win_overflow | swi | int_tag_trap | illegal) &
                (gs_trap | valid_trapi | dpagef | win_underflow);
    reason[3] = ~(gs_trap | valid_trapi | dpagef | win_underflow | win_overflow |
                  swi | int_tag_trap | illegal) & (ipagef | io_int);
  end

endmodule
