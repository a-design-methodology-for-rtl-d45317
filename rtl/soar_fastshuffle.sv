// soar_fastshuffle: the off-chip "fast shuffle" address latch and mux.
//
// A call or jmp holds its 28-bit target in the instruction word itself. So
// that the target can be fetched in the very next cycle, without waiting for
// the chip to compute it, an external latch (extMAL) captures the low 28 bits
// of every instruction fetched, and an address mux chooses between the
// chip's memory address latch (MAL) and extMAL. The chip's FSHCNTL pin
// selects: high = MAL, low = extMAL (a call/jmp is in the execute stage and
// no skip is squashing it). extMAL loads at the end of a cycle that fetched
// an instruction (I_D high) and was not a WAIT cycle. This is the document's
// model of the external logic; traps must restart the instruction just
// fetched for it to be correct, which the chip's trap sequence does.
module soar_fastshuffle (
  input  logic        clk,
  input  logic        en,
  input  logic        rst,
  input  logic [27:0] mal,
  input  logic [27:0] data_in,
  input  logic        i_d,
  input  logic        wait_q,
  input  logic        fshcntl,
  output logic [27:0] addr
);

  logic [27:0] ext_mal;

  always_ff @(posedge clk) begin
    if (rst)                          ext_mal <= '0;
    else if (en && i_d && !wait_q)    ext_mal <= data_in;
  end

  assign addr = fshcntl ? mal : ext_mal;

endmodule
