// soar_sxt: immediate sign extender fed by the data/immediate input latch.
//
// Normal format: the 12-bit immediate in instruction bits 11:0. Bits 6:0 are
// the value, bit 7 is the sign, extended through bits 27:7, and bits 11:8
// become the tag bits 31:28.
// Store format (store, storem): the constant is split; bits 6:0 are the low
// value bits, bit 18 the sign (extended through 27:7) and bits 22:19 the tag.
// Combinational; follows the document's SXT rule exactly.
module soar_sxt (
  input  logic [22:18] dil_hi,   // instruction DST field
  input  logic [11:0]  dil_lo,   // instruction immediate field
  input  logic        store_fmt,
  output logic [31:0] y
);

  always_comb begin
    if (store_fmt) y = {dil_hi[22:19], {21{dil_hi[18]}}, dil_lo[6:0]};
    else           y = {dil_lo[11:8],  {21{dil_lo[7]}},  dil_lo[6:0]};
  end

endmodule
