// soar_cwp: current window pointer with window overflow/underflow detect.
//
// A 3-bit pointer to one of the eight register windows. A call decrements it,
// a return with the W option increments it, and it can be written as special
// register 22 (bits 6:4 of the written value). Reset sets it to 7. When the
// cycle ends with a trap, the change requested in that cycle is dropped (the
// trap blocks the pointer's slave latch in the chip), so a call or return
// that trapped leaves the window unchanged.
// Window overflow: a call while CWP-1 equals the saved window pointer's
// window field (SWP bits 6:4). Window underflow: a return with the W option
// while CWP+1 equals it. The window arithmetic and the trap hold follow the
// document; the reset value 7 is this design's choice. Updates on the clock
// edge when en is high; the flags are combinational.
module soar_cwp (
  input  logic       clk,
  input  logic       en,
  input  logic       rst,
  input  logic       dec,
  input  logic       inc,
  input  logic       write,
  input  logic [2:0] wdata,
  input  logic       hold,
  input  logic [2:0] swp_win,
  output logic [2:0] cwp,
  output logic       overflow,
  output logic       underflow
);

  logic [2:0] changed;

  always_comb begin
    changed   = inc ? cwp + 3'd1 : cwp - 3'd1;
    overflow  = dec & (changed == swp_win);
    underflow = inc & (changed == swp_win);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (rst)                cwp <= 3'd7;
      else if (hold)          cwp <= cwp;
      else if (dec || inc)    cwp <= changed;
      else if (write)         cwp <= wdata;
    end
  end

endmodule
