// soar_ptr_detect: pointer-to-register detection.
//
// Smalltalk contexts live in the register windows; their memory image is the
// area just below the saved window pointer (SWP). An address points into a
// register when (SWP<27:4> - MAL<27:4> - 1) is between 0 and 7 and MAL<3>
// is 1, i.e. it is one of the eight 16-word blocks below the SWP and
// addresses a "high" register (bits 6:4 pick the window, 3:0 the register).
// A subtractor and range detect, combinational, as in the document.
module soar_ptr_detect (
  input  logic [27:3] mal,
  input  logic [27:4] swp,
  output logic        ptr_to_reg
);

  logic [23:0] diff;

  always_comb begin
    diff       = swp[27:4] - mal[27:4] - 24'd1;
    ptr_to_reg = (diff < 24'd8) & mal[3];
  end

endmodule
