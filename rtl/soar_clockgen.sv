// soar_clockgen: three-phase non-overlapping clock generator.
//
// A modulo-6 counter on the master clock produces one machine cycle of six
// master-clock ticks: phi1, phi1+ (non-overlap), phi2, phi2+, phi3, phi3+.
// Exactly one of the six outputs is high in each tick (count 0 = phi1 ...
// count 5 = phi3+). The counter starts at 5 after reset, so the first tick
// after reset is phi1. cycle_end is high in the phi3+ tick, the last of the
// machine cycle; the cycle-level core uses it as its clock enable.
// Follows the document's clock description.
module soar_clockgen (
  input  logic mclk,
  input  logic rst,
  output logic phi1,
  output logic phi1p,
  output logic phi2,
  output logic phi2p,
  output logic phi3,
  output logic phi3p,
  output logic cycle_end
);

  logic [2:0] count;

  always_ff @(posedge mclk) begin
    if (rst)                 count <= 3'd5;
    else if (count == 3'd5)  count <= 3'd0;
    else                     count <= count + 3'd1;
  end

  always_comb begin
    phi1  = (count == 3'd0);
    phi1p = (count == 3'd1);
    phi2  = (count == 3'd2);
    phi2p = (count == 3'd3);
    phi3  = (count == 3'd4);
    phi3p = (count == 3'd5);
    cycle_end = phi3p;
  end

endmodule
