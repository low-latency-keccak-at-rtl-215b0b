// bypass_mux: Mux.2 of the low-latency datapath.
//
// Feeds the state register. In every cycle but the last round it selects
// the (d+1)^2 theta outputs; in the last round (`bypass` high) it selects
// the chi/iota output directly, so that the register ends up holding the
// final state, which the compression layer then turns into the d+1 output
// shares. Combinational.
module bypass_mux
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic                          bypass,
  input  logic [(D+1)*(D+1)-1:0][B-1:0] theta_in,
  input  logic [(D+1)*(D+1)-1:0][B-1:0] chi_in,
  output logic [(D+1)*(D+1)-1:0][B-1:0] y
);

  assign y = bypass ? chi_in : theta_in;

endmodule
