// input_pad_mux: Mux.1 of the low-latency datapath.
//
// With `load` high it expands the (d+1)-share primary input to (d+1)^2
// shares by zero padding: input share i goes to share i*S + i, all others
// are zero. That position lies in group i both of the plain compression
// grouping (i*S .. i*S+S-1) and of the rearranged one used for the x = 3
// lanes (i, S+i, 2S+i, ...), so after the first theta and compression each
// compressed share i still depends on input share i only. The diagonal
// position is this design's own choice. With `load` low it passes the
// (d+1)^2-share chi output fed back from the end of the round.
// Combinational.
module input_pad_mux
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic                          load,
  input  logic [D:0][B-1:0]             din,
  input  logic [(D+1)*(D+1)-1:0][B-1:0] fb,
  output logic [(D+1)*(D+1)-1:0][B-1:0] y
);

  localparam int unsigned S = D + 1;

  always_comb begin
    if (load) begin
      y = '0;
      for (int unsigned i = 0; i < S; i++) y[i * S + i] = din[i];
    end else begin
      y = fb;
    end
  end

endmodule
