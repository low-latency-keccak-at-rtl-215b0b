// share_compress: the compression layer, (d+1)^2 shares back to d+1.
//
// Output share i is the XOR of input shares i*S .. i*S+S-1 (S = D+1),
// which after masked chi are exactly the shares built from input-share
// pair (i, j), j = 0..S-1. Lanes with x = 3 hold output bit d' of every chi
// row, whose shares are grouped the other way round: for them share
// k'' = i*S + j is taken from k = j*S + i before the same XOR (the d''
// rearrangement). The rearrangement is a permutation of shares, so the sum
// of all shares, and with it correctness, is the same with or without it;
// it only decides which partial products may meet. Combinational.
module share_compress
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic [(D+1)*(D+1)-1:0][B-1:0] a,
  output logic [D:0][B-1:0]             y
);

  localparam int unsigned S = D + 1;

  always_comb begin
    for (int unsigned i = 0; i < S; i++) begin
      for (int unsigned n = 0; n < B; n++) begin
        logic acc;
        acc = 1'b0;
        for (int unsigned j = 0; j < S; j++) begin
          if ((n / W) % 5 == 3) acc ^= a[j * S + i][n];  // x = 3 lane
          else                  acc ^= a[i * S + j][n];
        end
        y[i][n] = acc;
      end
    end
  end

endmodule
