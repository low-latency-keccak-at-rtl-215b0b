// keccak_theta: the theta step of Keccak-f[200] on one share.
//
// Every bit is XORed with the parity of column x-1 at the same z and the
// parity of column x+1 at z-1. Being linear, theta is applied to each share
// separately; the low-latency datapath instantiates it once per share of the
// expanded (d+1)^2-share state. Purely combinational, no timing of its own.
module keccak_theta
  import keccak_pkg::*;
(
  input  state_t a,
  output state_t y
);

  logic [4:0][W-1:0] col;   // column parities C[x][z]
  logic [4:0][W-1:0] eff;   // theta effect D[x][z]

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      for (int z = 0; z < int'(W); z++) begin
        col[x][z] = a[bidx(x, 0, z)] ^ a[bidx(x, 1, z)] ^ a[bidx(x, 2, z)]
                  ^ a[bidx(x, 3, z)] ^ a[bidx(x, 4, z)];
      end
    end
  end

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      for (int z = 0; z < int'(W); z++) begin
        eff[x][z] = col[(x + 4) % 5][z] ^ col[(x + 1) % 5][(z + int'(W) - 1) % int'(W)];
      end
    end
  end

  always_comb begin
    for (int x = 0; x < 5; x++)
      for (int yy = 0; yy < 5; yy++)
        for (int z = 0; z < int'(W); z++)
          y[bidx(x, yy, z)] = a[bidx(x, yy, z)] ^ eff[x][z];
  end

endmodule
