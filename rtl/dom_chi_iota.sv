// dom_chi_iota: the masked non-linear layer of one round, chi followed by
// iota, from d+1 to (d+1)^2 shares.
//
// The 40 rows (y, z) of the state each go through a dom_chi_row; row
// (y, z) takes the mask bits rnd[(W*y + z)*NM +: NM], NM = 5*D*(D+1)/2, so
// a round uses round_masks(D+1) = 100*D*(D+1) fresh bits (200 for D = 1). Iota adds the
// round constant of round `round` to lane (0,0) of output share 0 only.
// Output share k is the one built from input share pair (i, j) = (k/S, k%S).
// Combinational.
module dom_chi_iota
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic [D:0][B-1:0]               a,
  input  logic [round_masks(D+1)-1:0]     rnd,
  input  logic [4:0]                      round,
  output logic [(D+1)*(D+1)-1:0][B-1:0]   y
);

  localparam int unsigned S  = D + 1;
  localparam int unsigned NM = row_masks(S);

  logic [(D+1)*(D+1)-1:0][B-1:0] chi_out;

  for (genvar gy = 0; gy < 5; gy++) begin : g_y
    for (genvar gz = 0; gz < int'(W); gz++) begin : g_z
      localparam int unsigned RIDX = gy * W + gz;   // row number 0..39
      logic [D:0][4:0]         rin;
      logic [S*S-1:0][4:0]     rout;
      for (genvar gs = 0; gs < int'(S); gs++) begin : g_in
        for (genvar gx = 0; gx < 5; gx++) begin : g_b
          assign rin[gs][gx] = a[gs][bidx(gx, gy, gz)];
        end
      end
      dom_chi_row #(.D(D)) u_row (
        .x(rin),
        .r(rnd[RIDX * NM +: NM]),
        .y(rout)
      );
      for (genvar gk = 0; gk < int'(S * S); gk++) begin : g_out
        for (genvar gx = 0; gx < 5; gx++) begin : g_b
          assign chi_out[gk][bidx(gx, gy, gz)] = rout[gk][gx];
        end
      end
    end
  end

  localparam rc_table_t RC = rc_table();

  // round numbers past NR-1 give no constant
  logic [W-1:0] rc;
  assign rc = (round < 5'(NR)) ? RC[round] : '0;

  always_comb begin
    y = chi_out;
    y[0][W-1:0] = chi_out[0][W-1:0] ^ rc;   // lane (0,0) is bits 0..W-1
  end

endmodule
