// keccak_rho_pi: the rho and pi steps of Keccak-f[200] on one share.
//
// Rho rotates lane (x, y) towards higher z by its fixed offset; pi then moves
// lane (x, y) to position (y, 2x + 3y mod 5). Both are wiring only. In the
// low-latency datapath they act on the d+1 compressed shares right after
// the state register. Combinational.
module keccak_rho_pi
  import keccak_pkg::*;
(
  input  state_t a,
  output state_t y
);

  for (genvar gx = 0; gx < 5; gx++) begin : g_x
    for (genvar gy = 0; gy < 5; gy++) begin : g_y
      localparam int unsigned OFF = rho_offset(gx, gy);
      for (genvar gz = 0; gz < int'(W); gz++) begin : g_z
        // destination lane (gy, 2gx+3gy), source bit z - OFF of lane (gx, gy)
        assign y[bidx(gy, 2 * gx + 3 * gy, gz)] = a[bidx(gx, gy, gz - int'(OFF))];
      end
    end
  end

endmodule
