// keccak_pkg: sizes, state indexing and step constants for Keccak-f[200].
//
// The permutation works on a 5x5 array of W-bit lanes (W = 8, so 200 bits)
// for 12 + 2L = 18 rounds. Bit (x, y, z) of a state is held at index
// W*(x + 5*y) + z, the usual lane-major ordering, so lane (x, y) is byte
// x + 5*y of the state. The round constants and the rho rotation offsets are
// not stored as tables: they are computed by constant functions from the
// definitions of the Keccak reference (the rc() LFSR and the (t+1)(t+2)/2
// offset walk), so the package also works if W is changed.
//
// The share-count helpers give the fresh-mask budget of the masked chi
// layer: 5 mask bits per unordered pair of domains per 5-bit row, that is
// 5*D*(D+1)/2 bits per row and 40 rows per state.
package keccak_pkg;

  localparam int unsigned L  = 3;
  localparam int unsigned W  = 1 << L;     // lane width
  localparam int unsigned B  = 25 * W;     // state width
  localparam int unsigned NR = 12 + 2 * L; // number of rounds
  localparam int unsigned NROWS = 5 * W;   // chi rows per state

  typedef logic [B-1:0] state_t;

  // Index of bit (x, y, z) in a state; x, y are taken mod 5 and z mod W.
  function automatic int unsigned bidx(int x, int y, int z);
    int xm, ym, zm;
    xm = ((x % 5) + 5) % 5;
    ym = ((y % 5) + 5) % 5;
    zm = ((z % int'(W)) + int'(W)) % int'(W);
    return W * (xm + 5 * ym) + zm;
  endfunction

  // Output bit t of the degree-8 LFSR that defines the round constants.
  function automatic logic rc_bit(int unsigned t);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 0; i < (t % 255); i++) begin
      if (r[7]) r = {r[6:0], 1'b0} ^ 8'h71;
      else      r = {r[6:0], 1'b0};
    end
    return r[0];
  endfunction

  // Round constant of round ir: bit 2^j - 1 is rc(j + 7*ir) for j = 0..L.
  function automatic logic [W-1:0] round_const(int unsigned ir);
    logic [W-1:0] c;
    c = '0;
    for (int unsigned j = 0; j <= L; j++) c[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return c;
  endfunction

  // All round constants, computed once at elaboration.
  typedef logic [NR-1:0][W-1:0] rc_table_t;

  function automatic rc_table_t rc_table();
    rc_table_t t;
    for (int unsigned ir = 0; ir < NR; ir++) t[ir] = round_const(ir);
    return t;
  endfunction

  // Rho rotation of lane (x, y), reduced mod W.
  function automatic int unsigned rho_offset(int unsigned x, int unsigned y);
    int unsigned cx, cy, nx, off;
    off = 0;
    cx = 1;
    cy = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (cx == x && cy == y) off = ((t + 1) * (t + 2) / 2) % W;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return off;
  endfunction

  // Fresh mask bits needed by one masked chi row with s = d+1 shares.
  function automatic int unsigned row_masks(int unsigned s);
    return 5 * s * (s - 1) / 2;
  endfunction

  // Fresh mask bits needed per round (per clock cycle) for s shares.
  function automatic int unsigned round_masks(int unsigned s);
    return NROWS * row_masks(s);
  endfunction

endpackage
