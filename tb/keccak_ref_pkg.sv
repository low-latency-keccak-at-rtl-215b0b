// keccak_ref_pkg: unmasked reference model of Keccak-f[200] for the
// testbenches, written on a 5x5 array of byte lanes with the round
// constants and rotation offsets spelled out as tables (the RTL computes
// them instead), plus helpers to split a value into random Boolean shares
// and to recombine them.
package keccak_ref_pkg;

  typedef logic [199:0] st_t;
  typedef logic [7:0] lanes_t [5][5];

  // low bytes of the Keccak round constants, rounds 0..17
  localparam logic [7:0] RC8 [18] = '{
    8'h01, 8'h82, 8'h8A, 8'h00, 8'h8B, 8'h01, 8'h81, 8'h09, 8'h8A,
    8'h88, 8'h09, 8'h0A, 8'h8B, 8'h8B, 8'h89, 8'h03, 8'h02, 8'h80 };

  // rotation offsets of the 64-bit Keccak, indexed [x][y]
  localparam int ROT [5][5] = '{
    '{ 0, 36,  3, 41, 18}, '{ 1, 44, 10, 45,  2}, '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56}, '{27, 20, 39,  8, 14} };

  // Keccak-f[200] of the all-zero state and of bytes 0,1,..,24
  localparam st_t KAT_ZERO = 200'heaafabc5d2692c85a3ea4c1311b8e9aa1e175cb31c8426283c;
  localparam st_t KAT_SEQ  = 200'h1ca51c23bf40f0832d772391ea41d1776ccea9f95ebd40037f;

  function automatic void unpack(input st_t s, output lanes_t a);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = s[8*(x+5*y) +: 8];
  endfunction

  function automatic st_t pack(input lanes_t a);
    st_t s;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        s[8*(x+5*y) +: 8] = a[x][y];
    return s;
  endfunction

  function automatic logic [7:0] rol8(logic [7:0] v, int r);
    int k;
    k = r % 8;
    return (k == 0) ? v : ((v << k) | (v >> (8 - k)));
  endfunction

  function automatic st_t ref_theta(st_t s);
    lanes_t a;
    logic [7:0] c [5];
    unpack(s, a);
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] ^= c[(x+4)%5] ^ rol8(c[(x+1)%5], 1);
    return pack(a);
  endfunction

  function automatic st_t ref_rho_pi(st_t s);
    lanes_t a, b;
    unpack(s, a);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y][(2*x+3*y)%5] = rol8(a[x][y], ROT[x][y]);
    return pack(b);
  endfunction

  function automatic st_t ref_chi(st_t s);
    lanes_t a, b;
    unpack(s, a);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[x][y] = a[x][y] ^ (~a[(x+1)%5][y] & a[(x+2)%5][y]);
    return pack(b);
  endfunction

  function automatic st_t ref_iota(st_t s, int ir);
    st_t t;
    t = s;
    t[7:0] ^= RC8[ir];
    return t;
  endfunction

  function automatic st_t ref_round(st_t s, int ir);
    return ref_iota(ref_chi(ref_rho_pi(ref_theta(s))), ir);
  endfunction

  function automatic st_t ref_permute(st_t s);
    st_t t;
    t = s;
    for (int ir = 0; ir < 18; ir++) t = ref_round(t, ir);
    return t;
  endfunction

  function automatic st_t rand_state();
    st_t s;
    for (int i = 0; i < 25; i++) s[8*i +: 8] = 8'($urandom());
    return s;
  endfunction

endpackage
