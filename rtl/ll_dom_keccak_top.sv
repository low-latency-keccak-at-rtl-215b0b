// ll_dom_keccak_top: the masked Keccak-f[200] core together with the PRNG
// that feeds it 100*D*(D+1) fresh mask bits per cycle.
//
// The PRNG is a bank of 31-bit LFSRs, one per mask bit, seeded serially
// through seed_in while seed_load is high (N*31 cycles for a full seed).
// Everything else is the interface of ll_dom_keccak: start loads the
// (D+1)-share input din, valid rises 18 cycles after the load edge and dout
// is the (D+1)-share result. D is the protection order (default 1).
module ll_dom_keccak_top
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  logic              seed_in,
  input  logic              start,
  input  logic [D:0][B-1:0] din,
  output logic              busy,
  output logic              valid,
  output logic [D:0][B-1:0] dout
);

  localparam int unsigned NRAND = round_masks(D + 1);

  logic [NRAND-1:0] rnd;

  lfsr_prng #(.N(NRAND)) u_prng (
    .clk, .rst_n, .seed_load, .seed_in, .rnd
  );

  ll_dom_keccak #(.D(D)) u_core (
    .clk, .rst_n, .start, .din, .rnd, .busy, .valid, .dout
  );

endmodule
