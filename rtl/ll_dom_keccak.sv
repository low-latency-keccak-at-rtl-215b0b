// ll_dom_keccak: d-th order masked Keccak-f[200] with one register stage per
// round (low-latency domain-oriented masking).
//
// The state register holds (d+1)^2 shares. Each cycle the compression layer
// folds them to d+1 shares, rho/pi act on each share, and the masked chi
// (with iota on share 0) expands them again to (d+1)^2 shares refreshed by
// fresh masks. Theta of the next round is then applied to each of the
// (d+1)^2 shares before the register, which is what lets chi and theta meet
// without a register in between. Mux.1 replaces the feedback by the
// zero-padded input sharing in the load cycle; Mux.2 bypasses theta in the
// last round. The output sharing is the compression of the register, valid
// when `valid` is high.
//
// Interface: `start` (while not busy) loads din, a (d+1)-share sharing with
// share i in din[i]. `rnd` must carry round_masks(D+1) = 100*D*(D+1) fresh
// random bits in every cycle. `valid` rises NR = 18 cycles after the load
// edge and dout (d+1 shares) is then the sharing of Keccak-f[200](din).
// The datapath follows the published architecture; handshake, reset and
// input padding position are this design's own.
module ll_dom_keccak
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [D:0][B-1:0]             din,
  input  logic [round_masks(D+1)-1:0]   rnd,
  output logic                          busy,
  output logic                          valid,
  output logic [D:0][B-1:0]             dout
);

  localparam int unsigned S  = D + 1;
  localparam int unsigned SS = S * S;

  logic                     load, bypass, reg_en;
  logic [4:0]               round;
  logic [SS-1:0][B-1:0]     st_q, st_d, chi_q, mux1_q, th_q;
  logic [D:0][B-1:0]        comp_q, rp_q;

  round_ctrl #(.NR(NR)) u_ctrl (
    .clk, .rst_n, .start,
    .load, .bypass, .reg_en, .round, .busy, .valid
  );

  state_reg #(.D(D)) u_reg (
    .clk, .rst_n, .en(reg_en), .d(st_d), .q(st_q)
  );

  share_compress #(.D(D)) u_comp (.a(st_q), .y(comp_q));

  for (genvar g = 0; g < int'(S); g++) begin : g_rp
    keccak_rho_pi u_rp (.a(comp_q[g]), .y(rp_q[g]));
  end

  dom_chi_iota #(.D(D)) u_chi (.a(rp_q), .rnd(rnd), .round(round), .y(chi_q));

  input_pad_mux #(.D(D)) u_mux1 (.load(load), .din(din), .fb(chi_q), .y(mux1_q));

  for (genvar g = 0; g < int'(SS); g++) begin : g_th
    keccak_theta u_th (.a(mux1_q[g]), .y(th_q[g]));
  end

  bypass_mux #(.D(D)) u_mux2 (.bypass(bypass), .theta_in(th_q), .chi_in(chi_q), .y(st_d));

  assign dout = comp_q;

endmodule
