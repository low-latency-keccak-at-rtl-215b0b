// lfsr_prng: fresh-mask generator, one 31-bit LFSR per mask bit.
//
// Each LFSR is a Fibonacci register with feedback polynomial x^31 + x^28 + 1
// (feedback s[30] ^ s[27] shifted in at bit 0) and delivers its bit 30 as
// rnd[n]. All N registers step on every clock edge, so every cycle sees N
// new mask bits. Seeding is serial: while `seed_load` is high the N LFSRs
// form one N*31-bit shift chain that takes `seed_in` at LFSR 0 bit 0, so
// N*31 cycles of random seed bits give every LFSR its own seed (an all-zero
// seed would lock an LFSR at zero). Reset puts a fixed non-zero pattern in
// each register so the bank runs even unseeded. The LFSR polynomial and one
// LFSR per mask bit follow the evaluation setup the design was built with;
// the seeding scheme and reset pattern are this design's own.
module lfsr_prng #(
  parameter int unsigned N = 200
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic         seed_in,
  output logic [N-1:0] rnd
);

  logic [N-1:0][30:0] s;

  function automatic logic [30:0] init_val(logic [30:0] n);
    logic [30:0] h;
    h = (n + 31'd1) * 31'h1E37_79B1;
    return (h == '0) ? 31'd1 : h;
  endfunction

  for (genvar g = 0; g < int'(N); g++) begin : g_lfsr
    logic chain_in;
    if (g == 0) begin : g_first
      assign chain_in = seed_in;
    end else begin : g_next
      assign chain_in = s[g-1][30];
    end

    always_ff @(posedge clk) begin
      if (!rst_n)         s[g] <= init_val(31'(g));
      else if (seed_load) s[g] <= {s[g][29:0], chain_in};
      else                s[g] <= {s[g][29:0], s[g][30] ^ s[g][27]};
    end

    assign rnd[g] = s[g][30];
  end

endmodule
