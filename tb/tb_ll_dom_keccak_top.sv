// tb_ll_dom_keccak_top: full-size test of the top at its default
// parameters (order 1, 200 LFSRs). It seeds the LFSR bank serially
// (200*31 cycles), then runs known-answer and random permutations through
// the masked core with the on-chip masks. Checks: the recombined output of
// every permutation against the reference, valid exactly 18 cycles after
// the load edge, the mask word changing every cycle while running, a start
// during a run being ignored, a back-to-back start, and the bypass of theta
// in the last round. Each mechanism is counted; one that never happened is
// a failure.
module tb_ll_dom_keccak_top;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NRAND = round_masks(2);
  int checks = 0, failures = 0;
  int n_seed = 0, n_load = 0, n_bypass = 0, n_ignored = 0, n_b2b = 0, n_fresh = 0, n_stale = 0;

  logic rst_n, seed_load, seed_in, start, busy, valid;
  logic [1:0][199:0] din, dout;
  logic [NRAND-1:0] last_rnd;

  ll_dom_keccak_top dut (.clk, .rst_n, .seed_load, .seed_in, .start, .din,
                         .busy, .valid, .dout);

  always @(posedge clk) begin
    if (dut.u_core.bypass) n_bypass++;
    if (busy) begin
      if (dut.u_core.rnd != last_rnd) n_fresh++;
      else n_stale++;
    end
    last_rnd <= dut.u_core.rnd;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  task automatic run(st_t x, logic poke, logic b2b, output st_t res);
    int cyc;
    din[1] = rand_state(); din[0] = x ^ din[1];
    if (!b2b) @(negedge clk);
    else n_b2b++;
    start = 1'b1;
    @(posedge clk); #1;
    n_load++;
    start = 1'b0;
    cyc = 0;
    while (!valid && cyc < 40) begin
      if (poke && cyc == 3) begin start = 1'b1; n_ignored++; end
      @(posedge clk); #1;
      start = 1'b0;
      cyc++;
    end
    chk(cyc == 18, $sformatf("latency %0d cycles, expected 18", cyc));
    res = dout[0] ^ dout[1];
    chk(res === ref_permute(x), "result");
  endtask

  initial begin
    st_t x, res;
    rst_n = 1'b0; seed_load = 1'b0; seed_in = 1'b0; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    seed_load = 1'b1;
    for (int q = 0; q < NRAND * 31; q++) begin
      seed_in = 1'($urandom());
      @(posedge clk); #1;
    end
    seed_load = 1'b0;
    n_seed++;
    run('0, 1'b0, 1'b0, res);
    chk(res === KAT_ZERO, "known answer, zero state");
    for (int i = 0; i < 25; i++) x[8*i +: 8] = 8'(i);
    run(x, 1'b1, 1'b1, res);
    chk(res === KAT_SEQ, "known answer, bytes 0..24");
    for (int t = 0; t < 8; t++) run(rand_state(), t[0], t[1], res);
    if (n_seed == 0 || n_load == 0 || n_bypass == 0 || n_ignored == 0 || n_b2b == 0 || n_fresh == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    chk(n_stale == 0, "mask word repeated in a running cycle");
    $display("seeds=%0d loads=%0d bypass=%0d ignored_starts=%0d back_to_back=%0d fresh_mask_cycles=%0d",
             n_seed, n_load, n_bypass, n_ignored, n_b2b, n_fresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
