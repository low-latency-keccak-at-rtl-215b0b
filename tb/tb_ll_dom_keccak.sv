// tb_ll_dom_keccak: end-to-end test of the masked core at order 1 (default
// parameters) and order 2, with fresh random masks driven every cycle.
// For every permutation the testbench checks, cycle by cycle, that the
// recombined compressed register equals the reference: theta of the input
// after the load edge, theta of the state after round r, and the final
// state after round 17 (theta bypassed); that valid rises exactly 18
// cycles after the load edge; and that the result matches two known-answer
// vectors and random inputs. It also exercises start while busy (ignored),
// back-to-back starts, and re-running one input with other masks (same
// result, different shares). Right after the load, compressed share i must
// be theta of input share i alone (padding position and the two
// compression groupings agree). Every mechanism is counted and one that never
// happened is a failure.
module tb_ll_dom_keccak;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_bypass = 0, n_ignored = 0, n_b2b = 0, n_remask = 0;

  logic rst_n, start;
  logic [1:0][199:0] din1, dout1;
  logic [2:0][199:0] din2, dout2;
  logic [round_masks(2)-1:0] rnd1;
  logic [round_masks(3)-1:0] rnd2;
  logic busy1, valid1, busy2, valid2;

  ll_dom_keccak u1 (.clk, .rst_n, .start, .din(din1), .rnd(rnd1),
                    .busy(busy1), .valid(valid1), .dout(dout1));
  ll_dom_keccak #(.D(2)) u2 (.clk, .rst_n, .start, .din(din2), .rnd(rnd2),
                    .busy(busy2), .valid(valid2), .dout(dout2));

  // fresh masks every cycle
  always @(negedge clk) begin
    for (int q = 0; q < $bits(rnd1); q++) rnd1[q] = 1'($urandom());
    for (int q = 0; q < $bits(rnd2); q++) rnd2[q] = 1'($urandom());
  end

  always @(posedge clk) if (u1.bypass) n_bypass++;

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

  // one permutation of x on both orders; poke_start raises start mid-run
  task automatic run(st_t x, logic poke_start, logic b2b, output logic [1:0][199:0] sh1);
    st_t ref_st;
    int cyc;
    din1[1] = rand_state(); din1[0] = x ^ din1[1];
    din2[1] = rand_state(); din2[2] = rand_state(); din2[0] = x ^ din2[1] ^ din2[2];
    if (!b2b) begin @(negedge clk); end
    start = 1'b1;
    #1;
    chk(u1.load && u2.load, "load accepted");
    n_load++;
    @(posedge clk); #1;
    start = 1'b0;
    ref_st = x;
    chk((dout1[0] ^ dout1[1]) === ref_theta(x), "d=1 theta of input after load");
    chk((dout2[0] ^ dout2[1] ^ dout2[2]) === ref_theta(x), "d=2 theta of input after load");
    // padding and both compression groupings: compressed share i after the
    // load depends on input share i alone
    for (int i = 0; i < 2; i++) chk(dout1[i] === ref_theta(din1[i]), $sformatf("d=1 share %0d after load", i));
    for (int i = 0; i < 3; i++) chk(dout2[i] === ref_theta(din2[i]), $sformatf("d=2 share %0d after load", i));
    cyc = 0;
    for (int r = 0; r < 18; r++) begin
      if (poke_start && r == 5) begin start = 1'b1; n_ignored++; end
      @(posedge clk); #1;
      start = 1'b0;
      cyc++;
      ref_st = ref_round(ref_st, r);
      if (r < 17) begin
        chk((dout1[0] ^ dout1[1]) === ref_theta(ref_st), $sformatf("d=1 state after round %0d", r));
        chk((dout2[0] ^ dout2[1] ^ dout2[2]) === ref_theta(ref_st), $sformatf("d=2 state after round %0d", r));
        chk(!valid1 && !valid2 && busy1 && busy2, "busy during rounds");
      end
    end
    chk(valid1 && valid2 && cyc == 18, "valid 18 cycles after the load edge");
    chk((dout1[0] ^ dout1[1]) === ref_st, "d=1 result");
    chk((dout2[0] ^ dout2[1] ^ dout2[2]) === ref_st, "d=2 result");
    chk(ref_st === ref_permute(x), "reference consistency");
    sh1 = dout1;
  endtask

  initial begin
    logic [1:0][199:0] s_a, s_b;
    st_t x;
    rst_n = 1'b0; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run('0, 1'b0, 1'b0, s_a);
    chk((s_a[0] ^ s_a[1]) === KAT_ZERO, "known answer, zero state");
    for (int i = 0; i < 25; i++) x[8*i +: 8] = 8'(i);
    run(x, 1'b1, 1'b0, s_a);
    chk((s_a[0] ^ s_a[1]) === KAT_SEQ, "known answer, bytes 0..24");
    // same input again, other masks: same value, different shares
    run(x, 1'b0, 1'b1, s_b);
    n_b2b++;
    checks++;
    if (s_a !== s_b && (s_b[0] ^ s_b[1]) === KAT_SEQ) n_remask++;
    else failures++;
    for (int t = 0; t < 6; t++) run(rand_state(), t[0], t[1], s_a);
    chk(!u1.busy, "idle at end");
    if (n_load == 0 || n_bypass == 0 || n_ignored == 0 || n_b2b == 0 || n_remask == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("loads=%0d bypass=%0d ignored_starts=%0d back_to_back=%0d remasked=%0d",
             n_load, n_bypass, n_ignored, n_b2b, n_remask);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
