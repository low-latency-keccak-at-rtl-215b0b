// tb_dom_chi_iota: checks the masked chi/iota layer at orders 1 and 2 on
// random sharings, random masks and every round number: the XOR of all
// output shares must equal iota(chi(x)) of the reference, and the round
// constant must sit in output share 0 only (flipping every mask leaves the
// result unchanged while the shares change).
module tb_dom_chi_iota;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0][199:0] a1; logic [round_masks(2)-1:0] r1; logic [3:0][199:0] y1;
  logic [2:0][199:0] a2; logic [round_masks(3)-1:0] r2; logic [8:0][199:0] y2;
  logic [4:0] round;

  dom_chi_iota #(.D(1)) u1 (.a(a1), .rnd(r1), .round(round), .y(y1));
  dom_chi_iota #(.D(2)) u2 (.a(a2), .rnd(r2), .round(round), .y(y2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 180; t++) begin
      st_t x, s1, s2;
      logic [3:0][199:0] y1a;
      round = 5'(t % 18);
      x = rand_state();
      a1[1] = rand_state(); a1[0] = x ^ a1[1];
      a2[1] = rand_state(); a2[2] = rand_state(); a2[0] = x ^ a2[1] ^ a2[2];
      for (int q = 0; q < $bits(r1); q++) r1[q] = 1'($urandom());
      for (int q = 0; q < $bits(r2); q++) r2[q] = 1'($urandom());
      @(negedge clk);
      s1 = '0; s2 = '0;
      for (int k = 0; k < 4; k++) s1 ^= y1[k];
      for (int k = 0; k < 9; k++) s2 ^= y2[k];
      checks += 2;
      if (s1 !== ref_iota(ref_chi(x), t % 18)) begin failures++; $display("d=1 round %0d wrong", t % 18); end
      if (s2 !== ref_iota(ref_chi(x), t % 18)) begin failures++; $display("d=2 round %0d wrong", t % 18); end
      y1a = y1;
      r1 = ~r1;
      @(negedge clk);
      s1 = '0;
      for (int k = 0; k < 4; k++) s1 ^= y1[k];
      checks++;
      if (s1 !== ref_iota(ref_chi(x), t % 18) || y1 == y1a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
