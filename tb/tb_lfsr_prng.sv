// tb_lfsr_prng: checks the LFSR bank against a bit-serial software model
// of x^31 + x^28 + 1: serial seeding of every register through the chain,
// then free-running output sequences; also checks the unseeded registers
// run (no stuck output).
module tb_lfsr_prng;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;
  int checks = 0, failures = 0;
  logic rst_n, seed_load, seed_in;
  logic [N-1:0] rnd;
  logic [30:0] model [N];
  logic [N*31-1:0] seed;

  lfsr_prng #(.N(N)) dut (.clk, .rst_n, .seed_load, .seed_in, .rnd);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    rst_n = 1'b0; seed_load = 1'b0; seed_in = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    ones = 0;
    for (int t = 0; t < 200; t++) begin @(posedge clk); #1 ones += $countones(rnd); end
    checks++;
    if (ones < 400 || ones > 1200) begin failures++; $display("unseeded ones %0d", ones); end
    // serial seed: the first bit shifted in ends up at the far end
    for (int q = 0; q < N*31; q++) seed[q] = 1'($urandom());
    seed_load = 1'b1;
    for (int q = N*31-1; q >= 0; q--) begin seed_in = seed[q]; @(posedge clk); #1; end
    seed_load = 1'b0;
    for (int n = 0; n < N; n++) model[n] = seed[31*n +: 31];
    for (int t = 0; t < 500; t++) begin
      for (int n = 0; n < N; n++) begin
        checks++;
        if (rnd[n] !== model[n][30]) begin failures++; $display("lfsr %0d step %0d", n, t); end
      end
      @(posedge clk); #1;
      for (int n = 0; n < N; n++) model[n] = {model[n][29:0], model[n][30] ^ model[n][27]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
