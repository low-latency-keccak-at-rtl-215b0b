// tb_order4: the order-4 (5-share) run of the order sweep in tb_orders,
// kept in a file of its own because the simulator build of this size takes
// minutes. It checks the 2000-bit fresh-mask port, the 18-cycle latency and
// the recombined result against the reference on known-answer and random
// inputs with fresh masks in every cycle.
module tb_order4;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, start;
  st_t x;
  localparam int NORD = 1;
  localparam int RAND_BITS [NORD] = '{2000};

  logic [NORD-1:0] valid, busy;
  st_t res [NORD];

  for (genvar g = 0; g < NORD; g++) begin : g_ord
    localparam int unsigned DD = g + 4;
    logic [DD:0][199:0] din, dout;
    logic [round_masks(DD+1)-1:0] rnd;
    ll_dom_keccak #(.D(DD)) u (.clk, .rst_n, .start, .din, .rnd,
                               .busy(busy[g]), .valid(valid[g]), .dout);
    always @(negedge clk)
      for (int q = 0; q < $bits(rnd); q++) rnd[q] = 1'($urandom());
    // a fresh random sharing of x whenever start is raised
    always @(posedge start) begin
      st_t acc;
      acc = x;
      for (int i = 1; i <= int'(DD); i++) begin din[i] = rand_state(); acc ^= din[i]; end
      din[0] = acc;
    end
    always_comb begin
      res[g] = '0;
      for (int i = 0; i <= int'(DD); i++) res[g] ^= dout[i];
    end
    initial begin
      checks++;
      if ($bits(rnd) != RAND_BITS[g]) begin
        failures++;
        $display("order %0d: %0d mask bits", DD, $bits(rnd));
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      int cyc;
      @(negedge clk);
      if (t == 0) x = '0;
      else if (t == 1) for (int i = 0; i < 25; i++) x[8*i +: 8] = 8'(i);
      else x = rand_state();
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      cyc = 0;
      while (valid != '1 && cyc < 40) begin @(posedge clk); #1; cyc++; end
      for (int g = 0; g < NORD; g++) begin
        checks += 2;
        if (cyc != 18) begin failures++; $display("order %0d latency %0d", g + 1, cyc); end
        if (res[g] !== ref_permute(x)) begin failures++; $display("order %0d wrong result", g + 1); end
      end
      checks++;
      if (t == 0 && res[0] !== KAT_ZERO) failures++;
      if (t == 1 && res[0] !== KAT_SEQ) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
