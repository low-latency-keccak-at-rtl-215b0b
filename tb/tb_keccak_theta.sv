// tb_keccak_theta: checks keccak_theta against the lane-based reference on
// single-bit states (each bit must reach exactly itself and ten others)
// and on random states.
module tb_keccak_theta;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  st_t a, y;
  int checks = 0, failures = 0;

  keccak_theta dut (.a(a), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = '0;
      a[n] = 1'b1;
      @(posedge clk);
      checks++;
      if (y !== ref_theta(a) || $countones(y) != 11) begin
        failures++;
        $display("bit %0d: got %h", n, y);
      end
    end
    for (int t = 0; t < 500; t++) begin
      a = rand_state();
      @(posedge clk);
      checks++;
      if (y !== ref_theta(a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
