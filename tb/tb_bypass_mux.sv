// tb_bypass_mux: checks Mux.2 (order 1 and 2): theta input when bypass is
// low, chi input when it is high.
module tb_bypass_mux;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic bypass;
  logic [3:0][199:0] t1, c1, y1;
  logic [8:0][199:0] t2, c2, y2;

  bypass_mux #(.D(1)) u1 (.bypass(bypass), .theta_in(t1), .chi_in(c1), .y(y1));
  bypass_mux #(.D(2)) u2 (.bypass(bypass), .theta_in(t2), .chi_in(c2), .y(y2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 4; k++) begin t1[k] = rand_state(); c1[k] = rand_state(); end
      for (int k = 0; k < 9; k++) begin t2[k] = rand_state(); c2[k] = rand_state(); end
      bypass = 1'($urandom());
      @(negedge clk);
      checks += 2;
      if (y1 !== (bypass ? c1 : t1)) failures++;
      if (y2 !== (bypass ? c2 : t2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
