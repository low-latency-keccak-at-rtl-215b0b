// tb_state_reg: checks the state register: reset to zero, load on enable,
// hold without enable.
module tb_state_reg;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, en;
  logic [3:0][199:0] d, q, model;

  state_reg #(.D(1)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b1;
    for (int k = 0; k < 4; k++) d[k] = rand_state();
    @(posedge clk); #1;
    checks++; if (q !== '0) failures++;
    model = '0;
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 4; k++) d[k] = rand_state();
      en = 1'($urandom());
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
