// tb_input_pad_mux: checks Mux.1 at orders 1 and 2: with load high input
// share i lands in share i*S+i and all other shares are zero; with load
// low the feedback passes unchanged.
module tb_input_pad_mux;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic load;
  logic [1:0][199:0] d1; logic [3:0][199:0] f1, y1;
  logic [2:0][199:0] d2; logic [8:0][199:0] f2, y2;

  input_pad_mux #(.D(1)) u1 (.load(load), .din(d1), .fb(f1), .y(y1));
  input_pad_mux #(.D(2)) u2 (.load(load), .din(d2), .fb(f2), .y(y2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 2; k++) d1[k] = rand_state();
      for (int k = 0; k < 3; k++) d2[k] = rand_state();
      for (int k = 0; k < 4; k++) f1[k] = rand_state();
      for (int k = 0; k < 9; k++) f2[k] = rand_state();
      load = t[0];
      @(negedge clk);
      if (load) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (y1[k] !== ((k == 0) ? d1[0] : (k == 3) ? d1[1] : '0)) failures++;
        end
        for (int k = 0; k < 9; k++) begin
          checks++;
          if (y2[k] !== ((k % 4 == 0) ? d2[k/4] : '0)) failures++;
        end
      end else begin
        checks += 2;
        if (y1 !== f1) failures++;
        if (y2 !== f2) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
