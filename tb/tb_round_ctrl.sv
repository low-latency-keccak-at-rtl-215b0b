// tb_round_ctrl: checks the sequencing: start while idle gives one load
// cycle, then rounds 0..17 one per cycle with bypass only in round 17,
// valid rising exactly 18 cycles after the load edge and staying high;
// start while busy is ignored.
module tb_round_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, start, load, bypass, reg_en, busy, valid;
  logic [4:0] round;

  round_ctrl dut (.clk, .rst_n, .start, .load, .bypass, .reg_en, .round, .busy, .valid);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s (busy %b valid %b load %b round %0d)", $time, what, busy, valid, load, round); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!busy && !valid && !load, "idle after reset");
    for (int op = 0; op < 4; op++) begin
      #1 start = 1'b1;
      #1 chk(load && reg_en && !bypass, "load cycle");
      @(posedge clk); #1;
      start = (op == 1);   // op 1 keeps start high through the run
      for (int r = 0; r < 18; r++) begin
        chk(busy && !valid && !load && reg_en, "busy in round");
        chk(round == 5'(r), $sformatf("round %0d, got %0d", r, round));
        chk(bypass == (r == 17), "bypass only in the last round");
        @(posedge clk); #1;
      end
      start = 1'b0;
      #1 chk(valid && !busy && !reg_en, "valid 18 cycles after load");
      repeat (op) begin @(posedge clk); #1; chk(valid && !reg_en, "valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
