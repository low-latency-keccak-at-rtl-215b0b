// tb_share_compress: checks the compression layer at orders 1 and 2:
// output share i is the XOR of shares i*S..i*S+S-1, except in lanes with
// x = 3, where it is the XOR of shares j*S+i (j = 0..S-1); the XOR of all
// outputs equals the XOR of all inputs.
module tb_share_compress;
  import keccak_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0][199:0] a1; logic [1:0][199:0] y1;
  logic [8:0][199:0] a2; logic [2:0][199:0] y2;

  share_compress #(.D(1)) u1 (.a(a1), .y(y1));
  share_compress #(.D(2)) u2 (.a(a2), .y(y2));

  // lanes with x = 3 are bytes 3, 8, 13, 18, 23
  function automatic st_t x3_mask();
    st_t m;
    m = '0;
    for (int y = 0; y < 5; y++) m[8*(3+5*y) +: 8] = 8'hFF;
    return m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t m3;
    m3 = x3_mask();
    for (int t = 0; t < 300; t++) begin
      st_t e, tot_in, tot_out;
      for (int k = 0; k < 4; k++) a1[k] = rand_state();
      for (int k = 0; k < 9; k++) a2[k] = rand_state();
      @(negedge clk);
      // order 1: plain groups {0,1},{2,3}; x = 3 lanes {0,2},{1,3}
      e = ((a1[0] ^ a1[1]) & ~m3) | ((a1[0] ^ a1[2]) & m3);
      checks++; if (y1[0] !== e) failures++;
      e = ((a1[2] ^ a1[3]) & ~m3) | ((a1[1] ^ a1[3]) & m3);
      checks++; if (y1[1] !== e) failures++;
      // order 2, share by share
      for (int i = 0; i < 3; i++) begin
        e = ((a2[3*i] ^ a2[3*i+1] ^ a2[3*i+2]) & ~m3) | ((a2[i] ^ a2[3+i] ^ a2[6+i]) & m3);
        checks++;
        if (y2[i] !== e) begin failures++; $display("d=2 share %0d wrong", i); end
      end
      tot_in = '0; tot_out = '0;
      for (int k = 0; k < 9; k++) tot_in ^= a2[k];
      for (int k = 0; k < 3; k++) tot_out ^= y2[k];
      checks++; if (tot_in !== tot_out) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
