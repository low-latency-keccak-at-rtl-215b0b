// tb_dom_chi_row: checks the masked chi row at orders 1, 2 and 3.
//  - correctness: the XOR of all (d+1)^2 output shares equals chi of the
//    XOR of the input shares (exhaustive over all 2^10 inputs for d = 1,
//    random masks; random inputs for d = 2, 3);
//  - share separation: output share k = i*S+j must not change when any
//    share of a, b, c, d, e other than a[(i+j)%S], b[i], c[j], d[i], e[j]
//    is flipped;
//  - refreshing: flipping one fresh mask bit m changes exactly two output
//    share bits, both of chi output bit m.
module tb_dom_chi_row;
  import keccak_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [4:0] chi5(logic [4:0] v);
    logic [4:0] o;
    for (int x = 0; x < 5; x++) o[x] = v[x] ^ (~v[(x+1)%5] & v[(x+2)%5]);
    return o;
  endfunction

  // allowed input share of variable v for output share (i, j)
  function automatic int allowed(int v, int i, int j, int s);
    case (v)
      0:       return (i + j) % s;
      1, 3:    return i;
      default: return j;
    endcase
  endfunction

  // order-generic test task, instantiated once per order below
  logic [1:0][4:0]   x1;  logic [row_masks(2)-1:0] r1;  logic [3:0][4:0]  y1;
  logic [2:0][4:0]   x2;  logic [row_masks(3)-1:0] r2;  logic [8:0][4:0]  y2;
  logic [3:0][4:0]   x3;  logic [row_masks(4)-1:0] r3;  logic [15:0][4:0] y3;

  dom_chi_row #(.D(1)) u1 (.x(x1), .r(r1), .y(y1));
  dom_chi_row #(.D(2)) u2 (.x(x2), .r(r2), .y(y2));
  dom_chi_row #(.D(3)) u3 (.x(x3), .r(r3), .y(y3));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define CHI_TESTS(XV, RV, YV, S, NIN)                                        \
    for (int t = 0; t < NIN; t++) begin                                        \
      logic [4:0] xin, xo;                                                     \
      logic [S*S-1:0][4:0] ysave;                                              \
      if (NIN == 1024) XV = t[(S*5)-1:0]; else XV = '0;                        \
      if (NIN != 1024) for (int q = 0; q < S; q++) XV[q] = 5'($urandom());     \
      for (int q = 0; q < $bits(RV); q++) RV[q] = 1'($urandom());              \
      @(negedge clk);                                                          \
      xin = '0; xo = '0;                                                       \
      for (int q = 0; q < S; q++) xin ^= XV[q];                                \
      for (int q = 0; q < S*S; q++) xo ^= YV[q];                               \
      checks++;                                                                \
      if (xo !== chi5(xin)) begin                                              \
        failures++; $display("order %0d: chi(%b) got %b", S-1, xin, xo);      \
      end                                                                      \
      if (t % 16 == 0) begin                                                   \
        ysave = YV;                                                            \
        for (int v = 0; v < 5; v++)                                            \
          for (int sh = 0; sh < S; sh++) begin                                 \
            XV[sh][v] = ~XV[sh][v];                                            \
            @(negedge clk);                                                    \
            for (int i = 0; i < S; i++)                                        \
              for (int j = 0; j < S; j++)                                      \
                if (allowed(v, i, j, S) != sh) begin                           \
                  checks++;                                                    \
                  if (YV[i*S+j] !== ysave[i*S+j]) begin                        \
                    failures++;                                                \
                    $display("order %0d: share %0d sees share %0d of var %0d", \
                             S-1, i*S+j, sh, v);                               \
                  end                                                          \
                end                                                            \
            XV[sh][v] = ~XV[sh][v];                                            \
          end                                                                  \
        for (int q = 0; q < $bits(RV); q++) begin                              \
          int nch, nok;                                                        \
          logic [S*S-1:0][4:0] yb;                                             \
          @(negedge clk);                                                      \
          yb = YV;                                                             \
          RV[q] = ~RV[q];                                                      \
          @(negedge clk);                                                      \
          nch = 0; nok = 0;                                                    \
          for (int k = 0; k < S*S; k++)                                        \
            for (int b = 0; b < 5; b++)                                        \
              if (YV[k][b] !== yb[k][b]) begin                                 \
                nch++;                                                         \
                if (b == q / (S*(S-1)/2)) nok++;                               \
              end                                                              \
          checks++;                                                            \
          if (nch != 2 || nok != 2) begin                                      \
            failures++; $display("order %0d: mask %0d changes %0d bits", S-1, q, nch); \
          end                                                                  \
          RV[q] = ~RV[q];                                                      \
        end                                                                    \
      end                                                                      \
    end

  initial begin
    `CHI_TESTS(x1, r1, y1, 2, 1024)
    `CHI_TESTS(x2, r2, y2, 3, 600)
    `CHI_TESTS(x3, r3, y3, 4, 400)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
