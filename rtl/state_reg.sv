// state_reg: the single register stage of the round, (d+1)^2 shares of the
// 200-bit state. It loads d on a rising clock edge when `en` is high and
// holds otherwise; an active-low synchronous reset clears it (the reset
// value is this design's own choice).
module state_reg
  import keccak_pkg::*;
#(
  parameter int unsigned D = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [(D+1)*(D+1)-1:0][B-1:0] d,
  output logic [(D+1)*(D+1)-1:0][B-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
