// round_ctrl: sequencing of the low-latency round-based datapath.
//
// A permutation takes one load cycle plus NR = 18 round cycles, one per
// Keccak round. In the load cycle (`start` high while idle) Mux.1 selects
// the padded input and the register loads theta of it. In round cycle r
// (0..NR-1) `round` = r selects the round constant and the register loads
// theta of the next round applied to the chi/iota output; in the last round
// `bypass` makes Mux.2 skip theta, so the register then holds the result.
// `valid` rises after that edge, NR cycles after the load edge, and stays
// high until the next start. `start` while busy is ignored. The handshake
// (start / busy / valid) is this design's own choice.
module round_ctrl #(
  parameter int unsigned NR = 18
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       load,
  output logic       bypass,
  output logic       reg_en,
  output logic [4:0] round,
  output logic       busy,
  output logic       valid
);

  localparam logic [4:0] LAST = 5'(NR - 1);

  assign load   = start & ~busy;
  assign bypass = busy & (round == LAST);
  assign reg_en = load | busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      valid <= 1'b0;
      round <= '0;
    end else if (load) begin
      busy  <= 1'b1;
      valid <= 1'b0;
      round <= '0;
    end else if (busy) begin
      if (round == LAST) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        round <= '0;
      end else begin
        round <= round + 5'd1;
      end
    end
  end

  // the round counter never leaves 0..NR-1
  a_round_range : assert property (@(posedge clk) disable iff (!rst_n) round <= LAST);
  // busy and valid are never high together
  a_busy_valid  : assert property (@(posedge clk) disable iff (!rst_n) !(busy && valid));

endmodule
