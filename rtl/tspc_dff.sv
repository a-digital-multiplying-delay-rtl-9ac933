`timescale 1fs/1fs
// tspc_dff: rising-edge D flip-flop with true and complementary outputs.
//
// The divider and the select logic are built from true-single-phase-clock (TSPC)
// flip-flops, chosen for their low power at the 1.4 GHz output rate. Only the
// flip-flop function is described here; the transistor circuit is not.
//
// This design's choices: rising-edge triggered, asynchronous active-low reset to
// q=0.
module tspc_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end
  assign qb = ~q;
endmodule
