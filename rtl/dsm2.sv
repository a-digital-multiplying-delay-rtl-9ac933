`timescale 1fs/1fs
// dsm2: second-order error-feedback delta-sigma modulator.
//
// The 14-bit accumulator code is truncated to a 4-bit DAC code. The 10 bits cut
// away (the quantisation error) are delayed and fed back: v = x + 2*e[n-1] -
// e[n-2]. The output is y = v - e, so Y = X - (1 - z^-1)^2 E: the truncation
// error is pushed to high frequencies, where the RC filter after the DAC removes
// it, and the average DAC code equals x / 2^10. The coefficients 2 and -1 need no
// multiplier.
//
// Follows the published design: structure, widths (14 in, 4 out, 10-bit error)
// and coefficients. This design's choices: the adder is two bits wider than the
// input so the sum never wraps; the output is clamped to 0..15 (only reachable
// within about two codes of either end of the input range); error registers reset
// to zero.
//
// Timing: dout is registered and valid one clk after din; one sample per clk.
module dsm2
  import dmdll_pkg::*;
#(
  parameter int unsigned IN_W  = DSM_IN_W,
  parameter int unsigned OUT_W = DSM_OUT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IN_W-1:0]   din,
  output logic [OUT_W-1:0]  dout,
  output logic [IN_W-OUT_W-1:0] e1
);
  localparam int unsigned ERR_W = IN_W - OUT_W;
  localparam int unsigned SUM_W = IN_W + 2;   // signed, covers -2^ERR_W .. 2^IN_W + 2^(ERR_W+1)

  logic        [ERR_W-1:0] e2;
  logic signed [SUM_W-1:0] v;
  logic signed [SUM_W-1:0] q_raw;
  logic        [OUT_W-1:0] q_sat;

  always_comb begin
    v = $signed(SUM_W'(din)) + $signed(SUM_W'({e1, 1'b0})) - $signed(SUM_W'(e2));
    q_raw = v >>> ERR_W;   // floor(v / 2^ERR_W)
    if (q_raw < 0)
      q_sat = '0;
    else if (q_raw > $signed(SUM_W'((1 << OUT_W) - 1)))
      q_sat = '1;
    else
      q_sat = q_raw[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1   <= '0;
      e2   <= '0;
      dout <= '0;
    end else begin
      e1   <= v[ERR_W-1:0];
      e2   <= e1;
      dout <= q_sat;
    end
  end
endmodule
