`timescale 1fs/1fs
// saff_pd: bang-bang phase detector (1-bit time-to-digital converter).
//
// A sense-amplifier flip-flop compares the reference edge with the ring
// oscillator's own edge. On every rising edge of ref_clk (the reference as it
// reaches the MUX) it samples vco_out (the ring output OUT). If OUT is already high
// the reference edge lags OUT and S=1 (+1 to the loop accumulator); otherwise the
// reference leads and R=1 (-1). As with the slave SR latch of a SAFF, S and R are
// complementary and hold until the next rising ref_clk edge.
//
// Follows the published design: flip-flop as 1-bit TDC, +1/-1 output meaning.
// This design's choices: the sense amplifier is ideal (no metastability dead zone),
// REF is the clock and OUT the data, and an asynchronous active-low reset that
// leaves R=1.
//
// Timing: S/R change right after the rising ref_clk edge; downstream logic clocked
// by the reference sees them one reference cycle later.
module saff_pd (
  input  logic ref_clk,
  input  logic rst_n,
  input  logic vco_out,
  output logic s,
  output logic r
);
  logic q;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= vco_out;
  end

  // SR latch outputs: exactly one is active.
  assign s = q;
  assign r = ~q;
endmodule
