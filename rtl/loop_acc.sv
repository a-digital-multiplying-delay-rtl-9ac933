`timescale 1fs/1fs
// loop_acc: digital loop filter of the MDLL, an up/down accumulator.
//
// The loop is first order, so its filter is a plain integrator. Each reference
// cycle the accumulator adds +1 when the phase detector reports S and -1 when it
// reports R. The full state is ACC_W bits wide, but only the top ACC_W-DROP_LSB
// bits go on to the delta-sigma modulator: the bang-bang detector and the loop
// latency make the accumulator limit-cycle by a few counts, and dropping the LSBs
// hides that dither from the DAC.
//
// Follows the published design: 18-bit accumulator, +1/-1 per S/R, 4 LSBs
// dropped, 14-bit output. This design's choices: saturation at both ends instead
// of wrap-around, reset to mid-scale (ACC_INIT), asynchronous active-low reset.
//
// Timing: one update per rising clk edge; code is registered (acc[17:4]).
module loop_acc
  import dmdll_pkg::*;
#(
  parameter int unsigned W        = ACC_W,
  parameter int unsigned DROP     = DROP_LSB,
  parameter logic [W-1:0] ACC_INIT = W'(1) << (W - 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s,
  input  logic            r,
  output logic [W-1:0]    acc,
  output logic [W-DROP-1:0] code
);
  localparam logic [W-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= ACC_INIT;
    end else if (s && !r) begin
      if (acc != MAX) acc <= acc + 1'b1;
    end else if (r && !s) begin
      if (acc != '0) acc <= acc - 1'b1;
    end
  end

  assign code = acc[W-1:DROP];
endmodule
