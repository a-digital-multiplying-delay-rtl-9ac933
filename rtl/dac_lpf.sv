`timescale 1fs/1fs
// dac_lpf: behavioural model of the current-mode DAC and its RC low-pass filter.
//
// Behavioural model of an analog block. Each of the 15 unit current elements that
// is enabled adds V_UNIT_UV microvolts to the DAC output; a second-order RC filter
// (R = 100 kOhm, C = 3.2 pF, two identical sections) smooths the delta-sigma
// pattern into the control voltage of the delay cells. The filter is updated once
// per clk, which holds the DAC output constant between reference edges: each pole
// does y += alpha * (u - y), alpha = 1 - exp(-T_ref / RC) in Q16 (4518 for a
// 43.75 MHz clock and RC = 320 ns). Fixed-point integers are used throughout.
//
// Follows the published design: 15 unit elements, thermometer control, second
// order RC filter with the published R and C. This design's choices: the voltage
// per element (80 mV, i.e. 1.2 V full scale), the filter's topology (two
// unloaded sections), reset to V_RESET_UV.
//
// Timing: vctrl_uv changes right after each rising clk edge.
module dac_lpf
  import dmdll_pkg::*;
#(
  parameter int unsigned UNITS      = DAC_UNITS,
  parameter int          V_UNIT_UV  = 80000,
  parameter int          ALPHA_Q16  = 4518,
  parameter int          V_RESET_UV = 640000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [UNITS-1:0] therm,
  output int               vctrl_uv
);
  // Filter states in microvolts, Q16.
  longint y1, y2;
  longint u;

  always_comb begin
    u = 0;
    for (int i = 0; i < UNITS; i++)
      if (therm[i]) u += longint'(V_UNIT_UV);
    u = u <<< 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= longint'(V_RESET_UV) <<< 16;
      y2 <= longint'(V_RESET_UV) <<< 16;
    end else begin
      y1 <= y1 + (((u - y1) * ALPHA_Q16) >>> 16);
      y2 <= y2 + (((y1 - y2) * ALPHA_Q16) >>> 16);
    end
  end

  assign vctrl_uv = int'(y2 >>> 16);
endmodule
