`timescale 1fs/1fs
// dmdll_top: digital multiplying delay-locked loop (1.4 GHz from 43.75 MHz).
//
// A ring oscillator multiplies the reference by 32, and once every 32 output
// cycles a MUX at the ring input replaces the ring's own edge with the clean
// reference edge. The accumulated jitter of the ring is thereby discarded at every
// reference cycle, which suppresses oscillator phase noise over a bandwidth close
// to the reference frequency. A digital loop keeps the 32-cycle ring period equal
// to the reference period, so that the inserted edge lands where the ring's edge
// would have been:
//   saff_pd   samples OUT at the reference edge: +1 (REF late) or -1 (REF early)
//   loop_acc  18-bit integrator, 14 MSBs onward (4 LSBs hide the limit cycle)
//   dsm2      2nd-order delta-sigma, 14 -> 4 bits
//   bin2therm + dac_lpf   15-element current DAC and RC filter -> V_CTRL
//   mux_vco   2-cell reference buffer, MUX, 5-stage ring
//   divider   divide-by-32 of the falling OUT3 edges -> DIV
//   select_logic  DIV + OUT1 -> SEL, the MUX control
// The digital loop runs on the reference clock; the phase detector is clocked by
// the reference as it reaches the MUX. mode = 1 enables reference insertion;
// coarse is the manual coarse tuning of the ring. The remaining outputs are for
// observation.
//
// Capture range: the loop acquires when the ring starts fast (its 32nd edge before
// the reference edge) or at most about one stage delay late. From a slower start
// the MUX hands the ring back to OUT before OUT has risen, the edge splits, the
// divider loses count and the loop does not lock. Start the ring fast with coarse
// (manual coarse tuning) and ACC_INIT.
//
// Follows the published design: block diagram, widths, N = 32, select-logic taps.
// This design's choices: reset, the observation ports, and the behavioural models
// of the DAC/filter and the ring (see those files).
module dmdll_top
  import dmdll_pkg::*;
#(
  parameter logic [ACC_W-1:0] ACC_INIT = ACC_W'(1) << (ACC_W - 1)
) (
  input  logic                 ref_clk,
  input  logic                 rst_n,
  input  logic                 mode,
  input  logic [3:0]           coarse,
  output logic                 clk_out,
  output logic                 sel,
  output logic                 div,
  output logic                 pd_s,
  output logic [ACC_W-1:0]     acc,
  output logic [DSM_OUT_W-1:0] dac_code,
  output int                   vctrl_uv
);
  logic                 ref_buf, mux_out, out1, out3, out3_n;
  logic                 pd_r, sel_b;
  logic [DSM_IN_W-1:0]  code;
  logic [DSM_ERR_W-1:0] dsm_e1;
  logic [DAC_UNITS-1:0] therm;

  mux_vco u_vco (
    .ref_in(ref_clk), .sel(sel), .vctrl_uv(vctrl_uv), .coarse(coarse),
    .ref_buf(ref_buf), .mux_out(mux_out), .out1(out1), .out3(out3), .out(clk_out)
  );

  saff_pd u_pd (.ref_clk(ref_buf), .rst_n(rst_n), .vco_out(clk_out), .s(pd_s), .r(pd_r));

  loop_acc #(.ACC_INIT(ACC_INIT)) u_acc (
    .clk(ref_clk), .rst_n(rst_n), .s(pd_s), .r(pd_r), .acc(acc), .code(code)
  );

  dsm2 u_dsm (.clk(ref_clk), .rst_n(rst_n), .din(code), .dout(dac_code), .e1(dsm_e1));

  bin2therm u_b2t (.bin(dac_code), .therm(therm));

  dac_lpf u_dac (.clk(ref_clk), .rst_n(rst_n), .therm(therm), .vctrl_uv(vctrl_uv));

  assign out3_n = ~out3;
  divider u_div (.clk_in(out3_n), .rst_n(rst_n), .div(div));

  select_logic u_sel (
    .div(div), .out1(out1), .mode(mode), .rst_n(rst_n), .sel(sel), .sel_b(sel_b)
  );
endmodule
