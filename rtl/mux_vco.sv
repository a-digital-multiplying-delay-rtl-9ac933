`timescale 1fs/1fs
// mux_vco: behavioural model of the multiplexed ring oscillator.
//
// Behavioural model of an analog block. Five inverting delay stages in a ring
// oscillate at 1 / (10 * stage delay). A 2:1 MUX sits at the ring input: with
// sel low it closes the ring (input 0 = OUT); with sel high it passes the
// reference (input 1), so the reference edge replaces one ring edge and the
// oscillator restarts from a clean edge. Before the MUX the reference passes
// through two delay cells identical to the ring stages, so that both MUX inputs
// have matching edges.
//
// Stage delay (fs) = D_NOM_FS + KVD_FS_PER_MV * (vctrl - V_MID) / 1 mV
//                    + COARSE_STEP_FS * coarse     (coarse is signed)
// A higher control voltage gives a longer delay (a slower ring). D_NOM_FS is
// 1/(1.4 GHz)/10, so V_MID with coarse = 0 gives the published 1.4 GHz output.
//
// Follows the published design: five stages, MUX at the ring input, two-cell
// reference buffer, manual coarse tuning beside the loop's fine control. This
// design's choices: gain, sign and range of the tuning, the coarse step, and the
// single-ended stage model.
//
// The ring starts with alternating stage outputs (1, 0, 1, 0, 1), which leaves
// exactly one travelling edge, so it oscillates in its fundamental mode.
//
// Taps: out1 = first stage, out3 = third stage, out = fifth stage (the clock
// output and MUX input 0).
module mux_vco
  import dmdll_pkg::*;
#(
  parameter int unsigned STAGES         = RING_STAGES,
  parameter int unsigned REF_BUF        = REF_BUF_STAGES,
  parameter int          D_NOM_FS       = 71429,
  parameter int          KVD_FS_PER_MV  = 25,
  parameter int          V_MID_UV       = 640000,
  parameter int          COARSE_STEP_FS = 250,
  parameter int          D_MIN_FS       = 20000
) (
  input  logic        ref_in,
  input  logic        sel,
  input  int          vctrl_uv,
  input  logic [3:0]  coarse,
  output logic        ref_buf,
  output logic        mux_out,
  output logic        out1,
  output logic        out3,
  output logic        out
);
  int          d_calc;
  int unsigned d_fs;

  always_comb begin
    d_calc = D_NOM_FS + (KVD_FS_PER_MV * (vctrl_uv - V_MID_UV)) / 1000
           + COARSE_STEP_FS * int'($signed(coarse));
    d_fs   = (d_calc < D_MIN_FS) ? D_MIN_FS : d_calc;
  end

  // Reference buffer: REF_BUF cells in series.
  logic [REF_BUF:0] rb;
  assign rb[0] = ref_in;
  for (genvar k = 0; k < REF_BUF; k++) begin : g_rbuf
    delay_cell #(.INIT(1'(k % 2 == 0))) u_cell (.a(rb[k]), .d_fs(d_fs), .y(rb[k+1]));
  end
  // An odd number of buffer cells would invert the reference.
  assign ref_buf = (REF_BUF % 2 == 1) ? ~rb[REF_BUF] : rb[REF_BUF];

  ref_mux u_mux (.in0(out), .in1(ref_buf), .sel(sel), .y(mux_out));

  logic [STAGES:0] n;
  assign n[0] = mux_out;
  for (genvar k = 0; k < STAGES; k++) begin : g_ring
    delay_cell #(.INIT(1'(k % 2 == 0))) u_cell (.a(n[k]), .d_fs(d_fs), .y(n[k+1]));
  end

  assign out1 = n[1];
  assign out3 = n[3];
  assign out  = n[STAGES];
endmodule
