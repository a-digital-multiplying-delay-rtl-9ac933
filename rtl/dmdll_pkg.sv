`timescale 1fs/1fs
// dmdll_pkg: constants shared by the digital multiplying DLL.
//
// The loop is an 18-bit accumulator whose 14 MSBs feed a 2nd-order delta-sigma
// modulator with a 4-bit output, decoded to 15 thermometer bits for a unit-element
// current DAC. The ring is realigned to the reference every 32 output cycles
// (divide-by-32 built from 5 toggle stages). These numbers are the published
// design's; the time values below are derived from its 43.75 MHz reference and
// 1.4 GHz output and are used only by the behavioural models and testbenches.
package dmdll_pkg;
  localparam int unsigned ACC_W      = 18;   // accumulator width
  localparam int unsigned DROP_LSB   = 4;    // LSBs dropped before the DSM
  localparam int unsigned DSM_IN_W   = ACC_W - DROP_LSB;  // 14
  localparam int unsigned DSM_OUT_W  = 4;    // DSM output / DAC code width
  localparam int unsigned DSM_ERR_W  = DSM_IN_W - DSM_OUT_W;  // 10
  localparam int unsigned DAC_UNITS  = 15;   // thermometer DAC elements
  localparam int unsigned DIV_STAGES = 5;    // toggle flip-flops in the divider
  localparam int unsigned DIV_N      = 1 << DIV_STAGES;  // 32
  localparam int unsigned RING_STAGES = 5;   // ring oscillator delay stages
  localparam int unsigned REF_BUF_STAGES = 2; // reference buffer delay cells

  // Timing of the published operating point, in femtoseconds.
  localparam longint unsigned T_REF_FS  = 64'd22857143;  // 1 / 43.75 MHz
  localparam longint unsigned T_OUT_FS  = 64'd714286;    // 1 / 1.4 GHz = T_REF / 32
endpackage
