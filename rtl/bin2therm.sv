`timescale 1fs/1fs
// bin2therm: binary-to-thermometer decoder for the unit-element DAC.
//
// Code k (0..15) turns on the k lowest of the 15 enables: therm[i] = (bin > i).
// Thermometer coding lets each unit current element switch on or off without the
// mismatch glitches of a binary-weighted DAC.
//
// Follows the published design: 4-bit input, 15 outputs. This design's choice:
// purely combinational.
module bin2therm
  import dmdll_pkg::*;
#(
  parameter int unsigned BIN_W = DSM_OUT_W,
  parameter int unsigned UNITS = DAC_UNITS
) (
  input  logic [BIN_W-1:0] bin,
  output logic [UNITS-1:0] therm
);
  always_comb begin
    for (int i = 0; i < UNITS; i++)
      therm[i] = (32'(bin) > i);
  end
endmodule
