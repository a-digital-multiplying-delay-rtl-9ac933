`timescale 1fs/1fs
// ref_mux: 2:1 edge multiplexer at the input of the ring oscillator.
//
// Input 0 is the ring's own output OUT, which closes the ring; input 1 is the
// buffered reference. While sel is high the ring is driven by the reference, so
// the reference edge replaces the ring's edge and resets its accumulated jitter.
//
// Follows the published design: input numbering (0 = ring, 1 = reference). The
// transmission-gate circuit and its delay matching are outside this logic
// description: the matching is modelled by the reference buffer in mux_vco.
module ref_mux (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic y
);
  always_comb y = sel ? in1 : in0;
endmodule
