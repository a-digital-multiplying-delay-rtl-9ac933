`timescale 1fs/1fs
// select_logic: generates SEL, the MUX control that inserts the reference edge.
//
// Once every 32 output cycles the MUX must pass the reference edge instead of the
// ring's own edge, and its select line must switch while the ring is in the middle
// of a transition, never on an edge that is passing through. The sequence:
//   1. DIV rises (on the last falling OUT3 edge before the insertion) and sets the
//      armed flip-flop q (D tied high).
//   2. SEL = q AND OUT1 (the NAND and inverter) rises with the next rising OUT1,
//      i.e. half a cycle after the ring edge that started the cycle; the ring input
//      is then low and the MUX now holds it at REF.
//   3. REF rises and passes through the MUX; the ring's first stage output OUT1
//      falls one stage later and drops SEL, handing the ring back to its own loop.
//   4. That falling OUT1 edge also sets done, which holds q reset (only while MODE
//      is high) until the following falling OUT1 edge clears done again.
// With MODE low q is held reset, SEL stays low and the ring runs freely.
//
// Follows the published design: DIV-clocked reset-able flip-flop, SEL from q and
// OUT1, reset on the falling OUT1 edge when MODE is high. This design's choice:
// the reset path is a register (done) clocked by the falling OUT1 edge; the
// published description names the behaviour but not these gates. sel_b is the complementary
// select used by the transmission-gate MUX.
module select_logic (
  input  logic div,
  input  logic out1,
  input  logic mode,
  input  logic rst_n,
  output logic sel,
  output logic sel_b
);
  logic q;
  logic done;
  logic clr_n;

  assign clr_n = rst_n & mode & ~done;

  // DFFR: set by the rising DIV edge, cleared after the insertion.
  always_ff @(posedge div or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= 1'b1;
  end

  // The falling OUT1 edge that ends the SEL pulse marks the insertion as done.
  always_ff @(negedge out1 or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= q & mode;
  end

  assign sel   = q & out1;
  assign sel_b = ~sel;
endmodule
