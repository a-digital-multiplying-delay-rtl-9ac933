`timescale 1fs/1fs
// divider: divide-by-32 ripple counter of five TSPC flip-flops.
//
// Every flip-flop toggles (D = Qbar). Stage 0 is clocked by clk_in and stage k by
// the Qbar of stage k-1, so stage k toggles when stage k-1 falls: a ripple up
// counter. div is the Q of the last stage and rises once every 2^STAGES rising
// clk_in edges. In the MDLL clk_in is the inverted third ring tap, so DIV rises on
// the last falling OUT3 edge before the reference edge is inserted.
//
// Follows the published design: five TSPC flip-flops in series, N = 32. This
// design's choices: which output clocks the next stage (Qbar), the reset.
//
// Timing: ripple; the outputs settle in the same time step as the clock edge in
// this zero-delay description.
module divider
  import dmdll_pkg::*;
#(
  parameter int unsigned STAGES = DIV_STAGES
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic div
);
  logic [STAGES-1:0] q, qb;
  logic [STAGES-1:0] ck;

  assign ck[0] = clk_in;
  for (genvar k = 1; k < STAGES; k++) begin : g_ck
    assign ck[k] = qb[k-1];
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tspc_dff u_ff (.clk(ck[k]), .rst_n(rst_n), .d(qb[k]), .q(q[k]), .qb(qb[k]));
  end

  assign div = q[STAGES-1];
endmodule
