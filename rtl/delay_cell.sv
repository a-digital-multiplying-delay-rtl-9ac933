`timescale 1fs/1fs
// delay_cell: behavioural model of one ring-oscillator delay stage.
//
// Behavioural model, not synthesizable logic: the real stage is a differential
// Kim-Lee cell (cross-coupled pMOS loads, rail-to-rail swing) whose delay is set
// by the control voltage. Here it is a single-ended inverter with a transport
// delay of d_fs femtoseconds, so that every input edge, including a short pulse,
// reappears inverted d_fs later. The delay is sampled when the edge enters.
// The output starts at INIT, so that an enclosing ring can start with a single
// travelling edge; a disagreeing input is propagated from 1 fs onward.
module delay_cell #(
  parameter logic INIT = 1'b0
) (
  input  logic        a,
  input  int unsigned d_fs,
  output logic        y
);
  task automatic launch(input logic v, input int unsigned d);
    fork
      begin
        #(d) y = v;
      end
    join_none
  endtask

  // Start from INIT; 1 fs later, launch an edge if INIT disagrees with the input.
  initial begin
    y = INIT;
    #1;
    if (y != ~a) launch(~a, (d_fs > 1) ? d_fs - 1 : 1);
  end
  always @(a) launch(~a, d_fs);
endmodule
