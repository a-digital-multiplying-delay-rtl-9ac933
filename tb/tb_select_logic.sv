`timescale 1fs/1fs
// tb_select_logic: drives the select logic with the waveforms of the ring
// (OUT1 as a clock, DIV rising while OUT1 is low, as after a falling OUT3 edge)
// and checks:
//  - SEL rises with the first rising OUT1 edge after DIV rises, and only then;
//  - SEL falls with the next falling OUT1 edge (the one after the REF edge);
//  - exactly one SEL pulse per DIV period, sel_b its complement;
//  - MODE low keeps SEL low; MODE high again restores the pulses.
module tb_select_logic;
  logic div = 0, out1 = 0, mode = 1, rst_n = 1;
  logic sel, sel_b;
  int checks = 0, failures = 0;

  select_logic dut (.div, .out1, .mode, .rst_n, .sel, .sel_b);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #(64'd5_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One ring period: OUT1 low then high, 357 ps each. DIV rises 100 ps into the
  // low half of cycle 31 of every 32 (as the divider does after OUT3 falls) and
  // falls in cycle 15.
  task automatic ring_period(input int cyc, input bit expect_pulse);
    out1 = 0;
    #100000;
    if (cyc == 31) div = 1;
    if (cyc == 15) div = 0;
    #1;
    check(sel == 0, "SEL low while OUT1 low");
    check(sel_b == !sel, "sel_b complement");
    #257142;
    out1 = 1;
    #1;
    check(sel == expect_pulse, $sformatf("SEL=%b on rising OUT1 of cycle %0d", sel, cyc));
    check(sel_b == !sel, "sel_b complement");
    #357142;
  endtask

  initial begin
    int pulses;
    #2 rst_n = 0;
    #100;
    check(sel == 0, "reset");
    rst_n = 1;
    // MDLL mode: DIV rises in the low half of cycle 31, so the rising OUT1 edge
    // of cycle 31 raises SEL and the falling OUT1 edge that starts the next
    // period (the cycle started by the reference edge) drops it.
    for (int p = 0; p < 10; p++) begin
      for (int c = 0; c < 32; c++) ring_period(c, c == 31);
    end
    // Count pulses over a longer run.
    pulses = 0;
    fork
      begin : counter
        forever begin @(posedge sel); pulses++; end
      end
    join_none
    for (int p = 0; p < 8; p++)
      for (int c = 0; c < 32; c++) ring_period(c, c == 31);
    check(pulses == 8, $sformatf("%0d SEL pulses in 8 DIV periods", pulses));
    // MODE low: no pulses.
    mode = 0;
    pulses = 0;
    for (int p = 0; p < 4; p++)
      for (int c = 0; c < 32; c++) ring_period(c, 1'b0);
    check(pulses == 0, "no SEL with MODE low");
    mode = 1;
    for (int p = 0; p < 4; p++)
      for (int c = 0; c < 32; c++) ring_period(c, c == 31);
    disable counter;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
