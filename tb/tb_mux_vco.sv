`timescale 1fs/1fs
// tb_mux_vco: checks the multiplexed ring oscillator model.
//  - free running (sel = 0): output period = 10 stage delays, with the stage delay
//    following D_NOM + 25 fs/mV * (vctrl - 640 mV) + 250 fs * coarse;
//  - the reference buffer delays REF by two stage delays;
//  - with sel = 1 the ring follows the reference: OUT1 is the inverted reference
//    one stage later, OUT3 three stages later and OUT five stages later.
module tb_mux_vco;
  logic ref_in = 0, sel = 0;
  int vctrl_uv = 640000;
  logic [3:0] coarse = 0;
  logic ref_buf, mux_out, out1, out3, out;
  int checks = 0, failures = 0;

  mux_vco dut (.ref_in, .sel, .vctrl_uv, .coarse, .ref_buf, .mux_out, .out1, .out3, .out);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(64'd5_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input longint exp_period, input string what);
    longint t0, t1;
    repeat (20) @(posedge out);   // settle after a change
    @(posedge out); t0 = $time;
    repeat (100) @(posedge out);
    t1 = $time;
    check((t1 - t0) == 100 * exp_period, $sformatf("%s: 100 periods %0d fs, expected %0d", what, t1 - t0, 100 * exp_period));
  endtask

  function automatic longint stage(input int v, input int c);
    return longint'(71429 + (25 * (v - 640000)) / 1000 + 250 * c);
  endfunction

  initial begin
    longint t;
    #1000;
    measure(10 * stage(640000, 0), "nominal 1.4 GHz");
    vctrl_uv = 800000;
    measure(10 * stage(800000, 0), "higher control voltage, slower");
    vctrl_uv = 500000;
    measure(10 * stage(500000, 0), "lower control voltage, faster");
    coarse = 4'(-3);
    measure(10 * stage(500000, -3), "coarse -3");
    coarse = 4'(5);
    measure(10 * stage(500000, 5), "coarse +5");
    // Reference path with the ring held by the reference.
    vctrl_uv = 640000; coarse = 0;
    @(posedge out);
    #1000 sel = 1;
    #2000000;
    for (int i = 0; i < 10; i++) begin
      ref_in = ~ref_in; t = $time;
      @(ref_buf);
      check($time - t == 2 * stage(640000, 0), $sformatf("REF buffer delay %0d", $time - t));
      check(mux_out == ref_buf, "MUX passes the reference while sel = 1");
      @(out1);
      check($time - t == 3 * stage(640000, 0) && out1 == !ref_buf, "OUT1 one stage after the MUX");
      @(out3);
      check($time - t == 5 * stage(640000, 0) && out3 == !ref_buf, "OUT3 three stages after the MUX");
      @(out);
      check($time - t == 7 * stage(640000, 0) && out == !ref_buf, "OUT five stages after the MUX");
      #1000000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
