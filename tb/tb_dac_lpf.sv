`timescale 1fs/1fs
// tb_dac_lpf: checks the DAC and RC filter model against a floating-point model
// of two cascaded first-order sections with alpha = 1 - exp(-T/RC)
// (T = 1/43.75 MHz, RC = 100 kOhm * 3.2 pF), for steps of the thermometer input;
// also the reset level, the final value of n elements * 80 mV and that the
// second section lags the first.
module tb_dac_lpf;
  logic clk = 0, rst_n = 1;
  logic [14:0] therm;
  int vctrl_uv;
  int checks = 0, failures = 0;

  dac_lpf dut (.clk, .rst_n, .therm, .vctrl_uv);

  always #11428571 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real alpha, y1, y2, u;
    int steps [4] = '{15, 0, 3, 11};
    alpha = 1.0 - $exp(-22857.143 / 320000.0);
    therm = '0;
    #2 rst_n = 0;
    #1;
    check(vctrl_uv == 640000, $sformatf("reset level %0d", vctrl_uv));
    y1 = 640000.0; y2 = 640000.0;
    @(negedge clk); rst_n = 1;
    foreach (steps[j]) begin
      therm = 15'((32'd1 << steps[j]) - 1);
      u = 80000.0 * steps[j];
      for (int i = 0; i < 800; i++) begin
        real y1n;
        @(posedge clk); #1;
        y1n = y1 + alpha * (u - y1);
        y2 = y2 + alpha * (y1 - y2);
        y1 = y1n;
        check((vctrl_uv - y2) < 300.0 && (y2 - vctrl_uv) < 300.0,
              $sformatf("step %0d cycle %0d: %0d vs model %0.0f", steps[j], i, vctrl_uv, y2));
        @(negedge clk);
      end
      check((vctrl_uv - 80000 * steps[j]) < 1000 && (80000 * steps[j] - vctrl_uv) < 1000,
            $sformatf("final value %0d for %0d elements", vctrl_uv, steps[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
