`timescale 1fs/1fs
// tb_dsm2: checks the second-order error-feedback modulator.
//  - cycle by cycle against an integer model of v = x + 2e[n-1] - e[n-2],
//    y = floor(v/1024) clamped to 0..15, e = v mod 1024, with one cycle latency;
//  - second-order shaping: the running sum of (x - 1024*y) equals e[n] - e[n-1]
//    and so stays within +-1023;
//  - the mean of y over a long run equals x/1024.
module tb_dsm2;
  logic clk = 0, rst_n = 1;
  logic [13:0] din;
  logic [3:0]  dout;
  logic [9:0]  e1;
  int checks = 0, failures = 0;

  dsm2 dut (.clk, .rst_n, .din, .dout, .e1);

  always #5000 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [6] = '{8192, 7023, 100, 16000, 1, 12345};
    din = 0;
    #2 rst_n = 0;
    #1;
    check(dout == 0 && e1 == 0, "reset state");
    @(negedge clk); rst_n = 1;
    foreach (xs[j]) begin
      int me1, me2, v, y, e;
      longint sum_err, sum_y;
      int n;
      bit clamped;
      // Restart the model from the design's state.
      me1 = int'(e1); me2 = int'(dut.e2);
      sum_err = 0; sum_y = 0; n = 0; clamped = 0;
      din = 14'(xs[j]);
      for (int i = 0; i < 4096; i++) begin
        v = xs[j] + 2 * me1 - me2;
        y = (v < 0) ? -1 : v / 1024;
        if (y < 0) begin y = 0; clamped = 1; end
        if (y > 15) begin y = 15; clamped = 1; end
        e = v & 1023;
        @(posedge clk); #1;
        check(int'(dout) == y, $sformatf("x=%0d step %0d: dout=%0d model %0d", xs[j], i, dout, y));
        check(int'(e1) == e, "fed-back error");
        me2 = me1; me1 = e;
        if (i >= 2) begin
          sum_err += longint'(xs[j]) - 1024 * longint'(dout);
          sum_y += longint'(dout); n++;
          if (!clamped) check(sum_err > -2048 && sum_err < 2048, $sformatf("x=%0d running error %0d", xs[j], sum_err));
        end
        @(negedge clk);
      end
      if (!clamped) begin
        // mean(y) * 1024 within 2048/n of x
        check((sum_y * 1024 - longint'(n) * xs[j]) < 2048 && (longint'(n) * xs[j] - sum_y * 1024) < 2048,
              $sformatf("x=%0d mean %0d/%0d", xs[j], sum_y, n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
