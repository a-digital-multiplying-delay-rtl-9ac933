`timescale 1fs/1fs
// tb_loop_acc: checks the loop accumulator against a counter model: +1 on S,
// -1 on R, one update per clock, reset to mid-scale, saturation at both ends and
// the 14-bit output taken from the top bits (4 LSBs dropped).
module tb_loop_acc;
  localparam int W = 18;
  logic clk = 0, rst_n = 1;
  logic s, r;
  logic [W-1:0] acc, acc_hi, acc_lo;
  logic [W-5:0] code, code_hi, code_lo;
  int checks = 0, failures = 0;

  loop_acc dut (.clk, .rst_n, .s, .r, .acc, .code);
  loop_acc #(.ACC_INIT(18'h3FFFD)) dut_hi (.clk, .rst_n, .s, .r, .acc(acc_hi), .code(code_hi));
  loop_acc #(.ACC_INIT(18'd2))     dut_lo (.clk, .rst_n, .s, .r, .acc(acc_lo), .code(code_lo));

  always #5000 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s acc=%0d hi=%0d lo=%0d", what, acc, acc_hi, acc_lo); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m, mh, ml;
    s = 0; r = 1;
    #2 rst_n = 0;
    #1;
    check(acc == 18'd131072, "reset to mid-scale");
    check(code == 14'd8192, "code = acc >> 4 at reset");
    m = 131072; mh = 18'h3FFFD; ml = 2;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      // Bias the direction in runs so the saturation ends are reached.
      bit up = (i % 400) < 200 ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      s = up; r = !up;
      if (i % 97 == 0) begin s = 0; r = 0; end   // idle code: no change
      @(posedge clk); #1;
      if (s && !r) begin m++; mh = (mh < 262143) ? mh + 1 : mh; ml++; end
      else if (r && !s) begin m--; mh--; ml = (ml > 0) ? ml - 1 : 0; end
      check(longint'(acc) == m, "mid-scale accumulator tracks +1/-1");
      check(longint'(acc_hi) == mh, "saturates at the top");
      check(longint'(acc_lo) == ml, "saturates at zero");
      check(code == acc[W-1:4], "code drops 4 LSBs");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
