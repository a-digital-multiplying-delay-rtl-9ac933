`timescale 1fs/1fs
// tb_saff_pd: checks that the phase detector samples OUT on the rising reference
// edge, reports S (REF lags) or R (REF leads), keeps S and R complementary and
// holds them between reference edges whatever OUT does.
module tb_saff_pd;
  logic ref_clk = 0, rst_n = 1, vco_out = 0;
  logic s, r;
  int checks = 0, failures = 0;

  saff_pd dut (.ref_clk, .rst_n, .vco_out, .s, .r);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (s=%b r=%b)", what, s, r); end
  endtask

  initial begin : watchdog
    #(64'd1_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_s;
    #2 rst_n = 0;
    #1000;
    check(s == 1'b0 && r == 1'b1, "reset state R");
    rst_n = 1;
    #1000;
    for (int i = 0; i < 200; i++) begin
      // OUT edge before (lag) or after (lead) the reference edge.
      bit lag = 1'($urandom_range(0, 1));
      vco_out = 0;
      #1000;
      if (lag) begin
        vco_out = 1; #($urandom_range(1, 50) * 100);
        ref_clk = 1;
        exp_s = 1;
      end else begin
        ref_clk = 1;
        #($urandom_range(1, 50) * 100);
        vco_out = 1;
        exp_s = 0;
      end
      #100;
      check(s == exp_s && r == !exp_s, lag ? "REF lags OUT gives S" : "REF leads OUT gives R");
      // OUT toggles while the clock is high and low: outputs must hold.
      vco_out = ~vco_out; #500;
      ref_clk = 0; #500;
      vco_out = ~vco_out; #500;
      check(s == exp_s && r == !exp_s, "S/R held between reference edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
