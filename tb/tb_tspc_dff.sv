`timescale 1fs/1fs
// tb_tspc_dff: checks the rising-edge capture, hold, complementary output and
// asynchronous reset of the divider flip-flop.
module tb_tspc_dff;
  logic clk = 0, rst_n = 1, d = 0;
  logic q, qb;
  int checks = 0, failures = 0;

  tspc_dff dut (.clk, .rst_n, .d, .q, .qb);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s q=%b qb=%b", what, q, qb); end
  endtask

  initial begin : watchdog
    #(64'd1_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit model;
    #2 rst_n = 0;
    #100 check(q == 0 && qb == 1, "reset");
    rst_n = 1; model = 0;
    for (int i = 0; i < 300; i++) begin
      d = 1'($urandom_range(0, 1)); #100;
      clk = 1; model = d; #100;
      check(q == model && qb == !model, "capture on rising edge");
      d = ~d; #100;
      clk = 0; #100;
      check(q == model, "hold on falling edge and data change");
    end
    d = 1; clk = 1; #100; clk = 0; #100;
    rst_n = 0; #10;
    check(q == 0 && qb == 1, "asynchronous reset");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
