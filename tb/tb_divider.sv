`timescale 1fs/1fs
// tb_divider: checks that the five-stage ripple divider gives one rising DIV
// edge per 32 rising input edges with a 50 % duty cycle. From reset (count 0)
// the first rising DIV edge comes on the 16th input edge, when the MSB of the
// ripple count first sets.
module tb_divider;
  logic clk_in = 0, rst_n = 1;
  logic div;
  int checks = 0, failures = 0;
  int n_in = 0, last_rise = -1, last_fall = -1, n_rise = 0;

  divider dut (.clk_in, .rst_n, .div);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(64'd2_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 0;
    #1;
    check(div == 0, "reset");
    rst_n = 1;
    repeat (32 * 40) begin
      #357143 clk_in = 1;
      n_in++;
      #1;
      if (div && last_rise < last_fall + 0 || div && last_rise == -1) begin
        // rising edge of div seen after this input edge
        if (last_rise == -1) check(n_in == 16, $sformatf("first DIV rise at input edge %0d", n_in));
        else                 check(n_in - last_rise == 32, $sformatf("DIV period %0d", n_in - last_rise));
        last_rise = n_in; n_rise++;
      end else if (!div && last_rise > last_fall) begin
        check(n_in - last_rise == 16, $sformatf("DIV high for %0d", n_in - last_rise));
        last_fall = n_in;
      end
      #357142 clk_in = 0;
    end
    check(n_rise == 40, $sformatf("%0d DIV periods", n_rise));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
