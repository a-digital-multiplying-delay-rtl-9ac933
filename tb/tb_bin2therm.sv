`timescale 1fs/1fs
// tb_bin2therm: exhaustive check of the 4-bit to 15-bit thermometer decoder:
// code k must enable exactly the k lowest elements.
module tb_bin2therm;
  logic [3:0]  bin;
  logic [14:0] therm;
  int checks = 0, failures = 0;

  bin2therm dut (.bin, .therm);

  initial begin : watchdog
    #(64'd1_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      logic [14:0] exp_t;
      bin = 4'(k); #10;
      exp_t = 15'((32'd1 << k) - 1);
      checks++;
      if (therm !== exp_t) begin failures++; $display("FAIL: bin=%0d therm=%b", k, therm); end
      checks++;
      if ($countones(therm) != k) begin failures++; $display("FAIL: count bin=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
