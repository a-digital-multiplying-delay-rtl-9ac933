`timescale 1fs/1fs
// tb_ref_mux: exhaustive check of the ring-input multiplexer (0 = ring output,
// 1 = reference).
module tb_ref_mux;
  logic in0, in1, sel, y;
  int checks = 0, failures = 0;

  ref_mux dut (.in0, .in1, .sel, .y);

  initial begin : watchdog
    #(64'd1_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {sel, in1, in0} = 3'(k); #10;
      checks++;
      if (y != (sel ? in1 : in0)) begin failures++; $display("FAIL: sel=%b in1=%b in0=%b y=%b", sel, in1, in0, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
