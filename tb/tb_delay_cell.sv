`timescale 1fs/1fs
// tb_delay_cell: checks that the behavioural delay stage inverts its input with
// exactly the programmed transport delay, also for pulses shorter than the delay,
// and follows a change of the delay.
module tb_delay_cell;
  logic a = 0, y;
  int unsigned d_fs = 71429;
  int checks = 0, failures = 0;
  longint t_in [$];
  longint t_out [$];

  delay_cell dut (.a, .d_fs, .y);

  always @(a) t_in.push_back($time);
  always @(y) if ($time > 0) t_out.push_back($time);

  initial begin : watchdog
    #(64'd1_000_000_000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    checks++;
    if (y !== 1'b1) begin failures++; $display("FAIL: initial inversion y=%b", y); end
    t_in.delete(); t_out.delete();
    for (int i = 0; i < 40; i++) begin
      a = ~a;
      #(i % 3 == 0 ? 30000 : 150000);   // every third pulse shorter than the delay
    end
    #200000;
    checks++;
    if (t_in.size() != t_out.size()) begin failures++; $display("FAIL: %0d edges in, %0d out", t_in.size(), t_out.size()); end
    for (int i = 0; i < t_in.size() && i < t_out.size(); i++) begin
      checks++;
      if (t_out[i] - t_in[i] != 71429) begin failures++; $display("FAIL: edge %0d delay %0d", i, t_out[i] - t_in[i]); end
    end
    d_fs = 90000; #10;
    a = ~a; #1;
    #89998; checks++;
    if (y != a) begin failures++; $display("FAIL: changed too early"); end
    #2; checks++;
    if (y != !a) begin failures++; $display("FAIL: new delay not applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
