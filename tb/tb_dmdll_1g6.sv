`timescale 1fs/1fs
// tb_dmdll_1g6: the MDLL at the ring's 1.6 GHz design target, from a 50 MHz
// reference (N = 32). Coarse tuning is set to its fastest step (-8) and the
// accumulator starts at 70000, which leaves the ring about 0.8 % fast, inside
// the loop's capture range (the ring must start fast, see the top-level
// description). Checks acquisition, then 500 locked reference cycles with 32
// output edges and one SEL pulse each, the ring edge within +-5 ps of the
// reference edge, and a mean output period of 625 ps.
module tb_dmdll_1g6;
  logic ref_clk = 0, rst_n = 1, mode = 1;
  logic [3:0] coarse = 4'b1000;
  logic clk_out, sel, div, pd_s;
  logic [17:0] acc;
  logic [3:0] dac_code;
  int vctrl_uv;
  int checks = 0, failures = 0;

  dmdll_top #(.ACC_INIT(18'd70000)) dut (
    .ref_clk, .rst_n, .mode, .coarse, .clk_out, .sel, .div, .pd_s, .acc, .dac_code, .vctrl_uv);

  always #10000000 ref_clk = ~ref_clk;   // 50 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s at %0t", what, $time); end
  endtask

  int     n_out_edges = 0, n_sel = 0;
  longint t_own = -1, t_refb = -1, last_err = 0;
  bit     err_valid = 0;
  always @(posedge clk_out) begin n_out_edges++; if (sel) t_own = $time; end
  always @(posedge dut.ref_buf) if (sel) t_refb = $time;
  always @(posedge sel) begin n_sel++; t_own = -1; t_refb = -1; end
  always @(negedge sel) begin
    err_valid = (t_own >= 0) && (t_refb >= 0);
    if (err_valid) last_err = t_own - t_refb;
  end

  initial begin : watchdog
    #(64'd20_000_000 * 40000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int good, took;
    longint t0, t1;
    #2 rst_n = 0;
    #(64'd50_000_000);
    rst_n = 1;
    good = 0; took = 0;
    while (good < 200 && took < 30000) begin
      @(posedge ref_clk); took++;
      if (err_valid && last_err <= 5000 && last_err >= -5000) good++; else good = 0;
    end
    $display("locked at 1.6 GHz after %0d reference cycles, acc=%0d V_CTRL=%0d uV", took, acc, vctrl_uv);
    check(took < 30000, "lock at 1.6 GHz");
    for (int i = 0; i < 500; i++) begin
      @(posedge ref_clk); n_out_edges = 0; n_sel = 0;
      @(posedge ref_clk);
      check(n_out_edges == 32, $sformatf("%0d output edges per reference cycle", n_out_edges));
      check(n_sel == 1, "one SEL pulse per reference cycle");
      check(err_valid && last_err <= 5000 && last_err >= -5000, $sformatf("edge error %0d fs", last_err));
    end
    @(posedge clk_out); t0 = $time;
    repeat (3200) @(posedge clk_out);
    t1 = $time;
    check((t1 - t0) > 64'd2_000_000_000 - 64'd10000 && (t1 - t0) < 64'd2_000_000_000 + 64'd10000,
          $sformatf("3200 output periods take %0d fs, expected 2e9 (625 ps each)", t1 - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
