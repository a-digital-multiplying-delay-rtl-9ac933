`timescale 1fs/1fs
// tb_dmdll_top: end-to-end test of the digital MDLL at its default parameters,
// with a 43.75 MHz reference (expected output 32 x 43.75 MHz = 1.4 GHz).
//
// Phases:
//   1. acquisition: coarse tuning -3 makes the ring about 1 % fast; the
//      accumulator must climb until the 32nd ring edge meets the reference edge;
//   2. lock: for 1000 reference cycles the ring's own edge must arrive within
//      +-5 ps of the reference edge, with exactly 32 output edges and one SEL
//      pulse per reference cycle; the bang-bang detector must give both S and R
//      (limit cycle), the accumulator must stay within a small band that
//      shrinks to at most 3 codes once the 4 LSBs are dropped, the delta-sigma
//      output must dither between codes, and at every SEL edge both MUX inputs
//      must be equal (the switch moves no edge);
//   3. mode switch: MODE low for 300 cycles, no SEL pulse, the ring runs freely;
//   4. MODE high again: relock;
//   5. coarse step to -4: the loop re-acquires and locks again.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_dmdll_top;
  import dmdll_pkg::*;

  logic ref_clk = 0, rst_n = 1, mode = 1;
  logic [3:0] coarse = 4'(-3);
  logic clk_out, sel, div, pd_s;
  logic [17:0] acc;
  logic [3:0] dac_code;
  int vctrl_uv;
  int checks = 0, failures = 0;

  dmdll_top dut (.ref_clk, .rst_n, .mode, .coarse, .clk_out, .sel, .div, .pd_s,
                 .acc, .dac_code, .vctrl_uv);

  // 43.75 MHz reference: period 22857143 fs.
  always begin
    #11428571 ref_clk = 1;
    #11428572 ref_clk = 0;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s at %0t", what, $time); end
  endtask

  // ---- Per-reference-cycle observation ----------------------------------
  int     n_out_edges = 0, n_sel = 0;
  longint t_own = -1, t_refb = -1;
  longint last_err = 0;
  bit     err_valid = 0;

  always @(posedge clk_out) begin
    n_out_edges++;
    if (sel) t_own = $time;
  end
  always @(posedge dut.ref_buf) if (sel) t_refb = $time;
  always @(posedge sel) begin n_sel++; t_own = -1; t_refb = -1; end
  always @(negedge sel) begin
    err_valid = (t_own >= 0) && (t_refb >= 0);
    if (err_valid) last_err = t_own - t_refb;
  end

  // Hitless switching: at every SEL edge the two MUX inputs must agree, so the
  // switch moves no edge. Counted while the loop is locked.
  bit in_lock = 0;
  int c_hitless = 0, c_hit = 0;
  always @(sel) if (in_lock) begin
    #1;
    if (dut.clk_out == dut.ref_buf) c_hitless++; else c_hit++;
  end

  // Mechanism counters.
  int c_insert = 0, c_s = 0, c_r = 0, c_stall = 0, c_lock_cycles = 0;
  int c_limit = 0, c_dither = 0, c_free_cycles = 0, c_relock = 0, c_acq = 0;

  task automatic run_cycles(input int n, output int edges, output int sels,
                            output int s_cnt, output int r_cnt);
    edges = 0; sels = 0; s_cnt = 0; r_cnt = 0;
    repeat (n) begin
      @(posedge ref_clk);
      n_out_edges = 0; n_sel = 0;
      @(posedge ref_clk);
      edges += n_out_edges; sels += n_sel;
      if (pd_s) s_cnt++; else r_cnt++;
    end
  endtask

  // Wait until the edge error stays within tol_fs for 200 cycles.
  task automatic wait_lock(input int max_cycles, input longint tol_fs, output int took);
    int good = 0;
    took = 0;
    while (good < 200 && took < max_cycles) begin
      @(posedge ref_clk); took++;
      if (err_valid && last_err <= tol_fs && last_err >= -tol_fs) good++;
      else good = 0;
    end
  endtask

  // Check a locked stretch of n cycles.
  task automatic check_locked(input int n, input string tag);
    int edges_per, worst, s_cnt, r_cnt;
    logic [17:0] amin, amax;
    logic [13:0] kmin, kmax;
    logic [3:0]  cmin, cmax;
    amin = acc; amax = acc; cmin = dac_code; cmax = dac_code;
    kmin = acc[17:4]; kmax = acc[17:4];
    in_lock = 1;
    worst = 0; s_cnt = 0; r_cnt = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge ref_clk);
      n_out_edges = 0; n_sel = 0;
      @(posedge ref_clk);
      // The window between two reference edges holds one full output period set.
      check(n_out_edges == DIV_N, $sformatf("%s: %0d output edges per reference cycle", tag, n_out_edges));
      check(n_sel == 1, $sformatf("%s: %0d SEL pulses per reference cycle", tag, n_sel));
      check(err_valid && last_err <= 5000 && last_err >= -5000,
            $sformatf("%s: ring edge %0d fs from the reference edge", tag, last_err));
      if (last_err < 0) c_stall++;   // ring edge early: ring held for the reference
      if (pd_s) s_cnt++; else r_cnt++;
      if (acc < amin) amin = acc;
      if (acc > amax) amax = acc;
      if (acc[17:4] < kmin) kmin = acc[17:4];
      if (acc[17:4] > kmax) kmax = acc[17:4];
      if (dac_code < cmin) cmin = dac_code;
      if (dac_code > cmax) cmax = dac_code;
      c_insert++; c_lock_cycles++;
    end
    c_s += s_cnt; c_r += r_cnt;
    check(s_cnt > 0 && r_cnt > 0, $sformatf("%s: limit cycle, S=%0d R=%0d", tag, s_cnt, r_cnt));
    check(amax - amin < 18'd200, $sformatf("%s: accumulator band %0d..%0d", tag, amin, amax));
    // Dropping 4 LSBs shrinks the limit cycle seen by the modulator by 16.
    check(amax - amin >= 18'd4, $sformatf("%s: accumulator limit cycle %0d counts", tag, amax - amin));
    check(kmax - kmin <= 14'd3, $sformatf("%s: modulator input band %0d..%0d", tag, kmin, kmax));
    if (amax - amin >= 18'd4) c_limit++;
    in_lock = 0;
    check(cmax > cmin, $sformatf("%s: DSM output dithers %0d..%0d", tag, cmin, cmax));
    if (cmax > cmin) c_dither++;
    $display("%s: acc %0d..%0d, DAC code %0d..%0d, S=%0d R=%0d, V_CTRL=%0d uV",
             tag, amin, amax, cmin, cmax, s_cnt, r_cnt, vctrl_uv);
    $display("%s: modulator input (acc >> 4) %0d..%0d", tag, kmin, kmax);
  endtask

  initial begin : watchdog
    #(64'd22857143 * 80000);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int took, edges, sels, s_cnt, r_cnt;
    logic [17:0] acc0;
    longint t0, t1;
    #2 rst_n = 0;
    #(64'd50_000_000);
    check(acc == 18'd131072, "accumulator reset to mid-scale");
    rst_n = 1;
    acc0 = acc;

    // 1. Acquisition from a 1 % fast ring.
    wait_lock(20000, 5000, took);
    $display("acquired after %0d reference cycles, acc %0d -> %0d", took, acc0, acc);
    check(took < 20000, "lock acquired");
    check(acc > acc0 + 18'd2000, "accumulator slowed the ring down");
    if (took < 20000 && acc > acc0) c_acq++;

    // 2. Lock.
    check_locked(1000, "lock");
    // Output frequency: 32000 output edges in 1000 reference periods.
    @(posedge clk_out); t0 = $time;
    repeat (32000) @(posedge clk_out);
    t1 = $time;
    check((t1 - t0) > 64'd22857143 * 1000 - 64'd10000 && (t1 - t0) < 64'd22857143 * 1000 + 64'd10000,
          $sformatf("32000 output periods take %0d fs (1000 reference periods)", t1 - t0));

    // 3. MODE low: free-running ring, no reference insertion.
    mode = 0;
    run_cycles(300, edges, sels, s_cnt, r_cnt);
    check(sels == 0, $sformatf("%0d SEL pulses with MODE low", sels));
    check(edges > 300 * 28 && edges < 300 * 36, $sformatf("free-running ring gave %0d edges in 300 cycles", edges));
    if (sels == 0) c_free_cycles += 300;

    // 4. MODE high: relock.
    mode = 1;
    wait_lock(20000, 5000, took);
    $display("relocked after MODE high in %0d cycles", took);
    check(took < 20000, "relock after MODE switch");
    if (took < 20000) c_relock++;
    check_locked(300, "relock");

    // 5. Coarse step: ring 0.35 % faster, the loop must re-acquire.
    acc0 = acc;
    coarse = 4'(-4);
    wait_lock(20000, 5000, took);
    $display("re-acquired after coarse step in %0d cycles, acc %0d -> %0d", took, acc0, acc);
    check(took < 20000 && acc > acc0 + 18'd1000, "re-acquisition after coarse step");
    if (took < 20000 && acc > acc0) c_acq++;
    check_locked(500, "coarse -4");

    // Every mechanism must have happened.
    $display("mechanisms: insertions=%0d S=%0d R=%0d early-ring-edge(stall)=%0d dither=%0d free-run-cycles=%0d relock=%0d acquisitions=%0d",
             c_insert, c_s, c_r, c_stall, c_dither, c_free_cycles, c_relock, c_acq);
    $display("hitless SEL switches %0d, switches with unequal MUX inputs %0d, limit-cycle stretches %0d", c_hitless, c_hit, c_limit);
    check(c_hitless > 0 && c_hit == 0, "every locked SEL switch was hitless");
    check(c_limit > 0, "accumulator limit cycle happened");
    check(c_insert > 0, "REF edge insertion happened");
    check(c_s > 0 && c_r > 0, "bang-bang detector gave S and R");
    check(c_stall > 0, "ring held by the MUX for a late reference edge");
    check(c_dither > 0, "delta-sigma dithering happened");
    check(c_free_cycles > 0, "MODE low free-run happened");
    check(c_relock > 0, "MODE switch relock happened");
    check(c_acq == 2, "acquisition happened twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
