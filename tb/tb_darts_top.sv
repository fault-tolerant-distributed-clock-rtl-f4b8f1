// tb_darts_top -- end-to-end test of a five-unit DARTS system at its default
// parameters.
//
// Holds the common reset for 100 ns (longer than any wire delay), lets the
// units run for RUN_NS and checks, from the clock outputs alone:
//   * tick 1 (a rising edge) appears at every unit right after reset;
//   * every clock keeps running (ticks per unit within the range that the
//     wire delays allow, no gap between two ticks longer than MAX_GAP_NS);
//   * precision: at every tick, the tick counts of any two units differ by
//     at most PI;
//   * the same tick leaves all units within one clock period (measured in
//     ns and printed, like a skew measurement on a logic analyser).
// It also counts how often each mechanism acted and fails if one never did:
// ticks released by the 2F+1 GEQ rule, ticks released by the F+1 GR
// (catch-up) rule, Diff-Gate removals, and a pipeline holding two or more
// ticks at once, and that no pipeline ever fills all S stages.
`timescale 1ns/1ps
module tb_darts_top;
  localparam int N      = 5;
  localparam int S      = 4;
  localparam int RUN_NS = 20000;
  localparam int PI     = 2;
  localparam int MAX_GAP_NS = 60;

  logic         rst;
  logic [N-1:0] clk;
  int checks = 0, failures = 0;

  darts_top dut (.rst(rst), .clk(clk));

  int unsigned cnt [N];
  realtime     last [N];
  realtime     max_gap = 0.0;
  int unsigned max_stored = 0;
  int unsigned geq_ticks = 0, gr_ticks = 0, removals = 0, deep = 0, prec_bad = 0, max_skew = 0;
  bit          running = 0;
  realtime     t_first [int], t_last [int];   // earliest / latest send of tick k
  realtime     max_skew_ns = 0.0;

  // transitions held in a pipeline whose stage outputs are v[S-1:0] and whose
  // consumer acknowledge is v[S]: one per stage that differs from the next
  function automatic int unsigned stored(input logic [S:0] v);
    int unsigned n;
    n = 0;
    for (int i = 0; i < S; i++) n += (v[i] != v[i+1]);
    return n;
  endfunction

  for (genvar p = 0; p < N; p++) begin : g_mon
    always @(clk[p]) begin
      if (running) begin
        int unsigned mx, mn;
        cnt[p]++;
        if (cnt[p] > 1 && $realtime - last[p] > max_gap) max_gap = $realtime - last[p];
        last[p] = $realtime;
        if (!t_first.exists(cnt[p])) t_first[cnt[p]] = $realtime;
        t_last[cnt[p]] = $realtime;
        if (t_last[cnt[p]] - t_first[cnt[p]] > max_skew_ns) max_skew_ns = t_last[cnt[p]] - t_first[cnt[p]];
        mx = cnt[0]; mn = cnt[0];
        for (int q = 1; q < N; q++) begin
          if (cnt[q] > mx) mx = cnt[q];
          if (cnt[q] < mn) mn = cnt[q];
        end
        if (mx - mn > max_skew) max_skew = mx - mn;
        if (mx - mn > PI) prec_bad++;
        // which rule released this tick
        if (clk[p]) begin
          if (dut.g_unit[p].u_ts.th_geq_e) geq_ticks++;
          if (dut.g_unit[p].u_ts.th_gr_e)  gr_ticks++;
        end else begin
          if (!dut.g_unit[p].u_ts.th_geq_o_n) geq_ticks++;
          if (!dut.g_unit[p].u_ts.th_gr_o_n)  gr_ticks++;
        end
      end
    end
    for (genvar j = 0; j < N - 1; j++) begin : g_pair
      always @(dut.g_unit[p].u_ts.g_pair[j].u_pm.loc_ack) if (running) removals++;
      // ticks waiting in the remote and the local pipe beyond the head
      always @(dut.g_unit[p].u_ts.g_pair[j].u_pm.u_rem_pipe.c or
               dut.g_unit[p].u_ts.g_pair[j].u_pm.rem_ack or
               dut.g_unit[p].u_ts.g_pair[j].u_pm.u_loc_pipe.c or
               dut.g_unit[p].u_ts.g_pair[j].u_pm.loc_ack) begin
        logic [S:0] vr, vl;
        vr = {dut.g_unit[p].u_ts.g_pair[j].u_pm.rem_ack, dut.g_unit[p].u_ts.g_pair[j].u_pm.u_rem_pipe.c};
        vl = {dut.g_unit[p].u_ts.g_pair[j].u_pm.loc_ack, dut.g_unit[p].u_ts.g_pair[j].u_pm.u_loc_pipe.c};
        if (running && (stored(vr) >= 2 || stored(vl) >= 2)) deep++;
        if (running && stored(vr) > max_stored) max_stored = stored(vr);
        if (running && stored(vl) > max_stored) max_stored = stored(vl);
      end
    end
  end

  initial begin
    #(RUN_NS * 3);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lo, hi;
    for (int p = 0; p < N; p++) begin cnt[p] = 0; last[p] = 0.0; end
    rst = 1'b1;
    #100;
    running = 1;
    rst = 1'b0;
    // tick 1 needs nothing but the reset state: all units rise at once
    #1;
    checks++;
    if (clk !== '1) begin failures++; $display("tick 1 missing after reset: %b", clk); end
    #(RUN_NS - 1);
    running = 0;
    // every unit made progress within the bounds set by the wire delays:
    // one tick needs at least the local wire (2 ns) and at most
    // two of the slowest wires plus the local wire (longest wire
    // 8 + 6*2 + 20 = 40 ns, so 2*40+2 ns).
    lo = RUN_NS / (2 * 40 + 2);
    hi = RUN_NS / 2;
    for (int p = 0; p < N; p++) begin
      checks++;
      if (cnt[p] < lo || cnt[p] > hi) begin
        failures++;
        $display("unit %0d: %0d ticks, expected %0d..%0d", p, cnt[p], lo, hi);
      end
    end
    checks++;
    if (prec_bad != 0) begin failures++; $display("precision exceeded %0d times", prec_bad); end
    checks++;
    if (max_gap > MAX_GAP_NS) begin failures++; $display("clock gap %0t too long", max_gap); end
    checks++; if (geq_ticks == 0) begin failures++; $display("no GEQ-released tick"); end
    checks++; if (gr_ticks == 0)  begin failures++; $display("no GR-released tick"); end
    checks++; if (removals == 0)  begin failures++; $display("no Diff-Gate removal"); end
    // the same tick leaves all units within one clock period (two ticks)
    checks++;
    if (max_skew_ns > 2.0 * RUN_NS / cnt[0]) begin failures++; $display("units send the same tick %0.1f ns apart", max_skew_ns); end
    // the pipelines must never be asked to hold more than S transitions
    checks++; if (max_stored >= S) begin failures++; $display("a pipeline filled up: %0d", max_stored); end
    checks++; if (deep == 0)      begin failures++; $display("no pipeline ever held two ticks"); end
    $display("ticks: %0d %0d %0d %0d %0d  max skew %0d ticks  max gap %0t ns", cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], max_skew, max_gap);
    $display("same tick at different units: at most %0.1f ns apart; mean tick spacing %0.2f ns", max_skew_ns, 1.0 * RUN_NS / cnt[0]);
    $display("mechanisms: geq=%0d gr=%0d removals=%0d deep=%0d max stored %0d", geq_ticks, gr_ticks, removals, deep, max_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
