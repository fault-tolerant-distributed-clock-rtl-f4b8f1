// tb_clk_monitor -- testbench helper that watches the N clocks of a DARTS
// system while `running` is set: counts ticks per unit, the largest
// difference in tick counts between any two units (max_skew) and the
// longest gap between two ticks of one unit (max_gap, ns).
`timescale 1ns/1ps
module tb_clk_monitor #(
  parameter int N = 5
) (
  input logic         running,
  input logic [N-1:0] clk
);
  int unsigned cnt [N];
  realtime     last [N];
  int unsigned max_skew;
  realtime     max_gap;

  task automatic clear();
    for (int p = 0; p < N; p++) begin cnt[p] = 0; last[p] = 0.0; end
    max_skew = 0;
    max_gap  = 0.0;
  endtask

  initial clear();

  for (genvar p = 0; p < N; p++) begin : g_mon
    always @(clk[p]) if (running) begin
      int unsigned mx, mn;
      cnt[p]++;
      if (cnt[p] > 1 && $realtime - last[p] > max_gap) max_gap = $realtime - last[p];
      last[p] = $realtime;
      mx = cnt[0]; mn = cnt[0];
      for (int q = 1; q < N; q++) begin
        if (cnt[q] > mx) mx = cnt[q];
        if (cnt[q] < mn) mn = cnt[q];
      end
      if (mx - mn > max_skew) max_skew = mx - mn;
    end
  end
endmodule
