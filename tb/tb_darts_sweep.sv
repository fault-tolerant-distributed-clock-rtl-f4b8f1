// tb_darts_sweep -- the five-unit system under different wire-delay
// patterns, all instances of darts_top running side by side:
//   uniform  every wire 10 ns
//   tight    2..8 ns
//   wide     4..34 ns
//   far      8..20 ns, plus 30 ns on the wires from units 2 and 3 to unit 4
// For each: every unit keeps ticking (at least one tick per two longest
// wires plus the local wire), tick counts stay within PI = 2, and no gap
// between ticks exceeds twice the longest wire plus the local wire.
`timescale 1ns/1ps
module tb_darts_sweep;
  localparam int N      = 5;
  localparam int NCFG   = 4;
  localparam int RUN_NS = 10000;
  localparam int PI     = 2;
  // {D_REM_MIN_PS, D_REM_STEP_PS, D_FAR_PS}; longest wire = min + 6*step + far
  function automatic int cfg(int c, int i);
    case (c)
      0:       return (i == 0) ? 10000 : 0;
      1:       return (i == 0) ? 2000 : (i == 1) ? 1000 : 0;
      2:       return (i == 0) ? 4000 : (i == 1) ? 5000 : 0;
      default: return (i == 0) ? 8000 : (i == 1) ? 2000 : 30000;
    endcase
  endfunction
  localparam string NAME [NCFG] = '{"uniform", "tight", "wide", "far"};

  logic rst;
  bit   running = 0;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [N-1:0] clk;
    darts_top #(.D_REM_MIN_PS(cfg(c, 0)), .D_REM_STEP_PS(cfg(c, 1)), .D_FAR_PS(cfg(c, 2))) dut (.rst(rst), .clk(clk));
    tb_clk_monitor #(.N(N)) mon (.running(running), .clk(clk));
  end

  initial begin
    #(RUN_NS * 4);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(int c, int unsigned cnt [N], int unsigned skew, realtime gap);
    real longest, lo;
    longest = (cfg(c, 0) + 6 * cfg(c, 1) + cfg(c, 2)) / 1000.0;
    lo = RUN_NS / (2.0 * longest + 2.0);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (cnt[p] < lo) begin failures++; $display("%s: unit %0d made %0d ticks", NAME[c], p, cnt[p]); end
    end
    checks++;
    if (skew > PI) begin failures++; $display("%s: tick counts %0d apart", NAME[c], skew); end
    checks++;
    if (gap > 2.0 * longest + 2.0) begin failures++; $display("%s: gap of %0.1f ns", NAME[c], gap); end
    $display("%s: %0d ticks at unit 0 (%0.2f ns per tick), skew %0d ticks, longest gap %0.1f ns",
             NAME[c], cnt[0], 1.0 * RUN_NS / cnt[0], skew, gap);
  endtask

  initial begin
    rst = 1'b1;
    #100;
    rst = 1'b0; running = 1;
    #(RUN_NS);
    running = 0;
    judge(0, g_cfg[0].mon.cnt, g_cfg[0].mon.max_skew, g_cfg[0].mon.max_gap);
    judge(1, g_cfg[1].mon.cnt, g_cfg[1].mon.max_skew, g_cfg[1].mon.max_gap);
    judge(2, g_cfg[2].mon.cnt, g_cfg[2].mon.max_skew, g_cfg[2].mon.max_gap);
    judge(3, g_cfg[3].mon.cnt, g_cfg[3].mon.max_skew, g_cfg[3].mon.max_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
