// tb_darts_boot -- start-up of a five-unit system whose units leave reset at
// different times. The system model allows each unit its own reset release
// time within [0, shortest wire delay): no tick can then reach a unit that
// is still in reset. The testbench builds the network from ts_alg units
// and wires as in darts_top (wires 8..20 ns, local 2 ns) and, in 8 trials,
// releases the resets at random offsets in [0, 8) ns. In every trial all
// units must start ticking and stay within PI = 2 ticks of each other.
`timescale 1ns/1ps
module tb_darts_boot;
  import darts_pkg::*;
  localparam int N      = 5;
  localparam int PI     = 2;
  localparam int RUN_NS = 3000;
  localparam int TRIALS = 8;

  logic [N-1:0] rst, tick, tick_loc;
  logic [N-1:0] net [N];
  bit running = 0;
  int checks = 0, failures = 0;

  for (genvar p = 0; p < N; p++) begin : g_unit
    logic [N-2:0] rem_in;
    for (genvar q = 0; q < N; q++) begin : g_wire
      if (q != p) begin : g_link
        zb_channel #(.D_PS(link_delay_ps(q, p, N, 8000, 2000, 0))) u_w (.din(tick[q]), .dout(net[p][q]));
      end else begin : g_self
        assign net[p][q] = 1'b0;
      end
      if (q < p) begin : g_lo
        assign rem_in[q] = net[p][q];
      end else if (q > p) begin : g_hi
        assign rem_in[q-1] = net[p][q];
      end
    end
    zb_channel #(.D_PS(2000)) u_loc (.din(tick[p]), .dout(tick_loc[p]));
    ts_alg #(.N(N), .F(1), .S(4)) u_ts (.rst(rst[p]), .tick_rem_in(rem_in), .tick_loc_in(tick_loc[p]), .tick_out(tick[p]));
  end

  tb_clk_monitor #(.N(N)) mon (.running(running), .clk(tick));

  initial begin
    #(TRIALS * (RUN_NS + 200) * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < TRIALS; t++) begin
      int unsigned off [N];
      rst = '1; running = 0;
      #100;
      mon.clear();
      running = 1;
      for (int p = 0; p < N; p++) off[p] = $urandom_range(7999, 0);
      fork
        for (int p = 0; p < N; p++) begin
          automatic int pp = p;
          fork
            begin #(off[pp] * 1ps); rst[pp] = 1'b0; end
          join_none
        end
      join
      #(RUN_NS);
      running = 0;
      for (int p = 0; p < N; p++) begin
        checks++;
        // at least one tick per two longest wires (20 ns) plus the local one
        if (mon.cnt[p] < RUN_NS / 42) begin failures++; $display("trial %0d: unit %0d made %0d ticks", t, p, mon.cnt[p]); end
      end
      checks++;
      if (mon.max_skew > PI) begin failures++; $display("trial %0d: tick counts %0d apart", t, mon.max_skew); end
      $display("trial %0d: offsets %0d %0d %0d %0d %0d ps, %0d ticks, skew %0d", t,
               off[0], off[1], off[2], off[3], off[4], mon.cnt[0], mon.max_skew);
      #100;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
