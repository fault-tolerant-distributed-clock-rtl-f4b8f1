// tb_darts_fault -- fault tolerance of a five-unit system (N = 5, F = 1).
// Units 0..3 are TS-Alg units; unit 4 is replaced by a faulty unit driven
// by the testbench, wired to the others through the same kind of delayed
// wires as in darts_top. Three faults are run, each after a fresh reset:
//   crash     the faulty unit's wires stay low;
//   stuck-1   its wires rise once and stay high;
//   byzantine each receiver sees its own random transitions, at random
//             times, sometimes faster than the correct units tick.
// For every fault the four correct units must keep ticking at a rate the
// wire delays allow and their tick counts must stay within PI of each
// other. The faulty unit's pipeline pairs may overflow; the algorithm
// tolerates that because only one unit's status is affected.
`timescale 1ns/1ps
module tb_darts_fault;
  import darts_pkg::*;
  localparam int N  = 5;
  localparam int NC = 4;       // correct units
  localparam int PI = 2;
  localparam int RUN_NS = 10000;

  logic          rst;
  logic [NC-1:0] tick, tick_loc;
  logic [NC-1:0] bad;          // faulty unit's wire as seen by each correct unit
  logic [N-1:0]  net [NC];     // net[p][q]: unit q's tick at unit p
  int checks = 0, failures = 0;

  for (genvar p = 0; p < NC; p++) begin : g_unit
    logic [N-2:0] rem_in;
    for (genvar q = 0; q < NC; q++) begin : g_wire
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
    assign net[p][N-1] = bad[p];
    assign rem_in[N-2] = bad[p];
    zb_channel #(.D_PS(2000)) u_loc (.din(tick[p]), .dout(tick_loc[p]));
    ts_alg #(.N(N), .F(1), .S(4)) u_ts (.rst(rst), .tick_rem_in(rem_in), .tick_loc_in(tick_loc[p]), .tick_out(tick[p]));
  end

  int unsigned cnt [NC];
  int unsigned prec_bad = 0;
  bit running = 0;
  int mode = 0;

  for (genvar p = 0; p < NC; p++) begin : g_mon
    always @(tick[p]) if (running) begin
      int unsigned mx, mn;
      cnt[p]++;
      mx = cnt[0]; mn = cnt[0];
      for (int q = 1; q < NC; q++) begin
        if (cnt[q] > mx) mx = cnt[q];
        if (cnt[q] < mn) mn = cnt[q];
      end
      if (mx - mn > PI) prec_bad++;
    end
  end

  // byzantine unit: independent random transitions towards each receiver
  for (genvar p = 0; p < NC; p++) begin : g_byz
    initial begin
      forever begin
        #($urandom_range(40000, 3000) * 1ps);
        if (mode == 2 && !rst) bad[p] = ~bad[p];
      end
    end
  end

  initial begin
    #(RUN_NS * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [3];
    names = '{"crash", "stuck-1", "byzantine"};
    for (int m = 0; m < 3; m++) begin
      rst = 1'b1; bad = '0; running = 0; mode = m;
      for (int p = 0; p < NC; p++) cnt[p] = 0;
      prec_bad = 0;
      #100;
      rst = 1'b0; running = 1;
      if (m == 1) begin #5 bad = '1; end
      #(RUN_NS);
      running = 0;
      for (int p = 0; p < NC; p++) begin
        checks++;
        // one tick takes at least the 2 ns local wire and at most two
        // of the slowest wires (20 ns) plus the local wire
        if (cnt[p] < RUN_NS / 42 || cnt[p] > RUN_NS / 2) begin
          failures++;
          $display("%s: unit %0d made %0d ticks", names[m], p, cnt[p]);
        end
      end
      checks++;
      if (prec_bad != 0) begin failures++; $display("%s: precision exceeded %0d times", names[m], prec_bad); end
      $display("%s: ticks %0d %0d %0d %0d", names[m], cnt[0], cnt[1], cnt[2], cnt[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
