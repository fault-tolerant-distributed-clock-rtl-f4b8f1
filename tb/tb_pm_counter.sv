// tb_pm_counter -- self-checking test of the +/- counter (pipe pair,
// Diff-Gate and PCSG together).
// Random remote and local ticks (toggles of rem_in / loc_in) are applied,
// keeping the two totals within S-1 of each other so neither pipeline can
// overflow. With R and L the numbers of ticks sent after tick 0, the
// reference follows the algorithm's definitions: the local pipe holds one
// tick exactly when L <= R, r_self = L and r_rem = R, so
// GEQ = (L <= R), GR = (L < R), odd/even by the parity of L, all gated by
// s = 1. It also checks that the pending flags match R and L.
`timescale 1ns/1ps
module tb_pm_counter;
  import darts_pkg::*;
  localparam int S = 4;
  logic rst, rem_in, loc_in, rem_ack_out, loc_ack_out, rem_pending, loc_pending;
  pcsg_t st;
  int checks = 0, failures = 0;
  int unsigned gr_seen = 0, geq_seen = 0;

  pm_counter #(.S(S)) dut (
    .rst(rst), .rem_in(rem_in), .loc_in(loc_in), .rem_ack_out(rem_ack_out), .loc_ack_out(loc_ack_out),
    .rem_pending(rem_pending), .loc_pending(loc_pending), .st(st)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int R, L;
    pcsg_t e;
    rst = 1'b1; rem_in = 1'b0; loc_in = 1'b0; R = 0; L = 0;
    #2 rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(1, 0) == 1) begin
        if (R < L + S - 1) begin R++; rem_in = ~rem_in; end
      end else begin
        if (L < R + S - 1) begin L++; loc_in = ~loc_in; end
      end
      #1;
      e.geq_o = (L <= R) && (L % 2 == 1);
      e.gr_o  = (L <  R) && (L % 2 == 1);
      e.geq_e = (L <= R) && (L % 2 == 0);
      e.gr_e  = (L <  R) && (L % 2 == 0);
      checks++;
      if (st !== e) begin failures++; $display("R=%0d L=%0d: st=%b expected %b", R, L, st, e); end
      checks++;
      if (rem_pending !== (R > L) || loc_pending !== (L > R)) begin
        failures++; $display("R=%0d L=%0d: pending %b/%b", R, L, rem_pending, loc_pending);
      end
      if (st.gr_o || st.gr_e) gr_seen++;
      if (st.geq_o || st.geq_e) geq_seen++;
    end
    checks++;
    if (gr_seen == 0 || geq_seen == 0) begin failures++; $display("status never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
