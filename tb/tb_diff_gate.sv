// tb_diff_gate -- self-checking test of the Diff-Gate.
// The gate is fed by two reference queues standing in for the remote and
// the local pipe: a queue presents its oldest transition as req != ack and
// drops it when the gate acknowledges. Random ticks are added to both
// (keeping them within 3 of each other). Checked: a transition is removed
// only when both queues offer one (never from one alone); removal empties
// the matching pair (after every step at most one queue still offers a
// transition); and the local acknowledge never moves before the remote one.
`timescale 1ns/1ps
module tb_diff_gate;
  logic rst, rem_req, loc_req, rem_ack, loc_ack;
  int checks = 0, failures = 0;
  int unsigned rem_n, loc_n;   // ticks sent into each side
  int unsigned rem_pend, loc_pend;

  diff_gate dut (.rst(rst), .rem_req(rem_req), .loc_req(loc_req), .rem_ack(rem_ack), .loc_ack(loc_ack));

  int unsigned rem_acks = 0, loc_acks = 0;
  always @(rem_ack) if (!rst) rem_acks++;
  always @(loc_ack) if (!rst) begin
    loc_acks++;
    checks++;
    if (loc_acks > rem_acks) begin failures++; $display("local acknowledged before remote"); end
  end

  // each side is a one-place pipe: req toggles when a queued tick moves up
  always @(rem_ack or rem_pend) if (!rst && rem_req == rem_ack && rem_pend > 0) begin rem_req = ~rem_req; rem_pend--; end
  always @(loc_ack or loc_pend) if (!rst && loc_req == loc_ack && loc_pend > 0) begin loc_req = ~loc_req; loc_pend--; end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rem_req = 1'b0; loc_req = 1'b0; rem_pend = 0; loc_pend = 0; rem_n = 0; loc_n = 0;
    #2 rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      if ($urandom_range(1, 0) == 1) begin
        if (rem_n < loc_n + 3) begin rem_n++; rem_pend++; end
      end else begin
        if (loc_n < rem_n + 3) begin loc_n++; loc_pend++; end
      end
      #1;
      // removed pairs: both sides acknowledged the same number of ticks,
      // which is the smaller of the two totals
      checks++;
      if (rem_acks != loc_acks || rem_acks != ((rem_n < loc_n) ? rem_n : loc_n)) begin
        failures++;
        $display("step %0d: sent %0d/%0d removed %0d/%0d", i, rem_n, loc_n, rem_acks, loc_acks);
      end
      checks++;
      if (rem_req != rem_ack && loc_req != loc_ack) begin failures++; $display("matching pair left in place"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
