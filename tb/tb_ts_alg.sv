// tb_ts_alg -- self-checking test of one TS-Alg unit (N = 5, F = 1) whose
// four remote tick wires are driven by the testbench. The unit's own tick
// returns to it through a 2 ns local wire.
// Scenarios, each with an expected outcome worked out from the rules:
//   1. after reset the unit sends tick 1 (rising) at once;
//   2. two remotes sending tick 1 is not enough for tick 2 (2F+1 = 3 needed);
//      the third one releases it (falling edge);
//   3. one remote sending ticks 2 and 3 (ahead) does not release tick 3
//      (F+1 = 2 needed); a second remote ahead does (catch-up rule), even
//      though only two remotes have sent tick 2;
//   4. the remaining remotes catch up, which releases tick 4; then in each
//      round the remotes send tick k and the unit sends tick k+1 within
//      0.1 ns of the third remote's tick (the unit's logic is zero-delay),
//      but not after only two.
`timescale 1ns/1ps
module tb_ts_alg;
  localparam int N = 5;
  logic rst, tick, tick_loc;
  logic [N-2:0] rem;
  int checks = 0, failures = 0;
  int unsigned ticks = 0;

  ts_alg #(.N(N), .F(1), .S(4)) dut (.rst(rst), .tick_rem_in(rem), .tick_loc_in(tick_loc), .tick_out(tick));
  zb_channel #(.D_PS(2000)) u_loc (.din(tick), .dout(tick_loc));

  always @(tick) if (!rst) ticks++;

  task automatic expect_ticks(int unsigned n, string what);
    checks++;
    if (ticks != n) begin failures++; $display("%s: %0d ticks, expected %0d", what, ticks, n); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rem = '0;
    #20 rst = 1'b0;
    #1 expect_ticks(1, "after reset");
    checks++; if (tick !== 1'b1) begin failures++; $display("tick 1 is not a rising edge"); end
    #10;
    // remotes 0 and 1 send tick 1
    rem[0] = 1'b1; #5 rem[1] = 1'b1; #10;
    expect_ticks(1, "two remotes at tick 1");
    rem[2] = 1'b1; #0.1;
    expect_ticks(2, "third remote at tick 1");
    checks++; if (tick !== 1'b0) begin failures++; $display("tick 2 is not a falling edge"); end
    #10;
    // remote 0 runs ahead: ticks 2 and 3
    rem[0] = 1'b0; #5 rem[0] = 1'b1; #10;
    expect_ticks(2, "one remote ahead");
    // remote 1 too: two remotes ahead of tick 2 -> catch-up to tick 3
    rem[1] = 1'b0; #5 rem[1] = 1'b1; #0.1;
    expect_ticks(3, "two remotes ahead");
    #10;
    // remote 2 and 3 catch up (3 sends ticks 1..3, 2 sends 2..3)
    rem[3] = 1'b1; rem[2] = 1'b0; #3 rem[3] = 1'b0; #3 rem[2] = 1'b1; #3 rem[3] = 1'b1; #10;
    // three remotes now hold tick 3, the unit's latest: tick 4 follows
    expect_ticks(4, "all remotes at tick 3");
    // lock-step rounds: remotes send tick k, the unit sends k+1 when the
    // third remote delivers
    for (int k = 4; k <= 9; k++) begin
      rem[0] = ~rem[0]; #3 rem[1] = ~rem[1]; #3;
      expect_ticks(k, "two remotes in round");
      rem[2] = ~rem[2]; #0.1;
      expect_ticks(k + 1, "third remote in round");
      #3 rem[3] = ~rem[3]; #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
