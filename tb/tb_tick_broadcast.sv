// tb_tick_broadcast -- self-checking test of the tick broadcast stage.
// Random threshold patterns are applied (odd thresholds low-active). The
// reference tick rises when an even threshold is active and no odd one is,
// falls when an odd threshold is active and no even one is, and otherwise
// keeps its value; reset drives it low.
`timescale 1ns/1ps
module tb_tick_broadcast;
  logic rst, geq_o_n, gr_o_n, geq_e, gr_e, tick;
  int checks = 0, failures = 0;
  int ups = 0, downs = 0;

  tick_broadcast dut (.rst(rst), .th_geq_o_n(geq_o_n), .th_gr_o_n(gr_o_n), .th_geq_e(geq_e), .th_gr_e(gr_e), .tick(tick));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    bit odd_act, even_act;
    rst = 1'b1; geq_o_n = 1'b1; gr_o_n = 1'b1; geq_e = 1'b1; gr_e = 1'b0;
    // an even threshold is active during reset: the tick must still stay low
    #1;
    checks++;
    if (tick !== 1'b0) begin failures++; $display("tick not low in reset"); end
    geq_e = 1'b0;
    #1 rst = 1'b0; e = 1'b0;
    #1;
    for (int i = 0; i < 500; i++) begin
      {geq_o_n, gr_o_n, geq_e, gr_e} = 4'($urandom);
      odd_act  = !geq_o_n || !gr_o_n;
      even_act = geq_e || gr_e;
      if (even_act && !odd_act) begin if (!e) ups++; e = 1'b1; end
      if (odd_act && !even_act) begin if (e) downs++; e = 1'b0; end
      #1;
      checks++;
      if (tick !== e) begin failures++; $display("step %0d: tick=%b expected %b", i, tick, e); end
    end
    checks++;
    if (ups == 0 || downs == 0) begin failures++; $display("no tick produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
