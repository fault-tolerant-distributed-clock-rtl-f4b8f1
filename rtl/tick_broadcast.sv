// tick_broadcast -- turns the four threshold outputs into the tick signal.
//
// The two low-active odd threshold gates meet in an AND gate: its output
// falls when either odd threshold is reached. The two high-active even
// threshold gates meet in an OR gate: its output rises when either even
// threshold is reached. A C-element combines them, so the tick rises only
// when an even threshold is active and no odd one is, and falls only when an
// odd threshold is active and no even one is; in between it holds. The
// tick's rising edge is an odd tick, its falling edge an even tick. This is
// the original design's structure; the reset to 0 (tick 0 sent) is this design's
// choice.
//
// Interface: th_geq_o_n, th_gr_o_n (low-active), th_geq_e, th_gr_e
// (high-active), rst, tick. Timing: zero-delay.
`timescale 1ns/1ps
module tick_broadcast (
  input  logic rst,
  input  logic th_geq_o_n,
  input  logic th_gr_o_n,
  input  logic th_geq_e,
  input  logic th_gr_e,
  output logic tick
);

  logic and_o, or_e;

  assign and_o = th_geq_o_n & th_gr_o_n;
  assign or_e  = th_geq_e | th_gr_e;

  c_element u_c (.rst(rst), .a(and_o), .b(or_e), .y(tick));

endmodule
