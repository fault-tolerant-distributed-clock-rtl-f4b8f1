// ts_alg -- one tick-synchronisation unit (TS-Alg) of a DARTS system.
//
// Generates a clock for its functional unit without any reference clock.
// Every tick transition it sends is one message of a Srikanth-Toueg style
// clock synchronisation: rising edges are odd ticks, falling edges even
// ticks. For each of the N-1 other units a pm_counter compares the ticks
// received from that unit with the unit's own ticks. Four threshold ROMs
// count the remote units in each state:
//   * TH_GEQ: at least 2F+1 remote units have sent the unit's latest tick
//     (normal progress, the "2f+1" rule);
//   * TH_GR:  at least F+1 remote units are ahead of it (catch-up, the
//     "f+1" rule; at least one of them is correct).
// Odd and even copies are kept apart so that status left over from the
// previous tick cannot trigger the next one. tick_broadcast sends the next
// tick once a threshold for the current parity is reached and both
// thresholds of the previous parity have dropped. With N >= 3F+2 up to F
// units may fail arbitrarily.
//
// Interface: rst (active high) puts every pipeline at "tick 0 stored" and
// the tick low; tick_rem_in[j] is the tick wire of the j-th other unit;
// tick_loc_in is this unit's own tick after the local feedback wire (the
// local pipelines' input); tick_out drives the TS-Net and is the functional
// unit's clock.
// Timing: the unit itself is zero-delay; the clock period comes from the
// delays of the wires around it (and, in silicon, of its gates).
// Structure, thresholds and rules follow the document; reset style and the
// port split between local feedback and remote wires are this design's.
// The pipelines' handshake loops show up as combinational loops in lint;
// they are intended. The pipelines' producer acknowledges and pending flags
// are left unconnected on purpose: a clock wire cannot be held back.
`timescale 1ns/1ps
module ts_alg
  import darts_pkg::*;
#(
  parameter int unsigned N = 5,
  parameter int unsigned F = 1,
  parameter int unsigned S = 4
) (
  input  logic         rst,
  input  logic [N-2:0] tick_rem_in,
  input  logic         tick_loc_in,
  output logic         tick_out
);

  pcsg_t        st [N-1];
  logic [N-2:0] geq_o, gr_o, geq_e, gr_e;
  logic         th_geq_o_n, th_gr_o_n, th_geq_e, th_gr_e;

  for (genvar j = 0; j < N - 1; j++) begin : g_pair
    pm_counter #(.S(S)) u_pm (
      .rst(rst), .rem_in(tick_rem_in[j]), .loc_in(tick_loc_in),
      .rem_ack_out(), .loc_ack_out(),
      .rem_pending(), .loc_pending(),
      .st(st[j])
    );
    assign geq_o[j] = st[j].geq_o;
    assign gr_o[j]  = st[j].gr_o;
    assign geq_e[j] = st[j].geq_e;
    assign gr_e[j]  = st[j].gr_e;
  end

  threshold_rom #(.N_IN(N-1), .K(2*F+1), .ACTIVE_LOW(1'b1)) u_th_geq_o (.addr(geq_o), .th(th_geq_o_n));
  threshold_rom #(.N_IN(N-1), .K(F+1),   .ACTIVE_LOW(1'b1)) u_th_gr_o  (.addr(gr_o),  .th(th_gr_o_n));
  threshold_rom #(.N_IN(N-1), .K(2*F+1), .ACTIVE_LOW(1'b0)) u_th_geq_e (.addr(geq_e), .th(th_geq_e));
  threshold_rom #(.N_IN(N-1), .K(F+1),   .ACTIVE_LOW(1'b0)) u_th_gr_e  (.addr(gr_e),  .th(th_gr_e));

  tick_broadcast u_tick (
    .rst(rst),
    .th_geq_o_n(th_geq_o_n), .th_gr_o_n(th_gr_o_n),
    .th_geq_e(th_geq_e), .th_gr_e(th_gr_e),
    .tick(tick_out)
  );

  initial begin
    assert (N >= 3 * F + 2) else $error("ts_alg: N must be at least 3F+2");
  end

endmodule
