// pm_counter -- the "+/- counter" a TS-Alg keeps for one remote unit.
//
// It never stores a tick number. Instead a remote elastic pipeline queues
// the remote unit's tick transitions and a local elastic pipeline queues the
// unit's own, a Diff-Gate deletes ticks present in both (remote first), and a
// PCSG reports how the two counts compare. Only their difference is kept,
// bounded by the pipeline depth S.
//
// Interface: rem_in (remote unit's tick wire), loc_in (own tick, after the
// local feedback wire), rst, st (GEQ/GR odd/even). rem_ack_out/loc_ack_out are
// the pipelines' producer acknowledges, unused by the TS-Alg, and
// rem_pending/loc_pending tell whether a transition waits at either
// pipeline's output (for observation).
// Timing: zero-delay; st reflects a new transition within its time step.
// The structure is the original design's; how the PCSG reads the pipes is this
// design's own (see pcsg). Pipelines and Diff-Gate form loops of C-elements
// (request/acknowledge handshakes); lint tools report them as combinational
// loops, and they are the intended asynchronous feedback.
`timescale 1ns/1ps
module pm_counter
  import darts_pkg::*;
#(
  parameter int unsigned S = 4
) (
  input  logic  rst,
  input  logic  rem_in,
  input  logic  loc_in,
  output logic  rem_ack_out,
  output logic  loc_ack_out,
  output logic  rem_pending,
  output logic  loc_pending,
  output pcsg_t st
);

  logic rem_req, rem_ack, loc_req, loc_ack;

  elastic_pipeline #(.S(S)) u_rem_pipe (
    .rst(rst), .data_in(rem_in), .ack_out(rem_ack_out),
    .data_out(rem_req), .ack_in(rem_ack)
  );

  elastic_pipeline #(.S(S)) u_loc_pipe (
    .rst(rst), .data_in(loc_in), .ack_out(loc_ack_out),
    .data_out(loc_req), .ack_in(loc_ack)
  );

  diff_gate u_diff (
    .rst(rst), .rem_req(rem_req), .loc_req(loc_req),
    .rem_ack(rem_ack), .loc_ack(loc_ack)
  );

  pcsg u_pcsg (
    .rem_req(rem_req), .rem_ack(rem_ack),
    .loc_req(loc_req), .loc_ack(loc_ack),
    .st(st)
  );

  assign rem_pending = (rem_req != rem_ack);
  assign loc_pending = (loc_req != loc_ack);

endmodule
