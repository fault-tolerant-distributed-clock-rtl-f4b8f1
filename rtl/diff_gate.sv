// diff_gate -- removes matching transitions from a remote/local pipe pair.
//
// Each pipe presents its oldest unremoved transition as a two-phase request
// (req != ack means a transition is waiting). When both pipes present a
// transition the pair holds the same tick twice, which carries no
// information for the algorithm, so both are acknowledged. The remote pipe
// is always acknowledged first: C-element u_rem copies the common level to
// rem_ack only once both requests agree, and u_loc copies it to loc_ack only
// after rem_ack has followed. This ordering is what the original design requires
// (it keeps the comparator downstream glitch-free); the two-C-element circuit
// that realises it is this design's own.
//
// Interface: rem_req/loc_req from the pipes' data_out, rem_ack/loc_ack to
// their ack_in. rst clears both acknowledges.
// Timing: zero-delay; a removal completes in the time step it is enabled.
// An assertion checks the remote-first order at the end of every time step.
`timescale 1ns/1ps
module diff_gate (
  input  logic rst,
  input  logic rem_req,
  input  logic loc_req,
  output logic rem_ack,
  output logic loc_ack
);

  c_element u_rem (.rst(rst), .a(rem_req), .b(loc_req), .y(rem_ack));
  c_element u_loc (.rst(rst), .a(loc_req), .b(rem_ack), .y(loc_ack));

  // Handshake rule: the local acknowledge may only lag the remote one, and
  // only while the local pipe already offers the matching transition.
  always_comb begin
    if (!rst) begin
      a_remote_first: assert final (loc_ack == rem_ack || loc_req == rem_ack)
        else $error("diff_gate: local pipe acknowledged out of order");
    end
  end

endmodule
