// pcsg -- Pipe Compare Signal Generator for one remote/local pipe pair.
//
// Purely combinational. It looks only at the consumer ends of the two pipes
// after the Diff-Gate:
//   * the local pipe holds exactly one tick (s = 1) when its request equals
//     its acknowledge, i.e. no local tick is waiting;
//   * that tick's number is odd when the local level is 1 (tick 0 is the
//     falling level present after reset, tick 1 the first rising edge);
//   * with s = 1 the remote pipe is never behind (r_rem >= r_self), and it
//     is ahead (r_rem > r_self) when a remote transition is waiting.
// GEQ/GR odd/even are then the four conditions of the algorithm. All are 0
// whenever a local tick is waiting, which keeps the logic to a few gates as
// the original design intends; mapping the conditions onto request/acknowledge
// levels is this design's own.
//
// Interface: rem_req/rem_ack, loc_req/loc_ack from the pipe pair; st the four
// status bits. Timing: combinational.
`timescale 1ns/1ps
module pcsg
  import darts_pkg::*;
(
  input  logic  rem_req,
  input  logic  rem_ack,
  input  logic  loc_req,
  input  logic  loc_ack,
  output pcsg_t st
);

  logic s_one, odd, ahead;

  always_comb begin
    s_one    = (loc_req == loc_ack);
    odd      = loc_ack;
    ahead    = (rem_req != rem_ack);
    st.geq_o = s_one &  odd;
    st.gr_o  = s_one &  odd & ahead;
    st.geq_e = s_one & ~odd;
    st.gr_e  = s_one & ~odd & ahead;
  end

endmodule
