// tb_pcsg -- exhaustive test of the Pipe Compare Signal Generator.
// For each of the 16 input combinations the expected outputs are derived
// from tick counts: the head tick of both pipes has the parity of loc_ack,
// the local pipe holds s = 1 + (loc_req != loc_ack) ticks, so
// r_self = head + s - 1 and r_rem = head + (rem_req != rem_ack). Then
// GEQ/GR odd/even follow the algorithm's definitions (r_rem >= / > r_self,
// parity of r_self, s = 1).
`timescale 1ns/1ps
module tb_pcsg;
  import darts_pkg::*;
  logic rem_req, rem_ack, loc_req, loc_ack;
  pcsg_t st;
  int checks = 0, failures = 0;

  pcsg dut (.rem_req(rem_req), .rem_ack(rem_ack), .loc_req(loc_req), .loc_ack(loc_ack), .st(st));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int head, s, r_self, r_rem;
      pcsg_t e;
      {rem_req, rem_ack, loc_req, loc_ack} = 4'(v);
      head   = int'(loc_ack);
      s      = 1 + int'(loc_req != loc_ack);
      r_self = head + s - 1;
      r_rem  = head + int'(rem_req != rem_ack);
      e.geq_o = (r_rem >= r_self) && (r_self % 2 == 1) && (s == 1);
      e.gr_o  = (r_rem >  r_self) && (r_self % 2 == 1) && (s == 1);
      e.geq_e = (r_rem >= r_self) && (r_self % 2 == 0) && (s == 1);
      e.gr_e  = (r_rem >  r_self) && (r_self % 2 == 0) && (s == 1);
      #1;
      checks++;
      if (st !== e) begin failures++; $display("inputs %b: got %b expected %b", 4'(v), st, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
