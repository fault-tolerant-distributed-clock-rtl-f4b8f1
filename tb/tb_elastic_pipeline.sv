// tb_elastic_pipeline -- self-checking test of the transition pipeline.
// A reference counts transitions put in (toggles of data_in) and taken out
// (toggles of ack_in). The producer only adds a transition while fewer than
// S are stored; the consumer acknowledges at random. Checked after every
// step: a transition is offered (data_out != ack_in) exactly when the
// reference holds one, and the offered level is that of the oldest stored
// transition. A second phase fills the pipeline with S transitions and
// drains it, checking the capacity of S.
`timescale 1ns/1ps
module tb_elastic_pipeline;
  localparam int S = 4;
  logic rst, din, ack_out, dout, ack_in;
  int checks = 0, failures = 0;
  logic q[$];   // levels of the stored transitions, oldest first

  elastic_pipeline #(.S(S)) dut (.rst(rst), .data_in(din), .ack_out(ack_out), .data_out(dout), .ack_in(ack_in));

  task automatic check(string what);
    checks++;
    if ((q.size() > 0) != (dout != ack_in) || (q.size() > 0 && dout !== q[0])) begin
      failures++;
      $display("%s: stored=%0d dout=%b ack_in=%b", what, q.size(), dout, ack_in);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; din = 1'b0; ack_in = 1'b0;
    #2 rst = 1'b0;
    #1 check("after reset");
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1, 0) == 1 && q.size() < S) begin
        din = ~din;
        q.push_back(din);
      end
      #1 check("after input");
      if ($urandom_range(2, 0) == 0 && q.size() > 0) begin
        ack_in = dout;
        void'(q.pop_front());
      end
      #1 check("after ack");
    end
    // capacity: S transitions without any acknowledge, then drain
    while (q.size() > 0) begin ack_in = dout; void'(q.pop_front()); #1; end
    for (int i = 0; i < S; i++) begin din = ~din; q.push_back(din); #1; end
    checks++;
    if (ack_out != din) begin failures++; $display("first stage did not take the last transition"); end
    for (int i = 0; i < S; i++) begin
      check("drain");
      ack_in = dout; void'(q.pop_front()); #1;
    end
    check("empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
