// tb_zb_channel -- self-checking test of the wire-delay model.
// Transitions are applied at random spacings, some much shorter than the
// delay. Each must appear at the output exactly D ns later, in order, with
// none lost.
`timescale 1ns/1ps
module tb_zb_channel;
  localparam int D_PS = 5000;
  logic din, dout;
  int checks = 0, failures = 0;
  realtime sent[$];
  logic    lvl[$];

  zb_channel #(.D_PS(D_PS)) dut (.din(din), .dout(dout));

  bit started = 0;

  always @(dout) if (started) begin
    checks++;
    if (sent.size() == 0) begin
      failures++; $display("unexpected output transition");
    end else begin
      realtime t; logic v;
      t = sent.pop_front(); v = lvl.pop_front();
      if (($realtime - t) - D_PS / 1000.0 > 0.0005 || (D_PS / 1000.0) - ($realtime - t) > 0.0005 || dout !== v) begin
        failures++; $display("transition sent at %0t arrived at %0t level %b", t, $realtime, dout);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    #10;
    started = 1;
    for (int i = 0; i < 200; i++) begin
      din = ~din;
      sent.push_back($realtime); lvl.push_back(din);
      #($urandom_range(8000, 300) * 1ps);
    end
    #10;
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d transitions lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
