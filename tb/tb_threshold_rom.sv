// tb_threshold_rom -- exhaustive test of the threshold ROMs as used in a
// five-unit system (4 address bits): thresholds 3 (2F+1) and 2 (F+1),
// high- and low-active, plus a 6-input gate with threshold 4. Every address
// is compared with a popcount computed in the testbench.
`timescale 1ns/1ps
module tb_threshold_rom;
  logic [3:0] a4;
  logic [5:0] a6;
  logic t3, t2n, t3n, t2, t6;
  int checks = 0, failures = 0;

  threshold_rom #(.N_IN(4), .K(3), .ACTIVE_LOW(1'b0)) u3  (.addr(a4), .th(t3));
  threshold_rom #(.N_IN(4), .K(3), .ACTIVE_LOW(1'b1)) u3n (.addr(a4), .th(t3n));
  threshold_rom #(.N_IN(4), .K(2), .ACTIVE_LOW(1'b0)) u2  (.addr(a4), .th(t2));
  threshold_rom #(.N_IN(4), .K(2), .ACTIVE_LOW(1'b1)) u2n (.addr(a4), .th(t2n));
  threshold_rom #(.N_IN(6), .K(4), .ACTIVE_LOW(1'b0)) u6  (.addr(a6), .th(t6));

  function automatic int pop(input int v);
    int c = 0;
    for (int i = 0; i < 8; i++) c += (v >> i) & 1;
    return c;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a6 = '0;
    for (int v = 0; v < 16; v++) begin
      a4 = 4'(v);
      #1;
      checks++;
      if (t3 !== (pop(v) >= 3) || t3n !== !(pop(v) >= 3) || t2 !== (pop(v) >= 2) || t2n !== !(pop(v) >= 2)) begin
        failures++;
        $display("addr %b: %b %b %b %b", a4, t3, t3n, t2, t2n);
      end
    end
    for (int v = 0; v < 64; v++) begin
      a6 = 6'(v);
      #1;
      checks++;
      if (t6 !== (pop(v) >= 4)) begin failures++; $display("addr %b: %b", a6, t6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
