// tb_c_element -- self-checking test of the Muller C-element.
// Applies reset, then 400 random input pairs, and compares the output after
// each step with a reference: the output copies the inputs when they agree
// and keeps its previous value when they differ. Both reset values are used.
`timescale 1ns/1ps
module tb_c_element;
  logic rst, a, b, y0, y1;
  int checks = 0, failures = 0;

  c_element #(.INIT(1'b0)) dut0 (.rst(rst), .a(a), .b(b), .y(y0));
  c_element #(.INIT(1'b1)) dut1 (.rst(rst), .a(a), .b(b), .y(y1));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e0, e1;
    rst = 1'b1; a = 1'b1; b = 1'b1;
    #1;
    checks++;
    if (y0 !== 1'b0 || y1 !== 1'b1) begin failures++; $display("reset value wrong: %b %b", y0, y1); end
    a = 1'b0; b = 1'b1;
    #1 rst = 1'b0;
    e0 = 1'b0; e1 = 1'b1;
    #1;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      if (a == b) begin e0 = a; e1 = a; end
      #1;
      checks++;
      if (y0 !== e0 || y1 !== e1) begin
        failures++;
        $display("step %0d a=%b b=%b: y=%b/%b expected %b/%b", i, a, b, y0, y1, e0, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
