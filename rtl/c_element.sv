// c_element -- Muller C-element with reset.
//
// The basic storage element of transition logic: when both inputs carry the
// same value the output takes that value, otherwise the output keeps its
// last value (a logical AND for transitions). Written in state semantics as
// a level-sensitive latch whose enable is (a == b); the latch is the
// element's intended feedback loop, not an accident. rst (active high,
// asynchronous) forces the output to INIT, which is how the design's
// pipelines and tick output start from a known state; the original design does not
// say how reset is applied, that part is this design's choice.
//
// Inside a loop of C-elements a lint tool may not recognise the latch and
// report the block as latch-free or as a combinational loop; either way the
// state-holding behaviour above is what is meant.
//
// Timing: zero-delay model; the output follows a matching input pair in the
// same time step.
`timescale 1ns/1ps
module c_element #(
  parameter logic INIT = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic y
);

  always_latch begin
    if (rst)         y = INIT;
    else if (a == b) y = a;
  end

endmodule
