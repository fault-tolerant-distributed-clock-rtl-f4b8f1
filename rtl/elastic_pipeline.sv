// elastic_pipeline -- latch-free micropipeline that stores signal
// transitions (zero-bit messages).
//
// A chain of S stages, each one C-element whose second input is the
// inverted output of the following stage. A stage holds a transition while
// its output differs from the next stage's output, so the pipeline stores up
// to S transitions. Transitions entering at data_in move towards data_out as
// far as free stages allow; the consumer removes the transition presented at
// data_out by copying data_out onto ack_in (two-phase handshake). ack_out is
// the acknowledge to the producer; the TS-Alg leaves it unused because a
// clock wire cannot be held back.
//
// Interface: data_in/ack_out (producer side), data_out/ack_in (consumer
// side), rst clears every stage to 0, i.e. "one even tick stored, none
// pending". The structure follows the original design's micropipeline without
// data latches; S defaults to four stages as in its example pipeline.
//
// Timing: zero-delay model, a transition ripples through all free stages
// within the time step in which it arrives. The stage chain is a loop of
// C-elements through the inverted next-stage feedback; that loop is the
// pipeline's handshake and is intended.
`timescale 1ns/1ps
module elastic_pipeline #(
  parameter int unsigned S = 4
) (
  input  logic rst,
  input  logic data_in,
  output logic ack_out,
  output logic data_out,
  input  logic ack_in
);

  logic [S-1:0] c;     // stage outputs, c[S-1] faces the consumer
  logic [S-1:0] prv;   // input from the previous stage (prv[i] feeds stage i)
  logic [S-1:0] nxt;   // output of the following stage (nxt[i] feeds stage i)

  always_comb begin
    prv[0] = data_in;
    for (int i = 1; i < S; i++) prv[i] = c[i-1];
    for (int i = 0; i < S - 1; i++) nxt[i] = c[i+1];
    nxt[S-1] = ack_in;
  end

  for (genvar i = 0; i < S; i++) begin : g_stage
    c_element u_c (.rst(rst), .a(prv[i]), .b(~nxt[i]), .y(c[i]));
  end

  assign ack_out  = c[0];
  assign data_out = c[S-1];

endmodule
