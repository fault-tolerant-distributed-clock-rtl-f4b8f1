// zb_channel -- behavioural model of a zero-bit message channel (a wire).
//
// Not synthesizable logic: it stands for the delay of an on-chip wire of the
// TS-Net or of a unit's local tick feedback. Every transition at din appears
// at dout D_PS picoseconds later (transport delay, so no transition is lost
// however close two of them are): a reliable FIFO channel that carries only
// the time of alternating up/down events. Output starts low, as the channel
// state does at reset. The fixed delay per wire is this design's choice; the
// system model only requires the delay to lie within unknown bounds.
`timescale 1ns/1ps
module zb_channel #(
  parameter int unsigned D_PS = 1000
) (
  input  logic din,
  output logic dout
);

  logic q;

  initial q = 1'b0;

  // one delayed update per transition, so transitions closer together than
  // D_PS all arrive, in order
  always @(din) begin
    fork : g_deliver
      automatic logic v = din;
      #(D_PS * 1ps) q = v;
    join_none
  end

  assign dout = q;

endmodule
