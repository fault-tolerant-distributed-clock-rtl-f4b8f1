// darts_top -- a DARTS clock-generation system: N TS-Alg units on a TS-Net.
//
// Each unit p drives one broadcast wire, its tick signal, which is also the
// clock of functional unit p (output clk[p]). The TS-Net carries every wire
// to all other units; each of those N(N-1) wires is a zb_channel with its
// own delay, taken from darts_pkg::link_delay_ps (D_REM_MIN_PS plus a
// multiple of D_REM_STEP_PS). Each unit also feeds its own tick back to its
// local pipelines through a wire of D_LOC_PS. The units agree on tick
// numbers without exchanging them: the resulting clocks differ in phase by
// a bounded number of ticks and run at the speed the wires allow.
//
// Interface: rst (active high, common to all units; it must be held longer
// than the longest wire delay so that no stale transition is in flight when
// it drops), clk[N-1:0] the generated clocks.
// Parameters: N = 5 units and F = 1 tolerated faulty unit as in the
// document's FPGA system; S = 4 pipeline stages; wire delays are this
// design's own values (chosen to give a clock near the 24 MHz reported for
// the FPGA system, with deliberately uneven wires).
`timescale 1ns/1ps
module darts_top
  import darts_pkg::*;
#(
  parameter int unsigned N            = 5,
  parameter int unsigned F            = 1,
  parameter int unsigned S            = 4,
  parameter int unsigned D_LOC_PS     = 2000,
  parameter int unsigned D_REM_MIN_PS = 8000,
  parameter int unsigned D_REM_STEP_PS = 2000,
  parameter int unsigned D_FAR_PS     = 20000
) (
  input  logic         rst,
  output logic [N-1:0] clk
);

  logic [N-1:0] tick;
  logic [N-1:0] tick_loc;
  // net[p][q]: unit q's tick as seen at unit p
  logic [N-1:0] net [N];

  for (genvar p = 0; p < N; p++) begin : g_unit
    logic [N-2:0] rem_in;

    for (genvar q = 0; q < N; q++) begin : g_wire
      if (q != p) begin : g_link
        zb_channel #(.D_PS(link_delay_ps(q, p, N, D_REM_MIN_PS, D_REM_STEP_PS, D_FAR_PS))) u_wire (
          .din(tick[q]), .dout(net[p][q])
        );
      end else begin : g_self
        assign net[p][q] = 1'b0;
      end
      // remote input j of unit p is unit q, skipping p itself
      if (q < p) begin : g_lo
        assign rem_in[q] = net[p][q];
      end else if (q > p) begin : g_hi
        assign rem_in[q-1] = net[p][q];
      end
    end

    zb_channel #(.D_PS(D_LOC_PS)) u_loc_wire (.din(tick[p]), .dout(tick_loc[p]));

    ts_alg #(.N(N), .F(F), .S(S)) u_ts (
      .rst(rst), .tick_rem_in(rem_in), .tick_loc_in(tick_loc[p]), .tick_out(tick[p])
    );
  end

  assign clk = tick;

endmodule
