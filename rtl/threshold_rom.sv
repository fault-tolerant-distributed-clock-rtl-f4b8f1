// threshold_rom -- threshold gate realised as a read-only memory.
//
// The N_IN status signals (GR or GEQ of every remote unit) form the address
// of a 2^N_IN x 1 ROM whose entry is 1 when the address holds at least K
// ones. With ACTIVE_LOW set the stored bit is inverted, which gives the
// low-active gates used for the odd (falling-edge) ticks. The ROM form
// follows the document; its contents are computed at elaboration time by
// darts_pkg::thr_rom, so no table file is needed.
//
// Interface: addr (status vector), th (threshold output).
// Timing: combinational (a ROM read with the status vector as address).
`timescale 1ns/1ps
module threshold_rom
  import darts_pkg::*;
#(
  parameter int unsigned N_IN       = 4,
  parameter int unsigned K          = 3,
  parameter bit          ACTIVE_LOW = 1'b0
) (
  input  logic [N_IN-1:0] addr,
  output logic            th
);

  localparam int unsigned DEPTH = 1 << N_IN;
  localparam logic [4095:0] FULL = thr_rom(N_IN, K);
  localparam logic [DEPTH-1:0] ROM = FULL[DEPTH-1:0];

  initial begin
    assert (N_IN >= 1 && N_IN <= 12) else $error("threshold_rom: N_IN must be 1..12");
  end

  assign th = ROM[addr] ^ ACTIVE_LOW;

endmodule
