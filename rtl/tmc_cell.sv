// tmc_cell: behavioural model of one Time Memory Cell with its delay element
// (not synthesizable logic: the real cell is a custom analog circuit).
//
// The write line WL enters the cell, is passed on to the next cell after the
// delay element's delay TAP, and on its rising edge the cell's memory takes
// the level of the timing input TIN. In the chip the delay is held at 1 ns
// by a feedback loop on the Vg bias; here it is a fixed parameter (the loop
// is taken as locked). Differential TIN/TIN* is modelled as one logic level.
`timescale 1ns/1ps
module tmc_cell #(
  parameter realtime TAP = 1.0ns   // delay element
) (
  input  logic wl_in,
  input  logic tin,
  output logic wl_out,
  output logic q
);

  always @(wl_in) wl_out <= #(TAP) wl_in;

  always @(posedge wl_in) q <= tin;

endmodule
