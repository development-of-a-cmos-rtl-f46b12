// tmc_delay_line: behavioural model of one row-wide chain of 32 Time Memory
// Cells (not synthesizable logic: the real circuit is analog).
//
// Each rising edge of `wl` (the write clock) starts a pulse down a chain of
// delay elements, 1 ns per cell, and cell k stores TIN at wl + k*TAP. After
// one 32 ns clock period `row` holds 32 samples of TIN with 1 ns spacing,
// bit 0 the earliest. The synchronous chip logic commits `row` into the
// addressed memory row on the next clock edge; with non-blocking updates it
// reads the samples of the period just ended while cell 0 starts the next.
// TAP * N_TAPS must equal the clock period, which in the chip is what the
// feedback loop enforces.
`timescale 1ns/1ps
module tmc_delay_line #(
  parameter int unsigned N_TAPS = 32,
  parameter realtime     TAP    = 1.0ns
) (
  input  logic              wl,
  input  logic              tin,
  output logic [N_TAPS-1:0] row,
  output logic              wl_end   // write pulse leaving the last cell
);

  logic [N_TAPS:0] wl_chain;
  assign wl_chain[0] = wl;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_cell
    tmc_cell #(.TAP(TAP)) u_cell (
      .wl_in (wl_chain[k]),
      .tin   (tin),
      .wl_out(wl_chain[k+1]),
      .q     (row[k])
    );
  end

  assign wl_end = wl_chain[N_TAPS];

endmodule
