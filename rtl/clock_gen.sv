// clock_gen: makes the 31.25 MHz write clock WCLK from the module's
// 62.5 MHz crystal oscillator with a toggle flip-flop, as in the timing
// control schematic. One WCLK period is 32 ns, the time one row of 32
// cells covers. The flip-flop has no reset: its phase does not matter.
`timescale 1ns/1ps
module clock_gen (
  input  logic osc,    // 62.5 MHz
  output logic wclk    // 31.25 MHz
);

  always_ff @(posedge osc) wclk <= ~wclk;

endmodule
