// input_latch: behavioural model of the module's input signal buffer with
// its latch (not synthesizable logic: a one-shot in the real module).
//
// The chip's encoder can resolve only one rising edge per 32-cell row, so
// every input pulse is held for at least 32 ns: the output rises with the
// input, at once, and falls when the input has fallen and 32 ns have passed
// since the rise. A pulse shorter than STRETCH is stretched to STRETCH; a
// longer one passes through unchanged. The rising edge, which carries the
// time, is not delayed. This is the behaviour the module description gives;
// the zero propagation delay is this model's simplification (a constant
// delay would cancel in the start/stop difference anyway).
`timescale 1ns/1ps
module input_latch #(
  parameter realtime STRETCH = 32.0ns
) (
  input  logic sig_in,
  output logic sig_out
);

  logic hold;

  initial hold = 1'b0;

  // each rise holds the output high for STRETCH; the input itself keeps it
  // high beyond that (a second rise within STRETCH is outside the module's
  // double-hit resolution)
  always @(posedge sig_in) begin
    hold <= 1'b1;
    hold <= #(STRETCH) 1'b0;
  end

  assign sig_out = sig_in | hold;

endmodule
