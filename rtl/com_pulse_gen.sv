// com_pulse_gen: behavioural model of the COM pulse former of the timing
// control (not synthesizable logic: delay cables and gates in the module).
//
// The START discriminator output (common start) or the STOP one (common
// stop) is delayed by DELAY to give signal A, and A is ANDed with an
// inverted copy of itself delayed by WIDTH, so COM is a WIDTH-long pulse
// starting DELAY after the reference edge. The delay places the reference
// pulse in the rows recorded with SEL low: rows 0-1 of a common start run,
// the last two rows of a common stop run. Delays are the values printed in
// the module's timing-control schematic (60 ns, 10 ns).
`timescale 1ns/1ps
module com_pulse_gen #(
  parameter realtime DELAY = 60.0ns,
  parameter realtime WIDTH = 10.0ns
) (
  input  logic start_in,
  input  logic stop_in,
  input  logic mode_cstop,  // switch: 0 CSTART, 1 CSTOP
  output logic com
);

  logic src;

  assign src = mode_cstop ? stop_in : start_in;

  initial com = 1'b0;

  // A rises DELAY after the source edge; the AND with A delayed by WIDTH
  // and inverted leaves a WIDTH-long pulse at A's rising edge
  always @(posedge src) begin
    fork
      begin
        #(DELAY) com <= 1'b1;
        #(WIDTH) com <= 1'b0;
      end
    join_none
  end

endmodule
