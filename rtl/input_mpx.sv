// input_mpx: the input multiplexer in front of one TMC chip.
//
// With SEL high each chip channel records a module input; with SEL low all
// four record COM, the shaped START (common start) or STOP (common stop)
// pulse, so that the reference time lands in the same memory as the hits.
// When channels are cascaded for a longer range the same input feeds the
// cascaded channels: for 2 us, input 0 feeds channels 0-1 and input 2
// feeds channels 2-3; for 4 us, input 0 feeds all four. The SEL/COM
// selection is the module's; which inputs stay in use when cascading is
// this design's choice. Combinational.
`timescale 1ns/1ps
module input_mpx
  import tmc_pkg::*;
(
  input  logic [N_CH-1:0] ch_in,   // stretched module inputs of this chip
  input  logic            com,
  input  logic            sel,     // 1: inputs, 0: COM
  input  range_e          range_sel,
  output logic [N_CH-1:0] tin
);

  logic [N_CH-1:0] routed;

  always_comb begin
    unique case (range_sel)
      RANGE_2US: routed = {ch_in[2], ch_in[2], ch_in[0], ch_in[0]};
      RANGE_4US: routed = {N_CH{ch_in[0]}};
      default:   routed = ch_in;
    endcase
    tin = sel ? routed : {N_CH{com}};
  end

endmodule
