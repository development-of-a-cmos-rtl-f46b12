// tmc_pointer: the chip's Write or Read Pointer, a 7-bit counter with a row
// decoder.
//
// The counter advances by one on a clock edge with `inc` high and can be
// loaded from the chip's register bus (`load` wins over `inc`). The decoder
// turns the low five bits into a one-hot row select for the 32-row arrays;
// the two upper bits pick an array when channels are cascaded for a longer
// time range. Counter and decoder are as described for the chip; the load
// priority and the synchronous reset to 0 are this design's choices.
// Timing: `ptr` and `row_sel` change one clock after `inc` / `load`.
`timescale 1ns/1ps
module tmc_pointer
  import tmc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,       // synchronous, to 0
  input  logic            load,
  input  ptr_t            load_val,
  input  logic            inc,
  output ptr_t            ptr,
  output logic [ROWS-1:0] row_sel    // one-hot decode of ptr[4:0]
);

  always_ff @(posedge clk) begin
    if (rst)       ptr <= '0;
    else if (load) ptr <= load_val;
    else if (inc)  ptr <= ptr + 1'b1;
  end

  always_comb begin
    row_sel = '0;
    row_sel[ptr[$clog2(ROWS)-1:0]] = 1'b1;
  end

endmodule
