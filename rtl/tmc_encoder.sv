// tmc_encoder: turns one 32-cell row of the time memory into a 6-bit word.
//
// Bit 5 of the code is the row's first cell (BIT0), so a reader can tell
// whether the signal was already high when the row began. Bits 4..0 give the
// position k (1..31) of a 0-to-1 transition, i.e. the cell k that holds 1
// while cell k-1 holds 0; with no transition they are 0. This is the encode
// table of the chip: all zeros -> 000000, ...10 -> 000001, 1000...0 ->
// 011111, all ones -> 100000, ...101 -> 100010.
//
// The chip builds it as 31 two-input gates, one per adjacent cell pair,
// each pulling the code lines whose bit is set in its own index (a wired
// ROM). That structure is kept here: the code bits are the OR over all
// active transitions of their index. With several transitions in one row
// the result is therefore the bitwise OR of their positions; the chip makes
// no provision for that case and the module's input stretcher keeps hits
// 32 ns apart. Purely combinational.
`timescale 1ns/1ps
module tmc_encoder
  import tmc_pkg::*;
(
  input  logic [COLS-1:0] row,   // cell k holds the sample taken k ns after the row began
  output code_t           code
);

  logic [COLS-1:1] edge_at;      // one transition detector per adjacent pair

  always_comb begin
    for (int k = 1; k < COLS; k++) edge_at[k] = row[k] & ~row[k-1];
  end

  always_comb begin
    code = '0;
    code[CODE_W-1] = row[0];
    for (int k = 1; k < COLS; k++) begin
      if (edge_at[k]) code[CODE_W-2:0] = code[CODE_W-2:0] | 5'(k);
    end
  end

endmodule
