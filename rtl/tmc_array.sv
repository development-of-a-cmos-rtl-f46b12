// tmc_array: one channel's time memory, 32 rows x 32 cells, with its column
// I/O.
//
// The cells are dual-port: a row selected by the Write Pointer's word line
// is written while another row, selected by the Read Pointer, drives the
// column lines, so recording and readout run at the same time. A written
// row is the 32 samples the channel's delay line took during the clock
// period just ended; `we` commits it on the closing clock edge. The read
// port is combinational: `rdata` is the row under `rsel`, as the bit lines
// would carry it into the encoder.
//
// For the serial I/O (memory test) mode the column I/O can also read or
// write a single cell: row `rsel`, column `sio_col`. A recording write and
// a serial write that hit the same row in one cycle both take effect (the
// serial bit wins on its own cell). Word lines are one-hot selects from the
// pointer decoders. The dual-port row/column organisation is the chip's;
// the single-cell access path is this design's reading of the serial mode.
`timescale 1ns/1ps
module tmc_array
  import tmc_pkg::*;
(
  input  logic                     clk,
  input  logic                     we,        // commit a recorded row
  input  logic [ROWS-1:0]          wsel,      // one-hot write word line
  input  logic [COLS-1:0]          wdata,
  input  logic [ROWS-1:0]          rsel,      // one-hot read word line
  output logic [COLS-1:0]          rdata,
  input  logic                     sio_we,    // serial I/O single-cell write
  input  logic [$clog2(COLS)-1:0]  sio_col,
  input  logic                     sio_wbit,
  output logic                     sio_rbit
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (we && wsel[r]) mem[r] <= wdata;
      if (sio_we && rsel[r]) mem[r][sio_col] <= sio_wbit;
    end
  end

  // bit lines: wired OR of the selected row
  always_comb begin
    rdata = '0;
    for (int r = 0; r < ROWS; r++) if (rsel[r]) rdata |= mem[r];
  end

  assign sio_rbit = rdata[sio_col];

endmodule
