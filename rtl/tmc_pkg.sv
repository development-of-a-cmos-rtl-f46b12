// tmc_pkg: sizes, types and command codes shared by the TMC1004 time memory
// chip and the 32-channel CAMAC TDC module built around it.
//
// The chip has four channels, each a 32 x 32 array of time memory cells: a
// row holds 32 samples taken 1 ns apart, so one row covers one 32 ns period
// of the 31.25 MHz write clock and an array covers 1.024 us. Pointers are
// 7-bit counters, chip registers are 7 bits wide and a row is encoded to a
// 6-bit word. These numbers, the chip modes and the CAMAC function codes
// follow the published description of the chip and module; nothing here
// is a free choice except the names.
`timescale 1ns/1ps
package tmc_pkg;

  localparam int unsigned N_CH    = 4;   // channels per chip
  localparam int unsigned ROWS    = 32;  // rows per channel array
  localparam int unsigned COLS    = 32;  // cells per row (1 ns each)
  localparam int unsigned PTR_W   = 7;   // Write / Read Pointer width
  localparam int unsigned CODE_W  = 6;   // encoded row width
  localparam int unsigned CSR_W   = 7;   // chip register width (CIO bus)
  localparam int unsigned PRESET_W = 8;  // F579 counter / F521 comparator

  typedef logic [CODE_W-1:0] code_t;
  typedef logic [PTR_W-1:0]  ptr_t;

  // CSR0 MODE field (MOD1, MOD0)
  typedef enum logic [1:0] {
    MODE_STANDALONE = 2'd0,  // read the row under the Read Pointer
    MODE_SLAVE      = 2'd1,  // same, Read Pointer advances after each readout
    MODE_SERIAL     = 2'd2,  // bit-level access for memory testing
    MODE_UNUSED     = 2'd3
  } tmc_mode_e;

  // chip register numbers
  typedef enum logic [1:0] {
    CSR_MODE = 2'd0,  // CSR0: MOD1 MOD0 SIO3..SIO0
    CSR_RP   = 2'd1,  // CSR1: Read Pointer / row address
    CSR_WP   = 2'd2   // CSR2: Write Pointer / column address
  } csr_sel_e;

  // channel cascading of the module (channels x range)
  typedef enum logic [1:0] {
    RANGE_1US = 2'd0,  // 32 channels, 1.024 us
    RANGE_2US = 2'd1,  // 16 channels, 2.048 us
    RANGE_4US = 2'd2   //  8 channels, 4.096 us
  } range_e;

  // CAMAC functions the module answers
  localparam logic [4:0] F_READ_DATA = 5'd0;
  localparam logic [4:0] F_READ_CSR0 = 5'd1;
  localparam logic [4:0] F_READ_CSR1 = 5'd4;
  localparam logic [4:0] F_READ_CSR2 = 5'd6;
  localparam logic [4:0] F_RESET     = 5'd9;
  localparam logic [4:0] F_WRITE_CSR0 = 5'd17;
  localparam logic [4:0] F_WRITE_CSR1 = 5'd20;
  localparam logic [4:0] F_WRITE_CSR2 = 5'd22;
  localparam logic [4:0] F_START     = 5'd25;

endpackage
