// tmc_camac_module: 32-channel multi-hit TDC in CAMAC built from eight
// TMC1004 time memory chips, with 1 ns bins over 1.024 us (or 16 channels
// over 2.048 us, or 8 over 4.096 us).
//
// Signal path: each input is stretched to at least 32 ns (input_latch), so
// a chip row never sees two rising edges; a per-chip multiplexer
// (input_mpx) gives the chip either the inputs or COM, the START or STOP
// pulse delayed by 60 ns and shaped to 10 ns (com_pulse_gen). The timing
// control (timing_control) raises WSTART to make all chips record one row
// per 32 ns WCLK period and drives SEL so that the reference pulse lands in
// two rows at the start (common start) or end (common stop) of the record.
// WCLK is the 62.5 MHz oscillator divided by two (clock_gen). The CAMAC
// interface (camac_if) gives access to the chips' registers and encoded
// data, one chip per sub-address, and issues reset and start.
//
// A hit time is the difference between the hit's recorded position
// (row * 32 + encoded cell) and that of the reference pulse in the same
// chip, so the asynchronous START/STOP phase cancels out.
//
// Switch inputs: mode_cstop (common start / common stop), preset_sw (rows
// recorded in common start), range_sel (channel cascading). The ECL/NIM
// receivers are outside: inputs here are logic levels. Structure and
// numbers follow the published module; the register and dataway details
// chosen in the sub-blocks are documented there.
`timescale 1ns/1ps
module tmc_camac_module
  import tmc_pkg::*;
#(
  parameter int unsigned N_CHIPS = 8
) (
  input  logic                   osc,          // 62.5 MHz oscillator
  input  logic [N_CHIPS*N_CH-1:0] ch_in,       // CH0..CH31
  input  logic                   start_in,
  input  logic                   stop_in,
  input  logic                   mode_cstop,   // switch: 0 CSTART, 1 CSTOP
  input  logic [PRESET_W-1:0]    preset_sw,
  input  range_e                 range_sel,
  input  logic                   camac_n,
  input  logic [3:0]             camac_a,
  input  logic [4:0]             camac_f,
  input  logic                   camac_s1,
  input  logic                   camac_s2,
  input  logic                   camac_z,
  input  logic                   camac_c,
  input  logic [23:0]            camac_w,
  output logic [23:0]            camac_r,
  output logic                   camac_q,
  output logic                   camac_x,
  output logic                   sync_out,
  output logic                   wclk
);

  logic                 wstart, sel, com, f25, tc_rst, chip_rst;
  logic [PRESET_W-1:0]  count;
  logic [N_CHIPS*N_CH-1:0] ch_latched;
  logic [N_CHIPS-1:0]   cs_n, ds_n;
  csr_sel_e             csr_addr;
  logic                 csr_we;
  logic [CSR_W-1:0]     cio_in;
  logic [CSR_W-1:0]     cio_out [N_CHIPS];
  code_t                dout    [N_CHIPS][N_CH];

  clock_gen u_clk (.osc, .wclk);

  timing_control u_tc (
    .clk(wclk), .rst(tc_rst), .mode_cstop, .preset(preset_sw),
    .start_in, .stop_in, .f25, .wstart, .sel, .sync_out, .count
  );

  com_pulse_gen u_com (.start_in, .stop_in, .mode_cstop, .com);

  camac_if #(.N_CHIPS(N_CHIPS)) u_camac (
    .clk(wclk), .n(camac_n), .a(camac_a), .f(camac_f), .s1(camac_s1), .s2(camac_s2),
    .z(camac_z), .c(camac_c), .w(camac_w), .r(camac_r), .q(camac_q), .x(camac_x),
    .cs_n, .csr_addr, .csr_we, .cio_in, .cio_out, .dout, .ds_n, .chip_rst,
    .tc_rst, .f25
  );

  for (genvar i = 0; i < int'(N_CHIPS * N_CH); i++) begin : g_in
    input_latch u_latch (.sig_in(ch_in[i]), .sig_out(ch_latched[i]));
  end

  for (genvar k = 0; k < int'(N_CHIPS); k++) begin : g_chip
    logic [N_CH-1:0] tin;

    input_mpx u_mpx (
      .ch_in(ch_latched[k*N_CH +: N_CH]), .com, .sel, .range_sel, .tin
    );

    tmc1004 u_tmc (
      .clk(wclk), .rst(chip_rst), .tin, .wstart, .range_sel,
      .cs_n(cs_n[k]), .csr_addr, .csr_we, .cio_in, .cio_out(cio_out[k]),
      .ds_n(ds_n[k]), .dout(dout[k])
    );
  end

endmodule
