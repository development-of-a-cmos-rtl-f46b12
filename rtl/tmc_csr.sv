// tmc_csr: the chip's three registers on the 7-bit CIO bus.
//
//   CSR0  bit 5..4 MOD1 MOD0, bit 3..0 SIO3..SIO0 (bit 6 unused)
//   CSR1  Read Pointer (also the row address in serial I/O mode)
//   CSR2  Write Pointer (also the column address in serial I/O mode)
//
// A write (cs_n low, csr_we high, sampled on the clock edge) to CSR1 or CSR2
// loads the pointer; reading them returns the pointer's present value. A
// write to CSR0 stores the mode; if the written mode is serial I/O, the
// four SIO bits are also written, one per channel, into the cell at row =
// Read Pointer, column = Write Pointer (`sio_we` pulses for that cycle).
// Reading CSR0 returns the mode and, in serial mode, the four cells at that
// address; outside serial mode the SIO bits read as 0. Reads are
// combinational while cs_n is low; cio_out is 0 otherwise.
// Register layout and meaning follow the module description; the
// write-strobe timing and the read-as-zero choices are this design's.
`timescale 1ns/1ps
module tmc_csr
  import tmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,          // synchronous: mode to standalone
  input  logic              cs_n,
  input  csr_sel_e          csr_addr,
  input  logic              csr_we,
  input  logic [CSR_W-1:0]  cio_in,
  output logic [CSR_W-1:0]  cio_out,
  output tmc_mode_e         mode,
  // pointers
  input  ptr_t              rp,
  input  ptr_t              wp,
  output logic              rp_load,
  output logic              wp_load,
  output ptr_t              ptr_val,
  // serial I/O
  output logic              sio_we,
  output logic [N_CH-1:0]   sio_wbits,
  input  logic [N_CH-1:0]   sio_rbits
);

  logic wr;
  assign wr = ~cs_n & csr_we;

  assign rp_load   = wr && csr_addr == CSR_RP;
  assign wp_load   = wr && csr_addr == CSR_WP;
  assign ptr_val   = cio_in[PTR_W-1:0];
  assign sio_we    = wr && csr_addr == CSR_MODE && tmc_mode_e'(cio_in[5:4]) == MODE_SERIAL;
  assign sio_wbits = cio_in[N_CH-1:0];

  always_ff @(posedge clk) begin
    if (rst) mode <= MODE_STANDALONE;
    else if (wr && csr_addr == CSR_MODE) mode <= tmc_mode_e'(cio_in[5:4]);
  end

  always_comb begin
    cio_out = '0;
    if (!cs_n) begin
      unique case (csr_addr)
        CSR_MODE: cio_out = {1'b0, mode, (mode == MODE_SERIAL) ? sio_rbits : 4'b0};
        CSR_RP:   cio_out = rp;
        CSR_WP:   cio_out = wp;
        default:  cio_out = '0;
      endcase
    end
  end

endmodule
