// tmc1004: the four-channel Time Memory Cell TDC chip.
//
// Each channel records its timing input TIN continuously into a 32 x 32
// array of time memory cells: during every 32 ns period of CLK a delay line
// takes 32 samples of TIN, 1 ns apart, and at the end of the period they are
// written as one row at the Write Pointer, which then advances. The array
// thus holds the last 1.024 us of the input with 1 ns bins. Readout is
// independent: the Read Pointer selects a row of every array, each row is
// encoded to 6 bits (tmc_encoder) and appears on DOUT0..3.
//
// Interface:
//   clk        CLK, the 31.25 MHz write clock (period = 32 cell delays)
//   wstart     record: while high, rows are written and the Write Pointer
//              advances each clock (the module's WSTART)
//   tin[3:0]   TIN0..3 timing inputs
//   cs_n, csr_addr, csr_we, cio_in/cio_out   register access (tmc_csr)
//   ds_n       data strobe: in slave mode, each clock edge with ds_n low
//              advances the Read Pointer (auto-increment after a readout)
//   range_sel  channel cascading, see below
//   dout       encoded rows, combinational from the Read Pointer
//
// Cascading: the pointers are 7 bits although an array has 32 rows. With
// range_sel = 2 us, arrays 0/1 and 2/3 form 64-row memories (array a is
// written while wp[5] == a[0]); with 4 us all four form one 128-row memory
// (written while wp[6:5] == a). The module feeds the same input to the
// cascaded channels. The chip, its pointers, encoders and registers follow
// the published block diagram; how the cascade selects arrays, the separate
// csr_addr/csr_we pins and the split CIO bus are this design's choices.
// The delay lines are behavioural models; everything else is synthesizable.
`timescale 1ns/1ps
module tmc1004
  import tmc_pkg::*;
#(
  parameter realtime TAP = 1.0ns   // cell delay held by the feedback loop
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N_CH-1:0]     tin,
  input  logic                wstart,
  input  range_e              range_sel,
  input  logic                cs_n,
  input  csr_sel_e            csr_addr,
  input  logic                csr_we,
  input  logic [CSR_W-1:0]    cio_in,
  output logic [CSR_W-1:0]    cio_out,
  input  logic                ds_n,
  output code_t               dout [N_CH]
);

  localparam int unsigned ROW_W = $clog2(ROWS);

  tmc_mode_e        mode;
  ptr_t             wp, rp, ptr_val;
  logic             rp_load, wp_load;
  logic [ROWS-1:0]  wsel, rsel;
  logic             sio_we;
  logic [N_CH-1:0]  sio_wbits, sio_rbits;

  tmc_pointer u_wp (
    .clk, .rst, .load(wp_load), .load_val(ptr_val), .inc(wstart),
    .ptr(wp), .row_sel(wsel)
  );

  tmc_pointer u_rp (
    .clk, .rst, .load(rp_load), .load_val(ptr_val),
    .inc(mode == MODE_SLAVE && !ds_n),
    .ptr(rp), .row_sel(rsel)
  );

  tmc_csr u_csr (
    .clk, .rst, .cs_n, .csr_addr, .csr_we, .cio_in, .cio_out, .mode,
    .rp, .wp, .rp_load, .wp_load, .ptr_val,
    .sio_we, .sio_wbits, .sio_rbits
  );

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    logic [COLS-1:0] samples, row;
    logic            array_en;
    logic            wl_end;   // end of the delay chain, not used

    always_comb begin
      unique case (range_sel)
        RANGE_2US: array_en = (wp[ROW_W] == ch[0]);
        RANGE_4US: array_en = (wp[ROW_W+1:ROW_W] == 2'(ch));
        default:   array_en = 1'b1;
      endcase
    end

    tmc_delay_line #(.N_TAPS(COLS), .TAP(TAP)) u_line (
      .wl(clk), .tin(tin[ch]), .row(samples), .wl_end(wl_end)
    );

    tmc_array u_array (
      .clk, .we(wstart && array_en), .wsel, .wdata(samples),
      .rsel, .rdata(row),
      .sio_we, .sio_col(wp[ROW_W-1:0]), .sio_wbit(sio_wbits[ch]),
      .sio_rbit(sio_rbits[ch])
    );

    tmc_encoder u_enc (.row, .code(dout[ch]));
  end

endmodule
