// camac_if: the module's CAMAC dataway interface.
//
// Each TMC chip is one sub-address, A(0)..A(7). Functions:
//   F(0)              read data: the four 6-bit encoded rows of chip A,
//                     channel 0 in R6..R1 up to channel 3 in R24..R19
//   F(1) F(4) F(6)    read CSR0, CSR1, CSR2 of chip A (R7..R1)
//   F(17) F(20) F(22) write CSR0, CSR1, CSR2 of chip A from W7..W1
//   F(9)              reset: stop the timing control
//   F(25)             start recording (common to all chips)
// Z (initialise) resets the chips and the timing control, C (clear) the
// timing control. X and Q answer every accepted command (N present, a
// function above, A below 8).
//
// The interface runs on WCLK. The strobes S1 and S2 are brought in through
// two-flop synchronisers; writes, F(9) and F(25) act on the rising edge of
// S1, Z and C on that of S2. After an F(0) read, the rising edge of S2
// drives DS* of chip A low for one clock so that a chip in slave mode
// advances its Read Pointer. Read data are driven combinationally while N
// and a read function are present. Bit 1 of the dataway is bit 0 here.
// The function list and data packing follow the module description; the
// strobe handling, Q = X and the bit order within R24..R1 are this
// design's choices.
`timescale 1ns/1ps
module camac_if
  import tmc_pkg::*;
#(
  parameter int unsigned N_CHIPS = 8
) (
  input  logic                 clk,
  // dataway
  input  logic                 n,
  input  logic [3:0]           a,
  input  logic [4:0]           f,
  input  logic                 s1,
  input  logic                 s2,
  input  logic                 z,
  input  logic                 c,
  input  logic [23:0]          w,
  output logic [23:0]          r,
  output logic                 q,
  output logic                 x,
  // chips
  output logic [N_CHIPS-1:0]   cs_n,
  output csr_sel_e             csr_addr,
  output logic                 csr_we,
  output logic [CSR_W-1:0]     cio_in,
  input  logic [CSR_W-1:0]     cio_out [N_CHIPS],
  input  code_t                dout    [N_CHIPS][N_CH],
  output logic [N_CHIPS-1:0]   ds_n,
  output logic                 chip_rst,
  // timing control
  output logic                 tc_rst,
  output logic                 f25
);

  logic [1:0] s1_sync, s2_sync;
  logic       s1_d, s2_d, s1_rise, s2_rise;

  always_ff @(posedge clk) begin
    s1_sync <= {s1_sync[0], s1};
    s2_sync <= {s2_sync[0], s2};
    s1_d    <= s1_sync[1];
    s2_d    <= s2_sync[1];
  end

  assign s1_rise = s1_sync[1] & ~s1_d;
  assign s2_rise = s2_sync[1] & ~s2_d;

  logic addr_ok, is_read_data, is_read_csr, is_write_csr, is_reset, is_start;
  logic [$clog2(N_CHIPS)-1:0] chip;

  assign addr_ok = n && a < 4'(N_CHIPS);
  assign chip    = a[$clog2(N_CHIPS)-1:0];

  always_comb begin
    is_read_data = 1'b0;
    is_read_csr  = 1'b0;
    is_write_csr = 1'b0;
    is_reset     = 1'b0;
    is_start     = 1'b0;
    csr_addr     = CSR_MODE;
    unique case (f)
      F_READ_DATA:  is_read_data = 1'b1;
      F_READ_CSR0:  begin is_read_csr  = 1'b1; csr_addr = CSR_MODE; end
      F_READ_CSR1:  begin is_read_csr  = 1'b1; csr_addr = CSR_RP;   end
      F_READ_CSR2:  begin is_read_csr  = 1'b1; csr_addr = CSR_WP;   end
      F_WRITE_CSR0: begin is_write_csr = 1'b1; csr_addr = CSR_MODE; end
      F_WRITE_CSR1: begin is_write_csr = 1'b1; csr_addr = CSR_RP;   end
      F_WRITE_CSR2: begin is_write_csr = 1'b1; csr_addr = CSR_WP;   end
      F_RESET:      is_reset = 1'b1;
      F_START:      is_start = 1'b1;
      default: ;
    endcase
  end

  assign x = addr_ok && (is_read_data || is_read_csr || is_write_csr || is_reset || is_start);
  assign q = x;

  always_comb begin
    cs_n = '1;
    if (addr_ok && (is_read_csr || is_write_csr)) cs_n[chip] = 1'b0;
  end

  assign cio_in = w[CSR_W-1:0];
  assign csr_we = s1_rise && addr_ok && is_write_csr;
  assign f25    = s1_rise && addr_ok && is_start;
  assign chip_rst = s2_rise && z;
  assign tc_rst   = (s2_rise && (z || c)) || (s1_rise && addr_ok && is_reset);

  always_ff @(posedge clk) begin
    ds_n <= '1;
    if (s2_rise && addr_ok && is_read_data) ds_n[chip] <= 1'b0;
  end

  always_comb begin
    r = '0;
    if (addr_ok && is_read_data)
      for (int ch = 0; ch < int'(N_CH); ch++) r[ch*CODE_W +: CODE_W] = dout[chip][ch];
    else if (addr_ok && is_read_csr)
      r[CSR_W-1:0] = cio_out[chip];
  end

endmodule
