// tb_camac_if: runs CAMAC dataway cycles (N, A, F set up, then S1 and S2
// strobes of 100 ns, asynchronous to WCLK) against the interface with
// stand-in chip outputs, and checks X/Q, the read data packing for F(0) and
// F(1,4,6), the chip select and register number, one write strobe per
// write cycle with the W data, one DS* pulse to the addressed chip after
// F(0), one start pulse for F(25) and the resets for F(9), Z and C.
`timescale 1ns/1ps
module tb_camac_if;
  import tmc_pkg::*;

  logic clk = 0;
  logic n = 0, s1 = 0, s2 = 0, z = 0, c = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic [23:0] w = 0, r;
  logic q, x;
  logic [7:0] cs_n, ds_n;
  csr_sel_e csr_addr;
  logic csr_we, chip_rst, tc_rst, f25;
  logic [6:0] cio_in;
  logic [6:0] cio_out [8];
  code_t dout [8][4];
  int checks = 0, failures = 0;
  int n_we, n_ds, n_f25, n_tc, n_chip;
  logic [7:0] ds_seen;
  logic [6:0] we_data;

  camac_if dut (.clk, .n, .a, .f, .s1, .s2, .z, .c, .w, .r, .q, .x, .cs_n, .csr_addr,
                .csr_we, .cio_in, .cio_out, .dout, .ds_n, .chip_rst, .tc_rst, .f25);

  always #16 clk = ~clk;

  always @(posedge clk) begin
    if (csr_we) begin n_we++; we_data = cio_in; end
    if (ds_n != 8'hFF) begin n_ds++; ds_seen = ~ds_n; end
    if (f25) n_f25++;
    if (tc_rst) n_tc++;
    if (chip_rst) n_chip++;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one dataway cycle; read data and X are sampled in the middle of S1
  task automatic cycle(input logic [3:0] aa, input logic [4:0] ff, input logic [23:0] ww,
                       input logic zz, input logic cc, output logic [23:0] rd, output logic xx);
    n_we = 0; n_ds = 0; n_f25 = 0; n_tc = 0; n_chip = 0; ds_seen = 0;
    #(7.3);
    n = !(zz || cc); a = aa; f = ff; w = ww; z = zz; c = cc;
    #100 s1 = 1;
    #50 rd = r; xx = x;
    #50 s1 = 0;
    #100 s2 = 1;
    #100 s2 = 0;
    #100 n = 0; z = 0; c = 0;
    #200;
  endtask

  logic [23:0] rd;
  logic xx;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      cio_out[k] = 7'(k * 13 + 5);
      for (int ch = 0; ch < 4; ch++) dout[k][ch] = 6'(k * 7 + ch * 11);
    end
    #300;
    // Z: chip and timing-control reset, once each
    cycle(0, 0, 0, 1, 0, rd, xx);
    expect_eq(n_chip, 1, "Z resets chips");
    expect_eq(n_tc, 1, "Z resets timing control");
    cycle(0, 0, 0, 0, 1, rd, xx);
    expect_eq(n_chip, 0, "C leaves chips");
    expect_eq(n_tc, 1, "C resets timing control");
    for (int k = 0; k < 8; k++) begin
      logic [23:0] exp;
      for (int ch = 0; ch < 4; ch++) exp[ch*6 +: 6] = dout[k][ch];
      cycle(4'(k), F_READ_DATA, 0, 0, 0, rd, xx);
      expect_eq(rd, exp, $sformatf("F0 data chip %0d", k));
      expect_eq(xx, 1, "X on F0");
      expect_eq(n_ds, 1, "one DS* pulse");
      expect_eq(ds_seen, 8'd1 << k, "DS* to addressed chip");
      cycle(4'(k), F_READ_CSR1, 0, 0, 0, rd, xx);
      expect_eq(rd, cio_out[k], $sformatf("F4 CSR read chip %0d", k));
      expect_eq(n_we, 0, "no write on read");
      expect_eq(n_ds, 0, "no DS* on CSR read");
    end
    // writes: check chip select and register number while N is up
    begin
      logic [4:0] wf [3] = '{F_WRITE_CSR0, F_WRITE_CSR1, F_WRITE_CSR2};
      csr_sel_e wa [3] = '{CSR_MODE, CSR_RP, CSR_WP};
      for (int i = 0; i < 3; i++) begin
        fork
          cycle(4'(i + 3), wf[i], 24'hABC000 | 24'(i * 17 + 9), 0, 0, rd, xx);
          begin
            #150;
            expect_eq(cs_n, 8'(~(8'd1 << (i + 3))), "chip select on write");
            expect_eq(csr_addr, wa[i], "register number");
          end
        join
        expect_eq(n_we, 1, "one write strobe");
        expect_eq(we_data, 7'(i * 17 + 9), "write data");
        expect_eq(xx, 1, "X on write");
      end
    end
    cycle(2, F_START, 0, 0, 0, rd, xx);
    expect_eq(n_f25, 1, "F25 start");
    expect_eq(xx, 1, "X on F25");
    cycle(2, F_RESET, 0, 0, 0, rd, xx);
    expect_eq(n_tc, 1, "F9 reset");
    expect_eq(n_chip, 0, "F9 leaves chips");
    // unknown function and out-of-range sub-address: no X, no action
    cycle(2, 5'd3, 0, 0, 0, rd, xx);
    expect_eq(xx, 0, "no X for F3");
    cycle(9, F_WRITE_CSR1, 0, 0, 0, rd, xx);
    expect_eq(xx, 0, "no X for A9");
    expect_eq(n_we, 0, "no write for A9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
