// tb_tmc_csr: checks the chip register file: mode writes and read-back,
// pointer load strobes and read-back of the present pointer values, the
// serial I/O write strobe (only when the written mode is serial) and the
// SIO read bits (only visible in serial mode), and that nothing happens
// with CS* high.
`timescale 1ns/1ps
module tb_tmc_csr;
  import tmc_pkg::*;

  logic clk = 0, rst, cs_n, csr_we;
  csr_sel_e csr_addr;
  logic [6:0] cio_in, cio_out;
  tmc_mode_e mode;
  ptr_t rp, wp, ptr_val;
  logic rp_load, wp_load, sio_we;
  logic [3:0] sio_wbits, sio_rbits;
  int checks = 0, failures = 0;

  tmc_csr dut (.clk, .rst, .cs_n, .csr_addr, .csr_we, .cio_in, .cio_out, .mode,
               .rp, .wp, .rp_load, .wp_load, .ptr_val, .sio_we, .sio_wbits, .sio_rbits);

  always #16 clk = ~clk;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cs_n = 1; csr_we = 0; csr_addr = CSR_MODE; cio_in = 0;
    rp = 7'd37; wp = 7'd101; sio_rbits = 4'b1010;
    @(posedge clk); #1 rst = 0;
    expect_eq(mode, MODE_STANDALONE, "mode after reset");
    // reads
    cs_n = 0; csr_addr = CSR_RP; #1 expect_eq(cio_out, 37, "read CSR1");
    csr_addr = CSR_WP; #1 expect_eq(cio_out, 101, "read CSR2");
    csr_addr = CSR_MODE; #1 expect_eq(cio_out, 0, "read CSR0 standalone");
    cs_n = 1; csr_addr = CSR_RP; #1 expect_eq(cio_out, 0, "no read without CS");
    // pointer loads
    cs_n = 0; csr_we = 1; csr_addr = CSR_RP; cio_in = 7'd99;
    #1 expect_eq({rp_load, wp_load, sio_we}, 3'b100, "CSR1 write strobes");
    expect_eq(ptr_val, 99, "load value");
    csr_addr = CSR_WP;
    #1 expect_eq({rp_load, wp_load, sio_we}, 3'b010, "CSR2 write strobes");
    cs_n = 1;
    #1 expect_eq({rp_load, wp_load, sio_we}, 3'b000, "no write without CS");
    // mode slave
    cs_n = 0; csr_addr = CSR_MODE; cio_in = 7'b0011111;
    #1 expect_eq(sio_we, 0, "no SIO write in slave mode");
    @(posedge clk); #1 expect_eq(mode, MODE_SLAVE, "mode slave");
    csr_we = 0; #1 expect_eq(cio_out, 7'b0010000, "read CSR0 slave");
    // serial mode write
    csr_we = 1; cio_in = 7'b0100110;
    #1 expect_eq(sio_we, 1, "SIO write strobe");
    expect_eq(sio_wbits, 4'b0110, "SIO bits");
    @(posedge clk); #1 csr_we = 0;
    expect_eq(mode, MODE_SERIAL, "mode serial");
    #1 expect_eq(cio_out, 7'b0101010, "read CSR0 serial");
    sio_rbits = 4'b0101; #1 expect_eq(cio_out, 7'b0100101, "read CSR0 serial 2");
    // write ignored without CS
    cs_n = 1; csr_we = 1; cio_in = 7'b0000000;
    @(posedge clk); #1 expect_eq(mode, MODE_SERIAL, "mode held without CS");
    rst = 1; @(posedge clk); #1 expect_eq(mode, MODE_STANDALONE, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
