// tb_tmc_encoder: checks the 32-to-6 row encoder against the encode table:
// the fixed table rows, every single-transition row with the signal low
// at the row start (code = k), every one with the signal high at the start
// and a later 0-to-1 transition (code = 32 + k), and rows with two
// transitions (code = OR of both positions, the wired-ROM behaviour).
`timescale 1ns/1ps
module tb_tmc_encoder;
  import tmc_pkg::*;

  logic [31:0] row;
  code_t       code;
  int checks = 0, failures = 0;

  tmc_encoder dut (.row, .code);

  task automatic check(input logic [31:0] r, input logic [5:0] exp, input string what);
    row = r;
    #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s: row=%b code=%b expected=%b", what, r, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // table rows
    check(32'h0000_0000, 6'b000000, "all zero");
    check(32'h0000_0002, 6'b000001, "...10");
    check(32'h0000_0004, 6'b000010, "...100");
    check(32'h8000_0000, 6'b011111, "100...0");
    check(32'hFFFF_FFFF, 6'b100000, "all one");
    check(32'h0000_0005, 6'b100010, "...101");
    check(32'h8000_0001, 6'b111111, "10...1");
    // signal low at row start, rises at k, falls again at k+len (or never)
    for (int k = 1; k < 32; k++)
      for (int len = 1; len <= 32 - k; len++) begin
        logic [31:0] r;
        r = '0;
        for (int b = k; b < k + len; b++) r[b] = 1'b1;
        check(r, 6'(k), "rise");
      end
    // signal high at row start until j, low until k, high from k on
    for (int k = 2; k < 32; k++)
      for (int j = 1; j < k; j++) begin
        logic [31:0] r;
        r = '0;
        for (int b = 0; b < j; b++) r[b] = 1'b1;
        for (int b = k; b < 32; b++) r[b] = 1'b1;
        check(r, 6'(32 + k), "hold+rise");
      end
    // two transitions: positions ORed
    for (int t = 0; t < 50; t++) begin
      int k1, k2;
      logic [31:0] r;
      k1 = 1 + ($urandom % 14);
      k2 = k1 + 2 + ($urandom % 14);
      r = '0;
      r[k1] = 1'b1;
      r[k2] = 1'b1;
      check(r, 6'(k1 | k2), "double");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
