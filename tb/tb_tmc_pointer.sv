// tb_tmc_pointer: checks the 7-bit pointer: reset, increment, load
// priority over increment, wrap from 127 to 0 and the one-hot row decode
// of the low five bits, against a software model, over random stimulus.
`timescale 1ns/1ps
module tb_tmc_pointer;
  import tmc_pkg::*;

  logic clk = 0, rst, load, inc;
  ptr_t load_val, ptr;
  logic [31:0] row_sel;
  int checks = 0, failures = 0;
  int model;

  tmc_pointer dut (.clk, .rst, .load, .load_val, .inc, .ptr, .row_sel);

  always #16 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; inc = 0; load_val = '0;
    @(posedge clk); #1 rst = 0;
    model = 0;
    for (int t = 0; t < 2000; t++) begin
      load = ($urandom % 8) == 0;
      inc  = ($urandom % 4) != 0;
      load_val = ptr_t'($urandom);
      if (t == 100) begin load = 1; load_val = 7'd125; end
      @(posedge clk);
      if (load) model = load_val;
      else if (inc) model = (model + 1) % 128;
      #1;
      checks++;
      if (ptr !== 7'(model) || row_sel !== (32'd1 << (model % 32))) begin
        failures++;
        $display("FAIL t=%0d ptr=%0d row_sel=%h model=%0d", t, ptr, row_sel, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
