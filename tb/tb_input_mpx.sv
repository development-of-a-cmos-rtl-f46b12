// tb_input_mpx: checks the chip input multiplexer over all input patterns:
// SEL low gives COM on all four channels, SEL high gives the inputs, routed
// per range (1 us: straight, 2 us: inputs 0 and 2 to channel pairs,
// 4 us: input 0 to all).
`timescale 1ns/1ps
module tb_input_mpx;
  import tmc_pkg::*;

  logic [3:0] ch_in, tin, exp;
  logic com, sel;
  range_e range_sel;
  int checks = 0, failures = 0;

  input_mpx dut (.ch_in, .com, .sel, .range_sel, .tin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++)
      for (int v = 0; v < 64; v++) begin
        range_sel = range_e'(r);
        {sel, com, ch_in} = 6'(v);
        if (!sel)      exp = {4{com}};
        else if (r == 0) exp = ch_in;
        else if (r == 1) exp = {ch_in[2], ch_in[2], ch_in[0], ch_in[0]};
        else           exp = {4{ch_in[0]}};
        #1;
        checks++;
        if (tin !== exp) begin
          failures++;
          $display("FAIL range %0d sel %b com %b in %b: tin %b expected %b", r, sel, com, ch_in, tin, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
