// tb_input_latch: checks the input stretcher: the output rises together with
// the input, a short pulse comes out 32 ns long, a long pulse comes out
// unchanged, and the output is low between pulses.
`timescale 1ns/1ps
module tb_input_latch;

  logic sig_in = 0, sig_out;
  int checks = 0, failures = 0;

  input_latch dut (.sig_in, .sig_out);

  task automatic expect_level(input logic exp, input string what);
    checks++;
    if (sig_out !== exp) begin
      failures++;
      $display("FAIL %s at %0t: out=%b", what, $time, sig_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50;
    repeat (20) begin
      realtime w;
      w = 2.0 + real'($urandom % 80) + 0.5;
      sig_in = 1;
      #0.01 expect_level(1, "rise follows input");
      #(w - 0.01) sig_in = 0;
      if (w < 32.0) begin
        #(32.0 - w - 0.1) expect_level(1, "short pulse held");
        #0.2 expect_level(0, "short pulse released at 32 ns");
      end else begin
        #0.1 expect_level(0, "long pulse passes");
      end
      #(40.0 + real'($urandom % 30)) expect_level(0, "idle low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
