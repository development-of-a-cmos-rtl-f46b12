// tb_com_pulse_gen: checks that COM is a 10 ns pulse starting 60 ns after
// the START edge in common start mode and after the STOP edge in common
// stop mode, and that the other input is ignored.
`timescale 1ns/1ps
module tb_com_pulse_gen;

  logic start_in = 0, stop_in = 0, mode_cstop = 0, com;
  int checks = 0, failures = 0;

  com_pulse_gen dut (.start_in, .stop_in, .mode_cstop, .com);

  task automatic expect_level(input logic exp, input string what);
    checks++;
    if (com !== exp) begin
      failures++;
      $display("FAIL %s at %0t: com=%b", what, $time, com);
    end
  endtask

  task automatic pulse_and_check(input bit use_stop, input bit expect_com);
    realtime w;
    w = 12.0;
    if (use_stop) stop_in = 1; else start_in = 1;
    #(w);
    stop_in = 0; start_in = 0;
    #(60.0 - w - 0.2) expect_level(0, "before delay");
    #0.4 expect_level(expect_com, "pulse start");
    #9.6 expect_level(expect_com, "pulse end");
    #0.4 expect_level(0, "after 10 ns");
    #100;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    mode_cstop = 0;
    repeat (3) begin pulse_and_check(0, 1); pulse_and_check(1, 0); end
    mode_cstop = 1;
    #200;
    repeat (3) begin pulse_and_check(1, 1); pulse_and_check(0, 0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
