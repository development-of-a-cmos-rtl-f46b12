// tb_clock_gen: checks that WCLK toggles on every oscillator edge, giving a
// 32 ns period from the 16 ns (62.5 MHz) oscillator.
`timescale 1ns/1ps
module tb_clock_gen;

  logic osc = 0, wclk;
  realtime last_rise = -1.0;
  int checks = 0, failures = 0;

  clock_gen dut (.osc, .wclk);

  always #8 osc = ~osc;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wclk) begin
    if (last_rise >= 0.0) begin
      checks++;
      if ($realtime - last_rise != 32.0) begin
        failures++;
        $display("FAIL WCLK period %0f ns", $realtime - last_rise);
      end
    end
    last_rise = $realtime;
  end

  initial begin
    #3210;
    checks++;
    if (checks < 90) begin
      failures++;
      $display("FAIL only %0d WCLK periods", checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
