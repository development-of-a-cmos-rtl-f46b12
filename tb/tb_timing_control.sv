// tb_timing_control: checks the recording sequence cycle by cycle.
// Common start: WSTART rises at the first WCLK edge after START (or after an
// F(25) request, which also gives one Sync Out pulse), stays high for
// exactly `preset` clocks (256 for preset 0), SEL is low for the first two
// of them and high for the rest. A second START during a run is ignored.
// Common stop: WSTART and SEL rise after START; at the first edge after
// STOP, SEL drops and WSTART stays high for exactly two more clocks. A reset
// stops a run at once.
`timescale 1ns/1ps
module tb_timing_control;
  import tmc_pkg::*;

  logic clk = 0, rst, mode_cstop, start_in = 0, stop_in = 0, f25 = 0;
  logic [7:0] preset, count;
  logic wstart, sel, sync_out;
  int checks = 0, failures = 0;

  timing_control dut (.clk, .rst, .mode_cstop, .preset, .start_in, .stop_in, .f25,
                      .wstart, .sel, .sync_out, .count);

  always #16 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // 12 ns pulse at a random phase within the current clock period
  task automatic pulse(ref logic s);
    @(posedge clk);
    #(1.0 + real'($urandom % 180) * 0.1);
    s = 1; #12 s = 0;
  endtask

  // counts the clocks with wstart high and checks SEL along the way
  task automatic common_start_run(input int p, input bit by_f25);
    int n, rows;
    rows = (p == 0) ? 256 : p;
    preset = 8'(p);
    if (by_f25) begin
      @(negedge clk); f25 = 1; @(negedge clk); f25 = 0;
      expect_eq(sync_out, 1, "sync out after F25");
      expect_eq(wstart, 1, "wstart after F25");
    end else begin
      pulse(start_in);
      @(posedge clk); #1;
      expect_eq(sync_out, 0, "no sync out after START");
    end
    n = 0;
    while (wstart && n < 400) begin
      expect_eq(sel, (n >= 2), $sformatf("SEL in row %0d", n));
      if (n == 5 && rows > 8) fork pulse(start_in); join_none   // ignored
      n++;
      @(posedge clk); #1;
    end
    expect_eq(n, rows, "rows recorded in common start");
    expect_eq(sel, 0, "SEL low after run");
    repeat (3) @(posedge clk); #1;
    expect_eq(wstart, 0, "no restart from START during run");
  endtask

  task automatic common_stop_run(input int rows_before);
    int n;
    pulse(start_in);
    @(posedge clk); #1;
    expect_eq(wstart, 1, "wstart after START (common stop)");
    expect_eq(sel, 1, "SEL high in common stop");
    repeat (rows_before) @(posedge clk);
    pulse(stop_in);
    @(posedge clk); #1;
    expect_eq(sel, 0, "SEL low after STOP");
    n = 0;
    while (wstart && n < 10) begin n++; @(posedge clk); #1; end
    expect_eq(n, 2, "rows after STOP");
  endtask

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; mode_cstop = 0; preset = 8'd10;
    repeat (2) @(posedge clk); #1 rst = 0;
    expect_eq(wstart, 0, "idle after reset");
    common_start_run(10, 0);
    common_start_run(34, 1);
    common_start_run(3, 0);
    common_start_run(0, 0);
    mode_cstop = 1;
    common_stop_run(5);
    common_stop_run(40);
    // a STOP while idle does nothing
    pulse(stop_in);
    repeat (3) @(posedge clk); #1;
    expect_eq(wstart, 0, "STOP while idle");
    // reset aborts a run
    pulse(start_in);
    repeat (4) @(posedge clk);
    #1 rst = 1; @(posedge clk); #1 rst = 0;
    expect_eq(wstart, 0, "reset stops run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
