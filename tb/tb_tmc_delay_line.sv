// tb_tmc_delay_line: drives random pulses into one row of time memory cells
// clocked at 32 ns and checks, for each period, that cell k holds the input
// level at (period start + k ns): the 1 ns bin of every edge.
`timescale 1ns/1ps
module tb_tmc_delay_line;

  logic clk = 0, tin = 0, wl_end;
  logic [31:0] row;
  realtime t_rise [$], t_fall [$];
  int checks = 0, failures = 0;

  tmc_delay_line dut (.wl(clk), .tin, .row, .wl_end);

  always #16 clk = ~clk;

  // level of tin at time t from the recorded edge lists
  function automatic logic level_at(realtime t);
    foreach (t_rise[i])
      if (t_rise[i] <= t && (i >= t_fall.size() || t < t_fall[i])) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulses at random 0.1 ns positions, never on a sampling instant
  initial begin
    #100;
    repeat (60) begin
      realtime w, gap;
      gap = 40.0 + real'($urandom % 600) + 0.1 * real'(1 + $urandom % 9);
      w   = 3.0 + real'($urandom % 60) + 0.5;
      #(gap);
      t_rise.push_back($realtime); tin = 1;
      #(w);
      t_fall.push_back($realtime); tin = 0;
    end
  end

  realtime edge_t = 0.0;
  // at each edge `row` still holds the samples of the period just ended
  always @(posedge clk) begin
    if ($realtime > 40.0) begin
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (row[k] !== level_at(edge_t + real'(k))) begin
          failures++;
          $display("FAIL period at %0t cell %0d = %b", edge_t, k, row[k]);
        end
      end
    end
    edge_t = $realtime;
  end

  initial begin
    #25000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
