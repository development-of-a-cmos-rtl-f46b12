// tb_tmc_array: checks the 32x32 dual-port array: rows written under the
// write word line are read back under the read word line, reads and writes
// of different rows in the same cycle do not disturb each other, and
// single-cell serial writes and reads hit only the addressed cell.
`timescale 1ns/1ps
module tb_tmc_array;
  import tmc_pkg::*;

  logic clk = 0, we, sio_we, sio_wbit, sio_rbit;
  logic [31:0] wsel, rsel, wdata, rdata;
  logic [4:0] sio_col;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  tmc_array dut (.clk, .we, .wsel, .wdata, .rsel, .rdata, .sio_we, .sio_col, .sio_wbit, .sio_rbit);

  always #16 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; sio_we = 0; sio_wbit = 0; sio_col = 0; wsel = 1; rsel = 1; wdata = 0;
    // fill every row
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wsel = 32'd1 << r; wdata = $urandom; model[r] = wdata;
    end
    @(negedge clk); we = 0;
    // random concurrent traffic
    for (int t = 0; t < 1500; t++) begin
      int wr, rr;
      wr = $urandom % 32;
      rr = $urandom % 32;
      @(negedge clk);
      we = ($urandom % 2) == 1; wsel = 32'd1 << wr; wdata = $urandom;
      rsel = 32'd1 << rr;
      sio_we = !we && (($urandom % 3) == 0);
      sio_col = 5'($urandom); sio_wbit = 1'($urandom);
      #1;
      checks++;
      if (rdata !== model[rr] || sio_rbit !== model[rr][sio_col]) begin
        failures++;
        $display("FAIL t=%0d row %0d read %h expected %h", t, rr, rdata, model[rr]);
      end
      @(posedge clk);
      if (we) model[wr] = wdata;
      if (sio_we) model[rr][sio_col] = sio_wbit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
