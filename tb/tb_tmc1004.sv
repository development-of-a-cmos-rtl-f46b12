// tb_tmc1004: end-to-end test of one chip. Random pulses (at least 33 ns
// wide and apart, on 0.1 ns positions) drive the four timing inputs while
// the chip records. The test keeps its own record of which clock period
// went into which row and computes, from the pulse edge times alone, the
// 32 one-ns samples of every row and their 6-bit code. It checks:
//   - standalone mode: every row read through CSR1 + DOUT, all channels,
//     after the Write Pointer has wrapped past the 32 rows,
//   - the Write and Read Pointer values read back through CSR2 / CSR1,
//   - slave mode: DS* advances the Read Pointer by one row per strobe,
//   - serial I/O mode: single cells written and read through CSR0,
//   - reading while recording: DS* held low in slave mode, the Read
//     Pointer trails the Write Pointer and sees each row once written,
//   - 4 us cascading: 128 consecutive rows spread over the four arrays.
`timescale 1ns/1ps
module tb_tmc1004;
  import tmc_pkg::*;

  logic clk = 0, rst, wstart, cs_n, csr_we, ds_n;
  logic [3:0] tin = '0;
  range_e range_sel;
  csr_sel_e csr_addr;
  logic [6:0] cio_in, cio_out;
  code_t dout [4];

  int checks = 0, failures = 0;
  realtime rise [4][$], fall [4][$];
  realtime row_t [128];        // start of the period recorded in a row
  int wp_model;
  bit gen_on = 0;

  tmc1004 dut (.clk, .rst, .tin, .wstart, .range_sel, .cs_n, .csr_addr, .csr_we,
               .cio_in, .cio_out, .ds_n, .dout);

  always #16 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse generators
  for (genvar c = 0; c < 4; c++) begin : g_gen
    initial begin
      realtime gap, w;
      forever begin
        gap = 33.0 + real'($urandom % 150) + 0.1 * real'(1 + $urandom % 9);
        w   = 33.0 + real'($urandom % 40);
        #(gap);
        if (gen_on) begin
          rise[c].push_back($realtime); tin[c] = 1'b1;
          #(w);
          fall[c].push_back($realtime); tin[c] = 1'b0;
        end
      end
    end
  end

  function automatic logic level_at(int c, realtime t);
    foreach (rise[c][i])
      if (rise[c][i] <= t && (i >= fall[c].size() || t < fall[c][i])) return 1'b1;
    return 1'b0;
  endfunction

  // reference code of the period starting at t0 on channel c
  function automatic code_t ref_code(int c, realtime t0);
    logic [31:0] s;
    code_t k;
    for (int b = 0; b < 32; b++) s[b] = level_at(c, t0 + real'(b));
    k = {s[0], 5'd0};
    for (int b = 1; b < 32; b++) if (s[b] && !s[b-1]) k[4:0] = 5'(b);
    return k;
  endfunction

  // track what the chip records: at each edge with wstart high, the period
  // just ended goes to row wp_model
  always @(posedge clk) begin
    if (wstart) begin
      row_t[wp_model] = $realtime - 32.0;
      wp_model = (wp_model + 1) % 128;
    end
  end

  task automatic csr_write(input csr_sel_e a, input logic [6:0] v);
    @(negedge clk);
    cs_n = 0; csr_addr = a; csr_we = 1; cio_in = v;
    @(negedge clk);
    cs_n = 1; csr_we = 0;
  endtask

  task automatic csr_read(input csr_sel_e a, output logic [6:0] v);
    @(negedge clk);
    cs_n = 0; csr_addr = a; csr_we = 0;
    #1 v = cio_out;
    cs_n = 1;
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic record(input int start_row, input int n_rows);
    csr_write(CSR_WP, 7'(start_row));
    wp_model = start_row;
    @(posedge clk); #1 wstart = 1;
    repeat (n_rows) @(posedge clk);
    #1 wstart = 0;
  endtask

  logic [6:0] v;

  initial begin
    rst = 1; wstart = 0; cs_n = 1; csr_we = 0; ds_n = 1; cio_in = 0;
    csr_addr = CSR_MODE; range_sel = RANGE_1US;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    gen_on = 1;

    // ---- 1 us: record 45 rows from row 5, so rows 5..17 are overwritten
    record(5, 45);
    csr_read(CSR_WP, v);
    expect_eq(v, 50, "write pointer after 45 rows");
    for (int r = 0; r < 32; r++) begin
      int last;
      csr_write(CSR_RP, 7'(r));
      csr_read(CSR_RP, v);
      expect_eq(v, r, "read pointer read back");
      // the most recent recording of physical row r
      last = (r >= 18) ? r : r + 32;
      if (r < 5) last = r + 32;
      for (int c = 0; c < 4; c++)
        expect_eq(dout[c], ref_code(c, row_t[last]), $sformatf("standalone row %0d ch %0d", r, c));
    end

    // ---- slave mode: DS* advances the Read Pointer
    csr_write(CSR_RP, 7'd30);
    csr_write(CSR_MODE, {1'b0, MODE_SLAVE, 4'b0});
    for (int i = 0; i < 8; i++) begin
      int rr, last;
      rr = (30 + i) % 32;
      last = (rr >= 18) ? rr : rr + 32;
      if (rr < 5) last = rr + 32;
      #1;
      for (int c = 0; c < 4; c++)
        expect_eq(dout[c], ref_code(c, row_t[last]), $sformatf("slave row %0d ch %0d", rr, c));
      @(negedge clk); ds_n = 0;
      @(negedge clk); ds_n = 1;
    end
    csr_read(CSR_RP, v);
    expect_eq(v, 38, "read pointer after 8 slave readouts");
    // in standalone mode DS* does nothing
    csr_write(CSR_MODE, {1'b0, MODE_STANDALONE, 4'b0});
    @(negedge clk); ds_n = 0;
    @(negedge clk); ds_n = 1;
    csr_read(CSR_RP, v);
    expect_eq(v, 38, "read pointer held in standalone mode");

    // ---- serial I/O: write row 3 cell by cell, channel c gets ones from cell 4+3c
    gen_on = 0;
    csr_write(CSR_RP, 7'd3);
    for (int col = 0; col < 32; col++) begin
      logic [3:0] bits;
      for (int c = 0; c < 4; c++) bits[c] = (col >= 4 + 3 * c);
      csr_write(CSR_WP, 7'(col));
      csr_write(CSR_MODE, {1'b0, MODE_SERIAL, bits});
    end
    csr_write(CSR_WP, 7'd9);
    csr_read(CSR_MODE, v);
    expect_eq(v, {1'b0, MODE_SERIAL, 4'b0011}, "serial read-back of cell (3,9)");
    csr_write(CSR_MODE, {1'b0, MODE_STANDALONE, 4'b0});
    #1;
    for (int c = 0; c < 4; c++) expect_eq(dout[c], 4 + 3 * c, $sformatf("serial pattern ch %0d", c));

    // ---- deadtimeless: slave mode with DS* held low, the Read Pointer
    // follows the Write Pointer four rows behind, reading while recording
    range_sel = RANGE_1US;
    csr_write(CSR_WP, 7'd20);
    csr_write(CSR_RP, 7'd16);
    csr_write(CSR_MODE, {1'b0, MODE_SLAVE, 4'b0});
    wp_model = 20;
    @(posedge clk); #1 wstart = 1; ds_n = 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      csr_read(CSR_RP, v);
      expect_eq(v, (wp_model + 128 - 4) % 128, "read pointer trails write pointer");
      for (int c = 0; c < 4; c++)
        expect_eq(dout[c], ref_code(c, row_t[v]), $sformatf("concurrent read row %0d ch %0d", v, c));
    end
    @(negedge clk); ds_n = 1; wstart = 0;
    csr_write(CSR_MODE, {1'b0, MODE_STANDALONE, 4'b0});

    // ---- 4 us cascade: 128 consecutive rows, array a takes rows 32a..32a+31
    gen_on = 1;
    range_sel = RANGE_4US;
    record(0, 128);
    for (int r = 0; r < 32; r++) begin
      csr_write(CSR_RP, 7'(r));
      #1;
      for (int a = 0; a < 4; a++)
        expect_eq(dout[a], ref_code(a, row_t[a * 32 + r]), $sformatf("4us array %0d row %0d", a, r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
