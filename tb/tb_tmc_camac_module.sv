// tb_tmc_camac_module: end-to-end test of the 32-channel CAMAC TDC module at
// its full size, driven only through its external pins: inputs, START,
// STOP, the mode/range/preset switches and CAMAC dataway cycles.
//
// Each run arms the chips over CAMAC, makes a measurement with random hit
// times (0.1 ns positions, random START/STOP phase against the clock), reads
// every chip back with F(0) in slave mode and decodes the 6-bit words the
// way acquisition software would: a rising edge is at row*32 + position, or
// at the start of a row whose first-cell bit is set after a row with no
// signal. The hit time is the decoded hit minus the decoded reference pulse
// (plus the 60 ns COM delay); it must match the true time to within one
// 1 ns bin, and every generated hit must be found.
//
// Runs: common start started by START (32 ch, 1 us); common stop started by
// F(25) with Sync Out, after the memory has wrapped; common start over 8
// channels x 4 us and 16 channels x 2 us; serial I/O through CSR0; F(9)
// and C stopping a run.
// Each of these mechanisms is counted and one that never happened fails.
`timescale 1ns/1ps
module tb_tmc_camac_module;
  import tmc_pkg::*;

  logic osc = 0;
  logic [31:0] ch_in = '0;
  logic start_in = 0, stop_in = 0, mode_cstop = 0;
  logic [7:0] preset_sw = 8'd32;
  range_e range_sel = RANGE_1US;
  logic n = 0, s1 = 0, s2 = 0, z = 0, c = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic [23:0] w = 0, r;
  logic q, x, sync_out, wclk;

  tmc_camac_module dut (
    .osc, .ch_in, .start_in, .stop_in, .mode_cstop, .preset_sw, .range_sel,
    .camac_n(n), .camac_a(a), .camac_f(f), .camac_s1(s1), .camac_s2(s2),
    .camac_z(z), .camac_c(c), .camac_w(w), .camac_r(r), .camac_q(q), .camac_x(x),
    .sync_out, .wclk
  );

  always #8 osc = ~osc;   // 62.5 MHz

  int checks = 0, failures = 0;
  int n_cstart = 0, n_cstop = 0, n_sync = 0, n_short = 0, n_long = 0, n_slave = 0,
      n_serial = 0, n_4us = 0, n_2us = 0, n_wrap = 0, n_abort = 0, n_hits = 0;

  always @(posedge sync_out) n_sync++;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- CAMAC
  task automatic camac(input logic [3:0] aa, input logic [4:0] ff, input logic [23:0] ww,
                       output logic [23:0] rd);
    #3.7;
    n = 1; a = aa; f = ff; w = ww;
    #60 s1 = 1;
    #70 rd = r;
    expect_true(x && q, $sformatf("X/Q for A%0d F%0d", aa, ff));
    #30 s1 = 0;
    #60 s2 = 1;
    #100 s2 = 0;
    #60 n = 0;
    #40;
  endtask

  task automatic camac_zc(input bit is_z);
    #3.7;
    if (is_z) z = 1; else c = 1;
    #60 s1 = 1;
    #100 s1 = 0;
    #60 s2 = 1;
    #100 s2 = 0;
    #60 z = 0; c = 0;
    #40;
  endtask

  logic [23:0] rd;

  // ---------------------------------------------------------------- hits
  realtime hit_t [32][$];

  task automatic hit(input int ch, input realtime t, input realtime width);
    fork
      begin
        #(t - $realtime);
        ch_in[ch] = 1;
        hit_t[ch].push_back($realtime);
        #(width) ch_in[ch] = 0;
      end
    join_none
    if (width < 32.0) n_short++; else n_long++;
  endtask

  task automatic pulse(ref logic s);
    s = 1; #12 s = 0;
  endtask

  // ---------------------------------------------------------------- readout
  code_t words [8][4][128];   // [chip][channel][time row]

  // read rows first..first+n_rows-1 (time order) of every chip in slave mode
  task automatic read_all(input int first, input int n_rows, input range_e rs);
    int per_array;
    per_array = (rs == RANGE_1US) ? n_rows : 32;
    for (int k = 0; k < 8; k++) begin
      camac(4'(k), F_WRITE_CSR0, {17'b0, 1'b0, MODE_SLAVE, 4'b0}, rd);
      camac(4'(k), F_WRITE_CSR1, 24'(first), rd);
      for (int i = 0; i < per_array; i++) begin
        camac(4'(k), F_READ_DATA, 0, rd);
        for (int ch = 0; ch < 4; ch++) begin
          if (rs == RANGE_4US)      words[k][0][ch * 32 + i] = rd[ch*6 +: 6];
          else if (rs == RANGE_2US) words[k][ch & 2][(ch & 1) * 32 + i] = rd[ch*6 +: 6];
          else                 words[k][ch][i] = rd[ch*6 +: 6];
        end
      end
      camac(4'(k), F_READ_CSR1, 0, rd);
      expect_true(rd[6:0] == 7'(first + per_array), "slave mode advanced the Read Pointer");
      n_slave++;
    end
  endtask

  // rising edges (in 1 ns units from the first row) in a sequence of words
  function automatic void decode(input int k, input int ch, input int lo, input int hi,
                                 ref int edges[$]);
    edges.delete();
    for (int i = lo; i < hi; i++) begin
      code_t cw, prev;
      cw = words[k][ch][i];
      prev = (i == 0) ? 6'd0 : words[k][ch][i-1];
      // in common start, the first-cell bit of row 2 is the tail of the
      // start pulse (sampled as SEL switches), not an input level
      if (i - 1 == 2 && lo == 2) prev[5] = 1'b0;
      if (cw[4:0] != 0) edges.push_back(i * 32 + int'(cw[4:0]));
      else if (cw[5] && prev == 6'd0) edges.push_back(i * 32);
    end
  endfunction

  // compare decoded hits with the generated ones; ref_bin is the decoded
  // reference pulse, ref_t the true START/STOP time
  task automatic check_hits(input int k, input int ch, input int edges[$], input int ref_bin,
                            input realtime ref_t, input bit is_stop, input realtime lo_t);
    realtime expect_list [$];
    foreach (hit_t[k*4+ch][i]) if (hit_t[k*4+ch][i] > lo_t) expect_list.push_back(hit_t[k*4+ch][i]);
    expect_true(edges.size() == expect_list.size(),
                $sformatf("chip %0d ch %0d: %0d hits decoded, %0d generated", k, ch, edges.size(), expect_list.size()));
    foreach (edges[i]) begin
      if (i < expect_list.size()) begin
        realtime meas, truth;
        meas  = is_stop ? real'(ref_bin - edges[i]) - 60.0 : real'(edges[i] - ref_bin) + 60.0;
        truth = is_stop ? ref_t - expect_list[i] : expect_list[i] - ref_t;
        expect_true(meas - truth < 1.0 && truth - meas < 1.0,
                    $sformatf("chip %0d ch %0d hit %0d: measured %0.1f true %0.2f ns", k, ch, i, meas, truth));
        n_hits++;
      end
    end
  endtask

  // ---------------------------------------------------------------- runs
  task automatic arm(input int wp);
    for (int k = 0; k < 8; k++) camac(4'(k), F_WRITE_CSR2, 24'(wp), rd);
  endtask

  task automatic clear_hits();
    for (int i = 0; i < 32; i++) hit_t[i].delete();
  endtask

  task automatic run_common_start(input int wp0);
    realtime t0;
    int edges[$], refs[$];
    mode_cstop = 0; range_sel = RANGE_1US; preset_sw = 8'd32;
    arm(wp0);
    clear_hits();
    #(100.0 + real'($urandom % 320) * 0.1);
    t0 = $realtime;
    for (int ch = 0; ch < 32; ch++) begin
      hit(ch, t0 + 100.0 + real'($urandom % 3000) * 0.1 + 0.05, 5.0 + real'($urandom % 50));
      if (ch % 3 == 0) hit(ch, t0 + 560.0 + real'($urandom % 3600) * 0.1 + 0.05, 5.0 + real'($urandom % 50));
    end
    pulse(start_in);
    #1300;
    camac(0, F_READ_CSR2, 0, rd);
    expect_true(rd[6:0] == 7'(wp0 + 32), "common start wrote preset rows");
    read_all(wp0, 32, RANGE_1US);
    for (int k = 0; k < 8; k++)
      for (int ch = 0; ch < 4; ch++) begin
        decode(k, ch, 0, 2, refs);
        expect_true(refs.size() == 1, $sformatf("start pulse in rows 0-1 of chip %0d ch %0d", k, ch));
        decode(k, ch, 2, 32, edges);
        if (refs.size() == 1) check_hits(k, ch, edges, refs[0], t0, 0, t0);
      end
    n_cstart++;
  endtask

  task automatic run_common_stop();
    realtime t_stop, t_begin, t_f25;
    int edges[$], refs[$], m;
    mode_cstop = 1; range_sel = RANGE_1US;
    arm(0);
    clear_hits();
    camac(0, F_START, 0, rd);     // start by F(25), gives Sync Out
    t_f25 = $realtime;
    // let the memory wrap several times, then a burst of hits and STOP
    #(3000.0 + real'($urandom % 320) * 0.1);
    t_begin = $realtime;
    for (int ch = 0; ch < 32; ch++) hit(ch, t_begin + 20.0 + real'($urandom % 7000) * 0.1 + 0.05, 5.0 + real'($urandom % 50));
    #(800.0 + real'($urandom % 50) * 0.1);
    t_stop = $realtime;
    pulse(stop_in);
    #300;
    camac(0, F_READ_CSR2, 0, rd);
    m = int'(rd[6:0]);
    // the run lasted well over 32 rows, so the arrays were overwritten
    if (t_stop - t_f25 > 1100.0) n_wrap++;
    read_all((m - 32) & 127, 32, RANGE_1US);
    for (int k = 0; k < 8; k++)
      for (int ch = 0; ch < 4; ch++) begin
        decode(k, ch, 30, 32, refs);
        expect_true(refs.size() == 1, $sformatf("stop pulse in last two rows of chip %0d ch %0d", k, ch));
        decode(k, ch, 0, 30, edges);
        if (refs.size() == 1) check_hits(k, ch, edges, refs[0], t_stop, 1, t_begin);
      end
    n_cstop++;
  endtask

  task automatic run_4us();
    realtime t0;
    int edges[$], refs[$];
    mode_cstop = 0; range_sel = RANGE_4US; preset_sw = 8'd128;
    arm(0);
    clear_hits();
    #(100.0 + real'($urandom % 320) * 0.1);
    t0 = $realtime;
    for (int k = 0; k < 8; k++) begin
      hit(k * 4, t0 + 100.0 + real'($urandom % 15000) * 0.1 + 0.05, 5.0 + real'($urandom % 50));
      hit(k * 4, t0 + 2000.0 + real'($urandom % 19000) * 0.1 + 0.05, 40.0);
    end
    pulse(start_in);
    #4300;
    camac(0, F_READ_CSR2, 0, rd);
    expect_true(rd[6:0] == 7'd0, "4 us run wrote 128 rows");
    read_all(0, 32, RANGE_4US);
    for (int k = 0; k < 8; k++) begin
      decode(k, 0, 0, 2, refs);
      expect_true(refs.size() == 1, $sformatf("start pulse, 4 us, chip %0d", k));
      decode(k, 0, 2, 128, edges);
      if (refs.size() == 1) check_hits(k, 0, edges, refs[0], t0, 0, t0);
    end
    n_4us++;
  endtask

  task automatic run_2us();
    realtime t0;
    int edges[$], refs[$];
    mode_cstop = 0; range_sel = RANGE_2US; preset_sw = 8'd64;
    arm(0);
    clear_hits();
    #(100.0 + real'($urandom % 320) * 0.1);
    t0 = $realtime;
    for (int k = 0; k < 8; k++)
      for (int p = 0; p < 4; p += 2) begin
        hit(k * 4 + p, t0 + 100.0 + real'($urandom % 8000) * 0.1 + 0.05, 5.0 + real'($urandom % 50));
        hit(k * 4 + p, t0 + 1000.0 + real'($urandom % 9000) * 0.1 + 0.05, 40.0);
      end
    pulse(start_in);
    #2300;
    camac(0, F_READ_CSR2, 0, rd);
    expect_true(rd[6:0] == 7'd64, "2 us run wrote 64 rows");
    read_all(0, 32, RANGE_2US);
    for (int k = 0; k < 8; k++)
      for (int p = 0; p < 4; p += 2) begin
        decode(k, p, 0, 2, refs);
        expect_true(refs.size() == 1, $sformatf("start pulse, 2 us, chip %0d input %0d", k, p));
        decode(k, p, 2, 64, edges);
        if (refs.size() == 1) check_hits(k, p, edges, refs[0], t0, 0, t0);
      end
    n_2us++;
  endtask

  task automatic run_serial_io();
    // chip 5: write cells (row 7, columns 0..31), channel c high from column 3+5c
    camac(5, F_WRITE_CSR1, 24'd7, rd);
    for (int col = 0; col < 32; col++) begin
      logic [3:0] bits;
      for (int ch = 0; ch < 4; ch++) bits[ch] = (col >= 3 + 5 * ch);
      camac(5, F_WRITE_CSR2, 24'(col), rd);
      camac(5, F_WRITE_CSR0, {17'b0, 1'b0, MODE_SERIAL, bits}, rd);
    end
    camac(5, F_WRITE_CSR2, 24'd9, rd);
    camac(5, F_READ_CSR0, 0, rd);
    expect_true(rd[6:0] == {1'b0, MODE_SERIAL, 4'b0011}, "serial read-back");
    camac(5, F_WRITE_CSR0, {17'b0, 1'b0, MODE_STANDALONE, 4'b0}, rd);
    camac(5, F_READ_DATA, 0, rd);
    for (int ch = 0; ch < 4; ch++)
      expect_true(rd[ch*6 +: 6] == 6'(3 + 5 * ch), $sformatf("serial pattern encodes, ch %0d", ch));
    camac(5, F_READ_CSR1, 0, rd);
    expect_true(rd[6:0] == 7'd7, "standalone mode keeps the Read Pointer");
    n_serial++;
  endtask

  task automatic run_abort(input bit use_c);
    mode_cstop = 1; range_sel = RANGE_1US;
    pulse(start_in);
    #500;
    if (use_c) camac_zc(0); else camac(0, F_RESET, 0, rd);
    camac(0, F_READ_CSR2, 0, rd);
    #500;
    begin
      logic [23:0] rd2;
      camac(0, F_READ_CSR2, 0, rd2);
      expect_true(rd2 == rd, use_c ? "C stops recording" : "F9 stops recording");
    end
    n_abort++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500;
    camac_zc(1);    // Z: initialise
    run_common_start(10);
    run_common_stop();
    run_4us();
    run_2us();
    run_serial_io();
    run_abort(0);
    run_abort(1);
    run_common_start(100);
    $display("INFO cstart=%0d cstop=%0d f25_sync=%0d short_pulses=%0d long_pulses=%0d slave_reads=%0d serial=%0d range4us=%0d range2us=%0d wrap=%0d abort=%0d hits=%0d",
             n_cstart, n_cstop, n_sync, n_short, n_long, n_slave, n_serial, n_4us, n_2us, n_wrap, n_abort, n_hits);
    expect_true(n_cstart > 0 && n_cstop > 0 && n_sync > 0 && n_short > 0 && n_long > 0 &&
                n_slave > 0 && n_serial > 0 && n_4us > 0 && n_2us > 0 && n_wrap > 0 && n_abort > 1 && n_hits > 0,
                "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
