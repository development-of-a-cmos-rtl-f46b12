// timing_control: starts and stops recording of the TMC chips and chooses
// what they record (module timing control: FF1, the F579 counter, the F521
// comparator and the SEL flip-flop).
//
// The chips write one row per WCLK period while WSTART is high. START and
// STOP are asynchronous to WCLK; each is caught by an asynchronously set
// flag and acted on at the next WCLK edge, which is the first edge of the
// run (row 0) or the edge from which the last two rows are counted. The
// exact edge time is not lost: the shaped START/STOP pulse (COM) is
// recorded by the chips themselves, with SEL low, and the hit time is the
// difference of the two recorded times.
//
// Common start (mode_cstop = 0): START or a CAMAC F(25) sets WSTART. Rows 0
// and 1 are recorded with SEL low (they receive the start pulse), from row
// 2 on SEL is high (inputs). The counter counts recorded rows and when it
// reaches the preset switch value WSTART and SEL drop, so `preset` rows are
// written (preset 0 means 256).
// Common stop (mode_cstop = 1): START or F(25) sets WSTART with SEL high and
// the memory is overwritten cyclically. At the first edge after STOP, SEL
// drops (the stop pulse goes in), two more rows are recorded and WSTART
// drops.
// A start by F(25) also gives a one-clock Sync Out pulse. A start while
// running is ignored. `rst` (CAMAC Z, C or F(9)) stops a run.
//
// The two-row reference areas, the preset compare and the start sources
// follow the module description; handling START/STOP as edge-caught flags
// sampled on WCLK, the count convention and preset 0 = 256 are this
// design's choices.
`timescale 1ns/1ps
module timing_control
  import tmc_pkg::*;
(
  input  logic                clk,          // WCLK
  input  logic                rst,          // synchronous
  input  logic                mode_cstop,   // switch: 0 CSTART, 1 CSTOP
  input  logic [PRESET_W-1:0] preset,       // switch SW (rows, common start)
  input  logic                start_in,     // START discriminator, async
  input  logic                stop_in,      // STOP discriminator, async
  input  logic                f25,          // one-clock CAMAC start request
  output logic                wstart,
  output logic                sel,          // 1: inputs, 0: COM
  output logic                sync_out,
  output logic [PRESET_W-1:0] count         // F579 counter
);

  typedef enum logic [1:0] {IDLE, RUN, STOPPING} state_e;
  state_e state;

  logic start_seen, stop_seen, start_clr, stop_clr;

  // edge catchers: set by the pulse, cleared synchronously once handled
  always_ff @(posedge clk or posedge start_in) begin
    if (start_in)       start_seen <= 1'b1;
    else if (start_clr) start_seen <= 1'b0;
  end

  always_ff @(posedge clk or posedge stop_in) begin
    if (stop_in)       stop_seen <= 1'b1;
    else if (stop_clr) stop_seen <= 1'b0;
  end

  // a start is taken only when idle; a stop only while a common stop run records
  assign start_clr = rst || state != IDLE || start_seen;
  assign stop_clr  = rst || !(mode_cstop && state == RUN) || stop_seen;

  always_ff @(posedge clk) begin
    sync_out <= 1'b0;
    if (rst) begin
      state <= IDLE;
      sel   <= 1'b0;
      count <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start_seen || f25) begin
            state    <= RUN;
            count    <= '0;
            sel      <= mode_cstop;
            sync_out <= f25;
          end
        end
        RUN: begin
          count <= count + 1'b1;
          if (!mode_cstop) begin
            if (count == PRESET_W'(1)) sel <= 1'b1;
            if (count + 1'b1 == preset) begin
              state <= IDLE;
              sel   <= 1'b0;
            end
          end else if (stop_seen) begin
            state <= STOPPING;
            sel   <= 1'b0;
            count <= '0;
          end
        end
        STOPPING: begin
          count <= count + 1'b1;
          if (count == PRESET_W'(1)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign wstart = state != IDLE;

endmodule
