# TMC1004 time memory TDC and its 32-channel CAMAC module

A drift chamber needs the arrival time of many wire signals to better than
1 ns, with a few microseconds of history kept until a trigger decides
whether to read it. A Time Memory Cell (TMC) chip does this in low-power
CMOS without a GHz clock: a write pulse is sent down a chain of delay
elements, 1 ns per stage, and each stage's memory cell stores the level of
the timing input at the moment the pulse passes. One pass covers one period
of a 31.25 MHz clock (32 cells x 1 ns = 32 ns) and fills one 32-bit row;
the next clock edge starts the next row. A 32-row array therefore holds the
last 1.024 us of the input as a bitmap with 1 ns bins.

This repository holds SystemVerilog for

* the **TMC1004 chip**: four channels, each a 32 x 32 time memory, a 7-bit
  Write and Read Pointer, a row encoder per channel and three registers;
* the **32-channel CAMAC TDC module** around eight of these chips: input
  stretchers, input multiplexers, the timing control that runs common
  start and common stop measurements, and the CAMAC dataway interface.

The delay-line cells, the input stretcher and the start/stop pulse former
are analog or delay-cable circuits in the real hardware. They are written
as behavioural models with `#` delays. Everything else is synthesizable
RTL.

## How a time is recorded

```
        CLK edge                                   next CLK edge
          |<------------------ 32 ns ------------------>|
 WL  ---->[d]->[d]->[d]-- ... --[d]->
           |    |    |            |
 cell      0    1    2    ...     31      cell k stores TIN at edge + k ns
```

`tmc_cell` is one cell: its write-line input is passed on after `TAP`
(1 ns), and on its rising edge the cell stores TIN. `tmc_delay_line` chains
32 of them. In the chip a feedback loop trims the delay so that the 32
delays exactly fill a clock period. That loop is analog and is not
modelled: `TAP` is a fixed parameter and must equal the clock period / 32.

At the clock edge that closes a period, `tmc1004` writes the 32 samples into
its array (`tmc_array`) at the row given by the Write Pointer, then advances
the pointer. This happens only while the `wstart` input is high. Cell 0 of
the new period samples at that same edge. The non-blocking updates keep the
two apart, so the committed row is always the period that just ended.

The array is dual-ported. The Read Pointer selects a row at the same time
as the Write Pointer writes another, so readout can run alongside recording.
The pointers are 7-bit counters with a decoder on the low five bits. The two
upper bits matter only when channels are cascaded (below).

## The 6-bit row code

A row is never read as 32 bits. `tmc_encoder` turns it into 6 bits:

| row (bit 31 ... bit 0)         | code     | meaning                          |
|--------------------------------|----------|----------------------------------|
| all 0                          | `000000` | no signal                        |
| `...0 1 0` (rise at cell 1)    | `000001` | low at start, rising edge at 1   |
| `1 0 ... 0`                    | `011111` | rising edge at 31                |
| all 1                          | `100000` | high all row, no edge            |
| `...1 0 1`                     | `100010` | high at start, falls, rises at 2 |
| `1 0 x ... x 1`                | `111111` | high at start, rises at 31       |

Bit 5 is cell 0, the input level when the row began. Bits 4..0 give the
cell k (1..31) with cell k = 1 and cell k-1 = 0. The encoder is built as the
chip builds it: one detector per adjacent cell pair, each driving the code
lines whose bit is set in its own index. If a row holds two rising edges,
the result is the OR of both positions, which is meaningless. The module
prevents this by stretching every input to at least 32 ns.

**Decoding.** Let r be the row number counted from the start of the record
and w its code. A rising edge lies at `r*32 + w[4:0]` ns if `w[4:0] != 0`.
It lies at `r*32` if `w == 100000` and the previous row's code is `000000`.
If the previous row carried a signal, a code of `100000` means the signal
simply continued. A hit time is always a difference between a decoded hit
and the decoded reference pulse, so the unknown phase of START or STOP
against the clock cancels. The result is good to within one 1 ns bin.

## The CAMAC module

```
 CH0..31 -> input_latch -> input_mpx (per chip) -> tmc1004 x 8 -> DOUT --+
                               ^   ^                   ^                 |
 START/STOP -> com_pulse_gen --+   | SEL               | WSTART          v
          \--> timing_control -----+-------------------+       camac_if <-> dataway
 62.5 MHz -> clock_gen -> WCLK (31.25 MHz) to all of the above
```

* `input_latch` holds every input high for at least 32 ns. It does not
  delay the rising edge, which carries the time. Longer pulses pass
  unchanged.
* `com_pulse_gen` makes COM, a 10 ns pulse that starts 60 ns after the
  START edge (common start) or the STOP edge (common stop).
* `input_mpx` gives each chip either its four inputs (SEL high) or COM on
  all four channels (SEL low). This puts the reference time into every
  channel's own memory.
* `timing_control` raises WSTART and sequences SEL on WCLK.

### Common start

START, or CAMAC F(25), starts a run at the next WCLK edge. F(25) also gives
a one-clock Sync Out pulse. The run covers `preset_sw` rows (0 means 256).
Rows 0 and 1 are recorded with SEL low and contain the start pulse. From row
2 on the chips record the inputs. With the Write Pointer loaded with N
beforehand, the memory then holds:

| rows          | content                                   |
|---------------|-------------------------------------------|
| N, N+1        | start pulse                               |
| N+2 ... N+31  | inputs (t = decoded hit - start + 60 ns)  |

When SEL switches at the start of row 2, cell 0 of row 2 can still catch the
tail of the 10 ns start pulse. Software should ignore bit 5 of row N+2 when
it tests row N+3 for an edge at cell 0.

### Common stop

START or F(25) starts recording with SEL high. The Write Pointer wraps, so
the memory always holds the last 32 rows. At the first WCLK edge after STOP,
SEL drops, two more rows are recorded (they receive the stop pulse) and
WSTART falls. With M the final Write Pointer, read back through CSR2:

| rows             | content                                    |
|------------------|--------------------------------------------|
| M-32 ... M-3     | inputs (t = stop - decoded hit, +60 ns)    |
| M-2, M-1         | stop pulse                                 |

In common start, a START during a run is ignored. A STOP outside a common
stop run is ignored.

### Ranges: 32 x 1 us, 16 x 2 us, 8 x 4 us

`range_sel` cascades channels for a longer range. In the 2 us range,
channels 0/1 and 2/3 of each chip act as 64-row memories. Array a is
written while `wp[5] == a[0]`, and inputs 0 and 2 of the chip feed the
pairs. In the 4 us range, all four arrays form one 128-row memory.
Array a holds the rows with `wp[6:5] == a`, and input 0 of the chip feeds
all four. A readout at Read Pointer row r returns row r of all four
arrays at once. The software knows which array covers which time.

## Chip registers and CAMAC functions

Chip registers, 7 bits, reached through `cs_n`, `csr_addr` and `csr_we`:

| reg  | bits                                     | read                           | write                  |
|------|------------------------------------------|--------------------------------|------------------------|
| CSR0 | 5..4 MODE, 3..0 SIO3..0 (bit 6 unused)   | MODE; SIO cells in serial mode | MODE; SIO cells if MODE=2 |
| CSR1 | Read Pointer                             | present value                  | load                   |
| CSR2 | Write Pointer                            | present value                  | load                   |

The modes:

* **MODE 0, standalone.** DOUT shows the row under the Read Pointer.
* **MODE 1, slave.** The same, but the Read Pointer advances by one on a
  clock edge with DS* low. The CAMAC interface pulses DS* after each F(0).
* **Reading while recording.** In slave mode with DS* held low, the Read
  Pointer advances on every clock, like the Write Pointer. It then trails
  the Write Pointer at a fixed distance and sees each row once it has been
  written. This is the chip's dead-time-free readout. The CAMAC module
  does not use it: it has no data buffer, and a CAMAC cycle is far slower
  than one row.
* **MODE 2, serial I/O.** Memory test. The SIO bits address the cell at
  row = Read Pointer, column = Write Pointer, one bit per channel.

CAMAC (`camac_if`), one chip per sub-address A(0)..A(7):

| function          | action                                                     |
|-------------------|------------------------------------------------------------|
| F(0)              | read DOUT0..3 of chip A: channel c in R[6c+6 .. 6c+1]      |
| F(1), F(4), F(6)  | read CSR0, CSR1, CSR2                                      |
| F(17), F(20), F(22) | write CSR0, CSR1, CSR2 from W7..W1                       |
| F(9)              | stop the timing control                                    |
| F(25)             | start                                                      |
| Z / C             | Z: reset chips and timing control; C: timing control only  |

X and Q are both asserted for every accepted command. The interface runs on
WCLK. S1 and S2 pass through two-flop synchronisers. Writes, F(9) and F(25)
act on the rising edge of S1; Z, C and the DS* pulse act on the rising edge
of S2.

A typical common-start readout:

1. Write CSR2 = N in every chip.
2. Write CSR0 = slave mode.
3. Apply START.
4. Wait for `preset_sw` x 32 ns.
5. For each chip, write CSR1 = N, then issue F(0) 32 times.

## Files

| file | contents |
|------|----------|
| `rtl/tmc_pkg.sv` | sizes, mode/register/range enums, CAMAC function codes |
| `rtl/tmc_cell.sv`, `rtl/tmc_delay_line.sv` | behavioural delay-line cells |
| `rtl/tmc_array.sv`, `rtl/tmc_pointer.sv`, `rtl/tmc_encoder.sv`, `rtl/tmc_csr.sv` | chip blocks |
| `rtl/tmc1004.sv` | the chip |
| `rtl/input_latch.sv`, `rtl/com_pulse_gen.sv` | behavioural module analog parts |
| `rtl/input_mpx.sv`, `rtl/timing_control.sv`, `rtl/clock_gen.sv`, `rtl/camac_if.sv` | module logic |
| `rtl/tmc_camac_module.sv` | the module (top) |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Every file carries `` `timescale 1ns/1ps ``. The delay models need
`--timing`. For example, the full module test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/tmc_pkg.sv tb/tb_tmc_camac_module.sv --top-module tb_tmc_camac_module -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. `tb_tmc_camac_module` runs the whole
module at its full size (8 chips, 32 channels, 1024 cells per chip) through
its pins only:

* a common start run started by START, with 1–2 hits per channel;
* a common stop run started by F(25) after the memory has wrapped;
* an 8-channel 4 us run and a 16-channel 2 us run;
* serial I/O through CSR0;
* stopping a run with F(9) and with C;
* a second common start from a Write Pointer that wraps at 128.

Every decoded hit must match the true time to within 1 ns, and every
generated hit must be found. Compiling it takes about 2 minutes; the
simulation itself takes seconds.

The behavioural models rely on Verilator's `--timing` semantics. A process
waiting on an intra-assignment delay does not see new events meanwhile.
This is harmless here because the cell delay (1 ns) is far shorter than a
clock phase, and the stretcher ignores a second rise within 32 ns (that is
below the module's double-hit resolution anyway).

## What is this design's own choice

The block structure, the sizes (4 channels, 32 x 32 cells, 7-bit pointers,
6-bit code, 7-bit registers, 8 chips, 8-bit preset), the encode table, the
register layout, the modes, the CAMAC function list and the timing-control
behaviour (two reference rows, preset compare, F(25) with Sync Out) follow
the published chip and module. The following had to be chosen:

* **Recording gate.** WSTART is a chip input that gates both the row write
  and the Write Pointer increment.
* **Read Pointer stepping.** The Read Pointer advances on a clock edge with
  DS* low, and only in slave mode.
* **Chip register pins.** The chip gets a register-number pin and a write
  strobe, and its CIO bus is split into an input and an output. Only CIO and
  CS* are given for the chip.
* **Cascading.** Which arrays are written in the 2 us and 4 us ranges, and
  which inputs feed them, are this design's choices. So is the `range_sel`
  input.
* **START/STOP timing.** START and STOP are caught asynchronously and acted
  on at the next WCLK edge. This replaces the 30 ns, 70 ns and 20 ns delay
  cables of the original timing control with cycle-level sequencing.
* **Row count.** A common start run records exactly `preset_sw` rows, and
  preset 0 means 256.
* **CAMAC details.** The strobe use, Q = X, the data bit order on R24..R1,
  and what F(9), Z and C reset.
* **Resets.** All resets are synchronous. The delay-line cells and the
  memory contents are never reset.
* **Not modelled.** The analog delay feedback (Vg), the ECL/NIM receivers
  and the 3 V / 5 V protection diodes. The cell delay is ideal, so the
  model shows none of the real chip's 0.52 ns timing error or 0.3 ns
  integral nonlinearity.
