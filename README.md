# TVM: on-chip temperature and voltage measurement by ring-oscillator counting

A CMOS chip can report its own die temperature T and core supply voltage V
with a few hundred transistors and four pins. Inside the chip, a ring
oscillator is built so that its delay is dominated by one technological
parameter: the resistance of an n- or p-diffusion strip, or the on-resistance
of an n- or p-transistor. Those parameters depend on T and V, but each in its
own way. A counter measures the oscillator frequency over a fixed gate time
(typically 1 ms), and the count is read through a scanpath. Two such
frequencies, Fdn (n-diffusion) and Ftn (n-transistor), are enough: a
per-chip calibration polynomial of degree 4 in (Fdn, Ftn), fitted by least
squares, turns them back into (T, V). Published results for this approach
are better than 50 mV and 3 °C over 4-6 V and 20-80 °C. Every result is an
average over the gate time.

This repository holds SystemVerilog for three levels of that scheme:

* **The prototype cell** (`tvm_proto_cell`). One ring oscillator can be
  switched to any of the four delay paths. An 18-bit counter doubles as the
  scanpath, and the scanpath can shift in either direction.
* **The industrial cell** (`tvm_ind_cell`). Two fixed oscillators, N-DIFF and
  N-TRANS, run at the same time. Each has its own 16-bit counter, and the two
  counters share one scanpath.
* **The TVM system** (`tvm_system`). A bus controller (`tvm_controller`) sits
  on a host's system bus and drives a daisy chain of industrial cells, one
  per chip. The default is 512 chips.

`tvm_top` puts the system and the prototype cell side by side. The host
software that evaluates the calibration polynomial is not part of the RTL.

## The measurement cycle

Every cell is used in the same three steps:

1. **Clear and set up.** Shift zeros into the counter through the scanpath.
   In the prototype, the same transfer also loads the oscillator path select.
2. **Gate.** Raise OSCVAL for the gate time. The oscillators run, and each
   counter counts the rising edges of its oscillator.
3. **Read.** Shift the counts out. The bits shifted in at the same time
   clear the counters again (and, in the prototype, select the next path), so
   steps 3 and 1 merge from the second measurement on.

While OSCVAL is high, SCANCLK must stay low. It must also stay low for a ring
delay after OSCVAL falls. The controller guarantees this, and an assertion in
`tvm_controller` checks it.

### One set of flip-flops, two clocks

The counter *is* the scanpath (`tvm_scan_counter`). The oscillator's VALOUT
signal (COUNTSEL at the counter) selects both the clock and the function of
the flip-flops:

| COUNTSEL | clock            | next state                               |
|----------|------------------|------------------------------------------|
| 1        | oscillator       | `q + 1` (wraps at 2^WIDTH)               |
| 0        | SCANCLK          | shift one bit (forward or, optionally, reverse) |

The clock multiplexer is safe only if both clock inputs are low when COUNTSEL
changes. The validated oscillator is built to make this hold:

* While stopped, its ring input is forced, so the oscillator output rests
  low.
* After VALIN rises, the first rising edge comes a full ring delay later.
  VALOUT rises after only 1 ns, so the clock has already switched when that
  edge arrives.

At the end of the gate, one edge may still be in flight. It falls on the
SCANCLK side of the multiplexer and is not counted. A count therefore has
±1 resolution.

### Bit order on the scanpath

A forward shift enters a counter at its most significant bit and leaves from
bit 0, so counts come out least significant bit first.

* **Prototype, forward (SCANDIR = 0).** The chain is
  `SCANIN -> sel[1] -> sel[0] -> counter[17..0] -> SCANOUT`. A 20-bit
  transfer does two jobs at once:
  * It reads the count on bits 0-17 and the old path code on bits 18-19.
  * It writes 18 zeros followed by the new 2-bit path code, least significant
    bit first.
* **Prototype, reverse (SCANDIR = 1).** The chain runs the other way
  between the same pins: `SCANIN -> counter[0..17] -> sel[0] -> sel[1] ->
  SCANOUT`. Read this way, the path code comes out first (sel[1], then
  sel[0]), followed by the count, most significant bit first.
* **Industrial cell.** The chain is `SCANIN -> N-DIFF counter -> N-TRANS
  counter -> SCANOUT`. A 32-bit word read from a cell holds Ftn in bits
  15:0 and Fdn in bits 31:16.
* **System.** The chain is `controller SCANIN -> cell 0 -> ... -> cell N-1
  -> controller SCANOUT`, so after a measurement the first word read belongs
  to cell N-1.

Path codes (`tvm_pkg::tvm_path_e`): 0 n-diffusion, 1 p-diffusion,
2 n-transistor, 3 p-transistor. The code is decoded into one-hot enables for
the four switches of every delay cell, so exactly one switch is on at a time.

## The oscillator model

The ring oscillator is analog. `tvm_delay_cell` and `tvm_ring_osc` are
behavioural models (timing only, not synthesizable), so that the digital
parts can be simulated against something that behaves like a real sensor.

* **Delay cell.** This is a buffered inverter with four switch-selected delay
  paths:
  * The diffusion paths slow both output edges.
  * The transistor paths slow only one edge, by twice as much. The
    n-transistor path slows the falling edge and the p-transistor path the
    rising edge.
* **Delay split.** About 75 % of a path's delay comes from its targeted
  parameter. The other 25 % comes from the average of the n and p transistors.
  At 5 V and 25 °C every path has the same average delay, D0 = 4 ns.
* **Ring.** Five stages (`N_STAGES`) make a period of 2·5·D0 = 40 ns, or
  25 MHz. A 1 ms gate gives about 25 000 counts, well within both counter
  widths.
* **Dependence on T and V.** The models take `temp_dc` (tenths of °C) and
  `vdd_mv` (mV) as inputs:
  * Diffusion resistance: r = 1 + k·(T − 25), with k = 0.0015 /°C for n and
    0.0010 /°C for p. It does not depend on V.
  * Transistor on-resistance: r = (1 + k·(T − 25))·4.2/(V − 0.8), with
    k = 0.004 /°C for n and 0.003 /°C for p.

  Both frequencies therefore rise with V and fall with T.

Those laws, D0 and the stage count are placeholders chosen for plausibility.
They are not characterised silicon. Replace them with measured data before
you draw any conclusion about accuracy.

Edge delays are real numbers rounded to the 1 ps simulation precision.
Rounding shifts a count by a few parts in 10^4, and the testbenches model it
the same way.

## The controller and the host procedure

`tvm_controller` is a small register block (32-bit words):

| addr | name  | write                                   | read |
|------|-------|-----------------------------------------|------|
| 0    | CTRL  | command `tvm_cmd_t`: `shift` with `shift_len_m1` (1-32 bits), or `measure` | status: bit 0 shifting, bit 1 measuring |
| 1    | SHIFT | bits to send, bit 0 first               | after an L-bit transfer, bits L-1..0 hold the bits received, first in bit 0 |
| 2    | GATE  | gate time in clock cycles               | same; resets to `CLK_HZ/1000` (1 ms) |

Behaviour:

* Commands and SHIFT writes are ignored while a command is running. Poll CTRL
  until it reads 0 before issuing the next one.
* Each bit of a transfer takes `2·SCAN_HALF` clocks. SCANCLK is low for the
  first half, with the new SCANIN bit on the line. SCANOUT is sampled at the
  end of that low half. SCANCLK then goes high, and the cells shift on that
  rising edge.
* A measurement holds OSCVAL high for exactly GATE clocks, then waits
  `SETTLE` clocks before it reports idle.

To measure all N chips:

1. Clear the chain: N transfers of 32 zero bits (first use only).
2. Start one `measure` command. Every chip measures at the same time.
3. Read N words, each a transfer of 32 zero bits: word k is chip N-1-k,
   holding Fdn in bits 31:16 and Ftn in bits 15:0.
4. Apply each chip's calibration polynomial in software.

At the 10 MHz clock assumed here, reading 512 chips takes about 6.6 ms. The
host can run this as a low-priority periodic task.

## What follows the published design and what is this design's own

These follow the published design:

* the three-step measurement
* the counter doubling as the scanpath
* the 18-bit prototype counter and the 16-bit industrial counters
* the four delay paths, with one switch on at a time
* the edge behaviour and the 75 %/25 % delay split of the delay cell
* the prototype's control block, with the path set through the scanpath
* the bidirectional prototype scanpath, set by a fifth pin
* the industrial cell's two simultaneous oscillators and chained counters
* the pin names OSCVAL, SCANCLK, SCANIN, SCANOUT, VALIN, VALOUT, OSCOUT,
  COUNTCLK and COUNTSEL
* the system topology: SCANCLK and OSCVAL broadcast, scanpaths daisy-chained
  through every chip, a controller on the host bus
* 512 cells, as in a 1024-processor machine built from 512 two-processor
  chips

These are this design's own choices:

* **Scanpath details.** The bit order, the 2-bit path code and its place in
  the chain. The reverse direction means the same pins with the chain
  reversed.
* **Counter behaviour.** Rising-edge clocking, the clock multiplexer and
  wrap-around on overflow.
* **Oscillator behaviour.** How validation stops the ring, and VALOUT being
  VALIN delayed by 1 ns.
* **Oscillator numbers.** All the numbers of the oscillator model (see above).
* **Industrial cell.** Its oscillators reuse the four-path delay cell with
  one switch tied on. The real cell removes the switches to raise the share
  of the targeted parameter, and that change is not modelled.
* **Controller.** Everything about it: the bus, the register map, the 32-bit
  transfer window, `CLK_HZ` = 10 MHz, `SCAN_HALF` and `SETTLE`.

Not built:

* the heating resistor that the prototype die used to vary its temperature
* the pads
* the host processor and its calibration software
* the processor datapaths that host the industrial counters in the target
  chip
* sharing SCANCLK, SCANIN and SCANOUT with a boundary-scan or LSSD test
  chain. The published design allows this, which leaves only two extra
  pins per chip. Here the cells have pins of their own.

## Files

| file | contents |
|------|----------|
| `rtl/tvm_pkg.sv` | path codes, counter widths, controller register map, command/status structs |
| `rtl/tvm_delay_cell.sv` | behavioural delay cell (four paths, T/V dependent) |
| `rtl/tvm_ring_osc.sv` | behavioural validated ring oscillator |
| `rtl/tvm_scan_counter.sv` | counter with integrated (optionally bidirectional) scanpath |
| `rtl/tvm_proto_control.sv` | prototype control: path select register, scan routing |
| `rtl/tvm_proto_cell.sv` | prototype cell |
| `rtl/tvm_ind_cell.sv` | industrial cell |
| `rtl/tvm_controller.sv` | bus controller |
| `rtl/tvm_system.sv` | controller plus N_CELLS industrial cells |
| `rtl/tvm_top.sv` | system and prototype cell side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

The synthesizable modules are:

* `tvm_scan_counter`
* `tvm_proto_control`
* `tvm_controller`
* the structural cells and system, apart from the oscillator models they
  instantiate

## Simulating

Every file sets `timescale 1ns/1ps`. With Verilator 5:

    verilator --binary --timing --assert --top-module tb_tvm_top \
        -y rtl -y tb +libext+.sv rtl/tvm_pkg.sv tb/tb_tvm_top.sv
    ./obj_dir/Vtb_tvm_top

Replace `tb_tvm_top` with any other testbench. Each one prints
`TB_RESULT checks=N failures=M` and ends.

Expected counts in the testbenches come from the oscillator laws above,
worked out independently of the RTL. They are accepted within ±1 count.

| testbench | what it checks |
|-----------|----------------|
| `tb_tvm_delay_cell` | each path's edge delays at two operating points |
| `tb_tvm_ring_osc` | period, start-up delay, rest level and VALOUT timing of all four paths |
| `tb_tvm_scan_counter` | load and read in both directions, count, wrap, one-direction variant |
| `tb_tvm_proto_control` | path decoding, scan routing, hold while counting |
| `tb_tvm_proto_cell` | full measurement on all four paths at two operating points, plus one in reverse |
| `tb_tvm_ind_cell` | chain pattern, simultaneous Fdn/Ftn at three operating points |
| `tb_tvm_controller` | transfer contents and duration, exact gate length, busy lock-out, 1 ms reset gate |
| `tb_tvm_system` | 6 chips at different conditions, two measurement rounds |
| `tb_tvm_sweep` | the 81-point grid (4-6 V in 0.25 V steps, 20-80 C in 7.5 C steps) on one industrial cell with a 1 ms gate: every count, and that no two grid points give the same (Fdn, Ftn) |
| `tb_tvm_top` | end to end with 16 chips and a 1 ms gate, plus the prototype on all paths in both scan directions |

`tb_tvm_top` counts the following and fails if any of them never happens:
transfers, clears, measurements, ignored busy commands, forward and reverse
prototype scans, and prototype paths.

Simulation limits:

* **Largest system simulated: 16 chips.** The default of 512 chips
  elaborates and lints, but it was not simulated. The 512-chip model holds
  5120 timed delay-cell processes; its generated C++ did not finish
  compiling within 9 minutes, and linting it needs about 12 GB of memory.
* **Speed.** One industrial cell through 81 gates of 1 ms
  (`tb_tvm_sweep`) takes about 30 s. The 16-chip `tb_tvm_top` takes about
  50 s.

To simulate a larger array, override `N_CELLS` on `tvm_top` or `tvm_system`.
Shorten the gate by writing a smaller value to GATE.
