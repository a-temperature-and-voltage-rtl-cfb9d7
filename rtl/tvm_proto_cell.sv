`timescale 1ns/1ps
// tvm_proto_cell: prototype temperature and voltage measurement cell.
//
// A programmable ring oscillator (tvm_ring_osc, four selectable delay
// paths) clocks an 18-bit counter with an integrated scanpath
// (tvm_scan_counter) while OSCVAL is high; a control block
// (tvm_proto_control) holds the path select in the same scanpath and
// routes it in either direction according to SCANDIR. The four
// frequencies Fdn, Fdp, Ftn, Ftp are measured one after the other:
//   1. shift 20 bits in: 18 zeros (clear) then the 2-bit path code,
//   2. hold OSCVAL high for the gate time (typically 1 ms),
//   3. shift 20 bits out: the count, least significant bit first, then
//      the path code.
// SCANCLK must stay low while OSCVAL is high and for a ring delay after.
//
// Pins (from the document): SCANIN, SCANOUT, SCANCLK, OSCVAL and the
// direction input. vdd_mv and temp_dc are not pins: they are the core
// supply and die temperature the behavioural oscillator model reacts to
// (the prototype set the temperature with an on-chip heating resistor).
// count and path are observation outputs.
module tvm_proto_cell
  import tvm_pkg::*;
#(
  parameter int unsigned COUNT_W  = PROTO_COUNT_W,
  parameter int unsigned N_STAGES = 5,
  parameter real         D0_NS    = 4.0
) (
  input  logic               scanclk,
  input  logic               scanin,
  input  logic               scandir,
  input  logic               oscval,
  output logic               scanout,
  input  logic [15:0]        vdd_mv,
  input  logic signed [15:0] temp_dc,
  output logic [COUNT_W-1:0] count,
  output tvm_path_e          path
);

  logic       osc_valin, osc_out, osc_valout;
  logic [3:0] osc_sw;
  logic       si_fwd, so_fwd, si_rev, so_rev;

  tvm_proto_control u_ctrl (
    .scanclk   (scanclk),
    .scanin    (scanin),
    .scandir   (scandir),
    .oscval    (oscval),
    .scanout   (scanout),
    .osc_valin (osc_valin),
    .osc_sw    (osc_sw),
    .osc_valout(osc_valout),
    .cnt_si_fwd(si_fwd),
    .cnt_so_fwd(so_fwd),
    .cnt_si_rev(si_rev),
    .cnt_so_rev(so_rev),
    .path      (path)
  );

  tvm_ring_osc #(.N_STAGES(N_STAGES), .D0_NS(D0_NS)) u_osc (
    .valin  (osc_valin),
    .sw     (osc_sw),
    .vdd_mv (vdd_mv),
    .temp_dc(temp_dc),
    .oscout (osc_out),
    .valout (osc_valout)
  );

  tvm_scan_counter #(.WIDTH(COUNT_W), .BIDIR(1'b1)) u_cnt (
    .countclk(osc_out),
    .countsel(osc_valout),
    .scanclk (scanclk),
    .scandir (scandir),
    .si_fwd  (si_fwd),
    .si_rev  (si_rev),
    .so_fwd  (so_fwd),
    .so_rev  (so_rev),
    .q       (count)
  );

endmodule
