`timescale 1ns/1ps
// tvm_ind_cell: industrial temperature and voltage measurement cell.
//
// Two validated ring oscillators run at the same time, one whose delay
// cells use only the n-diffusion path ("N-DIFF", frequency Fdn) and one
// using only the n-transistor path ("N-TRANS", Ftn); OSCVAL validates both.
// Each clocks its own 16-bit counter with scanpath; the oscillator's
// VALOUT is the counter's COUNTSEL. The two counters form one scanpath:
//   SCANIN -> N-DIFF counter -> N-TRANS counter -> SCANOUT
// so a 32-bit transfer reads Ftn (first, least significant bit first)
// then Fdn, while shifting in the next contents (zeros to clear).
// SCANCLK must stay low while OSCVAL is high and for a ring delay after.
//
// The structure and pin names follow the document's industrial cell; the
// delay cells keep their four-path form with one switch tied on, which
// stands for the single fixed path of the real cell. vdd_mv and temp_dc
// feed the behavioural oscillator models; fdn_count and ftn_count are
// observation outputs (in the document's application the counters sit in
// the processor datapath).
module tvm_ind_cell
  import tvm_pkg::*;
#(
  parameter int unsigned COUNT_W  = IND_COUNT_W,
  parameter int unsigned N_STAGES = 5,
  parameter real         D0_NS    = 4.0
) (
  input  logic               scanclk,
  input  logic               scanin,
  input  logic               oscval,
  output logic               scanout,
  input  logic [15:0]        vdd_mv,
  input  logic signed [15:0] temp_dc,
  output logic [COUNT_W-1:0] fdn_count,
  output logic [COUNT_W-1:0] ftn_count
);

  logic dn_osc, dn_val, tn_osc, tn_val;
  logic mid, dn_rev_unused, tn_rev_unused;

  tvm_ring_osc #(.N_STAGES(N_STAGES), .D0_NS(D0_NS)) u_osc_ndiff (
    .valin  (oscval),
    .sw     (path_switches(PATH_NDIFF)),
    .vdd_mv (vdd_mv),
    .temp_dc(temp_dc),
    .oscout (dn_osc),
    .valout (dn_val)
  );

  tvm_ring_osc #(.N_STAGES(N_STAGES), .D0_NS(D0_NS)) u_osc_ntrans (
    .valin  (oscval),
    .sw     (path_switches(PATH_NTRANS)),
    .vdd_mv (vdd_mv),
    .temp_dc(temp_dc),
    .oscout (tn_osc),
    .valout (tn_val)
  );

  tvm_scan_counter #(.WIDTH(COUNT_W), .BIDIR(1'b0)) u_cnt_ndiff (
    .countclk(dn_osc),
    .countsel(dn_val),
    .scanclk (scanclk),
    .scandir (1'b0),
    .si_fwd  (scanin),
    .si_rev  (1'b0),
    .so_fwd  (mid),
    .so_rev  (dn_rev_unused),
    .q       (fdn_count)
  );

  tvm_scan_counter #(.WIDTH(COUNT_W), .BIDIR(1'b0)) u_cnt_ntrans (
    .countclk(tn_osc),
    .countsel(tn_val),
    .scanclk (scanclk),
    .scandir (1'b0),
    .si_fwd  (mid),
    .si_rev  (1'b0),
    .so_fwd  (scanout),
    .so_rev  (tn_rev_unused),
    .q       (ftn_count)
  );

endmodule
