`timescale 1ns/1ps
// tvm_proto_control: control block of the prototype TVM cell.
//
// It holds the oscillator path select, a 2-bit register that is part of the
// cell's scanpath, decodes it into the one-hot enables of the four switches
// of every delay cell (exactly one switch is on), passes OSCVAL to the
// oscillator, and routes the bidirectional scanpath:
//   scandir = 0 : SCANIN -> sel[1] -> sel[0] -> counter -> SCANOUT
//   scandir = 1 : SCANIN -> counter -> sel[0] -> sel[1] -> SCANOUT
// so one transfer of 18 + 2 bits both clears (or reads) the counter and
// sets the path: the last two bits shifted in forward land in sel.
//
// The select register shifts on the rising edge of SCANCLK while the
// oscillator is not validated (osc_valout low), like the counter it is
// chained to. That a CONTROL block sits between the pins, oscillator and
// counter, that the path is set through the scanpath at the same time as
// the counter is cleared, and the fifth pin for the scan direction come
// from the document; the 2-bit code (tvm_pkg::tvm_path_e), the position of
// the select bits in the chain and the register having no reset are this
// design's own.
module tvm_proto_control
  import tvm_pkg::*;
(
  // cell pins
  input  logic       scanclk,
  input  logic       scanin,
  input  logic       scandir,
  input  logic       oscval,
  output logic       scanout,
  // oscillator
  output logic       osc_valin,
  output logic [3:0] osc_sw,
  input  logic       osc_valout,
  // counter scanpath
  output logic       cnt_si_fwd,
  input  logic       cnt_so_fwd,
  output logic       cnt_si_rev,
  input  logic       cnt_so_rev,
  // observation
  output tvm_path_e  path
);

  logic [PATH_SEL_W-1:0] sel;

  always_ff @(posedge scanclk) begin
    if (!osc_valout) begin
      if (scandir) sel <= {sel[0], cnt_so_rev};
      else         sel <= {scanin, sel[1]};
    end
  end

  assign path       = tvm_path_e'(sel);
  assign osc_sw     = path_switches(path);
  assign osc_valin  = oscval;

  assign cnt_si_fwd = sel[0];
  assign cnt_si_rev = scanin;
  assign scanout    = scandir ? sel[1] : cnt_so_fwd;

endmodule
