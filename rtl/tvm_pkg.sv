`timescale 1ns/1ps
// tvm_pkg: types and constants shared by the temperature and voltage
// measurement (TVM) cells and their controller.
//
// A TVM cell turns the die temperature and core supply voltage into
// oscillator frequencies: a ring oscillator whose delay is dominated by one
// technological parameter (n/p diffusion resistance, n/p transistor
// on-resistance) clocks a counter for a fixed gate time, and the count is
// read through a scanpath. The four parameter names and the 18-bit/16-bit
// counter widths follow the published cell; the 2-bit path code, the
// controller register map and the controller clock rate are this design's
// own choices.
package tvm_pkg;

  // Delay path of the elementary delay cell, i.e. which parameter sets
  // the oscillator frequency (Fdn, Fdp, Ftn, Ftp).
  typedef enum logic [1:0] {
    PATH_NDIFF  = 2'd0,
    PATH_PDIFF  = 2'd1,
    PATH_NTRANS = 2'd2,
    PATH_PTRANS = 2'd3
  } tvm_path_e;

  localparam int unsigned PROTO_COUNT_W = 18;  // prototype counter
  localparam int unsigned IND_COUNT_W   = 16;  // industrial counters
  localparam int unsigned PATH_SEL_W    = 2;   // prototype path select bits in the scanpath

  // One-hot switch enables of the delay cell: exactly one switch is on.
  function automatic logic [3:0] path_switches(tvm_path_e p);
    return 4'b0001 << p;
  endfunction

  // Controller register map (word addresses on the host bus).
  typedef enum logic [1:0] {
    REG_CTRL  = 2'd0,  // write: command; read: status
    REG_SHIFT = 2'd1,  // write: bits to send; read: bits received
    REG_GATE  = 2'd2   // oscillator gate time, controller clock cycles
  } tvm_reg_e;         // address 3 reads as zero

  // Command word written to REG_CTRL.
  typedef struct packed {
    logic [17:0] reserved;
    logic [5:0]  shift_len_m1;  // bits to shift minus one (1..32 bits)
    logic [5:0]  reserved2;
    logic        measure;       // start an oscillator gate period
    logic        shift;         // start a scanpath transfer
  } tvm_cmd_t;

  // Status word read from REG_CTRL.
  typedef struct packed {
    logic [29:0] reserved;
    logic        measuring;
    logic        shifting;
  } tvm_status_t;

endpackage
