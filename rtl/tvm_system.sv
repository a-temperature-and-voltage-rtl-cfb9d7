`timescale 1ns/1ps
// tvm_system: a TVM system - one controller on the host bus and N_CELLS
// circuits, each carrying an industrial TVM cell.
//
// SCANCLK and OSCVAL are broadcast to every cell; the scanpaths are
// daisy-chained: controller SCANIN -> cell 0 -> cell 1 -> ... ->
// cell N_CELLS-1 -> controller SCANOUT. Every cell holds 2 x 16 bits, so a
// 32-bit transfer moves exactly one cell: the first word read after a
// measurement is the last cell's (bits 15:0 Ftn, bits 31:16 Fdn), the
// N_CELLS-th word is cell 0's. One OSCVAL pulse measures all cells at the
// same time.
//
// N_CELLS = 512 is the document's application (one cell in each of 512
// biprocessor chips). vdd_mv and temp_dc give each circuit's core supply
// and die temperature to the oscillator models; the count arrays are
// observation outputs.
module tvm_system
  import tvm_pkg::*;
#(
  parameter int unsigned N_CELLS  = 512,
  parameter int unsigned CLK_HZ   = 10_000_000,
  parameter int unsigned N_STAGES = 5,
  parameter real         D0_NS    = 4.0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_wr,
  input  logic [1:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  input  logic [15:0]        vdd_mv    [N_CELLS],
  input  logic signed [15:0] temp_dc   [N_CELLS],
  output logic [IND_COUNT_W-1:0] fdn_count [N_CELLS],
  output logic [IND_COUNT_W-1:0] ftn_count [N_CELLS],
  output logic        scanclk,
  output logic        oscval
);

  logic             scanin;
  logic [N_CELLS:0] chain;

  tvm_controller #(.CLK_HZ(CLK_HZ)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .bus_sel  (bus_sel),
    .bus_wr   (bus_wr),
    .bus_addr (bus_addr),
    .bus_wdata(bus_wdata),
    .bus_rdata(bus_rdata),
    .scanclk  (scanclk),
    .scanin   (scanin),
    .scanout  (chain[N_CELLS]),
    .oscval   (oscval)
  );

  assign chain[0] = scanin;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    tvm_ind_cell #(.N_STAGES(N_STAGES), .D0_NS(D0_NS)) u_tvm (
      .scanclk  (scanclk),
      .scanin   (chain[i]),
      .oscval   (oscval),
      .scanout  (chain[i+1]),
      .vdd_mv   (vdd_mv[i]),
      .temp_dc  (temp_dc[i]),
      .fdn_count(fdn_count[i]),
      .ftn_count(ftn_count[i])
    );
  end

endmodule
