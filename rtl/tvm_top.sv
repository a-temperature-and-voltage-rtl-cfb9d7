`timescale 1ns/1ps
// tvm_top: the temperature and voltage measurement design.
//
// Two parts side by side:
//  * u_sys, the TVM system: a bus controller and N_CELLS industrial cells
//    (two simultaneous oscillators, N-diffusion and N-transistor, each with
//    a 16-bit counter) on one scan chain; the host reads every cell's Fdn
//    and Ftn counts through the controller's registers.
//  * u_proto, the prototype cell with its own five pins: one ring
//    oscillator programmable to four delay paths, an 18-bit counter and a
//    bidirectional scanpath.
// The host computes temperature and voltage from (Fdn, Ftn) with a
// per-chip calibration polynomial; that is software and not part of the
// RTL. vdd_mv / temp_dc inputs set the conditions seen by the behavioural
// oscillator models.
module tvm_top
  import tvm_pkg::*;
#(
  parameter int unsigned N_CELLS = 512,
  parameter int unsigned CLK_HZ  = 10_000_000
) (
  // TVM system
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_wr,
  input  logic [1:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  input  logic [15:0]        vdd_mv  [N_CELLS],
  input  logic signed [15:0] temp_dc [N_CELLS],
  output logic [IND_COUNT_W-1:0] fdn_count [N_CELLS],
  output logic [IND_COUNT_W-1:0] ftn_count [N_CELLS],
  output logic        sys_scanclk,
  output logic        sys_oscval,
  // prototype cell
  input  logic        p_scanclk,
  input  logic        p_scanin,
  input  logic        p_scandir,
  input  logic        p_oscval,
  output logic        p_scanout,
  input  logic [15:0]        p_vdd_mv,
  input  logic signed [15:0] p_temp_dc,
  output logic [PROTO_COUNT_W-1:0] p_count,
  output tvm_path_e   p_path
);

  tvm_system #(.N_CELLS(N_CELLS), .CLK_HZ(CLK_HZ)) u_sys (
    .clk      (clk),
    .rst_n    (rst_n),
    .bus_sel  (bus_sel),
    .bus_wr   (bus_wr),
    .bus_addr (bus_addr),
    .bus_wdata(bus_wdata),
    .bus_rdata(bus_rdata),
    .vdd_mv   (vdd_mv),
    .temp_dc  (temp_dc),
    .fdn_count(fdn_count),
    .ftn_count(ftn_count),
    .scanclk  (sys_scanclk),
    .oscval   (sys_oscval)
  );

  tvm_proto_cell u_proto (
    .scanclk(p_scanclk),
    .scanin (p_scanin),
    .scandir(p_scandir),
    .oscval (p_oscval),
    .scanout(p_scanout),
    .vdd_mv (p_vdd_mv),
    .temp_dc(p_temp_dc),
    .count  (p_count),
    .path   (p_path)
  );

endmodule
