`timescale 1ns/1ps
// tvm_ring_osc: behavioural model of the TVM validated ring oscillator (an
// analog circuit, not synthesizable).
//
// N_STAGES inverting delay cells (tvm_delay_cell) form a ring closed
// through a validation stage: while valin is low the ring is held still and
// oscout stays low; while valin is high the ring runs and oscout toggles
// with a period equal to the sum of the rising and falling delays of all
// stages. sw picks the delay path in every cell, so the frequency follows
// one technological parameter. The prototype cell drives sw from its
// control block (programmable oscillator); the industrial cell ties it to a
// single path (the N-DIFF and N-TRANS oscillators).
//
// valout is valin delayed by VAL_DLY_NS. It selects the counter clock.
// oscout is low whenever the ring is stopped and its first rising edge
// comes a full ring delay after valin rises, so that when the counter
// clock is switched between the oscillator and the scan clock the
// oscillator side is low.
//
// The number of stages and the nominal stage delay are this model's own:
// the document gives neither.
module tvm_ring_osc #(
  parameter int unsigned N_STAGES   = 5,    // odd
  parameter real         D0_NS      = 4.0,
  parameter real         VAL_DLY_NS = 1.0
) (
  input  logic        valin,
  input  logic [3:0]  sw,
  input  logic [15:0] vdd_mv,
  input  logic signed [15:0] temp_dc,
  output logic        oscout,
  output logic        valout
);

  logic [N_STAGES:0] node;

  // Validation stage: while valin is low the ring input is forced high, so
  // after an odd number of inverting stages the ring output rests low.
  assign node[0] = ~valin | node[N_STAGES];
  assign oscout  = node[N_STAGES];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    tvm_delay_cell #(.D0_NS(D0_NS)) u_cell (
      .in     (node[i]),
      .sw     (sw),
      .vdd_mv (vdd_mv),
      .temp_dc(temp_dc),
      .out    (node[i+1])
    );
  end

  initial valout = 1'b0;
  always @(valin) valout <= #(VAL_DLY_NS) valin;

endmodule
