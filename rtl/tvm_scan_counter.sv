`timescale 1ns/1ps
// tvm_scan_counter: frequency counter with an integrated scanpath.
//
// The same WIDTH flip-flops serve as a binary up-counter and as a shift
// register. countsel (the oscillator's VALOUT) selects their clock and
// their function:
//   countsel = 1 : clocked by countclk (the ring oscillator); q <= q + 1
//   countsel = 0 : clocked by scanclk; the register shifts one bit
// Shifting forward (scandir = 0), a bit enters at the top (si_fwd -> q[MSB])
// and the bottom bit leaves on so_fwd = q[0], so a count is read least
// significant bit first. With BIDIR = 1 the path can also shift the other
// way (scandir = 1): si_rev -> q[0], so_rev = q[MSB]. With BIDIR = 0 the
// scandir and si_rev inputs are ignored.
//
// A measurement is: clear the counter by shifting zeros in, raise countsel
// for the gate time, lower it, shift the count out. The counter wraps
// past 2**WIDTH - 1.
//
// From the document: the 18-bit prototype width, the 16-bit industrial
// width, the counter doubling as the scanpath, the bidirectional scanpath
// of the prototype, and the COUNTCLK / COUNTSEL / SCANCLK pins. This
// design's own: the shift order, rising-edge clocking, the clock
// multiplexer and the wrap-around. The clock multiplexer is glitch-free
// only if scanclk is low whenever countsel changes; the oscillator side is
// low then by construction of the validated oscillator.
module tvm_scan_counter #(
  parameter int unsigned WIDTH = 18,
  parameter bit          BIDIR = 1'b1
) (
  input  logic             countclk,
  input  logic             countsel,
  input  logic             scanclk,
  input  logic             scandir,
  input  logic             si_fwd,
  input  logic             si_rev,
  output logic             so_fwd,
  output logic             so_rev,
  output logic [WIDTH-1:0] q
);

  logic cclk;
  logic rev;

  assign cclk = countsel ? countclk : scanclk;
  assign rev  = BIDIR && scandir;

  always_ff @(posedge cclk) begin
    if (countsel)  q <= q + 1'b1;
    else if (rev)  q <= {q[WIDTH-2:0], si_rev};
    else           q <= {si_fwd, q[WIDTH-1:1]};
  end

  assign so_fwd = q[0];
  assign so_rev = q[WIDTH-1];

endmodule
