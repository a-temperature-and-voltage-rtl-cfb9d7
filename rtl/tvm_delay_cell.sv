`timescale 1ns/1ps
// tvm_delay_cell: behavioural model of the elementary inverting delay cell
// of the TVM ring oscillator. It is an analog circuit and is not
// synthesizable; this model only reproduces its timing.
//
// The cell is a buffered inverter. Between its input and output buffers,
// four CMOS switches (sw, one-hot) pick one of four delay paths; each path
// is dominated by one technological parameter:
//   sw[0] n-diffusion resistance  : slows both output edges
//   sw[1] p-diffusion resistance  : slows both output edges
//   sw[2] n-transistor resistance : slows only the falling edge, twice as much
//   sw[3] p-transistor resistance : slows only the rising edge, twice as much
// About 75 % of a path's delay comes from its targeted parameter and the
// other 25 % from the average of the n and p transistors, the same for all
// four paths; at nominal conditions every path has about the same delay.
// Those properties follow the published cell. The numbers are this model's
// own: the nominal delay D0_NS, and the laws by which the resistances move
// with the die temperature (temp_dc, tenths of a degree C) and the core
// supply (vdd_mv, millivolts): diffusion resistance rises linearly with
// temperature and ignores the supply; transistor on-resistance rises with
// temperature and falls as 1/(V - 0.8 V).
//
// Interface: in -> out, inverted, after the path delay of that edge. With
// no switch on, the output holds its value (the path is open).
module tvm_delay_cell #(
  parameter real D0_NS = 4.0  // nominal path delay at 5 V, 25 C
) (
  input  logic        in,
  input  logic [3:0]  sw,
  input  logic [15:0] vdd_mv,
  input  logic signed [15:0] temp_dc,
  output logic        out
);

  // Relative resistances (1.0 at 5 V, 25 C).
  function automatic real r_diff(real tco, real t_c);
    return 1.0 + tco * (t_c - 25.0);
  endfunction

  function automatic real r_trans(real tco, real t_c, real v);
    real vv;
    vv = (v < 1.0) ? 1.0 : v;
    return (1.0 + tco * (t_c - 25.0)) * (4.2 / (vv - 0.8));
  endfunction

  // Delay of the output edge that goes to 'rising_out'.
  function automatic real edge_delay(logic [3:0] s, logic rising_out, real t_c, real v);
    real r_n, r_p, r_avg;
    r_n   = r_trans(0.004, t_c, v);
    r_p   = r_trans(0.003, t_c, v);
    r_avg = 0.5 * (r_n + r_p);
    unique case (1'b1)
      s[0]: return D0_NS * (0.75 * r_diff(0.0015, t_c) + 0.25 * r_avg);
      s[1]: return D0_NS * (0.75 * r_diff(0.0010, t_c) + 0.25 * r_avg);
      s[2]: return rising_out ? D0_NS * 0.25 * r_avg
                              : D0_NS * (1.5 * r_n + 0.25 * r_avg);
      s[3]: return rising_out ? D0_NS * (1.5 * r_p + 0.25 * r_avg)
                              : D0_NS * 0.25 * r_avg;
      default: return D0_NS;
    endcase
  endfunction

  real t_c, v;
  assign t_c = real'(temp_dc) / 10.0;
  assign v   = real'(vdd_mv) / 1000.0;

  initial out = 1'b0;

  // Settle to the static value before the first input edge.
  initial begin
    #0.001;
    if (sw != 4'b0000) out = ~in;
  end

  always @(in) begin
    if (sw != 4'b0000) out <= #(edge_delay(sw, ~in, t_c, v)) ~in;
  end

endmodule
