`timescale 1ns/1ps
// tb_tvm_ring_osc: runs the 5-stage ring oscillator model on each path and
// checks its period (the sum of the rising and falling delays of all
// stages, worked out by hand), the count of rising edges in a 10 us window,
// that the output rests low while valin is low, the start-up delay and the
// VALOUT delay.
module tb_tvm_ring_osc;
  int checks = 0, failures = 0;

  logic valin = 0;
  logic [3:0] sw = 4'b0001;
  logic [15:0] vdd_mv = 16'd5000;
  logic signed [15:0] temp_dc = 16'sd250;
  logic oscout, valout;

  tvm_ring_osc #(.N_STAGES(5), .D0_NS(4.0), .VAL_DLY_NS(1.0)) dut (.*);

  int rises = 0;
  realtime last_rise = 0, period = 0;
  always @(posedge oscout) begin
    rises++;
    period = $realtime - last_rise;
    last_rise = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // first_ns: delay from valin to the first rising edge (5 stages).
  task automatic run(input logic [3:0] s, input real per_ns, input real first_ns);
    realtime t0;
    int n, exp_n;
    sw = s;
    #200;
    check(oscout == 0, "oscout low while stopped");
    rises = 0;
    t0 = $realtime;
    valin = 1;
    #0.5 check(valout == 0, "valout not yet up");
    #1   check(valout == 1, "valout up after 1 ns");
    @(posedge oscout);
    check($realtime - t0 > first_ns - 0.01 && $realtime - t0 < first_ns + 0.01,
          $sformatf("sw=%b first edge at %0.3f exp %0.3f", s, $realtime - t0, first_ns));
    #(10_000.0 - ($realtime - t0));
    n = rises;
    valin = 0;
    exp_n = int'((10_000.0 - first_ns) / per_ns) + 1;
    check(n >= exp_n - 1 && n <= exp_n + 1,
          $sformatf("sw=%b %0d rises in 10 us, exp %0d", s, n, exp_n));
    check(period > per_ns - 0.01 && period < per_ns + 0.01,
          $sformatf("sw=%b period %0.4f exp %0.4f", s, period, per_ns));
    #200;
    check(oscout == 0 && valout == 0, "stopped after valin low");
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 5 V, 25 C: every path 40 ns. The first edge passes rise,fall,rise,fall,rise.
    run(4'b0001, 40.0, 20.0);
    run(4'b0010, 40.0, 20.0);
    run(4'b0100, 40.0, 3*1.0 + 2*7.0);
    run(4'b1000, 40.0, 3*7.0 + 2*1.0);
    // 4 V, 75 C.
    vdd_mv = 16'd4000; temp_dc = 16'sd750;
    run(4'b0001, 10*4.7671875, 5*4.7671875);
    run(4'b0010, 10*4.6921875, 5*4.6921875);
    run(4'b0100, 5*(10.9921875 + 1.5421875), 3*1.5421875 + 2*10.9921875);
    run(4'b1000, 5*(10.5984375 + 1.5421875), 3*10.5984375 + 2*1.5421875);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
