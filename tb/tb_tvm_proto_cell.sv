`timescale 1ns/1ps
// tb_tvm_proto_cell: runs the prototype cell's three-step measurement for
// all four oscillator paths at two operating points:
//   1. shift 20 bits: 18 zeros to clear the counter, then the path code,
//   2. OSCVAL high for a 10 us gate,
//   3. shift 20 bits out (the next transfer also loads the next path).
// Each count is compared with the gate time divided by the oscillator
// period worked out by hand from the delay-cell laws, within one count.
// One measurement uses the reverse scan direction, where the count comes
// out most significant bit first after the path code.
module tb_tvm_proto_cell;
  import tvm_pkg::*;
  localparam int W = 18;
  localparam real GATE_NS = 10_000.0;

  int checks = 0, failures = 0;

  logic scanclk = 0, scanin = 0, scandir = 0, oscval = 0;
  logic scanout;
  logic [15:0] vdd_mv = 16'd5000;
  logic signed [15:0] temp_dc = 16'sd250;
  logic [W-1:0] count;
  tvm_path_e path;

  tvm_proto_cell dut (.*);

  // Delays are kept to the 1 ps time precision of the simulation.
  function automatic real ps(input real ns);
    return real'(longint'(ns * 1000.0)) / 1000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected oscillator period and start-up delay of a 5-stage ring with
  // 4 ns nominal stage delay (see tvm_delay_cell for the laws).
  function automatic void expected(input int p, input real t, input real v,
                                   output real per, output real first);
    real rn, rp, ra, d, slow, fast;
    rn = (1.0 + 0.004 * (t - 25.0)) * 4.2 / (v - 0.8);
    rp = (1.0 + 0.003 * (t - 25.0)) * 4.2 / (v - 0.8);
    ra = (rn + rp) / 2.0;
    case (p)
      0: begin d = 4.0 * (0.75 * (1.0 + 0.0015 * (t - 25.0)) + 0.25 * ra); d = ps(d); per = 10 * d; first = 5 * d; end
      1: begin d = 4.0 * (0.75 * (1.0 + 0.0010 * (t - 25.0)) + 0.25 * ra); d = ps(d); per = 10 * d; first = 5 * d; end
      2: begin slow = 4.0 * (1.5 * rn + 0.25 * ra); fast = ps(ra); slow = ps(slow);
               per = 5 * (slow + fast); first = 3 * fast + 2 * slow; end
      default: begin slow = 4.0 * (1.5 * rp + 0.25 * ra); fast = ps(ra); slow = ps(slow);
               per = 5 * (slow + fast); first = 3 * slow + 2 * fast; end
    endcase
  endfunction

  // One 20-bit transfer: din[i] is the i-th bit sent, dout[i] the i-th seen.
  task automatic transfer(input logic dir, input logic [W+1:0] din, output logic [W+1:0] dout);
    scandir = dir;
    #10;
    for (int i = 0; i < W + 2; i++) begin
      scanin = din[i];
      #10 dout[i] = scanout;
      scanclk = 1; #10 scanclk = 0;
    end
    #10;
  endtask

  task automatic gate();
    #50 oscval = 1;
    #(GATE_NS) oscval = 0;
    #200;
  endtask

  logic [W+1:0] rx;
  int exp_n;
  real per, first;

  function automatic int exp_count(input int p);
    real pr, f;
    expected(p, real'(temp_dc) / 10.0, real'(vdd_mv) / 1000.0, pr, f);
    return int'((GATE_NS - f) / pr) + 1;
  endfunction

  task automatic check_count(input int p, input logic [W-1:0] got, input string how);
    exp_n = exp_count(p);
    check(int'(got) >= exp_n - 1 && int'(got) <= exp_n + 1,
          $sformatf("%s path %0d count %0d exp %0d", how, p, got, exp_n));
  endtask

  int fdn_5v, fdn_4v;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    for (int op = 0; op < 2; op++) begin
      if (op == 1) begin vdd_mv = 16'd4000; temp_dc = 16'sd750; end
      transfer(0, {2'(0), {W{1'b0}}}, rx);
      for (int p = 0; p < 4; p++) begin
        check(path == tvm_path_e'(p), $sformatf("path %0d selected (%0d)", p, path));
        check(count == 0, "counter cleared");
        gate();
        // read out, clear and select the next path in the same transfer
        transfer(0, {2'(p + 1), {W{1'b0}}}, rx);
        check_count(p, rx[W-1:0], "fwd");
        check(rx[W+1:W] == 2'(p), "path code read back after the count");
        if (p == 0 && op == 0) fdn_5v = int'(rx[W-1:0]);
        if (p == 0 && op == 1) fdn_4v = int'(rx[W-1:0]);
      end
    end
    check(fdn_5v > fdn_4v, "Fdn falls at lower supply and higher temperature");

    // Reverse direction: code bits first (sel[1], sel[0]), then the counter.
    transfer(1, {{W{1'b0}}, 1'b1, 1'b0}, rx);    // path code 2'b01 = PATH_PDIFF
    check(path == PATH_PDIFF, $sformatf("reverse select: %0d", path));
    gate();
    transfer(1, '0, rx);
    begin
      logic [W-1:0] c;
      for (int i = 0; i < W; i++) c[W-1-i] = rx[i + 2];
      check_count(1, c, "rev");
      check(rx[1:0] == 2'b10, "reverse readout starts with sel[1], sel[0]");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
