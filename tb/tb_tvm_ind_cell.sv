`timescale 1ns/1ps
// tb_tvm_ind_cell: checks the industrial cell. A 32-bit pattern shifted in
// must come back out unchanged (N-DIFF counter then N-TRANS counter on one
// scanpath). Then, at two operating points, the counters are cleared, one
// 10 us OSCVAL gate measures both oscillators at once, and the 32 bits read
// out must hold Ftn in bits 15:0 and Fdn in bits 31:16, each within one
// count of the gate time over the hand-computed oscillator period.
module tb_tvm_ind_cell;
  localparam real GATE_NS = 10_000.0;
  int checks = 0, failures = 0;

  logic scanclk = 0, scanin = 0, oscval = 0;
  logic scanout;
  logic [15:0] vdd_mv = 16'd5000;
  logic signed [15:0] temp_dc = 16'sd250;
  logic [15:0] fdn_count, ftn_count;

  tvm_ind_cell dut (.*);

  // Delays are kept to the 1 ps time precision of the simulation.
  function automatic real ps(input real ns);
    return real'(longint'(ns * 1000.0)) / 1000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 5 stages, 4 ns nominal: n-diffusion and n-transistor rings.
  function automatic int exp_count(input bit trans, input real t, input real v);
    real rn, rp, ra, d, per, first, slow, fast;
    rn = (1.0 + 0.004 * (t - 25.0)) * 4.2 / (v - 0.8);
    rp = (1.0 + 0.003 * (t - 25.0)) * 4.2 / (v - 0.8);
    ra = (rn + rp) / 2.0;
    if (!trans) begin
      d = 4.0 * (0.75 * (1.0 + 0.0015 * (t - 25.0)) + 0.25 * ra);
      d = ps(d); per = 10 * d; first = 5 * d;
    end else begin
      slow = 4.0 * (1.5 * rn + 0.25 * ra); fast = ps(ra); slow = ps(slow);
      per = 5 * (slow + fast); first = 3 * fast + 2 * slow;
    end
    return int'((GATE_NS - first) / per) + 1;
  endfunction

  task automatic transfer(input logic [31:0] din, output logic [31:0] dout);
    for (int i = 0; i < 32; i++) begin
      scanin = din[i];
      #10 dout[i] = scanout;
      scanclk = 1; #10 scanclk = 0;
    end
    #10;
  endtask

  logic [31:0] rx;
  int en, et;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    transfer(32'hDEAD_BEEF, rx);
    check(fdn_count == 16'hDEAD && ftn_count == 16'hBEEF,
          $sformatf("load: fdn %h ftn %h", fdn_count, ftn_count));
    transfer(32'h0, rx);
    check(rx == 32'hDEAD_BEEF, $sformatf("pattern read back %h", rx));
    for (int op = 0; op < 3; op++) begin
      case (op)
        0: begin vdd_mv = 16'd5000; temp_dc = 16'sd250; end
        1: begin vdd_mv = 16'd4000; temp_dc = 16'sd750; end
        default: begin vdd_mv = 16'd6000; temp_dc = 16'sd200; end
      endcase
      check(fdn_count == 0 && ftn_count == 0, "counters cleared");
      #50 oscval = 1;
      #(GATE_NS) oscval = 0;
      #200;
      transfer(32'h0, rx);
      en = exp_count(0, real'(temp_dc) / 10.0, real'(vdd_mv) / 1000.0);
      et = exp_count(1, real'(temp_dc) / 10.0, real'(vdd_mv) / 1000.0);
      check(int'(rx[31:16]) >= en - 1 && int'(rx[31:16]) <= en + 1,
            $sformatf("op %0d Fdn count %0d exp %0d", op, rx[31:16], en));
      check(int'(rx[15:0]) >= et - 1 && int'(rx[15:0]) <= et + 1,
            $sformatf("op %0d Ftn count %0d exp %0d", op, rx[15:0], et));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
