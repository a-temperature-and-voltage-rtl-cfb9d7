`timescale 1ns/1ps
// tb_tvm_system: plays the host of a TVM system with 6 cells, each at its
// own supply and temperature. The host clears every counter through the
// chained scanpaths, starts one measurement (all cells at once), then reads
// one 32-bit word per ci, last ci first, which also clears the counters
// for the next round. Each Fdn/Ftn count is compared with the gate time
// over the hand-computed oscillator period, within one count. A second
// round at other conditions checks that reading out cleared the counters.
module tb_tvm_system;
  import tvm_pkg::*;
  localparam int N = 6;
  localparam int GATE = 100;          // cycles of 100 ns: 10 us
  localparam real GATE_NS = 100.0 * GATE;

  int checks = 0, failures = 0;
  int n_transfers = 0, n_measures = 0;

  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_wr = 0;
  logic [1:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic [15:0] vdd_mv [N];
  logic signed [15:0] temp_dc [N];
  logic [15:0] fdn_count [N], ftn_count [N];
  logic scanclk, oscval;

  tvm_system #(.N_CELLS(N)) dut (.*);

  always #50 clk = ~clk;

  // Delays are kept to the 1 ps time precision of the simulation.
  function automatic real ps(input real ns);
    return real'(longint'(ns * 1000.0)) / 1000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_wr = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_wr = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_wr = 0; bus_addr = a;
    #1 d = bus_rdata;
    bus_sel = 0;
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    do bus_read(REG_CTRL, s); while (s[1:0] != 0);
  endtask

  task automatic transfer(input logic [31:0] din, output logic [31:0] dout);
    tvm_cmd_t c;
    c = '0; c.shift = 1; c.shift_len_m1 = 6'd31;
    bus_write(REG_SHIFT, din);
    bus_write(REG_CTRL, c);
    wait_idle();
    bus_read(REG_SHIFT, dout);
    n_transfers++;
  endtask

  task automatic measure();
    tvm_cmd_t c;
    c = '0; c.measure = 1;
    bus_write(REG_CTRL, c);
    wait_idle();
    n_measures++;
  endtask

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

  logic [31:0] rx;
  int ci, en, et;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      vdd_mv[i]  = 16'(4000 + 400 * i);
      temp_dc[i] = 16'(200 + 120 * i);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_write(REG_GATE, GATE);
    for (int i = 0; i < N; i++) transfer('0, rx);      // clear
    for (int i = 0; i < N; i++)
      check(fdn_count[i] == 0 && ftn_count[i] == 0, $sformatf("ci %0d cleared", i));
    for (int round = 0; round < 2; round++) begin
      if (round == 1)
        for (int i = 0; i < N; i++) begin
          vdd_mv[i]  = 16'(6000 - 300 * i);
          temp_dc[i] = 16'(800 - 100 * i);
        end
      measure();
      for (int i = 0; i < N; i++)
        check(fdn_count[i] != 0 && ftn_count[i] != 0, $sformatf("cell %0d counters ran", i));
      for (int k = 0; k < N; k++) begin
        ci = N - 1 - k;
        en = exp_count(0, real'(temp_dc[ci]) / 10.0, real'(vdd_mv[ci]) / 1000.0);
        et = exp_count(1, real'(temp_dc[ci]) / 10.0, real'(vdd_mv[ci]) / 1000.0);
        transfer('0, rx);
        check(int'(rx[31:16]) >= en - 1 && int'(rx[31:16]) <= en + 1,
              $sformatf("round %0d cell %0d Fdn %0d exp %0d", round, ci, rx[31:16], en));
        check(int'(rx[15:0]) >= et - 1 && int'(rx[15:0]) <= et + 1,
              $sformatf("round %0d cell %0d Ftn %0d exp %0d", round, ci, rx[15:0], et));
      end
    end
    check(n_transfers == 3 * N && n_measures == 2, "all operations ran");
    $display("transfers=%0d measurements=%0d", n_transfers, n_measures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
