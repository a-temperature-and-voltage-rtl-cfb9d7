`timescale 1ns/1ps
// tb_tvm_top: end-to-end run of the whole design with 16 industrial cells
// on the scan chain (the default is 512, see tb_tvm_top_full), plus the
// prototype cell.
//
// System side, as a host would do it: clear all 16 cells (16 transfers
// of 32 zero bits), run one measurement with the gate time the controller
// resets to (1 ms), then read the 16 words back, last cell first, and
// compare each Fdn/Ftn count with the gate time over the hand-computed
// oscillator period (within one count). The cells are spread over 4-6 V
// and 20-80 C. A measure command issued during a transfer must be ignored.
//
// Prototype side, in parallel on its own pins: the three-step measurement
// with a 1 ms gate on each of the four paths, scanning forward, and once
// more on the p-diffusion path scanning in reverse.
//
// Each mechanism (transfer, clear, measurement, ignored busy command,
// forward and reverse scan, each prototype path) is counted and must
// occur at least once.
module tb_tvm_top;
  import tvm_pkg::*;
  localparam int N = 16;
  localparam real GATE_NS = 1_000_000.0;  // 1 ms
  localparam int PW = PROTO_COUNT_W;

  int checks = 0, failures = 0;
  int n_transfers = 0, n_clears = 0, n_measures = 0, n_ignored = 0;
  int n_fwd = 0, n_rev = 0;
  int path_runs [4] = '{0, 0, 0, 0};

  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_wr = 0;
  logic [1:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic [15:0] vdd_mv [N];
  logic signed [15:0] temp_dc [N];
  logic [15:0] fdn_count [N], ftn_count [N];
  logic sys_scanclk, sys_oscval;
  logic p_scanclk = 0, p_scanin = 0, p_scandir = 0, p_oscval = 0;
  logic p_scanout;
  logic [15:0] p_vdd_mv = 16'd4500;
  logic signed [15:0] p_temp_dc = 16'sd600;
  logic [PW-1:0] p_count;
  tvm_path_e p_path;

  tvm_top #(.N_CELLS(N)) dut (.*);

  always #50 clk = ~clk;  // 10 MHz

  // Delays are kept to the 1 ps time precision of the simulation.
  function automatic real ps(input real ns);
    return real'(longint'(ns * 1000.0)) / 1000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected count of a 5-stage ring, 4 ns nominal stage delay, for a gate.
  function automatic int exp_count(input int p, input real t, input real v);
    real rn, rp, ra, d, per, first, slow, fast;
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
    return int'((GATE_NS - first) / per) + 1;
  endfunction

  // ---------------- host side of the TVM system ----------------
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

  task automatic transfer(input logic [31:0] din, output logic [31:0] dout, input bit poke);
    tvm_cmd_t c;
    logic [31:0] s;
    c = '0; c.shift = 1; c.shift_len_m1 = 6'd31;
    bus_write(REG_SHIFT, din);
    bus_write(REG_CTRL, c);
    if (poke) begin
      c = '0; c.measure = 1;
      bus_write(REG_CTRL, c);
      bus_read(REG_CTRL, s);
      if (!sys_oscval && s[1] == 0) n_ignored++;
    end
    wait_idle();
    bus_read(REG_SHIFT, dout);
    n_transfers++;
  endtask

  int osc_periods = 0;
  always @(posedge sys_oscval) osc_periods++;

  task automatic run_system();
    logic [31:0] rx, g;
    tvm_cmd_t c;
    int ci, en, et;
    bus_read(REG_GATE, g);
    check(g == 32'd10_000, $sformatf("gate resets to 1 ms: %0d cycles", g));
    for (int i = 0; i < N; i++) transfer('0, rx, i == 7);
    for (int i = 0; i < N; i++)
      check(fdn_count[i] == 0 && ftn_count[i] == 0, $sformatf("cell %0d cleared", i));
    n_clears++;
    check(osc_periods == 0, "measure command during a transfer was ignored");
    c = '0; c.measure = 1;
    bus_write(REG_CTRL, c);
    wait_idle();
    n_measures++;
    check(osc_periods == 1, "one gate period");
    for (int k = 0; k < N; k++) begin
      ci = N - 1 - k;
      en = exp_count(0, real'(temp_dc[ci]) / 10.0, real'(vdd_mv[ci]) / 1000.0);
      et = exp_count(2, real'(temp_dc[ci]) / 10.0, real'(vdd_mv[ci]) / 1000.0);
      transfer('0, rx, 0);
      check(int'(rx[31:16]) >= en - 1 && int'(rx[31:16]) <= en + 1,
            $sformatf("cell %0d Fdn %0d exp %0d", ci, rx[31:16], en));
      check(int'(rx[15:0]) >= et - 1 && int'(rx[15:0]) <= et + 1,
            $sformatf("cell %0d Ftn %0d exp %0d", ci, rx[15:0], et));
    end
  endtask

  // ---------------- prototype cell on its own pins ----------------
  task automatic p_transfer(input logic dir, input logic [PW+1:0] din, output logic [PW+1:0] dout);
    p_scandir = dir;
    #20;
    for (int i = 0; i < PW + 2; i++) begin
      p_scanin = din[i];
      #20 dout[i] = p_scanout;
      p_scanclk = 1; #20 p_scanclk = 0;
    end
    #20;
    if (dir) n_rev++; else n_fwd++;
  endtask

  task automatic p_gate();
    #100 p_oscval = 1;
    #(GATE_NS) p_oscval = 0;
    #500;
  endtask

  task automatic run_proto();
    logic [PW+1:0] rx;
    logic [PW-1:0] c;
    int e;
    p_transfer(0, {2'(0), {PW{1'b0}}}, rx);
    for (int p = 0; p < 4; p++) begin
      check(p_path == tvm_path_e'(p) && p_count == 0, $sformatf("prototype path %0d set, counter clear", p));
      p_gate();
      p_transfer(0, {2'(p + 1), {PW{1'b0}}}, rx);
      e = exp_count(p, real'(p_temp_dc) / 10.0, real'(p_vdd_mv) / 1000.0);
      check(int'(rx[PW-1:0]) >= e - 1 && int'(rx[PW-1:0]) <= e + 1,
            $sformatf("prototype path %0d count %0d exp %0d", p, rx[PW-1:0], e));
      path_runs[p]++;
    end
    p_transfer(1, {{PW{1'b0}}, 1'b1, 1'b0}, rx);   // reverse: select p-diffusion
    check(p_path == PATH_PDIFF, "prototype reverse select");
    p_gate();
    p_transfer(1, '0, rx);
    for (int i = 0; i < PW; i++) c[PW-1-i] = rx[i + 2];
    e = exp_count(1, real'(p_temp_dc) / 10.0, real'(p_vdd_mv) / 1000.0);
    check(int'(c) >= e - 1 && int'(c) <= e + 1,
          $sformatf("prototype reverse count %0d exp %0d", c, e));
  endtask

  initial begin
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      vdd_mv[i]  = 16'(4000 + (i * 37) % 2001);
      temp_dc[i] = 16'(200 + (i * 53) % 601);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_system();
      run_proto();
    join
    check(n_transfers > 0, "transfers happened");
    check(n_clears > 0, "clear happened");
    check(n_measures > 0, "measurement happened");
    check(n_ignored > 0, "busy command ignored");
    check(n_fwd > 0 && n_rev > 0, "prototype scanned both ways");
    for (int p = 0; p < 4; p++) check(path_runs[p] > 0, $sformatf("prototype path %0d measured", p));
    $display("transfers=%0d clears=%0d measures=%0d ignored=%0d fwd=%0d rev=%0d paths=%0d/%0d/%0d/%0d",
             n_transfers, n_clears, n_measures, n_ignored, n_fwd, n_rev,
             path_runs[0], path_runs[1], path_runs[2], path_runs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
