`timescale 1ns/1ps
// tb_tvm_controller: checks the TVM bus controller against a 40-bit scan
// chain modelled in the testbench (shifting on the rising edge of SCANCLK).
// It checks the reset gate time (1 ms at 10 MHz), full and partial
// transfers (bits sent and received), the duration of a transfer
// (2*SCAN_HALF cycles per bit), the exact length of the OSCVAL gate with
// SCANCLK idle, the status bits, and that commands and writes are ignored
// while the controller is busy.
module tb_tvm_controller;
  import tvm_pkg::*;
  localparam int L = 40;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_wr = 0;
  logic [1:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic scanclk, scanin, oscval;
  logic [L-1:0] chain = '0;
  logic scanout;

  tvm_controller dut (.*);

  always #50 clk = ~clk;  // 10 MHz
  always @(posedge scanclk) chain <= {scanin, chain[L-1:1]};
  assign scanout = chain[0];

  int osc_cycles = 0, clk_while_osc = 0, now = 0, sclk_rises = 0;
  always @(posedge scanclk) sclk_rises++;
  always @(posedge clk) begin
    now++;
    if (oscval) osc_cycles++;
    if (oscval && scanclk) clk_while_osc++;
  end

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

  function automatic logic [31:0] cmd(input bit shift, input bit measure, input int len);
    tvm_cmd_t c;
    c = '0;
    c.shift = shift; c.measure = measure; c.shift_len_m1 = 6'(len - 1);
    return c;
  endfunction

  // Wait until idle; return the clk cycles spent.
  task automatic wait_idle(output int cycles);
    logic [31:0] s;
    cycles = 0;
    do begin
      bus_read(REG_CTRL, s);
      cycles++;
    end while (s[1:0] != 0);
  endtask

  logic [31:0] r, prev_bits;
  int cyc, t0;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_read(REG_GATE, r);
    check(r == 32'd10_000, $sformatf("reset gate time %0d", r));

    // Full 32-bit transfer.
    chain = {8'h00, 32'h1234_5678};
    bus_write(REG_SHIFT, 32'hCAFE_F00D);
    bus_write(REG_CTRL, cmd(1, 0, 32));
    t0 = now;
    bus_read(REG_CTRL, r);
    check(r[0] == 1, "shifting flag set");
    bus_write(REG_SHIFT, 32'hFFFF_FFFF);   // ignored while busy
    bus_write(REG_CTRL, cmd(0, 1, 1));     // ignored while busy
    wait_idle(cyc);
    check(now - t0 >= 32 * 4 && now - t0 <= 32 * 4 + 2, $sformatf("32-bit transfer took %0d cycles", now - t0));
    check(sclk_rises == 32, $sformatf("%0d scan clock pulses", sclk_rises));
    bus_read(REG_SHIFT, r);
    check(r == 32'h1234_5678, $sformatf("received %h", r));
    check(chain[L-1:L-32] == 32'hCAFE_F00D, $sformatf("chain holds %h", chain[L-1:L-32]));
    check(osc_cycles == 0, "measure command ignored while shifting");

    // Partial 8-bit transfer: received bits at 7:0.
    prev_bits = chain[7:0];
    bus_write(REG_SHIFT, 32'h0000_00A5);
    bus_write(REG_CTRL, cmd(1, 0, 8));
    wait_idle(cyc);
    bus_read(REG_SHIFT, r);
    check(r[7:0] == prev_bits, $sformatf("8-bit receive %h exp %h", r[7:0], prev_bits));
    check(chain[L-1:L-8] == 8'hA5, "8 bits sent");

    // Measurement: OSCVAL for exactly GATE cycles.
    bus_write(REG_GATE, 32'd57);
    osc_cycles = 0;
    bus_write(REG_CTRL, cmd(0, 1, 1));
    bus_read(REG_CTRL, r);
    check(r[1] == 1, "measuring flag set");
    wait_idle(cyc);
    check(osc_cycles == 57, $sformatf("oscval high %0d cycles, exp 57", osc_cycles));
    check(clk_while_osc == 0, "scanclk idle while oscval high");

    // Default gate of 1 ms after reset.
    rst_n = 0; @(posedge clk); rst_n = 1;
    osc_cycles = 0;
    bus_write(REG_CTRL, cmd(0, 1, 1));
    wait_idle(cyc);
    check(osc_cycles == 10_000, $sformatf("1 ms gate: %0d cycles", osc_cycles));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
