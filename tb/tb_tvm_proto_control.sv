`timescale 1ns/1ps
// tb_tvm_proto_control: checks the prototype control block on its own. The
// counter side of the scanpath is played by the testbench. It loads each of
// the four path codes (least significant bit first) and checks the one-hot
// switch enables, the routing of the scanpath in both directions, that the
// select register holds while the oscillator is validated, and that OSCVAL
// reaches the oscillator.
module tb_tvm_proto_control;
  import tvm_pkg::*;
  int checks = 0, failures = 0;

  logic scanclk = 0, scanin = 0, scandir = 0, oscval = 0, osc_valout = 0;
  logic cnt_so_fwd = 0, cnt_so_rev = 0;
  logic scanout, osc_valin, cnt_si_fwd, cnt_si_rev;
  logic [3:0] osc_sw;
  tvm_path_e path;

  tvm_proto_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    #5 scanclk = 1; #5 scanclk = 0;
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int c = 0; c < 4; c++) begin
      scandir = 0;
      scanin = c[0]; pulse();
      scanin = c[1]; pulse();
      #1;
      check(path == tvm_path_e'(c), $sformatf("forward load path %0d got %0d", c, path));
      check(osc_sw == (4'b0001 << c), $sformatf("switch enables %b for path %0d", osc_sw, c));
      check(cnt_si_fwd == c[0], "sel[0] feeds the counter forward");
    end
    // Forward: SCANOUT is the counter's output.
    cnt_so_fwd = 1; #1 check(scanout == 1, "scanout = counter out (fwd)");
    cnt_so_fwd = 0; #1 check(scanout == 0, "scanout = counter out (fwd) 0");
    // Reverse: SCANIN goes to the counter, counter -> sel[0] -> sel[1] -> SCANOUT.
    scandir = 1;
    scanin = 1; #1 check(cnt_si_rev == 1, "scanin feeds counter in reverse");
    cnt_so_rev = 1; pulse();
    cnt_so_rev = 0; pulse();
    #1 check(path == tvm_path_e'(2'b10), $sformatf("reverse load path %0d", path));
    check(scanout == 1, "scanout = sel[1] in reverse");
    // Hold while the oscillator is validated.
    scandir = 0; osc_valout = 1; oscval = 1;
    #1 check(osc_valin == 1, "oscval reaches the oscillator");
    scanin = 1; pulse(); pulse();
    #1 check(path == PATH_NTRANS, $sformatf("select holds while counting: %0d", path));
    osc_valout = 0; oscval = 0;
    #1 check(osc_valin == 0, "oscval low reaches the oscillator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
