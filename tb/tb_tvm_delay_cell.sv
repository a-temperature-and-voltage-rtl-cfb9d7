`timescale 1ns/1ps
// tb_tvm_delay_cell: checks the edge delays of the delay cell model for
// each of the four paths, at the nominal point (5 V, 25 C) and at 4 V,
// 75 C, against hand-computed values, and that an open path holds.
module tb_tvm_delay_cell;
  int checks = 0, failures = 0;

  logic in = 0;
  logic [3:0] sw = 4'b0001;
  logic [15:0] vdd_mv = 16'd5000;
  logic signed [15:0] temp_dc = 16'sd250;
  logic out;

  tvm_delay_cell #(.D0_NS(4.0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Toggle the input and measure the delay to the output edge.
  task automatic edge_delay(input logic [3:0] s, input logic rise_out, input real exp_ns);
    realtime t0, d;
    sw = s;
    in = rise_out;  // output goes to ~in: set up the opposite first
    #50;
    t0 = $realtime;
    in = ~rise_out;
    fork
      @(out);
      #100;
    join_any
    disable fork;
    d = $realtime - t0;
    check(out == rise_out && d > exp_ns - 0.002 && d < exp_ns + 0.002,
          $sformatf("sw=%b rise=%0b delay %0.4f exp %0.4f", s, rise_out, d, exp_ns));
  endtask

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    // Nominal point: every path has the same average delay of 4 ns.
    edge_delay(4'b0001, 1, 4.0);  edge_delay(4'b0001, 0, 4.0);
    edge_delay(4'b0010, 1, 4.0);  edge_delay(4'b0010, 0, 4.0);
    edge_delay(4'b0100, 0, 7.0);  edge_delay(4'b0100, 1, 1.0);
    edge_delay(4'b1000, 1, 7.0);  edge_delay(4'b1000, 0, 1.0);
    // 4 V, 75 C: r_n = 1.2*4.2/3.2, r_p = 1.15*4.2/3.2, r_ndiff = 1.075, r_pdiff = 1.05.
    vdd_mv = 16'd4000; temp_dc = 16'sd750;
    edge_delay(4'b0001, 1, 4.7671875);  edge_delay(4'b0001, 0, 4.7671875);
    edge_delay(4'b0010, 1, 4.6921875);
    edge_delay(4'b0100, 0, 10.9921875); edge_delay(4'b0100, 1, 1.5421875);
    edge_delay(4'b1000, 1, 10.5984375); edge_delay(4'b1000, 0, 1.5421875);
    // Open path: the output holds.
    sw = 4'b0000;
    #20 in = ~in;
    #50 check(out == in, "output holds with no switch on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
