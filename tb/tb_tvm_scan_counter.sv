`timescale 1ns/1ps
// tb_tvm_scan_counter: self-checking test of the counter with scanpath.
// An 18-bit bidirectional instance is loaded and read back in both shift
// directions, counts a known number of oscillator pulses, is read out least
// significant bit first, and wraps from all ones to zero. A 16-bit
// one-direction instance checks that scandir is ignored when BIDIR = 0.
module tb_tvm_scan_counter;
  localparam int W = 18;

  int checks = 0, failures = 0;

  logic countclk = 0, countsel = 0, scanclk = 0, scandir = 0, si_fwd = 0, si_rev = 0;
  logic so_fwd, so_rev;
  logic [W-1:0] q;

  logic scanclk16 = 0;
  logic so16, so16r;
  logic [15:0] q16;

  tvm_scan_counter #(.WIDTH(W), .BIDIR(1'b1)) dut (.*);

  tvm_scan_counter #(.WIDTH(16), .BIDIR(1'b0)) dut16 (
    .countclk(1'b0), .countsel(1'b0), .scanclk(scanclk16), .scandir(1'b1),
    .si_fwd(si_fwd), .si_rev(1'b1), .so_fwd(so16), .so_rev(so16r), .q(q16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan_pulse();
    #5 scanclk = 1; #5 scanclk = 0;
  endtask

  // Shift W bits in forward, returning the W bits seen on so_fwd (first in bit 0).
  task automatic shift_fwd(input logic [W-1:0] din, output logic [W-1:0] dout);
    scandir = 0;
    for (int i = 0; i < W; i++) begin
      si_fwd = din[i];
      #1 dout[i] = so_fwd;
      scan_pulse();
    end
  endtask

  task automatic shift_rev(input logic [W-1:0] din, output logic [W-1:0] dout);
    scandir = 1;
    for (int i = 0; i < W; i++) begin
      si_rev = din[i];
      #1 dout[i] = so_rev;
      scan_pulse();
    end
    scandir = 0;
  endtask

  task automatic count_pulses(input int n);
    countsel = 1; #3;
    repeat (n) begin #2 countclk = 1; #2 countclk = 0; end
    #3 countsel = 0; #3;
  endtask

  logic [W-1:0] got, pat;
  logic [W-1:0] rev_img;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    // Forward load: first bit shifted in ends at q[0].
    pat = 18'h2_B5C3;
    shift_fwd(pat, got);
    check(q == pat, $sformatf("forward load q=%h exp %h", q, pat));
    shift_fwd('0, got);
    check(got == pat, $sformatf("forward read %h exp %h", got, pat));
    check(q == '0, "cleared by shifting zeros");

    // Reverse: bits enter at q[0]; the first bit in ends at q[W-1].
    pat = 18'h1_3A97;
    shift_rev(pat, got);
    for (int i = 0; i < W; i++) rev_img[i] = pat[W-1-i];
    check(q == rev_img, $sformatf("reverse load q=%h exp %h", q, rev_img));
    shift_rev('0, got);
    check(got == pat, $sformatf("reverse read %h exp %h", got, pat));

    // Counting from zero.
    count_pulses(1234);
    check(q == 18'd1234, $sformatf("count %0d exp 1234", q));
    shift_fwd('0, got);
    check(got == 18'd1234, $sformatf("count read out %0d exp 1234", got));

    // Scan clock is ignored while counting.
    countsel = 1; #3;
    repeat (5) scan_pulse();
    repeat (7) begin #2 countclk = 1; #2 countclk = 0; end
    #3 countsel = 0; #3;
    check(q == 18'd7, $sformatf("scanclk ignored while counting: %0d", q));

    // Wrap-around.
    shift_fwd(18'h3_FFFD, got);
    count_pulses(5);
    check(q == 18'd2, $sformatf("wrap q=%0d exp 2", q));

    // BIDIR = 0: always shifts forward.
    for (int i = 0; i < 16; i++) begin
      si_fwd = (16'hC3A5 >> i) & 1;
      #5 scanclk16 = 1; #5 scanclk16 = 0;
    end
    check(q16 == 16'hC3A5, $sformatf("unidirectional load %h", q16));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
