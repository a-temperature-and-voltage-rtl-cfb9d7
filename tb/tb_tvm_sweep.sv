`timescale 1ns/1ps
// tb_tvm_sweep: the 81-point test grid of the TVM method run on one
// industrial cell: supply 4.00 to 6.00 V in 0.25 V steps times die
// temperature 20 to 80 C in 7.5 C steps. At each point the cell is cleared,
// gated for 1 ms and read through its scanpath. Each Fdn/Ftn count is
// checked against the oscillator model (within one count plus the 1 ps
// rounding of the delays), and all 81 (Fdn, Ftn) pairs must differ by more
// than one count in at least one of the two, so that (T, V) can be
// recovered from them.
module tb_tvm_sweep;
  localparam real GATE_NS = 1_000_000.0;  // 1 ms
  int checks = 0, failures = 0;

  logic scanclk = 0, scanin = 0, oscval = 0;
  logic scanout;
  logic [15:0] vdd_mv = 16'd5000;
  logic signed [15:0] temp_dc = 16'sd250;
  logic [15:0] fdn_count, ftn_count;

  tvm_ind_cell dut (.*);

  function automatic real ps(input real ns);
    return real'(longint'(ns * 1000.0)) / 1000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int exp_count(input bit trans, input real t, input real v);
    real rn, rp, ra, d, per, first, slow, fast;
    rn = (1.0 + 0.004 * (t - 25.0)) * 4.2 / (v - 0.8);
    rp = (1.0 + 0.003 * (t - 25.0)) * 4.2 / (v - 0.8);
    ra = (rn + rp) / 2.0;
    if (!trans) begin
      d = ps(4.0 * (0.75 * (1.0 + 0.0015 * (t - 25.0)) + 0.25 * ra));
      per = 10 * d; first = 5 * d;
    end else begin
      slow = ps(4.0 * (1.5 * rn + 0.25 * ra)); fast = ps(ra);
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

  int fdn [81], ftn [81];
  logic [31:0] rx;
  int k, en, et, tol, clashes;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    transfer('0, rx);
    k = 0;
    for (int vi = 0; vi < 9; vi++)
      for (int ti = 0; ti < 9; ti++) begin
        vdd_mv  = 16'(4000 + 250 * vi);
        temp_dc = 16'(200 + 75 * ti);
        #100 oscval = 1;
        #(GATE_NS) oscval = 0;
        #200;
        transfer('0, rx);
        fdn[k] = int'(rx[31:16]);
        ftn[k] = int'(rx[15:0]);
        en = exp_count(0, real'(temp_dc) / 10.0, real'(vdd_mv) / 1000.0);
        et = exp_count(1, real'(temp_dc) / 10.0, real'(vdd_mv) / 1000.0);
        // +-1 count, plus up to 1 ps per edge where a delay sits on a
        // rounding boundary of the 1 ps time precision (2.5e-4 relative).
        tol = 1 + en / 4000;
        check(fdn[k] >= en - tol && fdn[k] <= en + tol,
              $sformatf("%0d mV %0d dC: Fdn %0d exp %0d", vdd_mv, temp_dc, fdn[k], en));
        tol = 1 + et / 4000;
        check(ftn[k] >= et - tol && ftn[k] <= et + tol,
              $sformatf("%0d mV %0d dC: Ftn %0d exp %0d", vdd_mv, temp_dc, ftn[k], et));
        k++;
      end
    clashes = 0;
    for (int a = 0; a < 81; a++)
      for (int b = a + 1; b < 81; b++)
        if ((fdn[a] - fdn[b]) <= 1 && (fdn[b] - fdn[a]) <= 1 &&
            (ftn[a] - ftn[b]) <= 1 && (ftn[b] - ftn[a]) <= 1) clashes++;
    check(clashes == 0, $sformatf("%0d grid points not told apart by (Fdn, Ftn)", clashes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
