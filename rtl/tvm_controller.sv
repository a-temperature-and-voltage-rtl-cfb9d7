`timescale 1ns/1ps
// tvm_controller: interface between a host bus and a chain of TVM cells.
//
// The host reaches every counter of every cell through the concatenated
// scanpaths, and starts the oscillators for a set time. The controller
// drives the four shared lines: SCANCLK and OSCVAL go to all cells, SCANIN
// to the first cell of the chain, and SCANOUT comes back from the last.
//
// Registers (32-bit words, addressed by bus_addr, see tvm_pkg):
//   0 CTRL  write: command (tvm_cmd_t): shift = transfer shift_len_m1+1 bits
//                  (1..32), measure = raise OSCVAL for GATE cycles.
//           read : status (tvm_status_t): shifting, measuring.
//   1 SHIFT write: the bits to send, bit 0 first.
//           read : after a transfer of L bits, bits L-1..0 hold the bits
//                  received from SCANOUT, the first one in bit 0.
//   2 GATE  read/write: gate time in clk cycles; resets to GATE_RESET,
//           1 ms at CLK_HZ.
// Commands and SHIFT writes are ignored while a command runs. A chain
// longer than 32 bits is read with several transfers.
//
// Scan timing: each bit takes 2*SCAN_HALF clk cycles: SCANCLK low with the
// new SCANIN bit for SCAN_HALF cycles, SCANOUT sampled at the end of that
// low phase, then SCANCLK high for SCAN_HALF cycles (the cells shift on
// the rising edge). A measurement holds OSCVAL high for exactly GATE
// cycles with SCANCLK low, then waits SETTLE cycles for the oscillators
// to stop before the controller reports idle.
//
// The document only says the interface is simple, sits in a programmable
// gate array and lets the host read, write and activate the oscillators
// for a given time; the register map, the 32-bit transfer window, the
// clock rate and the timing above are this design's own.
module tvm_controller
  import tvm_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 10_000_000,
  parameter int unsigned GATE_RESET = CLK_HZ / 1000,  // 1 ms
  parameter int unsigned SCAN_HALF  = 2,
  parameter int unsigned SETTLE     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        bus_sel,
  input  logic        bus_wr,
  input  logic [1:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // TVM lines
  output logic        scanclk,
  output logic        scanin,
  input  logic        scanout,
  output logic        oscval
);

  typedef enum logic [2:0] {S_IDLE, S_LOW, S_HIGH, S_MEASURE, S_SETTLE} state_e;

  state_e      state;
  logic [31:0] shreg;
  logic [31:0] gate;
  logic [31:0] timer;
  logic [5:0]  len_m1;
  logic [5:0]  bits_left;
  tvm_cmd_t    cmd;
  tvm_status_t status;
  logic        wr_ctrl, wr_shift, wr_gate;

  assign cmd      = tvm_cmd_t'(bus_wdata);
  assign wr_ctrl  = bus_sel && bus_wr && bus_addr == REG_CTRL;
  assign wr_shift = bus_sel && bus_wr && bus_addr == REG_SHIFT;
  assign wr_gate  = bus_sel && bus_wr && bus_addr == REG_GATE;

  always_comb begin
    status           = '0;
    status.shifting  = state inside {S_LOW, S_HIGH};
    status.measuring = state inside {S_MEASURE, S_SETTLE};
    unique case (bus_addr)
      REG_CTRL:  bus_rdata = status;
      REG_SHIFT: bus_rdata = shreg;
      REG_GATE:  bus_rdata = gate;
      default:   bus_rdata = '0;
    endcase
  end

  // Received bit enters at position len_m1 as the register shifts down.
  function automatic logic [31:0] shift_in(logic [31:0] r, logic b, logic [5:0] top);
    logic [31:0] n;
    n      = r >> 1;
    n[top[4:0]] = b;
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      shreg     <= '0;
      gate      <= GATE_RESET;
      timer     <= '0;
      len_m1    <= '0;
      bits_left <= '0;
      scanclk   <= 1'b0;
      scanin    <= 1'b0;
      oscval    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (wr_shift) shreg <= bus_wdata;
          if (wr_gate)  gate  <= bus_wdata;
          if (wr_ctrl && cmd.shift) begin
            len_m1    <= cmd.shift_len_m1;
            bits_left <= cmd.shift_len_m1;
            scanin    <= shreg[0];
            timer     <= 32'(SCAN_HALF - 1);
            state     <= S_LOW;
          end else if (wr_ctrl && cmd.measure && gate != 0) begin
            oscval <= 1'b1;
            timer  <= gate - 1;
            state  <= S_MEASURE;
          end
        end
        S_LOW: begin
          if (timer != 0) timer <= timer - 1;
          else begin
            shreg   <= shift_in(shreg, scanout, len_m1);
            scanclk <= 1'b1;
            timer   <= 32'(SCAN_HALF - 1);
            state   <= S_HIGH;
          end
        end
        S_HIGH: begin
          if (timer != 0) timer <= timer - 1;
          else begin
            scanclk <= 1'b0;
            timer   <= 32'(SCAN_HALF - 1);
            if (bits_left == 0) state <= S_IDLE;
            else begin
              bits_left <= bits_left - 1;
              scanin    <= shreg[0];
              state     <= S_LOW;
            end
          end
        end
        S_MEASURE: begin
          if (timer != 0) timer <= timer - 1;
          else begin
            oscval <= 1'b0;
            timer  <= 32'(SETTLE);
            state  <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          if (timer != 0) timer <= timer - 1;
          else            state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The counters take their clock from the oscillator while OSCVAL is
  // high: the scan clock must rest low then.
  a_no_scan_while_counting: assert property (
    @(posedge clk) disable iff (!rst_n) oscval |-> !scanclk);

endmodule
