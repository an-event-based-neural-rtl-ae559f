// Behavioural model (not synthesizable logic) of the event-driven,
// fully synthesized ring oscillator that clocks the event serializer
// (CLK_SER).
//
// In silicon the loop is a gate enabled by ENA followed by inverter groups
// of 1, 4, 8, 18 and 40 inverters, each reached through a gate enabled by
// one CTRL bit and returned through a chain of multiplexers, so CTRL sets
// how many groups lie in the loop and thus the frequency (84 MHz to
// 574 MHz).
// This model reads CTRL as a thermometer code: the loop extends through
// group k+1 only while CTRL<0..k> are all 1. The period grows linearly with
// the number of inverters in the loop, from P_MIN_PS (574 MHz, CTRL = 0) to
// P_MAX_PS (84 MHz, all groups in the loop).
//
// When ENA rises the oscillator starts after half a period; the first
// N_RAMP periods are longer (a start-up ramp, shortening linearly), which is
// why the serializer waits a number of edges before using the clock. A
// started period is always completed; with ENA low the output rests low.
// CTRL is read at the start of every period.
//
// The half-period delay is computed at run time, so lint cannot prove it
// non-zero; it is never below P_MIN_PS / 2.
module ring_osc #(
  parameter int unsigned P_MIN_PS = 1742,   // 574 MHz
  parameter int unsigned P_MAX_PS = 11905,  // 84 MHz
  parameter int unsigned N_RAMP   = 4
) (
  input  logic       ena,
  input  logic [4:0] ctrl,
  output logic       clk_ser
);
  timeunit 1ns; timeprecision 1ps;

  // Inverters in the loop when the first k groups are included.
  function automatic int unsigned loop_inv(input logic [4:0] c);
    int unsigned groups [5] = '{1, 4, 8, 18, 40};
    int unsigned n = 0;
    for (int k = 0; k < 5; k++) begin
      if (!c[k]) break;
      n += groups[k];
    end
    return n;
  endfunction

  function automatic real period_ns(input logic [4:0] c);
    return (real'(P_MIN_PS) + real'(P_MAX_PS - P_MIN_PS) * real'(loop_inv(c)) / 71.0) / 1000.0;
  endfunction

  int unsigned n_since_start;
  real         per;

  initial begin
    clk_ser       = 1'b0;
    n_since_start = 0;
  end

  always begin
    wait (ena);
    per = period_ns(ctrl);
    if (n_since_start < N_RAMP)
      per = per * (1.0 + real'(N_RAMP - n_since_start) / 2.0);
    #(per / 2.0) clk_ser = 1'b1;
    #(per / 2.0) clk_ser = 1'b0;
    n_since_start = ena ? n_since_start + 1 : 0;
  end

endmodule
