// Self-checking testbench of one CR-ADC with its 16:1 channel rotation.
// The testbench is the time-multiplexer: it presents channel k mod 16 while
// ADC CLK is low. Each channel follows its own random walk with occasional
// large jumps. A reference model quantises every sample to 7 bits, keeps the
// per-channel code of the previous frame (mid-scale after reset) and
// predicts delta = min(|new - old|, 31) with SIGN, saturating the code change
// at 31 steps exactly as the ADC does. Every conversion result is checked
// one ADC clock cycle after its sample, i.e. one result per ADC clock.
module tb_cr_adc;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;
  localparam real T_ADC = 3125.0;   // 16 channels per 50 us frame
  logic adc_clk = 0, rst_n = 1;
  logic [11:0] vin = '0;
  adc_event_t ev;
  logic [6:0] code;
  int checks = 0, failures = 0, n_sat = 0, n_zero = 0;
  int level [16];
  int refc  [16];

  cr_adc dut (.*);

  always #(T_ADC/2) adc_clk = ~adc_clk;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ch, t, d, exp_d, pend_ch, pend_d;
    bit pend_up, have_pend;
    for (int i = 0; i < 16; i++) begin level[i] = 2048; refc[i] = 64; end
    have_pend = 0;
    @(posedge adc_clk); #1 rst_n = 0;   // reset as a falling edge, taken while ADC CLK is high
    @(posedge adc_clk);
    @(negedge adc_clk); rst_n = 1;
    for (int n = 0; n < 16*60; n++) begin
      ch = n % 16;
      // Present channel ch during the low phase.
      if ((n / 16) % 10 == 9 && ch == 3) level[ch] = $urandom_range(0, 4095);
      else if (ch < 8) level[ch] += $urandom_range(0, 160) - 80;
      if (level[ch] < 0) level[ch] = 0;
      if (level[ch] > 4095) level[ch] = 4095;
      vin = 12'(level[ch]);
      @(posedge adc_clk);
      // Result of the previous conversion is on ev now.
      if (have_pend) begin
        checks++;
        if (ev.delta != 5'(pend_d) || ev.sign != pend_up) begin
          failures++;
          $display("FAIL ch=%0d delta=%0d sign=%0d exp %0d %0d", pend_ch, ev.delta, ev.sign, pend_d, pend_up);
        end
      end
      t = level[ch] >> 5;
      d = (t > refc[ch]) ? t - refc[ch] : refc[ch] - t;
      exp_d = (d > 31) ? 31 : d;
      if (d > 31) n_sat++;
      if (d == 0) n_zero++;
      pend_up = (t > refc[ch]);
      refc[ch] = pend_up ? refc[ch] + exp_d : refc[ch] - exp_d;
      pend_d = exp_d; pend_ch = ch; have_pend = 1;
      @(negedge adc_clk);
    end
    checks++;
    if (n_sat == 0 || n_zero == 0) begin failures++; $display("FAIL coverage sat=%0d zero=%0d", n_sat, n_zero); end
    $display("saturated conversions %0d, zero-delta conversions %0d", n_sat, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
