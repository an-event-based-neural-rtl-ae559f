// Self-checking testbench of cr_adc_ctrl. The testbench plays the analog
// part: it holds a target level t (in LSB units) and answers each
// comparison with cmp = (t >= dac_code), and it drives the comparison
// pulses while busy is high during the ADC CLK high phase. For random
// initial codes and targets it checks delta = min(|t - init|, 31), SIGN,
// the final code, and that the number of comparisons is |t-init|+1 upwards
// or |t-init|+2 downwards (fewer when the 31-step limit is hit).
module tb_cr_adc_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;
  logic adc_clk = 0, rst_n = 1, pulse = 0, cmp;
  logic [6:0] init_code, dac_code, final_code;
  logic busy;
  adc_event_t ev;
  int t;
  int checks = 0, failures = 0, npulse;

  cr_adc_ctrl dut (.*);

  assign cmp = (t >= int'(dac_code));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int init, d, exp_d, exp_code, exp_np;
    bit up;
    logic [6:0] fc;
    t = 0; init_code = 0;
    adc_clk = 1; #1 rst_n = 0; #1 adc_clk = 0;   // reset as a falling edge
    #50 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      init = $urandom_range(0, 127);
      case (n % 4)
        0: t = init;
        1: t = init + $urandom_range(-3, 3);
        default: t = $urandom_range(0, 127);
      endcase
      if (t < 0) t = 0;
      if (t > 127) t = 127;
      init_code = 7'(init);
      #100 adc_clk = 1;
      npulse = 0;
      #10;
      while (busy && npulse < 40) begin
        #5 pulse = 1; #5 pulse = 0; npulse++;
      end
      fc = final_code;
      #100 adc_clk = 0;
      #10;
      d     = (t > init) ? t - init : init - t;
      up    = t > init;
      exp_d = (d > 31) ? 31 : d;
      exp_code = up ? init + exp_d : init - exp_d;
      if (d == 0)            exp_np = 2;
      else if (up)           exp_np = (d >= 31) ? 31 : d + 1;
      else                   exp_np = (d >= 31) ? 32 : d + 2;
      check(ev.delta == 5'(exp_d), $sformatf("delta %0d exp %0d (init %0d t %0d)", ev.delta, exp_d, init, t));
      check(ev.sign == (up && d != 0), $sformatf("sign %0d (init %0d t %0d)", ev.sign, init, t));
      check(fc == 7'(exp_code), $sformatf("final code %0d exp %0d", fc, exp_code));
      check(npulse == exp_np, $sformatf("comparisons %0d exp %0d (init %0d t %0d)", npulse, exp_np, init, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
