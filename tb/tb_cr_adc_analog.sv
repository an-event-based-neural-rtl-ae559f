// Self-checking testbench of the cr_adc_analog behavioural model: checks
// that the held input is the value present at the rising edge of ADC CLK
// (later input changes are ignored), that cmp compares the held value with
// the DAC level code*32, and that the pulse generator gives pulses at the
// set period only while enable is high.
module tb_cr_adc_analog;
  timeunit 1ns; timeprecision 1ps;
  logic adc_clk = 0, enable = 0, cmp, pulse;
  logic [11:0] vin = '0;
  logic [6:0]  dac_code = '0;
  int checks = 0, failures = 0, npulse = 0;

  cr_adc_analog #(.T_PULSE_NS(20)) dut (.*);

  always @(posedge pulse) npulse++;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] x;
    for (int n = 0; n < 100; n++) begin
      x = 12'($urandom);
      vin = x;
      #50 adc_clk = 1;
      #5 vin = ~x;           // must not disturb the held sample
      for (int k = 0; k < 4; k++) begin
        dac_code = (k == 0) ? x[11:5] : (k == 1) ? x[11:5] + 7'd1 : 7'($urandom);
        #1 check(cmp == ({dac_code, 5'b0} <= x),
                 $sformatf("cmp=%0d code=%0d held=%0d", cmp, dac_code, x));
      end
      npulse = 0;
      enable = 1;
      #205 enable = 0;       // 10 pulses of 20 ns, the first after 10 ns
      #40;
      check(npulse == 10, $sformatf("pulses %0d", npulse));
      #50 adc_clk = 0;
      npulse = 0;
      #100 check(npulse == 0, "pulse while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
