// Behavioural model (not synthesizable logic) of the analog core of one
// CR-ADC: sample-and-hold, 7-bit capacitive DAC, dynamic comparator and the
// asynchronous pulse generator that clocks the comparisons.
//
// The analog input is represented as an unsigned VIN_W-bit number spanning
// the ADC full scale, so one ADC LSB is 2**(VIN_W-CODE_W) input units. The
// sample-and-hold tracks vin while ADC CLK is low and holds it from the
// rising edge. The DAC level of code c is c LSB; the comparator reports
// cmp = 1 when the held input is at or above the DAC level. While enable is
// high the pulse generator produces pulses of period T_PULSE_NS; the first
// rising edge comes T_PULSE_NS/2 after enable rises, which stands for the
// DAC settling before the first comparison, and no pulse starts once enable
// has fallen.
//
// The structure (one S&H, one dynamic comparator, differential top-plate
// C-DAC, pulse generator) follows the design description; the number format
// of the input and the pulse period are this model's choices. The pulse
// period must allow STEP_MAX+2 comparisons within half an ADC clock period.
//
// A synthesis tool that ignores the delays turns the pulse generator into
// a latch; the model is meant for simulation only.
module cr_adc_analog #(
  parameter int unsigned CODE_W     = 7,
  parameter int unsigned VIN_W      = 12,
  parameter int unsigned T_PULSE_NS = 20
) (
  input  logic              adc_clk,
  input  logic [VIN_W-1:0]  vin,       // time-multiplexed analog input
  input  logic [CODE_W-1:0] dac_code,  // C-DAC control
  input  logic              enable,    // run the pulse generator
  output logic              cmp,       // comparator decision
  output logic              pulse      // asynchronous comparison clock
);
  timeunit 1ns; timeprecision 1ps;

  logic [VIN_W-1:0] held;
  logic [VIN_W-1:0] dac_level;

  initial begin
    held  = '0;
    pulse = 1'b0;
  end

  // Sample-and-hold: the value at the end of the low (tracking) phase is held.
  always @(posedge adc_clk) held <= vin;

  assign dac_level = {dac_code, {(VIN_W-CODE_W){1'b0}}};
  assign cmp       = (held >= dac_level);

  // Asynchronous pulse generator.
  always begin
    wait (enable);
    #(T_PULSE_NS / 2.0);
    if (enable) begin
      pulse = 1'b1;
      #(T_PULSE_NS / 2.0) pulse = 1'b0;
    end
  end

endmodule
