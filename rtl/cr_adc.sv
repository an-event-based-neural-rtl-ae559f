// One channel-rotating delta ADC (CR-ADC) serving 16 time-multiplexed
// channels.
//
// Instead of converting each sample from mid-scale like a SAR ADC, the
// CR-ADC starts every conversion from the code the same channel reached one
// frame (16 ADC clock cycles) earlier and walks the DAC by single LSB steps
// towards the new sample. The number of steps is the quantised change of the
// channel since the previous frame: delta (0..31) with its SIGN. A quiet
// channel needs one or two comparisons and produces delta = 0, which the
// serializer treats as "no event".
//
// Parts: cr_adc_analog (S&H, C-DAC, comparator, pulse generator; a
// behavioural model), cr_adc_ctrl (event counter and DAC control) and
// cr_fifo (the 16-deep channel-rotating FIFO of 7-bit codes).
//
// Timing, per ADC clock cycle: the multiplexer presents a channel while ADC
// CLK is low; the sample is held at the rising edge and converted while ADC
// CLK is high; at the falling edge the result appears on ev and the final
// code is pushed into the FIFO, whose head becomes the stored code of the
// next channel. ev is therefore valid from one falling edge to the next and
// is taken by the event memory at the rising edge in between. The order of
// channels is fixed by the external multiplexer; the ADC itself does not
// know channel numbers.
module cr_adc
  import nct_pkg::adc_event_t;
#(
  parameter int unsigned N_CH       = 16,
  parameter int unsigned CODE_W     = 7,
  parameter int unsigned DELTA_W    = 5,
  parameter int unsigned STEP_MAX   = 31,
  parameter int unsigned VIN_W      = 12,
  parameter int unsigned T_PULSE_NS = 20
) (
  input  logic             adc_clk,
  input  logic             rst_n,
  input  logic [VIN_W-1:0] vin,
  output adc_event_t       ev,
  output logic [CODE_W-1:0] code   // last final code (for observation)
);
  timeunit 1ns; timeprecision 1ps;

  logic [CODE_W-1:0] init_code, dac_code, final_code;
  logic              cmp, pulse, busy, adc_clk_n;

  assign adc_clk_n = ~adc_clk;

  cr_adc_analog #(.CODE_W(CODE_W), .VIN_W(VIN_W), .T_PULSE_NS(T_PULSE_NS)) u_analog (
    .adc_clk (adc_clk),
    .vin     (vin),
    .dac_code(dac_code),
    .enable  (adc_clk & busy),
    .cmp     (cmp),
    .pulse   (pulse)
  );

  cr_adc_ctrl #(.CODE_W(CODE_W), .DELTA_W(DELTA_W), .STEP_MAX(STEP_MAX)) u_ctrl (
    .adc_clk   (adc_clk),
    .rst_n     (rst_n),
    .pulse     (pulse),
    .cmp       (cmp),
    .init_code (init_code),
    .dac_code  (dac_code),
    .final_code(final_code),
    .busy      (busy),
    .ev        (ev)
  );

  cr_fifo #(.DEPTH(N_CH), .CODE_W(CODE_W)) u_fifo (
    .clk  (adc_clk_n),
    .rst_n(rst_n),
    .push (1'b1),
    .din  (final_code),
    .head (init_code)
  );

  always_ff @(negedge adc_clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else        code <= final_code;
  end

endmodule
