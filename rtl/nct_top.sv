// Event-based neural compressive telemetry (NCT), top level.
//
// 128 recording channels reach the chip as 8 time-multiplexed analog inputs
// (16 channels each). Eight channel-rotating delta ADCs convert each channel
// once per 16-cycle frame and report only how far its 7-bit code moved
// since the previous frame (delta, up to 31 LSB, and SIGN). The event
// serializer collects the non-zero changes of a frame and, only if there
// are any, starts its ring oscillator and sends one packet in the next
// frame: SYNC, then per active ADC a header, its ID and one CH ID word per
// LSB of change. The event-based LVDS driver puts the packet on the
// differential line and parks the line at VDD/2 in between.
//
// Interface: adc_clk is the ADC clock shared with the off-chip
// time-multiplexers (16 channels in a 50 us frame, i.e. 320 kHz, in the
// described configuration); vin[a] is the analog input of ADC a, given as
// a VIN_W-bit number over the full scale, and must show channel mux_ch
// while adc_clk is low. ro_ctrl sets the serializer clock frequency and
// overflow reports a packet that did not fit in one frame. flag/data are
// the serializer outputs, outp/outn the line. clk_ser, ena and adc_event
// are brought out for observation; code is each ADC's latest 7-bit code.
//
// Lint notes flag as driven by a flop with asynchronous reset and also
// read by the driver model's event-controlled block; that is the model
// reacting to FLAG, not a second clock or reset.
module nct_top
  import nct_pkg::adc_event_t;
#(
  parameter int unsigned N_ADC       = 8,
  parameter int unsigned N_CH        = 16,
  parameter int unsigned CODE_W      = 7,
  parameter int unsigned VIN_W       = 12,
  parameter int unsigned CNT_STARTUP = 8,
  localparam int unsigned CW = $clog2(N_CH)
) (
  input  logic             adc_clk,
  input  logic             rst_n,
  input  logic [VIN_W-1:0] vin [N_ADC],
  input  logic [4:0]       ro_ctrl,
  output logic [CW-1:0]    mux_ch,
  output logic             frame_end,
  output logic             overflow,
  output adc_event_t       adc_event [N_ADC],
  output logic [CODE_W-1:0] code [N_ADC],
  output logic             ena,
  output logic             clk_ser,
  output logic             flag,
  output logic             data,
  output logic             inp,
  output logic             inn,
  output real              outp,
  output real              outn
);
  timeunit 1ns; timeprecision 1ps;

  for (genvar a = 0; a < N_ADC; a++) begin : g_adc
    cr_adc #(.N_CH(N_CH), .CODE_W(CODE_W), .VIN_W(VIN_W)) u_adc (
      .adc_clk, .rst_n, .vin(vin[a]), .ev(adc_event[a]), .code(code[a])
    );
  end

  eser #(.N_ADC(N_ADC), .N_CH(N_CH), .CNT_STARTUP(CNT_STARTUP)) u_eser (
    .adc_clk, .rst_n, .ev(adc_event), .ro_ctrl, .mux_ch, .frame_end, .overflow,
    .ena, .clk_ser, .flag, .data
  );

  elvds_driver u_lvds (.flag, .data, .inp, .inn, .outp, .outn);

endmodule
