// Event serializer (eSER): turns the per-frame events of all CR-ADCs into
// one ternary address-event packet per frame, clocked by its own
// event-driven ring oscillator.
//
// Blocks: event_memory (ADC CLK domain: double-buffered event lists, frame
// control, overflow detection), ring_osc (behavioural model of the
// synthesized ring oscillator giving CLK_SER), ser_fsm (start-up count and
// packet word sequence) and bitstream_gen (serial FLAG/DATA with Manchester
// coding). The two clock domains meet in a toggle handshake: the event
// memory toggles req when a frame with events is complete, the FSM toggles
// ack when the packet has been sent, and ENA = req XOR ack runs the
// oscillator only in between. A frame without events never starts the clock.
//
// Timing: events of frame n are stored during frame n; at its last ADC
// clock edge the banks swap and ENA rises; the packet follows after the
// ring-oscillator start-up (2 synchroniser edges, one IDLE edge and
// CNT_STARTUP edges), at one bit per CLK_SER cycle. If it has not ended by
// the end of frame n+1 and that frame also holds events, overflow pulses
// and frame n+1 is lost; raising the oscillator frequency (ro_ctrl) is the
// remedy.
//
// The sub-blocks' busy, sending, bit_out and wr_ch outputs are observation
// points that this level does not need; lint reports them as unused.
module eser
  import nct_pkg::adc_event_t;
  import nct_pkg::mem_entry_t;
#(
  parameter int unsigned N_ADC       = 8,
  parameter int unsigned N_CH        = 16,
  parameter int unsigned WORD_W      = 5,
  parameter int unsigned CNT_STARTUP = 8,
  parameter bit          MANCHESTER  = 1'b1,
  localparam int unsigned CW = $clog2(N_CH)
) (
  input  logic          adc_clk,
  input  logic          rst_n,
  input  adc_event_t    ev [N_ADC],
  input  logic [4:0]    ro_ctrl,     // ring oscillator frequency setting
  output logic [CW-1:0] mux_ch,      // channel the multiplexers must present
  output logic          frame_end,
  output logic          overflow,
  output logic          ena,         // ring oscillator enable
  output logic          clk_ser,
  output logic          flag,
  output logic          data
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned AW = $clog2(N_ADC);
  localparam int unsigned NW = $clog2(N_CH + 1);

  logic          req, ack, busy, load, sending, bit_out;
  logic [CW-1:0] wr_ch, rd_idx;
  logic [AW-1:0] rd_adc;
  logic [NW-1:0] rd_cnt [N_ADC];
  mem_entry_t    rd_entry;
  logic [WORD_W-1:0] wrd;

  assign ena = req ^ ack;

  event_memory #(.N_ADC(N_ADC), .N_CH(N_CH)) u_mem (
    .adc_clk, .rst_n, .ev, .ack, .req, .busy, .wr_ch, .mux_ch, .frame_end,
    .overflow, .rd_cnt, .rd_adc, .rd_idx, .rd_entry
  );

  ring_osc u_ro (.ena, .ctrl(ro_ctrl), .clk_ser);

  ser_fsm #(.N_ADC(N_ADC), .N_CH(N_CH), .WORD_W(WORD_W), .CNT_STARTUP(CNT_STARTUP)) u_fsm (
    .clk_ser, .rst_n, .req, .ack, .rd_cnt, .rd_adc, .rd_idx, .rd_entry,
    .load, .wrd, .sending
  );

  bitstream_gen #(.WORD_W(WORD_W), .MANCHESTER(MANCHESTER)) u_bsg (
    .clk_ser, .rst_n, .load, .wrd, .flag, .data, .bit_out
  );

endmodule
