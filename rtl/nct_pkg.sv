// Shared types and constants of the neural compressive telemetry (NCT).
//
// The NCT digitises 128 recording channels with 8 channel-rotating delta ADCs
// (16 channels each, time-multiplexed), keeps only the non-zero code changes
// ("events") and sends them as packets of 5-bit words over an event-driven
// serial link. This package holds the per-ADC event bundle, the word codes of
// the packet and the sizes that several modules share.
//
// Sizes from the design description: 8 ADCs, 16 channels per ADC, 7-bit
// codes, at most 31 events per channel and frame (5-bit delta), 5-bit words.
// The bit patterns of SYNC and ADC HDR are not specified there; the values
// below are this implementation's choice.
//
// Linted on its own, this file reports its constants as unused; the
// modules and testbenches are their users.
package nct_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N_ADC      = 8;   // CR-ADCs
  localparam int unsigned N_CH       = 16;  // channels per ADC (16:1 multiplexing)
  localparam int unsigned CODE_W     = 7;   // ADC resolution
  localparam int unsigned DELTA_W    = 5;   // quantised delta, 0..31
  localparam int unsigned STEP_MAX   = 31;  // maximum events per channel and frame
  localparam int unsigned CH_W       = 4;   // channel address
  localparam int unsigned ADC_ID_W   = 3;   // ADC address
  localparam int unsigned WORD_W     = 5;   // packet word width

  // Packet words. A CH ID word is {SIGN, channel}; an ADC ID word is the ADC
  // index, zero-extended. SYNC and ADC HDR are fixed patterns. Five bits
  // cannot keep every CH ID apart from ADC HDR: CH ID {1, 12} equals it.
  // A receiver still decodes the packet without doubt, because channels
  // of one ADC are sent in increasing order and ADC IDs are below 8: the
  // pattern is a header exactly when the word after it is below 8.
  localparam logic [WORD_W-1:0] WORD_SYNC = 5'b10101;
  localparam logic [WORD_W-1:0] WORD_HDR  = 5'b11100;

  // Output of one CR-ADC for one channel conversion.
  typedef struct packed {
    logic               sign;   // 1 = code went up, 0 = code went down
    logic [DELTA_W-1:0] delta;  // number of LSB steps (events), 0 = no event
  } adc_event_t;

  // One stored event in the event memory (10 bits).
  typedef struct packed {
    logic [CH_W-1:0]    ch;
    logic               sign;
    logic [DELTA_W-1:0] delta;
  } mem_entry_t;

  function automatic logic [WORD_W-1:0] ch_word(input logic sign, input logic [CH_W-1:0] ch);
    return {sign, ch};
  endfunction

  function automatic logic [WORD_W-1:0] id_word(input logic [ADC_ID_W-1:0] id);
    return {{(WORD_W-ADC_ID_W){1'b0}}, id};
  endfunction

endpackage
