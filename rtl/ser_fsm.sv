// Finite state machine of the event serializer. CLK_SER domain.
//
// The FSM runs only while the ring oscillator runs, i.e. while a frame's
// events wait to be sent. It first counts CNT_STARTUP clock edges
// (CNT_STARTUP in the description) so that the oscillator settles, then
// reads the frozen bank of the event memory and emits one 5-bit word every
// WORD_W cycles (with load high in the first cycle of each word):
//
//   SYNC, then for every ADC with at least one event, in ADC order:
//   ADC HDR, ADC ID, and for every stored event of that ADC, in channel
//   order, the CH ID word {SIGN, channel} repeated delta times.
//
// Sending one ADC ID per ADC instead of one per event is the spatial
// grouping of the packet. After the last word the FSM waits until the
// bit-stream generator has dropped FLAG, then toggles ack; that ends the
// ring oscillator enable and the clock stops.
//
// req arrives from the ADC CLK domain and is synchronised here; the
// start-up count covers the synchroniser delay. The event memory contents
// and counts are static while ack differs from req.
//
// From the description: start-up edge counter, one word per 5 clock
// cycles, the word types and their order, CH ID repetition by delta. Word
// codes (see nct_pkg), the ordering of ADCs and events, the default start-up
// count and the toggle handshake are this implementation's choices.
module ser_fsm
  import nct_pkg::mem_entry_t;
  import nct_pkg::WORD_SYNC;
  import nct_pkg::WORD_HDR;
#(
  parameter int unsigned N_ADC       = 8,
  parameter int unsigned N_CH        = 16,
  parameter int unsigned WORD_W      = 5,
  parameter int unsigned CNT_STARTUP = 8,
  localparam int unsigned AW = $clog2(N_ADC),
  localparam int unsigned CW = $clog2(N_CH),
  localparam int unsigned NW = $clog2(N_CH + 1)
) (
  input  logic              clk_ser,
  input  logic              rst_n,
  input  logic              req,             // toggle from the event memory
  output logic              ack,             // toggle back when sent
  input  logic [NW-1:0]     rd_cnt [N_ADC],
  output logic [AW-1:0]     rd_adc,
  output logic [CW-1:0]     rd_idx,
  input  mem_entry_t        rd_entry,
  output logic              load,
  output logic [WORD_W-1:0] wrd,
  output logic              sending          // between start-up and ack
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [2:0] {S_IDLE, S_STARTUP, S_SYNC, S_HDR, S_ID, S_CH, S_TAIL} fsm_state_e;

  localparam int unsigned PW = $clog2(WORD_W);
  localparam int unsigned SW = $clog2(CNT_STARTUP + 1);

  fsm_state_e       state;
  logic [1:0]       req_sync;
  logic [PW-1:0]    ph;
  logic [SW-1:0]    scnt;
  logic [AW-1:0]    adc;
  logic [CW-1:0]    idx;
  logic [4:0]       rep;
  logic             nxt_found;
  logic [AW-1:0]    nxt_adc;

  assign rd_adc  = adc;
  assign rd_idx  = idx;
  assign load    = (ph == '0) && (state inside {S_SYNC, S_HDR, S_ID, S_CH});
  assign sending = (state != S_IDLE) && (state != S_STARTUP);

  // Next ADC with events: after the current one, or from 0 when in SYNC.
  always_comb begin
    nxt_found = 1'b0;
    nxt_adc   = '0;
    for (int a = N_ADC - 1; a >= 0; a--) begin
      if (rd_cnt[a] != '0 && (state == S_SYNC || a > int'(adc))) begin
        nxt_found = 1'b1;
        nxt_adc   = AW'(a);
      end
    end
  end

  always_comb begin
    unique case (state)
      S_SYNC:  wrd = WORD_SYNC;
      S_HDR:   wrd = WORD_HDR;
      S_ID:    wrd = WORD_W'(adc);
      S_CH:    wrd = WORD_W'({rd_entry.sign, rd_entry.ch});
      default: wrd = '0;
    endcase
  end

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      req_sync <= '0;
      ack      <= 1'b0;
      ph       <= '0;
      scnt     <= '0;
      adc      <= '0;
      idx      <= '0;
      rep      <= '0;
    end else begin
      req_sync <= {req_sync[0], req};
      ph       <= (ph == PW'(WORD_W - 1)) ? '0 : ph + 1'b1;
      unique case (state)
        S_IDLE: begin
          ph   <= '0;
          scnt <= '0;
          if (req_sync[1] != ack) state <= S_STARTUP;
        end
        S_STARTUP: begin
          ph   <= '0;
          scnt <= scnt + 1'b1;
          if (scnt == SW'(CNT_STARTUP - 1)) state <= S_SYNC;
        end
        S_TAIL: begin
          // FLAG falls at the end of ph 0; hand back one cycle later.
          if (ph == PW'(1)) begin
            ack   <= ~ack;
            state <= S_IDLE;
          end
        end
        default: begin
          if (ph == PW'(WORD_W - 1)) begin
            unique case (state)
              S_SYNC, S_CH: begin
                if (state == S_CH && rep < rd_entry.delta) begin
                  rep <= rep + 1'b1;
                end else if (state == S_CH && NW'(idx) + 1'b1 < rd_cnt[adc]) begin
                  idx <= idx + 1'b1;
                  rep <= 5'd1;
                end else if (nxt_found) begin
                  adc   <= nxt_adc;
                  state <= S_HDR;
                end else begin
                  state <= S_TAIL;
                end
              end
              S_HDR: state <= S_ID;
              S_ID: begin
                idx   <= '0;
                rep   <= 5'd1;
                state <= S_CH;
              end
              default: state <= S_TAIL;
            endcase
          end
        end
      endcase
    end
  end

endmodule
