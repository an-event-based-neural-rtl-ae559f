// Event memory of the event serializer (eSER), with frame control and the
// overflow detector. ADC CLK domain.
//
// On every rising edge of ADC CLK the memory takes one conversion result
// from each of the N_ADC CR-ADCs. A result with non-zero delta is an event
// and is appended to that ADC's list as a 10-bit entry {CH ID, SIGN, delta};
// results with delta = 0 take no space. The lists are double-buffered: one
// bank is written during a frame while the other holds the previous frame
// for the serializer, so every channel has one entry in each bank.
//
// A frame is N_CH ADC clock cycles; wr_ch counts the slot, and the entry of
// slot s carries CH ID s. At the end of a frame, if the frame held at least
// one event, the banks swap and req toggles. The serializer answers with a
// toggle of ack when it has sent the packet; req XOR ack is the ring
// oscillator enable (ENA) and keeps the read bank frozen. If a frame with
// events ends while the previous packet is still being sent (ack not yet
// returned), the packet is longer than a frame: overflow pulses for one ADC
// clock cycle, the new frame is dropped and its bank is reused.
//
// Channel alignment: the result stored at a rising edge belongs to the
// sample taken in the low phase one cycle earlier, so the time-multiplexer
// must present channel mux_ch = wr_ch + 1 in the current low phase.
//
// From the description: per-ADC storage at each rising ADC CLK edge, only
// non-zero deltas stored, 10-bit entries plus a replica for parallel
// buffering and processing, a frame of 16 cycles, serialization starting
// in the next frame, an overflow detector. Compacted lists with per-ADC
// counters, the toggle handshake and dropping the frame on overflow are
// this implementation's choices.
//
// An assertion checks that req toggles only while the serializer is idle.
module event_memory
  import nct_pkg::adc_event_t;
  import nct_pkg::mem_entry_t;
#(
  parameter int unsigned N_ADC = 8,
  parameter int unsigned N_CH  = 16,
  localparam int unsigned AW   = $clog2(N_ADC),
  localparam int unsigned CW   = $clog2(N_CH),
  localparam int unsigned NW   = $clog2(N_CH + 1)
) (
  input  logic          adc_clk,
  input  logic          rst_n,
  input  adc_event_t    ev [N_ADC],     // results of the CR-ADCs
  input  logic          ack,            // toggle from the serializer
  output logic          req,            // toggles when a frame is ready
  output logic          busy,           // req != ack (synchronised)
  output logic [CW-1:0] wr_ch,          // slot being filled
  output logic [CW-1:0] mux_ch,         // channel to sample now
  output logic          frame_end,      // last slot of a frame
  output logic          overflow,       // packet longer than a frame
  // read port for the serializer (frozen bank)
  output logic [NW-1:0] rd_cnt [N_ADC], // events per ADC
  input  logic [AW-1:0] rd_adc,
  input  logic [CW-1:0] rd_idx,
  output mem_entry_t    rd_entry
);
  timeunit 1ns; timeprecision 1ps;

  mem_entry_t    mem [2][N_ADC][N_CH];
  logic [NW-1:0] cnt [2][N_ADC];
  logic          wb;         // bank being written
  logic [1:0]    ack_sync;
  logic          has_events;

  assign busy      = req ^ ack_sync[1];
  assign frame_end = (wr_ch == CW'(N_CH - 1));
  assign mux_ch    = wr_ch + 1'b1;

  always_comb begin
    has_events = 1'b0;
    for (int a = 0; a < N_ADC; a++)
      if (cnt[wb][a] != '0 || ev[a].delta != '0) has_events = 1'b1;
  end

  always_ff @(posedge adc_clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack};
    end
  end

  // Event storage (no reset needed: only entries below cnt are ever read).
  always_ff @(posedge adc_clk) begin
    for (int a = 0; a < N_ADC; a++)
      if (ev[a].delta != '0)
        mem[wb][a][cnt[wb][a][CW-1:0]] <= '{ch: wr_ch, sign: ev[a].sign, delta: ev[a].delta};
  end

  always_ff @(posedge adc_clk or negedge rst_n) begin
    if (!rst_n) begin
      wb       <= 1'b0;
      wr_ch    <= '0;
      req      <= 1'b0;
      overflow <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int a = 0; a < N_ADC; a++) cnt[b][a] <= '0;
    end else begin
      wr_ch    <= wr_ch + 1'b1;
      overflow <= 1'b0;
      for (int a = 0; a < N_ADC; a++)
        if (ev[a].delta != '0) cnt[wb][a] <= cnt[wb][a] + 1'b1;
      if (frame_end && has_events) begin
        if (!busy) begin
          wb  <= ~wb;
          req <= ~req;
          for (int a = 0; a < N_ADC; a++) cnt[~wb][a] <= '0;
        end else begin
          overflow <= 1'b1;
          for (int a = 0; a < N_ADC; a++) cnt[wb][a] <= '0;
        end
      end
    end
  end

  // A frame is only handed over while the serializer is idle.
  a_req_when_idle: assert property (@(posedge adc_clk) disable iff (!rst_n)
    (req != $past(req)) |-> !$past(busy))
    else $error("event_memory: frame handed over while the serializer is busy");

  // Read port: the bank not being written.
  always_comb begin
    for (int a = 0; a < N_ADC; a++) rd_cnt[a] = cnt[~wb][a];
    rd_entry = mem[~wb][rd_adc][rd_idx];
  end

endmodule
