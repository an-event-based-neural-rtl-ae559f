// Testbench helpers for the NCT: the reference packet builder.
//
// build_packet turns one frame of conversion results (delta and SIGN of
// every ADC and channel slot) into the word sequence the serializer must
// send: nothing for a frame without events, otherwise SYNC, and for each ADC
// with events ADC HDR, ADC ID and {SIGN, channel} repeated delta times, in
// channel order. The words are appended to q followed by -1 as the packet
// end marker. It is written from the packet format, independently of the
// RTL.
package nct_tb_pkg;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;

  typedef adc_event_t frame_t [N_ADC][N_CH];

  function automatic int packet_words(input frame_t fr);
    int n = 0;
    bit any_adc;
    for (int a = 0; a < N_ADC; a++) begin
      any_adc = 0;
      for (int s = 0; s < N_CH; s++)
        if (fr[a][s].delta != 0) begin any_adc = 1; n += fr[a][s].delta; end
      if (any_adc) n += 2;
    end
    return (n == 0) ? 0 : n + 1;
  endfunction

  function automatic void build_packet(input frame_t fr, ref int q[$]);
    bit any = 0;
    for (int a = 0; a < N_ADC; a++)
      for (int s = 0; s < N_CH; s++)
        if (fr[a][s].delta != 0) any = 1;
    if (!any) return;
    q.push_back(int'(WORD_SYNC));
    for (int a = 0; a < N_ADC; a++) begin
      bit adc_any = 0;
      for (int s = 0; s < N_CH; s++) if (fr[a][s].delta != 0) adc_any = 1;
      if (!adc_any) continue;
      q.push_back(int'(WORD_HDR));
      q.push_back(a);
      for (int s = 0; s < N_CH; s++)
        for (int r = 0; r < int'(fr[a][s].delta); r++)
          q.push_back(int'({fr[a][s].sign, 4'(s)}));
    end
    q.push_back(-1);
  endfunction
endpackage
