// Workload testbench: 1 kHz full-scale sine waves through the whole NCT at
// its default size (8 ADCs x 16 channels, 7-bit codes, 50 us frames), with
// the stream decoded and the waveforms rebuilt on the hub side.
//
// Each channel carries a 1 kHz sine spanning the 7-bit range (amplitude
// 63.5 LSB), with a small phase step between neighbouring channels. The
// amplitude ramps up over the first 20 frames after a channel starts, so
// the first change from the mid-scale reset code stays below Step_Max. At
// 20 kS/s the largest change between frames is 2 pi x 63.5 x 1/20 = 20 LSB,
// so no conversion may saturate.
//
// Phase A: only ADC 0 carries sines and the serializer runs at its
// slowest setting (84 MHz); the packets (about 200 words) fit a frame.
// Phase B: all eight ADCs carry sines and the serializer runs at 574 MHz
// (about 1600 words per frame). Neither phase may overflow.
//
// The hub model parses every received packet (SYNC, then per ADC: ADC HDR,
// ADC ID, CH ID words) and adds +1 or -1 per CH ID to the code it keeps
// for that channel, starting from mid-scale. After every packet all 128
// rebuilt codes must equal an independent reference (each sample quantised
// to 7 bits). A CH ID with SIGN = 1 and channel 12 has the same bits as
// ADC HDR; since channels of one ADC arrive in increasing order and ADC IDs
// are below 8, the pattern is a header exactly when the next word is
// below 8. From the rebuilt ADC 0 samples of phase A the testbench computes
// SNDR and ENOB against the ideal sine, which must exceed 6.5 bits
// (7-bit quantisation alone gives about 7.0).
//
// Amplitude sweep (Fig. 13(c) of the document): after the ENOB window, the
// amplitude of ADC 0 steps down to 30 %, 10 % and 3 % of full scale, each
// step spread over RAMP_FRAMES frames so no change exceeds Step_Max, and
// each level held for LEVEL_FRAMES frames. The SNDR rebuilt at the hub is
// measured at every level; at 3 % it must reach 12 dB, the value the
// document asks for spike sorting.
module tb_nct_sine;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;

  localparam real T_ADC = 3125.0;
  localparam real PI    = 3.14159265358979;
  localparam int  LSB   = 32;
  localparam int  RAMP_FRAMES = 20;
  localparam int  LEVEL_FRAMES = 40;
  localparam int  N_WIN = 4;
  localparam real LEVEL [N_WIN] = '{1.0, 0.3, 0.1, 0.03};

  logic adc_clk = 0, rst_n = 1;
  logic [11:0] vin [N_ADC];
  logic [4:0]  ro_ctrl = 5'b11111;
  logic [3:0]  mux_ch;
  logic frame_end, overflow, ena, clk_ser, flag, data, inp, inn;
  adc_event_t adc_event [N_ADC];
  logic [6:0] code [N_ADC];
  real outp, outn;

  nct_top dut (.*);
  nct_rx_monitor mon (.clk_ser, .flag, .data);

  bit live = 0;   // set when reset is released
  always @(posedge rst_n) live = 1;
  always #(T_ADC/2) adc_clk = ~adc_clk;

  int checks = 0, failures = 0;
  int nedge = 0, n_ovf = 0, n_sat_dut = 0, n_packets = 0, n_rebuilt = 0, max_words = 0;
  int refc [N_ADC][N_CH];          // reference code per channel
  int hub  [N_ADC][N_CH];          // code rebuilt by the hub model
  int snap [int][N_ADC][N_CH];     // reference codes after frame f
  real vsamp [int][N_CH];          // ADC 0 analog samples of frame f
  int pend_frames [$];             // frames that must produce a packet
  int start_frame [N_ADC];         // frame in which each ADC's sine starts (-1: off)
  int w_read = 0;                  // next unread word of the monitor
  real err_pow [N_WIN] = '{default: 0.0};
  real sig_pow [N_WIN] = '{default: 0.0};
  int  n_win [N_WIN] = '{default: 0};
  int  win_from = 0;   // first frame of window 0; ADC 0 only

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #60ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge adc_clk) if (live) begin
    nedge++;
    if (overflow) n_ovf++;
  end
  always @(negedge adc_clk) if (live)
    for (int a = 0; a < N_ADC; a++) if (adc_event[a].delta == 5'd31) n_sat_dut++;

  // Measurement window of frame f (ADC 0), or -1: each level is ramped to
  // over RAMP_FRAMES frames and then held for LEVEL_FRAMES frames.
  function automatic int window(input int f);
    int k = f - win_from;
    if (k < 0) return -1;
    for (int w = 0; w < N_WIN; w++) begin
      if (k < LEVEL_FRAMES) return w;
      k -= LEVEL_FRAMES + RAMP_FRAMES;
      if (k < 0) return -1;
    end
    return -1;
  endfunction

  // Amplitude level of ADC 0 in frame f.
  function automatic real level(input int f);
    int k = f - win_from;
    if (k < 0) return 1.0;
    for (int w = 0; w < N_WIN; w++) begin
      if (k < LEVEL_FRAMES) return LEVEL[w];
      k -= LEVEL_FRAMES;
      if (w == N_WIN - 1) return LEVEL[w];
      if (k < RAMP_FRAMES) return LEVEL[w] + (LEVEL[w + 1] - LEVEL[w]) * real'(k + 1) / RAMP_FRAMES;
      k -= RAMP_FRAMES;
    end
    return LEVEL[N_WIN - 1];
  endfunction

  // Analog value of channel s of ADC a in frame f (slot time included).
  function automatic real analog(input int a, input int s, input int f);
    real t, env, amp;
    if (start_frame[a] < 0 || f < start_frame[a]) return 2048.0 + 16.0;
    t   = (real'(f) * N_CH + s) * T_ADC * 1.0e-9;
    env = real'(f - start_frame[a]) / RAMP_FRAMES;
    if (env > 1.0) env = 1.0;
    amp = 2031.0 * env;
    if (a == 0) amp *= level(f);
    return 2048.0 + amp * $sin(2.0 * PI * 1000.0 * t + 0.15 * s + 0.7 * a);
  endfunction

  // Present one ADC clock period of samples, at a falling edge.
  task automatic run(input int nframes);
    for (int n = 0; n < nframes * N_CH; n++) begin
      int slot = (nedge + 1) % N_CH;
      int fno  = (nedge + 1) / N_CH;
      for (int a = 0; a < N_ADC; a++) begin
        real v = analog(a, slot, fno);
        int  vi = int'($floor(v));
        int  t, d;
        if (vi < 0) vi = 0;
        if (vi > 4095) vi = 4095;
        vin[a] = 12'(vi);
        t = vi / LSB;
        d = (t > refc[a][slot]) ? t - refc[a][slot] : refc[a][slot] - t;
        if (d > 31) begin
          failures++; $display("FAIL reference change %0d above Step_Max", d);
          d = 31;
        end
        refc[a][slot] = (t > refc[a][slot]) ? refc[a][slot] + d : refc[a][slot] - d;
        if (d != 0 && !pend_frames_has(fno)) pend_frames.push_back(fno);
        if (a == 0) vsamp[fno][slot] = real'(vi);
      end
      if (slot == N_CH - 1)
        for (int a = 0; a < N_ADC; a++) for (int s = 0; s < N_CH; s++) snap[fno][a][s] = refc[a][s];
      @(negedge adc_clk);
      hub_update();
    end
  endtask

  function automatic bit pend_frames_has(input int f);
    return pend_frames.size() > 0 && pend_frames[pend_frames.size() - 1] == f;
  endfunction

  // Parse every complete packet received so far and check the rebuilt codes.
  task automatic hub_update();
    while (1) begin
      int k, adc, last_ch, nw, f;
      int pk [$];
      k = w_read;
      while (k < mon.words.size() && mon.words[k] != -1) k++;
      if (k >= mon.words.size()) return;
      for (int i = w_read; i < k; i++) pk.push_back(mon.words[i]);
      w_read = k + 1;
      n_packets++;
      nw = pk.size();
      if (nw > max_words) max_words = nw;
      check(nw >= 4 && pk[0] == int'(WORD_SYNC), "packet starts with SYNC");
      adc = -1; last_ch = -1;
      for (int i = 1; i < nw; i++) begin
        if (pk[i] == int'(WORD_HDR) && (adc < 0 || (i + 1 < nw && pk[i + 1] < 8))) begin
          check(i + 1 < nw && pk[i + 1] < N_ADC && pk[i + 1] > adc, "ADC HDR followed by a rising ADC ID");
          adc = pk[i + 1]; last_ch = -1; i++;
        end else begin
          int ch = pk[i] & 15;
          check(adc >= 0 && ch >= last_ch, "CH ID order inside an ADC group");
          if (adc >= 0) hub[adc][ch] += (pk[i] & 16) ? 1 : -1;
          last_ch = ch;
        end
      end
      if (pend_frames.size() == 0) begin
        failures++; $display("FAIL packet without a frame of events");
        continue;
      end
      f = pend_frames.pop_front();
      begin
        int bad = 0;
        for (int a = 0; a < N_ADC; a++) for (int s = 0; s < N_CH; s++)
          if (hub[a][s] != snap[f][a][s]) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d rebuilt codes differ", f, bad));
        n_rebuilt++;
      end
      if (window(f) >= 0)
        for (int s = 0; s < N_CH; s++) begin
          int  w = window(f);
          real a = analog(0, s, f);
          real e = (real'(hub[0][s]) * LSB + LSB / 2.0) - a;
          err_pow[w] += e * e;
          sig_pow[w] += (a - 2048.0) * (a - 2048.0);
          n_win[w]++;
        end
    end
  endtask

  initial begin
    real sndr [N_WIN];
    real enob;
    for (int a = 0; a < N_ADC; a++) begin
      vin[a] = 12'(2048 + 16);
      start_frame[a] = -1;
      for (int s = 0; s < N_CH; s++) begin refc[a][s] = 64; hub[a][s] = 64; end
    end
    @(posedge adc_clk); #1 rst_n = 0;   // reset as a falling edge, taken while ADC CLK is high
    repeat (3) @(negedge adc_clk);
    rst_n = 1;
    mon.words.delete(); mon.packets = 0; mon.bits_total = 0; mon.errors = 0; mon.in_pkt = 0;
    // Phase A: ADC 0 only, slowest serializer clock.
    start_frame[0] = 1;
    win_from = 1 + RAMP_FRAMES;
    run(1 + RAMP_FRAMES + N_WIN * LEVEL_FRAMES + (N_WIN - 1) * RAMP_FRAMES);
    check(n_ovf == 0, "overflow in phase A at 84 MHz");
    $display("phase A: %0d packets, longest %0d words", n_packets, max_words);
    // Phase B: all ADCs, fastest serializer clock.
    ro_ctrl = 5'b00000;
    for (int a = 1; a < N_ADC; a++) start_frame[a] = (nedge + 1) / N_CH + 1;
    max_words = 0;
    run(RAMP_FRAMES + 12);
    // Hold every channel at the middle of its last code: no more events;
    // let the last packets arrive.
    for (int n = 0; n < 4 * N_CH; n++) begin
      automatic int slot = (nedge + 1) % N_CH;
      for (int a = 0; a < N_ADC; a++) vin[a] = 12'(refc[a][slot] * LSB + LSB / 2);
      if (slot == N_CH - 1)
        for (int a = 0; a < N_ADC; a++) for (int s = 0; s < N_CH; s++) snap[(nedge + 1) / N_CH][a][s] = refc[a][s];
      @(negedge adc_clk);
      hub_update();
    end
    $display("phase B: longest packet %0d words", max_words);
    check(n_ovf == 0, "overflow in phase B at 574 MHz");
    check(n_sat_dut == 0, $sformatf("%0d saturated conversions", n_sat_dut));
    check(pend_frames.size() == 0, $sformatf("%0d frames without a packet", pend_frames.size()));
    check(mon.errors == 0, "receiver coding errors");
    check(n_rebuilt > 60, $sformatf("only %0d frames rebuilt", n_rebuilt));
    for (int w = 0; w < N_WIN; w++) begin
      check(n_win[w] >= LEVEL_FRAMES * N_CH - N_CH, $sformatf("only %0d samples at level %0d", n_win[w], w));
      sndr[w] = 10.0 * $log10(sig_pow[w] / err_pow[w]);
      $display("ADC 0 rebuilt at the hub, amplitude %0.0f %%: %0d samples, SNDR %0.2f dB",
               100.0 * LEVEL[w], n_win[w], sndr[w]);
    end
    enob = (sndr[0] - 1.76) / 6.02;
    $display("full-scale ENOB %0.2f bits", enob);
    check(enob > 6.5, "ENOB below 6.5 bits");
    for (int w = 1; w < N_WIN; w++) check(sndr[w] < sndr[w - 1], "SNDR does not fall with the amplitude");
    check(sndr[N_WIN - 1] >= 12.0, "SNDR below 12 dB at 3 % of full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
