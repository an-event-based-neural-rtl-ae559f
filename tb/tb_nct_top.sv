// End-to-end testbench of the NCT at its default size: 8 CR-ADCs x 16
// channels, 7-bit codes, a 320 kHz ADC clock (16 channels in a 50 us frame).
//
// The testbench is the off-chip side: the eight 16:1 time-multiplexers
// (presenting channel mux_ch of each ADC while ADC CLK is low) and the hub
// receiver (nct_rx_monitor on CLK_SER, FLAG and DATA). Each channel is a
// quiet baseline, placed mid-LSB with noise well below one LSB, plus
// spikes of random amplitude (1 to 45 LSB) seen on up to four neighbouring
// channels of one ADC with decaying amplitude, the situation the spatial
// grouping is made for.
//
// An independent reference quantises every sample to 7 bits, tracks each
// channel's previous-frame code (mid-scale after reset), limits each change
// to 31 LSB and builds the packet of every frame. The received packets must
// equal the reference ones. Phase 1 runs the serializer clock at 574 MHz,
// first with sparse spikes (about 64 per second per channel, the rate of the
// high-density recording the design targets), then with dense spikes:
// every frame with events must arrive, none may overflow. Phase 2 switches
// to 84 MHz and fires spikes on all channels: packets become longer than a
// frame, overflow must be flagged, and the received packets must be the
// reference packets minus exactly one frame per overflow. The LVDS outputs
// are checked against DATA (rails) and idle (VDD/2) at every bit.
//
// Mechanisms counted, each must occur: frames with no events (clock not
// started), packets sent, start-up count of 12 CLK_SER edges nq0 FLAG,
// 31-step saturation, spatial grouping (an ADC with several events under
// one header), overflow, serializer frequency change, idle line at VDD/2.
// The compression ratio against raw 7-bit streaming is printed.
module tb_nct_top;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;
  import nct_tb_pkg::*;

  localparam real T_ADC = 3125.0;
  localparam int  LSB   = 32;     // input units per ADC LSB (12-bit input)

  logic adc_clk = 0, rst_n = 1;
  logic [11:0] vin [N_ADC];
  logic [4:0]  ro_ctrl = 5'b00000;
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
  int n_empty = 0, n_sat = 0, n_group = 0, n_ovf = 0, n_startup = 0, n_bad_startup = 0;
  int n_freq_change = 0, n_idle_ok = 0, n_line_err = 0;
  int edges_since_ena = 0, nedge = 0;
  int amp [N_ADC][N_CH];     // spike amplitude per channel (input units)
  int age [N_ADC][N_CH];     // frames since spike onset
  int refc [N_ADC][N_CH];
  frame_t frames [int];
  longint raw_bits = 0;

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
  always @(posedge ena) edges_since_ena = 0;
  always @(posedge clk_ser) edges_since_ena++;
  always @(posedge flag) if (live) begin
    if (edges_since_ena == 12) n_startup++;
    else begin n_bad_startup++; $display("start-up edges %0d", edges_since_ena); end
  end

  // Line check at every bit (second half) and now and then when idle.
  always @(negedge clk_ser) begin
    #0.5;
    if (flag) begin
      if ((outp > 0.6) != data || (outn > 0.6) == data) n_line_err++;
    end
  end
  always @(posedge adc_clk) begin
    if (!flag && !ena) begin
      if (outp == 0.6 && outn == 0.6) n_idle_ok++;
      else n_line_err++;
    end
  end

  // Input waveform of channel s of ADC a: baseline in the middle of LSB 64
  // plus a spike shape over 4 frames.
  function automatic int level(input int a, input int s, input int noise);
    int v = 64 * LSB + LSB / 2 + noise;
    case (age[a][s])
      0: v += amp[a][s];
      1: v -= amp[a][s] * 6 / 10;
      2: v += amp[a][s] * 3 / 10;
      default: ;
    endcase
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return v;
  endfunction

  // Start spikes at the beginning of a frame.
  task automatic new_spikes(input int pct, input bit all_ch);
    // pct = 1 is taken as 1.25 % (1 in 80 frames)
    for (int a = 0; a < N_ADC; a++)
      for (int s = 0; s < N_CH; s++) if (age[a][s] < 100) age[a][s]++;
    for (int a = 0; a < N_ADC; a++) begin
      if (all_ch) begin
        for (int s = 0; s < N_CH; s++) begin age[a][s] = 0; amp[a][s] = (40 + s) * LSB; end
      end else if (pct == 1 ? ($urandom_range(0, 79) == 0) : ($urandom_range(0, 99) < pct)) begin
        int c0 = $urandom_range(0, N_CH - 1);
        int A  = $urandom_range(1, 45) * LSB;
        for (int k = 0; k < 4 && c0 + k < N_CH; k++) begin
          age[a][c0 + k] = 0;
          amp[a][c0 + k] = A >> k;
        end
      end
    end
  endtask

  // Run frames: at each falling edge present the channel named by mux_ch
  // and record its reference event under (frame, slot).
  task automatic run(input int nframes, input int pct, input int all_at);
    for (int n = 0; n < nframes * N_CH; n++) begin
      int slot = (nedge + 1) % N_CH;
      int fno  = (nedge + 1) / N_CH;
      check(int'(mux_ch) == slot, "multiplexer alignment");
      if (slot == 0) new_spikes(pct, (fno == all_at));
      for (int a = 0; a < N_ADC; a++) begin
        int v = level(a, slot, $urandom_range(0, 20) - 10);
        int t = v / LSB;
        int d = (t > refc[a][slot]) ? t - refc[a][slot] : refc[a][slot] - t;
        adc_event_t e;
        vin[a] = 12'(v);
        if (d > 31) begin d = 31; n_sat++; end
        e.delta = 5'(d);
        e.sign  = (t > refc[a][slot]) && d != 0;
        refc[a][slot] = e.sign ? refc[a][slot] + d : refc[a][slot] - d;
        frames[fno][a][slot] = e;
      end
      raw_bits += N_ADC * CODE_W;
      @(negedge adc_clk);
    end
  endtask

  // Compare received packets (from word index w0) with the reference
  // packets of frames f0..f1-1; frames may be skipped only if allow_skip.
  task automatic compare(input int w0, input int f0, input int f1, input bit allow_skip,
                         output int matched, output int skipped);
    int exp_q [$], got [$], pk_e [$], pk_g [$];
    matched = 0; skipped = 0;
    for (int f = f0; f < f1; f++) begin
      int nq0 = exp_q.size();
      build_packet(frames[f], exp_q);
      if (exp_q.size() == nq0) n_empty++;
      else begin
        for (int a = 0; a < N_ADC; a++) begin
          int ne = 0;
          for (int s = 0; s < N_CH; s++) if (frames[f][a][s].delta != 0) ne++;
          if (ne > 1) n_group++;
        end
      end
    end
    for (int i = w0; i < mon.words.size(); i++) got.push_back(mon.words[i]);
    while (got.size() > 0) begin
      pk_g.delete();
      while (got.size() > 0 && got[0] != -1) pk_g.push_back(got.pop_front());
      if (got.size() > 0) void'(got.pop_front());
      forever begin
        pk_e.delete();
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL received packet of %0d words not expected", pk_g.size());
          break;
        end
        while (exp_q[0] != -1) pk_e.push_back(exp_q.pop_front());
        void'(exp_q.pop_front());
        if (pk_e == pk_g) begin matched++; break; end
        skipped++;
        if (!allow_skip) begin
          failures++;
          $display("FAIL packet mismatch: got %0d words, expected %0d", pk_g.size(), pk_e.size());
          for (int i = 0; i < pk_g.size() && i < pk_e.size(); i++) if (pk_g[i] != pk_e[i]) begin
            $display("  first difference at word %0d: got %h expected %h (matched so far %0d)", i, pk_g[i], pk_e[i], matched); break; end
        end
      end
    end
    while (exp_q.size() > 0) if (exp_q.pop_front() == -1) skipped++;
  endtask

  initial begin
    int m1, s1, m2, s2, w_p2, f_p2, ovf_p1;
    for (int a = 0; a < N_ADC; a++) begin
      vin[a] = 12'(64 * LSB + LSB / 2);
      for (int s = 0; s < N_CH; s++) begin
        refc[a][s] = 64; age[a][s] = 100; amp[a][s] = 0;
        frames[0][a][s] = '0;   // slot 0 of frame 0 precedes the first sample
      end
    end
    @(posedge adc_clk); #1 rst_n = 0;   // reset as a falling edge, taken while ADC CLK is high
    repeat (3) @(negedge adc_clk);
    rst_n = 1;
    // Forget what the line showed before reset: the start-up state is random.
    mon.words.delete(); mon.packets = 0; mon.bits_total = 0; mon.errors = 0; mon.in_pkt = 0;
    n_startup = 0; n_bad_startup = 0; n_line_err = 0; n_idle_ok = 0;
    // Phase 1a: 574 MHz serializer clock, spikes at a rate of about 64 per
    // second and channel (one 4-channel spike in 1.25 % of ADC frames).
    run(100, 1, -1);
    run(6, 0, -1);                       // quiet tail: all packets delivered
    $display("phase 1a: raw 7-bit streaming %0d bits, packets %0d bits, compression %0.1fx",
             raw_bits, mon.bits_total, real'(raw_bits) / real'(mon.bits_total));
    // Phase 1b: dense spikes.
    run(30, 30, -1);
    run(6, 0, -1);
    ovf_p1 = n_ovf;
    compare(0, 0, (nedge + 1) / N_CH, 1'b0, m1, s1);
    $display("phase 1: %0d packets matched, %0d missing", m1, s1);
    check(s1 == 0 && m1 > 0, "phase 1 packets");
    check(ovf_p1 == 0, "overflow at 574 MHz");
    // Phase 2: slowest clock, spikes on every channel.
    w_p2 = mon.words.size();
    f_p2 = (nedge + 1) / N_CH;
    ro_ctrl = 5'b11111;
    n_freq_change++;
    run(8, 40, f_p2 + 2);
    run(6, 0, -1);
    compare(w_p2, f_p2, (nedge + 1) / N_CH, 1'b1, m2, s2);
    $display("phase 2: %0d packets matched, %0d frames lost, %0d overflow pulses", m2, s2, n_ovf - ovf_p1);
    check(n_ovf - ovf_p1 > 0, "no overflow at 84 MHz");
    check(s2 == n_ovf - ovf_p1, "lost frames differ from overflow count");
    check(mon.errors == 0, "receiver coding errors");
    check(n_line_err == 0, $sformatf("LVDS line errors %0d", n_line_err));
    check(n_bad_startup == 0, "start-up edge count");
    $display("mechanisms: empty frames %0d, packets %0d, start-ups %0d, saturations %0d, grouped ADCs %0d, overflows %0d, frequency changes %0d, idle checks %0d",
             n_empty, mon.packets, n_startup, n_sat, n_group, n_ovf, n_freq_change, n_idle_ok);
    check(n_empty > 0, "no empty frame");
    check(mon.packets > 0, "no packet");
    check(n_startup > 0, "no start-up");
    check(n_sat > 0, "no saturation");
    check(n_group > 0, "no spatial grouping");
    check(n_ovf > 0, "no overflow");
    check(n_freq_change > 0, "no frequency change");
    check(n_idle_ok > 0, "no idle line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
