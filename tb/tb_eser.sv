// Self-checking testbench of the event serializer (eSER).
//
// The testbench stands in for the eight CR-ADCs and drives one result per
// ADC per ADC clock cycle, with random sparse events. A receiver model
// (nct_rx_monitor) decodes FLAG/DATA; every received packet is compared word
// by word with the packet the reference builder makes from the frame.
//
// Phase 1, fast clock (574 MHz setting): every frame with events must give
// exactly one packet, starting within the next frame, FLAG must rise on the
// 12th CLK_SER edge after ENA (2 synchroniser edges, one IDLE edge, 8
// start-up edges, one load edge), frames without events must not start the
// clock at all, and no overflow may occur.
// Phase 2, slowest clock (84 MHz): dense frames make packets longer than a
// frame. The received packets must then be a subsequence of the expected
// ones, and the number of frames missing must equal the number of overflow
// pulses, which must be non-zero.
module tb_eser;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;
  import nct_tb_pkg::*;

  localparam real T_ADC = 500.0;   // shortened ADC clock: 8 us frames

  logic adc_clk = 0, rst_n = 1;
  adc_event_t ev [N_ADC];
  logic [4:0] ro_ctrl = 5'b00000;
  logic [3:0] mux_ch;
  logic frame_end, overflow, ena, clk_ser, flag, data;

  eser dut (.*);
  nct_rx_monitor mon (.clk_ser, .flag, .data);

  bit live = 0;   // set when reset is released
  always @(posedge rst_n) live = 1;
  always #(T_ADC/2) adc_clk = ~adc_clk;

  int checks = 0, failures = 0;
  int exp_q [$];       // expected words of all frames (with -1 markers)
  int exp_frame [$];   // frame index of each expected packet
  int n_ovf = 0, n_empty_frames = 0, n_clk_in_empty = 0, n_pkts_exp = 0;
  int edges_since_ena = 0, n_startup_ok = 0, n_startup_bad = 0;
  int dense = 0;
  bit frame_empty [int];   // frame number -> had no events
  longint last_frame_end_t = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge adc_clk) if (live && overflow) n_ovf++;

  int nedge = 0;
  always @(posedge adc_clk) if (live) begin
    nedge++;
    if (nedge % N_CH == 0) last_frame_end_t = longint'($time);
  end

  always @(posedge ena) edges_since_ena = 0;
  always @(posedge clk_ser) begin
    edges_since_ena++;
    if (nedge >= N_CH && frame_empty.exists(nedge / N_CH - 1) && frame_empty[nedge / N_CH - 1])
      n_clk_in_empty++;
  end
  always @(posedge flag) if (live) begin
    if (edges_since_ena == 12) n_startup_ok++;
    else begin n_startup_bad++; $display("start-up edges %0d", edges_since_ena); end
    if (!dense && longint'($time) - last_frame_end_t > longint'(16*T_ADC)) begin
      failures++; $display("FAIL packet started late");
    end
  end

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Drive one frame, starting at a falling edge; events are applied at the
  // falling edge before the rising edge that stores them.
  task automatic run_frame(input int density_pct, input int dmax, input bit empty);
    frame_t fr;
    frame_empty[nedge / N_CH] = empty;
    for (int s = 0; s < N_CH; s++) begin
      for (int a = 0; a < N_ADC; a++) begin
        if (!empty && $urandom_range(0, 99) < density_pct) begin
          ev[a].delta = 5'($urandom_range(1, dmax));
          ev[a].sign  = 1'($urandom);
        end else ev[a] = '0;
        fr[a][s] = ev[a];
      end
      @(negedge adc_clk);
    end
    for (int a = 0; a < N_ADC; a++) ev[a] = '0;   // idle unless the next frame drives
    if (packet_words(fr) != 0) begin
      build_packet(fr, exp_q);
      n_pkts_exp++;
    end
  endtask

  initial begin
    for (int a = 0; a < N_ADC; a++) ev[a] = '0;
    @(posedge adc_clk); #1 rst_n = 0;   // reset as a falling edge, taken while ADC CLK is high
    repeat (3) @(negedge adc_clk);
    rst_n = 1;
    // Forget what the line showed before reset: the start-up state is random.
    mon.words.delete(); mon.packets = 0; mon.bits_total = 0; mon.errors = 0; mon.in_pkt = 0;
    n_startup_ok = 0; n_startup_bad = 0;
    // Phase 1
    for (int f = 0; f < 30; f++) begin
      automatic bit empty = (f % 4 == 2);
      if (empty) n_empty_frames++;
      run_frame(8, 6, empty);
    end
    repeat (3 * N_CH) @(negedge adc_clk);
    check(n_ovf == 0, $sformatf("overflow in phase 1: %0d", n_ovf));
    check(n_empty_frames > 0 && n_clk_in_empty == 0, $sformatf("clock ran after an empty frame: %0d edges", n_clk_in_empty));
    check(mon.packets == n_pkts_exp, $sformatf("packets %0d expected %0d", mon.packets, n_pkts_exp));
    check(n_startup_bad == 0 && n_startup_ok > 0, "start-up edge count");
    check(mon.words.size() == exp_q.size(), $sformatf("words %0d expected %0d", mon.words.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < mon.words.size(); i++) begin
      checks++;
      if (mon.words[i] != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %0d exp %0d", i, mon.words[i], exp_q[i]);
      end
    end
    // Phase 2
    begin
      int exp2 [$], got [$], pk_e [$], pk_g [$];
      automatic int ovf0 = n_ovf, pk0 = mon.packets, skipped = 0, matched = 0, rx_start;
      exp_q.delete();
      rx_start = mon.words.size();
      ro_ctrl = 5'b11111;
      dense = 1;
      for (int f = 0; f < 12; f++) run_frame(60, 4, 0);
      for (int f = 0; f < 4; f++) run_frame(0, 1, 1);
      repeat (4 * N_CH) @(negedge adc_clk);
      // Compare packet by packet, skipping dropped frames.
      for (int i = rx_start; i < mon.words.size(); i++) got.push_back(mon.words[i]);
      while (got.size() > 0) begin
        pk_g.delete();
        while (got[0] != -1) pk_g.push_back(got.pop_front());
        void'(got.pop_front());
        forever begin
          pk_e.delete();
          if (exp_q.size() == 0) break;
          while (exp_q[0] != -1) pk_e.push_back(exp_q.pop_front());
          void'(exp_q.pop_front());
          if (pk_e == pk_g) begin matched++; break; end
          skipped++;
        end
      end
      while (exp_q.size() > 0) begin if (exp_q.pop_front() == -1) skipped++; end
      $display("phase 2: %0d packets matched, %0d frames dropped, %0d overflow pulses", matched, skipped, n_ovf - ovf0);
      check(n_ovf - ovf0 > 0, "no overflow in phase 2");
      check(matched == mon.packets - pk0, "received packet not expected");
      check(skipped == n_ovf - ovf0, "dropped frames differ from overflow count");
    end
    check(mon.errors == 0, "receiver coding errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
