// Self-checking testbench of event_memory. The testbench drives random
// sparse ADC results slot by slot and plays the serializer through the
// req/ack toggle handshake. After each frame with events it checks that req
// toggled, that the frozen bank lists exactly the frame's non-zero results
// per ADC in slot order as {CH ID, SIGN, delta}, and that mux_ch leads the
// slot counter by one. Frames without events must not toggle req. Holding
// ack back over a frame with events must give one overflow pulse, no req
// toggle, and leave the frozen bank untouched; that frame is lost.
module tb_event_memory;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;
  import nct_tb_pkg::frame_t;

  logic adc_clk = 0, rst_n = 1, ack = 0, req, busy, frame_end, overflow;
  adc_event_t ev [N_ADC];
  logic [3:0] wr_ch, mux_ch, rd_idx = '0;
  logic [2:0] rd_adc = '0;
  logic [4:0] rd_cnt [N_ADC];
  mem_entry_t rd_entry;
  int checks = 0, failures = 0, n_ovf = 0;

  event_memory dut (.*);

  bit live = 0;   // set when reset is released
  always @(posedge rst_n) live = 1;
  always #50 adc_clk = ~adc_clk;
  always @(posedge adc_clk) if (live && overflow) n_ovf++;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_frame(input int pct, output frame_t fr);
    for (int s = 0; s < N_CH; s++) begin
      for (int a = 0; a < N_ADC; a++) begin
        if ($urandom_range(0, 99) < pct) begin
          ev[a].delta = 5'($urandom_range(1, 31));
          ev[a].sign  = 1'($urandom);
        end else ev[a] = '0;
        fr[a][s] = ev[a];
      end
      @(negedge adc_clk);
      check(wr_ch == 4'(s + 1) && mux_ch == 4'(s + 2), "slot counter");
    end
    for (int a = 0; a < N_ADC; a++) ev[a] = '0;
  endtask

  task automatic check_bank(input frame_t fr);
    for (int a = 0; a < N_ADC; a++) begin
      automatic int n = 0;
      rd_adc = 3'(a);
      for (int s = 0; s < N_CH; s++)
        if (fr[a][s].delta != 0) begin
          rd_idx = 4'(n);
          #1;
          check(rd_entry.ch == 4'(s) && rd_entry.delta == fr[a][s].delta && rd_entry.sign == fr[a][s].sign,
                $sformatf("entry adc %0d idx %0d", a, n));
          n++;
        end
      check(rd_cnt[a] == 5'(n), $sformatf("count adc %0d: %0d exp %0d", a, rd_cnt[a], n));
    end
  endtask

  initial begin
    frame_t fr, fr_kept, fr_lost;
    logic r0;
    for (int a = 0; a < N_ADC; a++) ev[a] = '0;
    @(posedge adc_clk); #1 rst_n = 0;   // reset as a falling edge, taken while ADC CLK is high
    repeat (2) @(negedge adc_clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      r0 = req;
      run_frame((f % 5 == 4) ? 0 : 10 + 10 * (f % 3), fr);
      if (f % 5 == 4) begin
        check(req == r0, "req toggled for an empty frame");
      end else begin
        check(req != r0, "req did not toggle");
        check(busy, "busy after request");
        check_bank(fr);
        ack = req;     // serializer done
      end
    end
    // Overflow: do not acknowledge.
    r0 = req;
    run_frame(20, fr_kept);
    check(req != r0, "req did not toggle");
    r0 = req;
    run_frame(20, fr_lost);
    check(req == r0, "req toggled while busy");
    check(overflow && n_ovf == 0, $sformatf("overflow pulse %0d after %0d", overflow, n_ovf));
    check_bank(fr_kept);
    ack = req;
    repeat (3) @(negedge adc_clk);
    repeat (N_CH - 3) @(negedge adc_clk);
    r0 = req;
    run_frame(30, fr);
    check(req != r0, "req after recovery");
    check_bank(fr);
    check(n_ovf == 1, "single overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
