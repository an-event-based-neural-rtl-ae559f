// Self-checking testbench of ser_fsm. The testbench models the frozen bank
// of the event memory (counts and entries of a random frame) and drives
// CLK_SER. After a req toggle it collects the word presented at every load
// and checks: the word sequence equals the reference packet; the first load
// comes on the 12th clock edge after req (2 synchroniser edges, one IDLE
// edge, CNT_STARTUP = 8 start-up edges, then SYNC); loads come exactly every
// 5 clocks; ack toggles 6 clocks after the last load (FLAG falls on the 5th,
// ack follows one clock later); and nothing happens without a request.
module tb_ser_fsm;
  timeunit 1ns; timeprecision 1ps;
  import nct_pkg::*;
  import nct_tb_pkg::*;

  logic clk_ser = 0, rst_n = 1, req = 0, ack, load, sending;
  logic [4:0] rd_cnt [N_ADC];
  logic [2:0] rd_adc;
  logic [3:0] rd_idx;
  mem_entry_t rd_entry;
  logic [4:0] wrd;
  mem_entry_t bank [N_ADC][N_CH];
  int checks = 0, failures = 0;

  ser_fsm dut (.*);

  assign rd_entry = bank[rd_adc][rd_idx];

  always #2 clk_ser = ~clk_ser;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    frame_t fr;
    int exp_q [$], got [$];
    int edge_no, last_load, first_load, ack_edge;
    logic a0;
    for (int a = 0; a < N_ADC; a++) rd_cnt[a] = '0;
    #1 rst_n = 0;   // reset as a falling edge
    repeat (2) @(negedge clk_ser);
    rst_n = 1;
    repeat (20) @(posedge clk_ser);
    check(!load && !sending && ack == 0, "activity without request");
    for (int p = 0; p < 40; p++) begin
      // Random frame; some ADCs empty.
      for (int a = 0; a < N_ADC; a++) begin
        automatic int n = 0;
        automatic bit use_adc = ($urandom_range(0, 3) != 0) || (a == p % N_ADC);
        for (int s = 0; s < N_CH; s++) begin
          fr[a][s] = '0;
          if (use_adc && $urandom_range(0, 99) < 25) begin
            fr[a][s].delta = 5'($urandom_range(1, (p % 3 == 0) ? 31 : 3));
            fr[a][s].sign  = 1'($urandom);
            bank[a][n] = '{ch: 4'(s), sign: fr[a][s].sign, delta: fr[a][s].delta};
            n++;
          end
        end
        rd_cnt[a] = 5'(n);
      end
      exp_q.delete(); got.delete();
      build_packet(fr, exp_q);
      if (exp_q.size() == 0) continue;
      void'(exp_q.pop_back());
      @(negedge clk_ser);
      a0 = ack;
      req = ~req;
      edge_no = 0; first_load = -1; last_load = -1; ack_edge = -1;
      while (ack_edge < 0 && edge_no < 20000) begin
        @(posedge clk_ser);
        edge_no++;
        if (load) begin
          got.push_back(int'(wrd));
          if (first_load < 0) first_load = edge_no;
          else check(edge_no - last_load == 5, "word spacing");
          last_load = edge_no;
        end
        #0.1;
        if (ack != a0) ack_edge = edge_no;
      end
      check(first_load == 12, $sformatf("first load at edge %0d", first_load));
      check(ack_edge - last_load == 6, $sformatf("ack %0d edges after last load", ack_edge - last_load));
      check(got.size() == exp_q.size(), $sformatf("words %0d exp %0d", got.size(), exp_q.size()));
      for (int i = 0; i < got.size() && i < exp_q.size(); i++)
        check(got[i] == exp_q[i], $sformatf("packet %0d word %0d got %h exp %h", p, i, got[i], exp_q[i]));
      repeat (5) @(posedge clk_ser);
      check(!sending && !load, "idle after packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
