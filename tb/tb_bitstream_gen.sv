// Self-checking testbench of bitstream_gen. Random packets of random
// 5-bit words are loaded one word every 5 clocks, with idle gaps between
// packets. The receiver model decodes FLAG/DATA (checking the Manchester
// mid-bit transition of every bit) and its words must equal the loaded
// ones, one packet per FLAG period. FLAG must rise on the load edge, fall
// exactly 5 clocks after the last load, and DATA must stay low while FLAG is
// low.
module tb_bitstream_gen;
  timeunit 1ns; timeprecision 1ps;
  logic clk_ser = 0, rst_n = 1, load = 0, flag, data, bit_out;
  logic [4:0] wrd = '0;
  int checks = 0, failures = 0, exp_q [$], cyc = 0, flag_hi = 0, idle_data = 0;

  bitstream_gen dut (.*);
  nct_rx_monitor mon (.clk_ser, .flag, .data);

  always #3 clk_ser = ~clk_ser;
  always @(posedge clk_ser) begin
    #0.5;
    if (flag) flag_hi++;
    if (!flag && data) idle_data++;
  end
  always @(negedge clk_ser) begin
    #0.5;
    if (!flag && data) idle_data++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nw;
    #1 rst_n = 0;   // reset as a falling edge
    repeat (2) @(negedge clk_ser);
    rst_n = 1;
    for (int p = 0; p < 50; p++) begin
      nw = $urandom_range(1, 12);
      flag_hi = 0;
      for (int w = 0; w < nw; w++) begin
        @(negedge clk_ser);
        load = 1; wrd = 5'($urandom);
        exp_q.push_back(int'(wrd));
        @(negedge clk_ser);
        load = 0;
        repeat (3) @(negedge clk_ser);
      end
      exp_q.push_back(-1);
      repeat ($urandom_range(3, 9)) @(negedge clk_ser);
      check(flag_hi == 5 * nw, $sformatf("FLAG high %0d cycles for %0d words", flag_hi, nw));
    end
    check(mon.words.size() == exp_q.size(), "word count");
    for (int i = 0; i < exp_q.size() && i < mon.words.size(); i++)
      check(mon.words[i] == exp_q[i], $sformatf("word %0d got %0d exp %0d", i, mon.words[i], exp_q[i]));
    check(mon.errors == 0, "Manchester errors");
    check(idle_data == 0, "DATA active while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
