// Testbench receiver for the serial event packets. It plays the role of
// the hub receiver with a recovered clock: it is given CLK_SER and samples
// FLAG and DATA just after each clock edge. In the first half of a bit
// period DATA must be the inverse of the second half (Manchester coding);
// the second half is the bit. Bits of one FLAG-high period are grouped into
// 5-bit words, MSB first. Words are appended to words[] and -1 marks the
// end of each packet. Coding faults are counted in errors.
module nct_rx_monitor (
  input logic clk_ser,
  input logic flag,
  input logic data
);
  timeunit 1ns; timeprecision 1ps;

  int   words [$];
  int   errors = 0;
  int   packets = 0;
  int   bits_total = 0;
  logic first_half;
  int   cur, nb;
  bit   in_pkt = 0;

  always @(posedge clk_ser) begin
    #0.01;
    first_half = data;
  end

  always @(negedge clk_ser) begin
    #0.01;
    if (flag) begin
      if (first_half == data) begin
        errors++;
        $display("RX: no mid-bit transition at %0t", $time);
      end
      if (!in_pkt) begin in_pkt = 1; cur = 0; nb = 0; end
      cur = (cur << 1) | int'(data);
      nb++;
      bits_total++;
      if (nb == 5) begin words.push_back(cur); cur = 0; nb = 0; end
    end else if (in_pkt) begin
      in_pkt = 0;
      if (nb != 0) begin errors++; $display("RX: packet not a whole number of words"); end
      words.push_back(-1);
      packets++;
    end
  end
endmodule
