// Self-checking testbench of cr_fifo: pushes random codes every clock and
// checks that the head always shows the code pushed DEPTH pushes earlier
// (mid-scale after reset), and that the FIFO holds when push is low.
module tb_cr_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int DEPTH = 16, W = 7;
  logic clk = 0, rst_n = 1, push = 0;
  logic [W-1:0] din = '0, head;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  cr_fifo #(.DEPTH(DEPTH), .CODE_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) hist.push_back(7'd64);
    #1 rst_n = 0;   // reset as a falling edge
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      checks++;
      if (head !== hist[0]) begin
        failures++; $display("FAIL n=%0d head=%0d exp=%0d", n, head, hist[0]);
      end
      push = (n % 7) != 3;
      din  = W'($urandom);
      if (push) begin hist.push_back(din); void'(hist.pop_front()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
