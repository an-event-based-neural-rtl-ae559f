// Self-checking testbench of the ring_osc model. It checks that no edge
// appears while ENA is low and the output then rests low, that the settled
// frequency is 574 MHz with CTRL = 0 and 84 MHz with all groups in the loop,
// that CTRL acts as a thermometer code (bits above the first 0 are
// ignored), that more groups always mean a lower frequency, and that the
// first periods after ENA are longer than the settled period (start-up).
module tb_ring_osc;
  timeunit 1ns; timeprecision 1ps;
  logic ena = 0, clk_ser;
  logic [4:0] ctrl = '0;
  int checks = 0, failures = 0, nedge = 0;
  realtime t_edge [$];

  ring_osc dut (.*);

  always @(posedge clk_ser) begin nedge++; t_edge.push_back($realtime); end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Run the oscillator for a while; return the settled frequency in MHz.
  task automatic measure(input logic [4:0] c, output real f_mhz, output real first_per);
    ctrl = c; nedge = 0; t_edge.delete();
    ena = 1;
    #2000;
    ena = 0;
    #100;
    first_per = t_edge[1] - t_edge[0];
    f_mhz = 1000.0 * real'(t_edge.size() - 11) / (t_edge[t_edge.size()-1] - t_edge[10]);
    check(clk_ser == 0, "output not low after stop");
    nedge = 0;
    #500 check(nedge == 0, "edges while disabled");
  endtask

  initial begin
    real f, fp, fprev, p1;
    logic [4:0] th [6] = '{5'b00000, 5'b00001, 5'b00011, 5'b00111, 5'b01111, 5'b11111};
    #100 check(nedge == 0 && clk_ser == 0, "running before ENA");
    measure(5'b00000, f, p1);
    check(f > 570.0 && f < 578.0, $sformatf("fmax %f MHz", f));
    check(p1 > 1.5 * (1000.0 / f), "no start-up ramp");
    measure(5'b11111, f, p1);
    check(f > 83.0 && f < 85.0, $sformatf("fmin %f MHz", f));
    fprev = 1.0e9;
    for (int k = 0; k < 6; k++) begin
      measure(th[k], f, p1);
      check(f < fprev, $sformatf("frequency not decreasing at step %0d: %f", k, f));
      fprev = f;
      if (k < 4) begin
        measure(th[k] | 5'b10000 & ~(5'b1 << k), fp, p1);
        check(fp > f - 0.5 && fp < f + 0.5, $sformatf("bits above first 0 changed f: %f vs %f", fp, f));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
