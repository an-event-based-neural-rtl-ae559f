// Self-checking testbench of the elvds_driver model: for every FLAG/DATA
// combination it checks the input gates (both low when idle, INN = DATA and
// INP = NOT DATA during a packet) and the line: both outputs at VDD/2 when
// idle, OUTP = DATA and OUTN = NOT DATA at the rails during a packet, after
// the driver delay.
module tb_elvds_driver;
  timeunit 1ns; timeprecision 1ps;
  logic flag = 0, data = 0, inp, inn;
  real outp, outn;
  int checks = 0, failures = 0;

  elvds_driver dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      flag = 1'($urandom); data = 1'($urandom);
      #1;
      check(inn == (flag & data) && inp == (flag & !data), "input gates");
      if (!flag) check(outp > 0.59 && outp < 0.61 && outn > 0.59 && outn < 0.61, "idle level");
      else check((data ? (outp > 1.19 && outn < 0.01) : (outp < 0.01 && outn > 1.19)), "driven level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
