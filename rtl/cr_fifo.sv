// Channel-rotating FIFO of one CR-ADC.
//
// Each CR-ADC converts its 16 time-multiplexed channels in turn and starts
// every conversion from the code that channel reached one frame (16 ADC clock
// cycles) earlier. This FIFO remembers those codes: it is a DEPTH-deep shift
// register of CODE_W-bit words that moves forward once per ADC clock cycle.
// The final code of the channel just converted enters at the tail; the head
// then holds the code stored DEPTH pushes ago, i.e. the previous-frame code
// of the next channel, which the DAC control uses as its initial code.
//
// Interface: push on the rising edge of clk while push is high; head is the
// oldest entry, valid one clock after the preceding push. Reset loads every
// entry with INIT_CODE.
//
// The depth of 16, the 7-bit width and the shift-every-cycle structure follow
// the design description. Clocking it on the edge that ends a conversion, the
// push enable and the mid-scale reset value are this implementation's choices.
module cr_fifo #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned CODE_W = 7,
  parameter logic [CODE_W-1:0] INIT_CODE = CODE_W'(1 << (CODE_W-1))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [CODE_W-1:0] din,
  output logic [CODE_W-1:0] head
);
  timeunit 1ns; timeprecision 1ps;

  logic [CODE_W-1:0] q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= INIT_CODE;
    end else if (push) begin
      q[0] <= din;
      for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end

  assign head = q[DEPTH-1];

endmodule
