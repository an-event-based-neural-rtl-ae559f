// Behavioural model (not synthesizable logic) of the event-based LVDS
// driver (eLVDS).
//
// A conventional LVDS driver burns its bias current all the time. This one
// is an inverter pair that is only driven during a packet: while FLAG is
// high the input gates turn DATA into the complementary drives INP and INN,
// and the two inverters drive OUTP = DATA and OUTN = NOT DATA to the rails.
// While FLAG is low INP and INN are both low and switches park both outputs
// at VDD/2, so the idle line carries no differential signal and the
// receiver sees the third (idle) state of the ternary code.
//
// Input gates, as the description states and its waveform shows (both low
// when idle): INN = FLAG AND DATA, INP = FLAG AND NOT DATA. The outputs
// are real-valued voltages; VDD_V is this model's choice (the supply value
// is not given). Outputs follow the inputs after T_DRV_NS.
module elvds_driver #(
  parameter real VDD_V    = 1.2,
  parameter real T_DRV_NS = 0.2
) (
  input  logic flag,
  input  logic data,
  output logic inp,
  output logic inn,
  output real  outp,
  output real  outn
);
  timeunit 1ns; timeprecision 1ps;

  assign inn = flag & data;
  assign inp = flag & ~data;

  initial begin
    outp = VDD_V / 2.0;
    outn = VDD_V / 2.0;
  end

  always @(inp, inn, flag) begin
    #(T_DRV_NS);
    if (!flag) begin
      outp = VDD_V / 2.0;
      outn = VDD_V / 2.0;
    end else begin
      outp = inp ? 0.0 : VDD_V;
      outn = inn ? 0.0 : VDD_V;
    end
  end

endmodule
