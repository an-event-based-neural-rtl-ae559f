// Event counter and DAC control of one channel-rotating delta ADC (CR-ADC).
//
// While ADC CLK is high the ADC converts one channel. The conversion starts
// from init_code, the code this channel reached in the previous frame, and
// walks the code one LSB per comparison towards the held input, counting
// every step as an event. The comparisons are clocked by the asynchronous
// pulse generator (pulse). The walk ends when the comparator reverses, when
// STEP_MAX events have been counted, or at the end of the code range; the
// controller then drops busy so that the pulse generator stops.
//
// Search order (this implementation's choice; the description only says
// that the DAC settles to the input by +1/-1 steps): the DAC is first set to
// code+1; while the held input is at or above it the code goes up. If the
// very first probe fails, the DAC is set to code and the code goes down while
// the input is below it. The final code c thus satisfies c <= input < c+1 in
// LSB units unless the STEP_MAX slew limit was hit.
//
// Timing: the pulse-domain registers are cleared asynchronously while ADC
// CLK is low (the event counter is reset after every conversion). On the
// falling edge of ADC CLK, when the comparisons are finished, SIGN and delta
// are captured in ev and final_code is valid for the channel-rotating FIFO.
// ev then stays stable over the following rising edge, where the event
// memory samples it. The multi-bit values crossing from the pulse domain are
// static by then, because all comparisons must finish within the high half
// of the ADC clock.
//
// Interface: cmp = 1 when the held input is at or above the DAC level of
// dac_code. STEP_MAX = 31 and the 7-bit code follow the description.
module cr_adc_ctrl
  import nct_pkg::adc_event_t;
#(
  parameter int unsigned CODE_W   = 7,
  parameter int unsigned DELTA_W  = 5,
  parameter int unsigned STEP_MAX = 31
) (
  input  logic              adc_clk,
  input  logic              rst_n,
  input  logic              pulse,      // asynchronous comparison clock
  input  logic              cmp,        // comparator decision for dac_code
  input  logic [CODE_W-1:0] init_code,  // previous-frame code of this channel
  output logic [CODE_W-1:0] dac_code,   // code applied to the C-DAC
  output logic [CODE_W-1:0] final_code, // code reached by the conversion
  output logic              busy,       // conversion still comparing
  output adc_event_t        ev          // SIGN and delta of the last conversion
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {S_UP, S_DN, S_DONE} conv_state_e;

  localparam logic [CODE_W-1:0] CODE_MAX = '1;

  conv_state_e        state;
  logic [DELTA_W-1:0] steps;
  logic               dir_up;
  logic               clr_n;
  logic [CODE_W-1:0]  code;
  logic               at_top, at_bot, last_step;

  assign clr_n = adc_clk & rst_n;

  always_comb begin
    code       = dir_up ? init_code + CODE_W'(steps) : init_code - CODE_W'(steps);
    at_top     = (code == CODE_MAX);
    at_bot     = (code == '0);
    last_step  = (steps == DELTA_W'(STEP_MAX - 1));
    dac_code   = (state == S_UP && !at_top) ? code + 1'b1 : code;
    final_code = code;
    busy       = (state != S_DONE);
  end

  always_ff @(posedge pulse or negedge clr_n) begin
    if (!clr_n) begin
      state  <= S_UP;
      steps  <= '0;
      dir_up <= 1'b1;
    end else begin
      unique case (state)
        S_UP: begin
          if (cmp && !at_top) begin
            steps  <= steps + 1'b1;
            dir_up <= 1'b1;
            if (last_step) state <= S_DONE;
          end else if (steps != '0) begin
            state <= S_DONE;
          end else begin
            state <= S_DN;
          end
        end
        S_DN: begin
          if (!cmp && !at_bot) begin
            steps  <= steps + 1'b1;
            dir_up <= 1'b0;
            if (last_step) state <= S_DONE;
          end else begin
            state <= S_DONE;
          end
        end
        default: state <= S_DONE;
      endcase
    end
  end

  always_ff @(negedge adc_clk or negedge rst_n) begin
    if (!rst_n) begin
      ev <= '0;
    end else begin
      ev.sign  <= dir_up && (steps != '0);
      ev.delta <= steps;
    end
  end

endmodule
