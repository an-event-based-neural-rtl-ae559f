// Bit-stream generator of the event serializer. CLK_SER domain.
//
// Turns the 5-bit words of the serializer FSM into the serial event packet.
// A word presented with load is taken at the rising clock edge and sent
// most-significant bit first, one bit per CLK_SER cycle, so a new word can
// be loaded every WORD_W cycles without a gap. FLAG is high while bits are
// being sent and falls WORD_W cycles after the last load; it marks the
// packet and enables the eLVDS driver.
//
// DATA is Manchester coded when MANCHESTER = 1: each bit period is split at
// the falling clock edge, a 1 is sent low-then-high and a 0 high-then-low
// (DATA = bit XOR CLK_SER), so the receiver can recover the clock from the
// data. The coding is formed with the clock itself, the usual way a
// Manchester encoder is built; DATA is held low while FLAG is low. Together
// FLAG and DATA form the ternary line code: idle, high, low.
//
// From the description: 5-bit words, one word every 5 CLK_SER cycles, the
// FLAG and DATA outputs, Manchester coding on the link. Bit order and the
// Manchester polarity are this implementation's choices.
//
// An assertion checks that load comes only on an idle line or in the last
// bit of the previous word.
module bitstream_gen #(
  parameter int unsigned WORD_W     = 5,
  parameter bit          MANCHESTER = 1'b1
) (
  input  logic              clk_ser,
  input  logic              rst_n,
  input  logic              load,
  input  logic [WORD_W-1:0] wrd,
  output logic              flag,
  output logic              data,
  output logic              bit_out   // current (uncoded) bit
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned BW = $clog2(WORD_W);

  logic [WORD_W-1:0] sh;
  logic [BW-1:0]     nbit;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      nbit <= '0;
      flag <= 1'b0;
    end else if (load) begin
      sh   <= wrd;
      nbit <= '0;
      flag <= 1'b1;
    end else if (flag) begin
      sh   <= sh << 1;
      nbit <= nbit + 1'b1;
      if (nbit == BW'(WORD_W - 1)) flag <= 1'b0;
    end
  end

  assign bit_out = sh[WORD_W-1];
  assign data    = flag & (MANCHESTER ? (bit_out ^ clk_ser) : bit_out);

  // A new word may only start on an idle line or in the last bit of a word.
  a_load_at_word_end: assert property (@(posedge clk_ser) disable iff (!rst_n)
    load |-> (!flag || nbit == BW'(WORD_W - 1)))
    else $error("bitstream_gen: word loaded in the middle of a word");

endmodule
