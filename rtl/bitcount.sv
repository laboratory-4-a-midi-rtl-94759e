// bitcount: counts the bits of a MIDI word: eight data bits and the STOP bit.
//
// A 4-bit counter with nine states 0,1,...,8,0,... built from enabled
// flip-flops: it advances only on a clock edge where GRAB9 is high, so it
// moves once per MIDI bit, at the sampling point of that bit.
//
//   count 0  BIT9 = 1. The previous word's STOP bit has been sampled and the
//            line is idle (or the START bit of a new word is under way).
//            This is also the reset state, so the receiver starts out idle.
//   count 1..7  data bits D0..D6 have been grabbed.
//   count 8  BIT8 = 1. All eight data bits are grabbed; the next GRAB9 pulse
//            falls in the STOP bit and BIT8 is used to keep it from the data
//            register.
//
// BIT9 doubles as DATAVALID: it rises after the STOP bit is sampled and
// falls at the first data-bit grab of the next word, when the parallel
// register starts to change.
module bitcount
  import midi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 grab9,
  output logic [BIT_CNT_W-1:0] count,
  output logic                 bit8,
  output logic                 bit9
);

  localparam logic [BIT_CNT_W-1:0] LAST = BIT_CNT_W'(BIT_STATES - 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        count <= '0;
    else if (grab9) count <= (count == LAST) ? '0 : count + 1'b1;
  end

  always_comb begin
    bit8 = (count == LAST);
    bit9 = (count == '0);
  end

endmodule
