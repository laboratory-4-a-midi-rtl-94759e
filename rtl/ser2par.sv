// ser2par: collects the eight data bits and presents them in parallel.
//
// An 8-bit shift register of enabled flip-flops, all clocked by CLK. On a
// clock edge where EN (GRAB8) is high, the voted bit MAJ enters the D7 end
// and every stored bit moves one place towards D0; with EN low the register
// holds. MIDI sends the least significant bit first, so after the eight
// GRAB8 pulses of a word D0 holds the first data bit and D7 the last.
// Reset clears the register.
module ser2par
  import midi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 maj,
  output logic [DATA_BITS-1:0] d
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     d <= '0;
    else if (en) d <= {maj, d[DATA_BITS-1:1]};
  end

endmodule
