// sampcount: counts the eight clock samples inside each MIDI bit.
//
// A 3-bit binary counter 0,1,...,7,0,... advancing on every rising clock
// edge. CLRSAMPCOUNT is a synchronous clear: when it is high the count is 0
// after the next edge (it acts on the D inputs, never on the asynchronous
// clear). The asynchronous reset is only for power-up.
//
// Outputs:
//   count  the state Q2 Q1 Q0.
//   grab9  high for the whole clock cycle in which the count is 7; one pulse
//          per MIDI bit, near the middle of the bit once the counter has
//          been started by a START bit.
//   fix    Q2, i.e. high at counts 4..7. The count-clear logic uses it to
//          block the late clear pulse that a 1 in D0 would otherwise cause.
//          Taking Q2 as FIX is this design's choice; the document asks for
//          a FIX signal from this counter without fixing which.
module sampcount
  import midi_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clr_samp_count,
  output logic [SAMP_CNT_W-1:0] count,
  output logic                  grab9,
  output logic                  fix
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 count <= '0;
    else if (clr_samp_count) count <= '0;
    else                     count <= count + 1'b1;
  end

  always_comb begin
    grab9 = &count;
    fix   = count[SAMP_CNT_W-1];
  end

endmodule
