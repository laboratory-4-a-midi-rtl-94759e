// last4samp: keeps the last four samples of the serial input.
//
// A four-flip-flop shift register clocked by CLK. Every rising edge the
// current SigIn value is stored in the newest stage s[3] (S3) and the older
// samples move one place towards s[0] (S0, the earliest of the four). So
// after an edge, s = {S3,S2,S1,S0} = the values SigIn had just before the
// last four edges, newest first.
//
// Reset: the asynchronous reset sets every stage to 1, the idle level of the
// line, so that the start-bit detector does not mistake the reset state for
// a START bit. The document suggests getting this effect by putting an
// inverter before and after each clearable flip-flop; an asynchronous set is
// the same behaviour written directly.
//
// SigIn is asynchronous to CLK. Like the original design, this block uses
// the sampling stages themselves as the input registers and adds no extra
// synchroniser stage.
module last4samp
  import midi_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      sig_in,
  output logic [N_SAMPLES_KEPT-1:0] s
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) s <= '1;
    else     s <= {sig_in, s[N_SAMPLES_KEPT-1:1]};
  end

endmodule
