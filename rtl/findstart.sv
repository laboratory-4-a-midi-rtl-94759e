// findstart: recognises a START bit in the last four input samples.
//
// Purely combinational. GOTSTART is 1 when the earliest of the four samples,
// S0, is low and at least two of the three later ones (S1, S2, S3) are low
// too. Written in time order S0 S1 S2 S3 the accepted patterns are exactly
// 0000, 0010, 0100 and 0001. "At least two of S1..S3 low" is the complement
// of the majority of S3, S2, S1, so
//   GOTSTART = /S0 . /(S3 S2 + S3 S1 + S2 S1)
// With a clean falling edge GOTSTART therefore rises once four low samples
// have been taken, and one noisy high sample among the last three does not
// prevent it.
//
// GOTSTART is also high during any long run of zeros inside a word (a low
// data bit); the count-clear logic ignores it there.
module findstart (
  input  logic [3:0] s,          // s[3]=S3 (newest) .. s[0]=S0 (earliest)
  output logic       got_start
);

  logic ones_majority;

  always_comb begin
    ones_majority = (s[3] & s[2]) | (s[3] & s[1]) | (s[2] & s[1]);
    got_start     = ~s[0] & ~ones_majority;
  end

endmodule
