// majority: value of a MIDI bit voted from three clock samples.
//
// Purely combinational. The output MAJ is 1 when at least two of the three
// newest samples S3, S2, S1 are 1:
//   MAJ = S3 S2 + S3 S1 + S2 S1
// A single noisy sample among the three is therefore outvoted. The
// serial-to-parallel register stores MAJ when the sample counter says the
// three samples lie inside a data bit.
module majority (
  input  logic [2:0] s,   // s[2]=S3 (newest), s[1]=S2, s[0]=S1
  output logic       maj
);

  always_comb maj = (s[2] & s[1]) | (s[2] & s[0]) | (s[1] & s[0]);

endmodule
