// countclear: generates CLRSAMPCOUNT, the synchronous clear of the sample
// counter.
//
// Purely combinational:
//   CLRSAMPCOUNT = BIT9 . /GOTSTART . /FIX
// BIT9 is high from the STOP bit of one word until the first data bit of the
// next has been grabbed, so BIT9./GOTSTART holds the sample counter at 0
// through the idle line and releases it when a START bit is recognised
// ("wanted clear"). Without FIX, a 1 in data bit D0 would drop GOTSTART while
// BIT9 is still high and clear the counter late in the first bit ("unwanted
// clear"). FIX, taken from the sample counter, is high for the second half of
// every count (counts 4..7) and masks that pulse until BIT9 falls. At count 0,
// where the wanted clear acts, FIX is low.
module countclear (
  input  logic bit9,
  input  logic got_start,
  input  logic fix,
  output logic clr_samp_count
);

  always_comb clr_samp_count = bit9 & ~got_start & ~fix;

endmodule
