// midi_pkg: constants shared by the MIDI serial-to-parallel receiver.
//
// The receiver runs from one clock that is eight times the MIDI bit rate
// (4.0 us clock, 32 us MIDI bit). A MIDI word is a low START bit, eight data
// bits sent least significant first, and a high STOP bit; the line idles high.
// All numbers below are the ones the receiver is designed around; the
// counter widths follow from them.
package midi_pkg;

  // Clock samples taken inside one MIDI bit.
  localparam int unsigned SAMPLES_PER_BIT = 8;
  // Width of the sample counter (counts 0 .. SAMPLES_PER_BIT-1).
  localparam int unsigned SAMP_CNT_W      = $clog2(SAMPLES_PER_BIT);
  // Data bits per MIDI word.
  localparam int unsigned DATA_BITS       = 8;
  // Bit counter states: one per data bit plus the STOP bit (0 .. DATA_BITS).
  localparam int unsigned BIT_STATES      = DATA_BITS + 1;
  localparam int unsigned BIT_CNT_W       = $clog2(BIT_STATES);
  // Samples kept by the input shift register.
  localparam int unsigned N_SAMPLES_KEPT  = 4;

  // Nominal timing, in nanoseconds, used by the testbenches.
  localparam int unsigned CLK_PERIOD_NS   = 4000;
  localparam int unsigned BIT_PERIOD_NS   = CLK_PERIOD_NS * SAMPLES_PER_BIT;

endpackage
