// midi_top: MIDI serial-to-parallel receiver.
//
// Turns the 10-bit serial MIDI word (START, D0..D7, STOP; idle high, 32 us
// per bit) into an 8-bit parallel byte D7..D0 with a DATAVALID flag. CLK is
// eight times the bit rate (4.0 us) and is not synchronised with SigIn.
//
// Data path: last4samp shifts SigIn in every clock; majority votes the three
// newest samples into MAJ; ser2par shifts MAJ in on each GRAB8 pulse.
// Control: findstart raises GOTSTART when four samples look like a START
// bit; countclear releases the sample counter (CLRSAMPCOUNT low) when
// GOTSTART arrives while bitcount is in its idle state (BIT9); sampcount then
// counts 0..7 per MIDI bit and pulses GRAB9 at count 7; bitcount counts the
// GRAB9 pulses 0..8. GRAB8 = GRAB9 . /BIT8, so the ninth pulse, which falls in
// the STOP bit, does not reach the data register.
//
// Timing, noise-free: GOTSTART rises after the fourth low sample of the START
// bit; GRAB9/GRAB8 pulses then come every eight clocks, the first one eight
// clocks after the counter starts. DATAVALID (= BIT9) falls with the first
// data-bit grab and rises again on the edge that ends the GRAB9 pulse inside
// the STOP bit, when all eight data bits are in place; it stays high through
// the idle line. A new START bit may follow the STOP bit immediately.
//
// RST is an asynchronous power-up reset (active high). It leaves the
// receiver idle: samples all 1, counters at 0, BIT9 = DATAVALID = 1 and the
// data register cleared.
//
// Lint notes: samp_count is a named net for the sample counter state that
// only simulation monitors read, so a lint tool reports it as unused; rst
// appears both as the flip-flops' asynchronous reset and as the disable
// condition of the assertion at the end, which a lint tool may report as a
// reset used both ways. Neither affects the synthesised circuit.
//
// What follows the original design and what does not: the block split, the
// signal names, the START rule, the counters and the GRAB8 gate follow it.
// The choice of Q2 as the FIX signal, the reset polarity, the all-ones reset
// of the sample register written as an asynchronous set, and the assertion
// are this design's own.
module midi_top
  import midi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sig_in,
  output logic [DATA_BITS-1:0] d,
  output logic                 data_valid
);

  logic [N_SAMPLES_KEPT-1:0] s;
  logic                      maj;
  logic                      got_start;
  logic                      clr_samp_count;
  logic [SAMP_CNT_W-1:0]     samp_count;
  logic                      grab9;
  logic                      fix;
  logic [BIT_CNT_W-1:0]      bit_count;
  logic                      bit8;
  logic                      bit9;
  logic                      grab8;

  last4samp u_last4samp (
    .clk    (clk),
    .rst    (rst),
    .sig_in (sig_in),
    .s      (s)
  );

  majority u_majority (
    .s   (s[3:1]),
    .maj (maj)
  );

  findstart u_findstart (
    .s         (s),
    .got_start (got_start)
  );

  countclear u_countclear (
    .bit9           (bit9),
    .got_start      (got_start),
    .fix            (fix),
    .clr_samp_count (clr_samp_count)
  );

  sampcount u_sampcount (
    .clk            (clk),
    .rst            (rst),
    .clr_samp_count (clr_samp_count),
    .count          (samp_count),
    .grab9          (grab9),
    .fix            (fix)
  );

  bitcount u_bitcount (
    .clk   (clk),
    .rst   (rst),
    .grab9 (grab9),
    .count (bit_count),
    .bit8  (bit8),
    .bit9  (bit9)
  );

  // The AND gate with an inverted input in front of the data register.
  always_comb grab8 = grab9 & ~bit8;

  ser2par u_ser2par (
    .clk (clk),
    .rst (rst),
    .en  (grab8),
    .maj (maj),
    .d   (d)
  );

  always_comb data_valid = bit9;

  // A data grab never happens while the word is reported valid, and at most
  // eight grabs happen between two rising edges of DATAVALID.
  a_no_grab_when_valid: assert property (@(posedge clk) disable iff (rst)
    grab8 |-> (bit_count != BIT_CNT_W'(BIT_STATES - 1)));

endmodule
