# MIDI serial-to-parallel receiver

MIDI moves bytes one bit at a time. Each byte travels as a 10-bit word: a low
START bit, eight data bits with the least significant bit first, and a high STOP
bit. Every bit lasts 32 us, and the line idles high for any length of time
between words. This receiver turns that stream back into bytes. It drives the
byte on eight parallel lines `d[7:0]` and raises `data_valid` while the byte
is complete and stable.

The receiver has no clock from the transmitter. It runs on its own 4 us clock,
eight times the bit rate, and samples the line on every rising edge. It finds
a word by its START bit. It then counts clocks to decide when a data bit can be
read. It reads each bit as the majority of three consecutive samples, so one
noisy sample is outvoted. The whole design is a few gates and 19 flip-flops.

## Block structure

```
 sig_in ─► last4samp ──S3..S0──► findstart ──GOTSTART──► countclear ──CLRSAMPCOUNT──► sampcount
              │                                            ▲    ▲                      │  │
              └─S3,S2,S1─► majority ──MAJ──┐         BIT9 ─┘    └──────── FIX ──────────┘  │ GRAB9
                                           ▼                                               ▼
                                        ser2par ◄── GRAB8 = GRAB9 & ~BIT8 ◄───────────── bitcount
                                           │                                               │
                                        d[7:0]                                   BIT9 = data_valid
```

| Module | Kind | What it does |
|---|---|---|
| `last4samp` | 4 flip-flops | Shift register of the last four samples. `s[3]` (S3) is the newest and `s[0]` (S0) the oldest. Reset sets it to 1111 (idle line). |
| `majority` | gates | `MAJ = S3·S2 + S3·S1 + S2·S1`. |
| `findstart` | gates | `GOTSTART = /S0 · /MAJ(S3,S2,S1)`. The oldest sample must be low, and so must at least two of the other three. |
| `countclear` | gates | `CLRSAMPCOUNT = BIT9 · /GOTSTART · /FIX`. |
| `sampcount` | 3 flip-flops | Counts 0..7 on every clock. It has a synchronous clear. `GRAB9` is high at count 7. `FIX` is Q2, which is high at counts 4..7. |
| `bitcount` | 4 flip-flops | Counts 0..8 and then wraps to 0. It advances only on clocks where `GRAB9` is high. `BIT8` is state 8 and `BIT9` is state 0. |
| `ser2par` | 8 flip-flops | Shift register with an enable. On `GRAB8`, MAJ enters at D7 and the other bits move one place towards D0. |
| `midi_top` | wiring + 1 gate | Connects the blocks. It forms `GRAB8 = GRAB9 · /BIT8` and drives `data_valid = BIT9`. |
| `midi_pkg` | package | Shared constants: 8 samples per bit, 8 data bits, 9 bit-counter states, 4 kept samples, and the clock and bit periods used by the testbenches. |

Every flip-flop is clocked by `clk`. Nothing else drives a clock input. All
the enables and clears are synchronous. `rst` is asynchronous, active high,
and used only for power-up.

## How a word is received

The timeline below is for a noise-free word. Edge 0 is the first rising clock
edge that samples the START bit low. The falling edge of the line comes
0 to 4 us before edge 0, depending on phase.

| Edge | Event |
|---|---|
| 0..3 | Four low samples enter `last4samp`. After edge 3, S0 through S3 are all low, so `GOTSTART` goes high. `BIT9` is high because the bit counter is in its idle state 0. `CLRSAMPCOUNT` therefore falls. |
| 4 | `sampcount` leaves 0 and starts counting. By now the START bit is half over. |
| 10 | The count reaches 7, so `GRAB9` and `GRAB8` go high. MAJ is the vote over the samples from edges 8, 9 and 10, which are the first three samples of D0. |
| 11 | `ser2par` shifts in D0. `bitcount` goes from 0 to 1, so `BIT9` and `data_valid` fall. |
| 19, 27, … 67 | D1 … D7 are shifted in, one every 8 clocks. After edge 67 the bit counter is in state 8 and `BIT8` is high. |
| 75 | The ninth `GRAB9` pulse falls in the STOP bit. `BIT8` keeps it from becoming a `GRAB8` pulse, so the data register does not move. The bit counter wraps to 0, and `BIT9` and `data_valid` rise. The byte is now complete. |
| 76 … | `sampcount` is at 0 again. The STOP bit is high, so `GOTSTART` is low, and `CLRSAMPCOUNT` holds the counter at 0. This "wanted clear" lasts through the idle line until the next START bit. |

So `data_valid` falls 11 clocks after the first low START sample and rises
64 clocks later. It stays high, with `d` unchanged, until the first data bit
of the next word is grabbed. A new START bit may follow the STOP bit
immediately.

## The count-clear problem and FIX

This is the subtle part of the design. `GOTSTART` does not mean "a word has
started". It is high whenever the last four samples look like a falling edge
into a low level. That also happens inside a word, during any low data bit.
`countclear` only pays attention to it while `BIT9` is high, which is the
idle state between the STOP bit of one word and the first data grab of the
next.

`BIT9` does not fall at the START bit. It falls at the first grab, in the
middle of D0. Suppose D0 is 1. The 1-samples reach `last4samp` at edges 8
and 9, and `GOTSTART` drops at counts 6 and 7. `BIT9` is still high at that
moment. The plain formula `BIT9 · /GOTSTART` would therefore clear the sample
counter one clock before its first grab. The receiver would then lose the
word, or read it shifted.

`FIX` removes this "unwanted clear". It is a signal from the sample counter
that is high late in each count, and it masks the clear. This design uses
`FIX = Q2`, which is high at counts 4 to 7. That covers counts 6 and 7, where
the unwanted clear would fall. It is low at count 0, where the wanted clear
has to act. It also leaves counts 1 to 3 unmasked. A false start therefore
still cancels itself: if `GOTSTART` drops during those counts because the
"START bit" was a noise burst, the counter is cleared and the receiver goes
back to waiting. Any signal that is high at counts 6 and 7 and low at count 0
would work. The testbench shows what happens without `FIX`: about half of
random bytes, the ones with D0 = 1, are received wrongly.

## START-bit rule

The oldest of the four samples must be low, and so must at least two of the
other three. Written in time order (S0 S1 S2 S3), the accepted patterns are
0000, 0010, 0100 and 0001. On a clean edge, the start is therefore
recognised after four low samples. One noisy high sample among the last
three does not block it. A single low glitch on an idle line cannot trigger
it.

A simpler "any three of four samples low" rule also appears as a possible
description of this block. The stricter rule is used here because it is
stated twice with explicit patterns, and it matches the example waveforms.

## Where each bit is sampled, and clock tolerance

The structure fixes where the vote is taken. Recognising the START takes
four samples, the counter then runs eight more clocks, and the vote uses the
three samples before the grab edge. Together these put the voted samples at
the first three clock edges of each data bit. Relative to the start of the
bit, they fall at about φ, φ+4 and φ+8 us, where φ (0–4 us) is the phase of
the clock against the START edge. The vote window is therefore early in the
bit, not centred in it. The consequences:

- **Transmitter slower than the receiver clock.** The sampling points drift
  earlier by 8·32·δ us over the eight data bits, where δ is the fractional
  rate difference. The vote still succeeds while two of its three samples
  lie inside the bit. This gives a worst-case tolerance of about 1.5 %. A
  4 us clock against 34.6 us bits, the same ratio as a 3.7 us receiver clock
  against 32 us bits, corrupts the late bits. The testbench confirms this.
- **Transmitter faster than the receiver clock.** The points drift later,
  and there is room for roughly 7 % before D7's window leaves the bit.

Both figures are estimates from this arithmetic. The simulations use a
transmitter 2 % faster and one 1 % slower, and all bytes are received
correctly in both. To centre the window, the counter can be released later.
One way is to require more low samples before `GOTSTART`. Another is to
start `sampcount` at a value below 0 modulo 8. Both change the rules above,
and this design does not do either.

## Noise

The noise test flips each sample independently with probability p,
including samples on the idle line. Over 300 random words per run:

| p | words received wrongly |
|---|---|
| 2 % | 7–13 of 300, depending on the random seed |
| 15 % | 160–190 of 300 |

A data bit is lost only if two of its three voted samples flip, which
happens at about 0.1 % per bit for p = 2 %. The remaining errors at 2 % come
from START detection: noise on the idle line, or a START recognised one
sample late or early. These shift or fake a word.

## Interface of `midi_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 4.0 us clock, 8 per MIDI bit, asynchronous to `sig_in` |
| `rst` | in | 1 | Asynchronous reset, active high, for power-up. Afterwards `d = 0`, `data_valid = 1` and the receiver is idle. |
| `sig_in` | in | 1 | Serial MIDI line after the opto-isolator, idle high |
| `d` | out | 8 | Received byte. `d[0]` is D0, the first data bit on the line. |
| `data_valid` | out | 1 | High while `d` holds a complete byte. Read `d` only while this is high. |

The opto-isolator in front of the receiver is analog and is not modelled
here. Nor are the transmitting keyboard and the synthesizer that reads the
bytes. Interpreting MIDI commands, such as status bytes followed by one or
two data bytes, is left to whatever reads `d`. Each byte arrives as its own
word.

`sig_in` goes straight into the sample register, with no extra synchroniser
stage. This follows the original circuit. For a real FPGA input, add a
two-flip-flop synchroniser in front of `last4samp`. It would shift every
timing figure above by two clocks.

## Design choices made here

- `FIX = Q2`. The original design only requires a FIX signal from the sample
  counter.
- Active-high asynchronous reset. The sample register resets to all ones, so
  a reset line does not look like a START bit. The other registers reset to
  zero. That puts the bit counter in its idle state and makes `data_valid`
  high after reset.
- Bit-counter numbering: state 0 is idle (`BIT9`) and state 8 is "all data
  in" (`BIT8`). Another numbering, with BIT8 in state 7 and BIT9 in state 8,
  gives identical outputs.
- The counters are written as binary increments, not as hand-minimised
  flip-flop equations. The state sequences are the same.
- `midi_top` has one assertion: a data grab never happens while the bit
  counter is in state 8.
- Not built: a variant that counts bits with a marker bit in an extended
  `ser2par` instead of a separate `bitcount`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| Testbench | Checks |
|---|---|
| `tb_majority`, `tb_findstart`, `tb_countclear` | Exhaustive truth tables, against rules computed in the testbench |
| `tb_last4samp` | Reset value; random stream against a history model |
| `tb_sampcount` | Held clear; `GRAB9` every 8 clocks, the first 7 clocks after release; `FIX` at counts 4..7; random clears against a reference model |
| `tb_bitcount` | One word of nine grabs, then random enables against a reference model |
| `tb_ser2par` | 100 bytes shifted in LSB first with random gaps; hold while the enable is low |
| `tb_midi_top` | End to end with a behavioural transmitter at a random clock phase. It sends the example bytes 0x59 and 0xC6, MIDI command sequences (FF; 80 3C; 90 3C 64; D0 20), 60 random bytes back to back and with gaps, a word after a long idle, 40 bytes at ±1–2 % bit rate, and the 3.7 us-clock case. It checks every byte, the 11/64-clock `data_valid` timing, that `d` is stable while valid, and one `data_valid` rise per word. It also requires that each mechanism occurred at least once: START recognition, wanted clear, a clear blocked by FIX, and a STOP-bit grab blocked by BIT8. |
| `tb_midi_noisy` | Noise at 2 % and 15 % as above. It passes if fewer than 10 % of words are wrong at 2 % and the vote corrected at least one flipped sample. |

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_midi_top \
    -y rtl -y tb +libext+.sv rtl/midi_pkg.sv tb/tb_midi_top.sv
./obj_dir/Vtb_midi_top
```

Replace `tb_midi_top` with any other testbench name. Each one runs in well
under a second. The testbenches use `$urandom`. Add `+verilator+seed+N` to
the run to change the random stream.
