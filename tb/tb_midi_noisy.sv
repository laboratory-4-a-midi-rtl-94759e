// tb_midi_noisy: the receiver under sample noise.
//
// The transmitter model sends a clean word first, then noisy words: the
// line level seen by the receiver is the clean MIDI signal XORed with a
// random bit that is redrawn every clock period (at the falling clock edge,
// so each rising-edge sample is flipped independently with probability p).
// Noise is on during the words and the idle gaps between them.
//
// Two noise levels are run, p = 2% and p = 15%. For each word the test
// records whether DATAVALID rose exactly once and D equalled the byte sent.
// At 2% the word error rate must stay under 10% (a data bit is lost only
// when two of its three voted samples flip, about 0.1% per bit). At 15%
// errors are expected and only reported. The test also requires that the
// vote corrected at least one flipped sample at a grab, and that the clean
// word is received exactly.
module tb_midi_noisy;
  import midi_pkg::*;

  logic       clk = 0, rst = 1;
  logic       x = 1;             // clean line
  logic       noise = 0;
  logic       sig_in;
  logic [7:0] d;
  logic       data_valid;
  int         noise_pm = 0;      // noise probability, per mille

  int checks = 0, failures = 0;

  always_comb sig_in = x ^ noise;

  midi_top dut (.clk(clk), .rst(rst), .sig_in(sig_in), .d(d), .data_valid(data_valid));

  always #(CLK_PERIOD_NS/2 * 1ns) clk = ~clk;

  always @(negedge clk) noise <= (int'($urandom % 1000) < noise_pm);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int dv_rises = 0;
  logic dv_q = 1;
  int corrected = 0;
  always @(negedge clk) begin
    if (!dv_q && data_valid) dv_rises++;
    dv_q <= data_valid;
    // A grab where the three voted samples disagree: the vote outvoted one.
    if (dut.grab8 && !(dut.s[3] == dut.s[2] && dut.s[2] == dut.s[1])) corrected++;
  end

  // Sends one word and reports whether it was received correctly.
  task automatic send_word(input logic [7:0] b, output logic ok);
    logic [9:0] frame;
    int rises0;
    frame  = {1'b1, b, 1'b0};
    rises0 = dv_rises;
    #(($urandom % CLK_PERIOD_NS) * 1ns);
    for (int i = 0; i < 10; i++) begin
      x = frame[i];
      #(BIT_PERIOD_NS * 1ns);
    end
    // idle gap of three bit times
    #(3 * BIT_PERIOD_NS * 1ns);
    ok = (dv_rises == rises0 + 1) && (d == b);
  endtask

  initial begin
    logic ok;
    int errors;
    #(10 * CLK_PERIOD_NS * 1ns);
    rst = 0;
    #(20 * CLK_PERIOD_NS * 1ns);

    send_word(8'(312153), ok);
    check("clean word", ok);

    foreach (levels[l]) begin
      noise_pm = levels[l];
      errors = 0;
      for (int w = 0; w < 300; w++) begin
        send_word(8'($urandom), ok);
        if (!ok) errors++;
      end
      $display("noise %0d.%0d%%: %0d of 300 words wrong", noise_pm / 10, noise_pm % 10, errors);
      if (noise_pm == 20) check("2% noise: word error rate under 10%", errors < 30);
      // Let the receiver settle on a clean idle line before the next level.
      noise_pm = 0;
      #(20 * BIT_PERIOD_NS * 1ns);
    end
    $display("grabs with one outvoted sample: %0d", corrected);
    check("vote corrected a flipped sample", corrected > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int levels [2] = '{20, 150};
endmodule
