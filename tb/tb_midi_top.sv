// tb_midi_top: end-to-end test of the MIDI receiver.
//
// A behavioural MIDI transmitter in this testbench sends 10-bit words (low
// START bit, eight data bits LSB first, high STOP bit) on sig_in at 32 us per
// bit, with the falling edge of each START bit at a random phase relative to
// the 4 us receiver clock. A monitor records D whenever DATAVALID rises and
// compares it, in order, with the bytes sent.
//
// Stimulus, in order:
//   1. the test word 0x59 (low byte of the example student number 312153)
//      and the example word 0011000111 = 0xC6;
//   2. the Table 4.1 commands: FF; 80 note; 90 note velocity; D0 pressure;
//   3. 60 random bytes, half of them sent back to back (next START right
//      after the STOP bit), half with idle gaps;
//   4. 20 random bytes with a transmitter 2% faster and 20 with one 1% slower
//      than nominal (within what the sampling scheme tolerates);
//   5. one word 0x55 as a receiver with a 3.7 us clock would see it (bits of
//      32*4/3.7 us): the late bits must come out wrong, as expected for this
//      sampling scheme.
//
// Checked: every byte; that DATAVALID falls 11 clocks after the first low
// sample of the START bit and rises 64 clocks after that (nominal rate);
// that D never changes while DATAVALID is high; that DATAVALID rises exactly
// once per word. Also counted, and required at least once each: START
// recognition, the wanted clear, a late clear blocked by FIX (needs D0 = 1),
// a STOP-bit GRAB9 pulse kept from the register by BIT8, back-to-back words,
// and a word received after a long idle.
module tb_midi_top;
  import midi_pkg::*;

  logic       clk = 0, rst = 1, sig_in = 1;
  logic [7:0] d;
  logic       data_valid;

  int checks = 0, failures = 0;

  midi_top dut (.clk(clk), .rst(rst), .sig_in(sig_in), .d(d), .data_valid(data_valid));

  always #(CLK_PERIOD_NS/2 * 1ns) clk = ~clk;

  // ---------------- watchdog ----------------
  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // ---------------- transmitter model ----------------
  // Sends one word. bit_ns is the length of one MIDI bit; idle_ns is the
  // idle time before the START bit (a random fraction of a clock is added).
  logic [7:0] sent_q[$];
  longint     start_time;
  task automatic send_word(input logic [7:0] b, input real bit_ns, input int idle_ns);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};          // sent from bit 0 (START) upward
    if (idle_ns > 0) #(idle_ns * 1ns);
    #(($urandom % CLK_PERIOD_NS) * 1ns);
    sent_q.push_back(b);
    for (int i = 0; i < 10; i++) begin
      sig_in = frame[i];
      if (i == 0) start_time = $time;
      #(bit_ns * 1ns);
    end
  endtask

  // ---------------- monitor ----------------
  int         cycle = 0;
  logic       dv_q = 1;
  logic [7:0] d_q;
  int         first_low_cycle = -1, fall_cycle = -1;
  int         words_checked = 0, dv_rises = 0;
  logic       check_timing = 1, check_bytes = 1;
  logic       last_word_wrong = 0;
  logic [7:0] last_captured;

  // mechanism counters
  int n_start = 0, n_wanted_clear = 0, n_fix_blocked = 0, n_stop_grab_blocked = 0;
  int n_back_to_back = 0, n_after_long_idle = 0, n_grab8 = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    // First clock edge that samples the START bit low.
    if (dut.bit9 && first_low_cycle < 0 && !sig_in && !rst && dut.u_sampcount.count == 0)
      first_low_cycle <= cycle + 1;
  end

  always @(negedge clk) begin
    if (!rst) monitor_cycle();
    dv_q = data_valid;
    d_q  = d;
  end

  task automatic monitor_cycle();
    if (dut.bit9 && dut.got_start && dut.u_sampcount.count == 0) n_start++;
    if (dut.clr_samp_count) n_wanted_clear++;
    if (dut.bit9 && !dut.got_start && dut.fix) n_fix_blocked++;
    if (dut.grab9 && dut.bit8) n_stop_grab_blocked++;
    if (dut.grab8) n_grab8++;
    // D must hold while DATAVALID is high.
    if (dv_q && data_valid) check("D stable while DATAVALID", d == d_q);
    if (dv_q && !data_valid) begin
      fall_cycle = cycle;
      if (check_timing)
        check($sformatf("DATAVALID falls 11 clocks after first low sample (%0d)", fall_cycle - first_low_cycle),
              fall_cycle - first_low_cycle == 11);
    end
    if (!dv_q && data_valid) begin
      dv_rises++;
      if (check_timing)
        check($sformatf("DATAVALID rises 64 clocks after falling (%0d)", cycle - fall_cycle),
              cycle - fall_cycle == 64);
      last_captured = d;
      if (sent_q.size() == 0) begin
        check("DATAVALID without a word sent", 0);
      end else begin
        logic [7:0] exp;
        exp = sent_q.pop_front();
        last_word_wrong = (d != exp);
        if (check_bytes) begin
          check($sformatf("byte received %h expected %h", d, exp), d == exp);
          words_checked++;
        end
      end
      first_low_cycle = -1;
    end
  endtask

  // Waits until the receiver has reported the word just sent.
  task automatic wait_word_done();
    int guard = 0;
    while (sent_q.size() != 0 && guard < 200) begin
      @(negedge clk);
      guard++;
    end
    check("word reported", sent_q.size() == 0);
  endtask

  // ---------------- stimulus ----------------
  initial begin
    real nominal;
    int  rises_before;
    nominal = real'(BIT_PERIOD_NS);
    #(10 * CLK_PERIOD_NS * 1ns);
    @(negedge clk);
    check("reset: DATAVALID high, D clear", data_valid && d == 8'h00);
    rst = 0;
    #(20 * CLK_PERIOD_NS * 1ns);
    check("idle: counters held", dut.u_sampcount.count == 0 && dut.bit9);

    // 1. example words
    send_word(8'(312153), nominal, 0);
    send_word(8'hC6, nominal, 3 * BIT_PERIOD_NS);
    // 2. Table 4.1 commands
    send_word(8'hFF, nominal, 2 * BIT_PERIOD_NS);
    send_word(8'h80, nominal, BIT_PERIOD_NS);
    send_word(8'h3C, nominal, 0);
    send_word(8'h90, nominal, BIT_PERIOD_NS);
    send_word(8'h3C, nominal, 0);
    send_word(8'h64, nominal, 0);
    send_word(8'hD0, nominal, BIT_PERIOD_NS);
    send_word(8'h20, nominal, 0);
    wait_word_done();
    check("example words and commands", words_checked == 10);

    // 3. random bytes; back to back then with gaps
    for (int i = 0; i < 30; i++) begin
      send_word(8'($urandom), nominal, 0);
      n_back_to_back++;
    end
    for (int i = 0; i < 30; i++)
      send_word(8'($urandom), nominal, int'($urandom % (4 * BIT_PERIOD_NS)));
    wait_word_done();
    // long idle (about 1000 bit times)
    #(1000 * BIT_PERIOD_NS * 1ns);
    rises_before = dv_rises;
    send_word(8'hA5, nominal, 0);
    wait_word_done();
    if (dv_rises == rises_before + 1 && !last_word_wrong) n_after_long_idle++;

    // 4. rate tolerance: timing checks off, bytes still checked
    check_timing = 0;
    for (int i = 0; i < 20; i++) send_word(8'($urandom), nominal * 0.98, int'($urandom % BIT_PERIOD_NS));
    for (int i = 0; i < 20; i++) send_word(8'($urandom), nominal * 1.01, int'($urandom % BIT_PERIOD_NS));
    wait_word_done();

    // 5. 3.7 us receiver clock equivalent: expected to fail on late bits
    check("eight GRAB8 per word", n_grab8 == 8 * dv_rises);
    check_bytes = 0;
    #(5 * BIT_PERIOD_NS * 1ns);
    send_word(8'h55, nominal * 4.0 / 3.7, 0);
    wait_word_done();
    check($sformatf("3.7 us clock corrupts the byte (got %h)", last_captured), last_word_wrong);

    // mechanism summary
    $display("mechanisms: start=%0d wanted_clear_cycles=%0d fix_blocked_cycles=%0d stop_grab_blocked=%0d grab8=%0d back_to_back=%0d after_long_idle=%0d",
             n_start, n_wanted_clear, n_fix_blocked, n_stop_grab_blocked, n_grab8, n_back_to_back, n_after_long_idle);
    check("START recognised", n_start > 0);
    check("wanted clear", n_wanted_clear > 0);
    check("late clear blocked by FIX", n_fix_blocked > 0);
    check("STOP-bit GRAB9 blocked by BIT8", n_stop_grab_blocked > 0);
    check("back-to-back words", n_back_to_back > 0);
    check("word after long idle", n_after_long_idle > 0);
    check("one DATAVALID rise per word", dv_rises == 112);
    $display("words checked: %0d", words_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
