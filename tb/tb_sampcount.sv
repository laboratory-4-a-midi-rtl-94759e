// tb_sampcount: checks the sample counter.
// Part 1: with CLRSAMPCOUNT held high the count stays 0 and GRAB9 never
// fires. Part 2: released, the counter must produce GRAB9 exactly every 8
// clocks, the first on the 8th cycle after release (count 7), and FIX must
// be high exactly at counts 4..7. Part 3: random clear pulses against a
// reference counter kept in the testbench.
module tb_sampcount;
  import midi_pkg::*;
  logic clk = 0, rst = 1, clr = 1;
  logic [2:0] count;
  logic grab9, fix;
  int checks = 0, failures = 0;
  int ref_count = 0;

  sampcount dut (.clk(clk), .rst(rst), .clr_samp_count(clr), .count(count),
                 .grab9(grab9), .fix(fix));

  always #(CLK_PERIOD_NS/2 * 1ns) clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d grab9=%b fix=%b ref=%0d", what, $time, count, grab9, fix, ref_count);
    end
  endtask

  initial begin
    int last_grab, cyc;
    repeat (2) @(negedge clk);
    rst = 0;
    // Part 1: held clear.
    repeat (20) begin
      @(negedge clk);
      check("held at 0", count == 0 && !grab9 && !fix);
    end
    // Part 2: free running; GRAB9 period.
    clr = 0;
    last_grab = 0;
    for (cyc = 1; cyc <= 40; cyc++) begin
      @(negedge clk);
      // cycle index cyc: count equals cyc mod 8
      check("free count", count == 3'(cyc % 8));
      check("fix", fix == ((cyc % 8) >= 4));
      if (grab9) begin
        if (last_grab == 0) check("first grab after 7 counts", cyc == 7);
        else                check("grab period 8", cyc - last_grab == 8);
        last_grab = cyc;
      end
    end
    check("grabs seen", last_grab == 39);
    // Part 3: random synchronous clears against a reference.
    ref_count = count;
    for (int i = 0; i < 1000; i++) begin
      clr = ($urandom % 10) == 0;
      @(posedge clk);
      ref_count = clr ? 0 : (ref_count + 1) % 8;
      @(negedge clk);
      check("random", count == 3'(ref_count) && grab9 == (ref_count == 7) && fix == (ref_count >= 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
