// tb_bitcount: checks the 0..8 bit counter.
// After reset the counter is in state 0 with BIT9 high. Random enable
// (GRAB9) pulses are applied; a reference count in the testbench advances
// 0,1,...,8,0 on each enabled edge, and BIT8 (state 8) and BIT9 (state 0)
// are compared with it. A full word of nine pulses must bring it back to 0.
module tb_bitcount;
  import midi_pkg::*;
  logic clk = 0, rst = 1, grab9 = 0;
  logic [3:0] count;
  logic bit8, bit9;
  int checks = 0, failures = 0;
  int ref_count = 0;
  int wraps = 0;

  bitcount dut (.clk(clk), .rst(rst), .grab9(grab9), .count(count),
                .bit8(bit8), .bit9(bit9));

  always #(CLK_PERIOD_NS/2 * 1ns) clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (count != 4'(ref_count) || bit8 != (ref_count == 8) || bit9 != (ref_count == 0)) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d bit8=%b bit9=%b ref=%0d", what, $time, count, bit8, bit9, ref_count);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check("reset");
    rst = 0;
    // One word: GRAB9 every 8th clock, nine times.
    for (int b = 0; b < 9; b++) begin
      repeat (7) begin
        @(negedge clk);
        check("hold between grabs");
      end
      grab9 = 1;
      @(posedge clk);
      ref_count = (ref_count + 1) % 9;
      @(negedge clk);
      grab9 = 0;
      check("word");
    end
    checks++;
    if (ref_count != 0 || !bit9) begin
      failures++;
      $display("FAIL nine grabs did not return to idle");
    end
    // Random enables.
    for (int i = 0; i < 1000; i++) begin
      grab9 = ($urandom % 3) == 0;
      @(posedge clk);
      if (grab9) begin
        ref_count = (ref_count + 1) % 9;
        if (ref_count == 0) wraps++;
      end
      @(negedge clk);
      check("random");
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
