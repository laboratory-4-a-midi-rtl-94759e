// tb_last4samp: checks the four-sample input shift register.
// After reset all four samples must read 1 (idle line). A random bit stream
// is then clocked in and, after every edge, s must equal the last four
// values driven, newest in s[3], kept independently in a history array.
module tb_last4samp;
  import midi_pkg::*;
  logic clk = 0, rst = 1, sig_in = 1;
  logic [3:0] s;
  logic hist [4] = '{1, 1, 1, 1};   // hist[0] newest
  int checks = 0, failures = 0;

  last4samp dut (.clk(clk), .rst(rst), .sig_in(sig_in), .s(s));

  always #(CLK_PERIOD_NS/2 * 1ns) clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig_in = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (s !== 4'b1111) begin
      failures++;
      $display("FAIL reset value %b", s);
    end
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      sig_in = 1'($urandom);
      @(posedge clk);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = sig_in;
      @(negedge clk);
      checks++;
      if (s !== {hist[0], hist[1], hist[2], hist[3]}) begin
        failures++;
        $display("FAIL cycle %0d s=%b exp=%b%b%b%b", i, s, hist[0], hist[1], hist[2], hist[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
