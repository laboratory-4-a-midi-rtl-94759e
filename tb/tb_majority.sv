// tb_majority: exhaustive check of the three-sample majority vote.
// Every one of the 8 input combinations is applied and MAJ is compared with
// "at least two ones", counted independently with a loop.
module tb_majority;
  logic [2:0] s;
  logic       maj;
  int checks = 0, failures = 0;

  majority dut (.s(s), .maj(maj));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      s = 3'(v);
      #1;
      ones = 0;
      for (int b = 0; b < 3; b++) ones += (v >> b) & 1;
      checks++;
      if (maj !== (ones >= 2)) begin
        failures++;
        $display("FAIL s=%b maj=%b", s, maj);
      end
    end
    // The example of a noisy data bit: samples 0,1,0 vote 0.
    s = 3'b010; #1;
    checks++;
    if (maj !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
