// tb_findstart: exhaustive check of the START-bit detector.
// All 16 sample patterns are applied. The expected GOTSTART is worked out
// from the rule "earliest sample S0 low and at least two of S1..S3 low", and
// the four accepted patterns (in time order S0 S1 S2 S3: 0000, 0010, 0100,
// 0001) are also checked by name.
module tb_findstart;
  logic [3:0] s;
  logic       got_start;
  int checks = 0, failures = 0;
  int accepted = 0;

  findstart dut (.s(s), .got_start(got_start));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int zeros_late;
      logic exp;
      s = 4'(v);
      #1;
      zeros_late = 0;
      for (int b = 1; b < 4; b++) if (((v >> b) & 1) == 0) zeros_late++;
      exp = ((v & 1) == 0) && (zeros_late >= 2);
      checks++;
      if (got_start !== exp) begin
        failures++;
        $display("FAIL s3..s0=%b got_start=%b exp=%b", s, got_start, exp);
      end
      if (got_start) accepted++;
    end
    // Patterns given in time order S0 S1 S2 S3 -> s = {S3,S2,S1,S0}.
    foreach (s_list[i]) begin
      s = s_list[i]; #1;
      checks++;
      if (got_start !== 1'b1) begin
        failures++;
        $display("FAIL accepted pattern s=%b", s);
      end
    end
    checks++;
    if (accepted != 4) begin
      failures++;
      $display("FAIL %0d patterns accepted, expected 4", accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] s_list [4] = '{4'b0000, 4'b0100, 4'b0010, 4'b1000};
endmodule
