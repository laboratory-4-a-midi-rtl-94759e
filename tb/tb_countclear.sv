// tb_countclear: exhaustive check of CLRSAMPCOUNT = BIT9 . /GOTSTART . /FIX.
module tb_countclear;
  logic bit9, got_start, fix, clr;
  int checks = 0, failures = 0;

  countclear dut (.bit9(bit9), .got_start(got_start), .fix(fix),
                  .clr_samp_count(clr));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {bit9, got_start, fix} = 3'(v);
      #1;
      // Clear only in the idle state, with no START seen and FIX low.
      exp = (v == 3'b100);
      checks++;
      if (clr !== exp) begin
        failures++;
        $display("FAIL bit9=%b got_start=%b fix=%b clr=%b", bit9, got_start, fix, clr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
