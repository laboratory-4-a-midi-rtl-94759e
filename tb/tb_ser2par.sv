// tb_ser2par: checks the serial-to-parallel data register.
// Bytes are shifted in least significant bit first with one enable pulse per
// bit and gaps of random length; after eight pulses D must equal the byte.
// Between pulses, and while EN is low with MAJ toggling, D must hold.
module tb_ser2par;
  import midi_pkg::*;
  logic clk = 0, rst = 1, en = 0, maj = 0;
  logic [7:0] d;
  int checks = 0, failures = 0;

  ser2par dut (.clk(clk), .rst(rst), .en(en), .maj(maj), .d(d));

  always #(CLK_PERIOD_NS/2 * 1ns) clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] byte_in, held;
    repeat (2) @(negedge clk);
    checks++;
    if (d !== 8'h00) failures++;
    rst = 0;
    for (int w = 0; w < 100; w++) begin
      byte_in = (w == 0) ? 8'hC6 : 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        maj = byte_in[b];
        en  = 1;
        @(negedge clk);
        en  = 0;
        held = d;
        repeat ($urandom % 4) begin
          maj = 1'($urandom);
          @(negedge clk);
          checks++;
          if (d !== held) begin
            failures++;
            $display("FAIL register changed without enable");
          end
        end
      end
      checks++;
      if (d !== byte_in) begin
        failures++;
        $display("FAIL word %0d d=%h exp=%h", w, d, byte_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
