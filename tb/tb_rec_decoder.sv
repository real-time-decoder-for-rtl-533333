// tb_rec_decoder: exhaustive test of the pulse counter. Every one of the
// 256 window patterns is applied and the count compared with a bit-by-bit
// count made in the testbench.
module tb_rec_decoder;
  logic [7:0] window;
  logic [3:0] count;
  int checks = 0, failures = 0;

  rec_decoder dut (.window(window), .count(count));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ones;
      window = 8'(v);
      ones = 0;
      for (int b = 0; b < 8; b++) if ((v >> b) & 1) ones++;
      #1;
      checks++;
      if (int'(count) != ones) begin
        failures++;
        $display("FAIL: window %b count %0d expected %0d", window, count, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
