// tb_rec_comparator: the comparator with hysteresis is driven with count
// sequences like those of a moving window (steps of one up or down, with
// long dwells at 4) and with random counts, and its output is compared
// every cycle with a reference: high once the count has reached 5, low once
// it has fallen to 3, unchanged at 4. The output is registered, so the
// reference is applied to the count of the previous cycle.
module tb_rec_comparator;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] count = '0;
  logic       comp_out;
  logic       ref_q = 1'b0;
  int checks = 0, failures = 0;
  int rises = 0, falls = 0, holds_hi = 0, holds_lo = 0;

  rec_comparator dut (.clk(clk), .rst_n(rst_n), .count(count), .comp_out(comp_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int c);
    @(negedge clk);
    count = 4'(c);
    @(posedge clk);
    if (c >= 5) begin
      if (!ref_q) rises++;
      ref_q = 1'b1;
    end else if (c <= 3) begin
      if (ref_q) falls++;
      ref_q = 1'b0;
    end else begin
      if (ref_q) holds_hi++; else holds_lo++;
    end
    #1;
    checks++;
    if (comp_out !== ref_q) begin
      failures++;
      $display("FAIL: count %0d out %0b expected %0b", c, comp_out, ref_q);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Ramp up and down through the hysteresis band.
    for (int c = 0; c <= 8; c++) step(c);
    for (int c = 8; c >= 0; c--) step(c);
    // Dwell at 4 coming from below, then from above.
    step(3); step(4); step(4); step(4); step(5); step(4); step(4); step(3);
    step(4); step(5); step(4); step(3); step(4); step(4);
    // Random walk with steps of one, like a sliding window.
    begin
      int c = 4;
      for (int i = 0; i < 2000; i++) begin
        int r;
        r = int'($urandom_range(0, 2));
        c = c + r - 1;
        if (c < 0) c = 0;
        if (c > 8) c = 8;
        step(c);
      end
    end
    // Random counts.
    for (int i = 0; i < 500; i++) step(int'($urandom_range(0, 8)));
    checks++;
    if (rises == 0 || falls == 0 || holds_hi == 0 || holds_lo == 0) begin
      failures++;
      $display("FAIL: coverage rises=%0d falls=%0d holds=%0d/%0d",
               rises, falls, holds_hi, holds_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
