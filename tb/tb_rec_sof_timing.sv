// tb_rec_sof_timing: start-of-frame recognition and slot timing. The
// testbench supplies one pulse flag per period strobe (tick) from a list
// of periods and checks: the tick period (32 cycles); that a burst of 24
// pulses after a quiet time starts the frame exactly GAP_END periods after
// its last pulse; the slot phase that follows (the period after the last
// burst pulse is phase 0); the length limits 20..28 and the minimum of 16
// pulses; bridging of gaps up to 3 periods; the minimum quiet time of 12
// periods; and the return to waiting after `stop`.
module tb_rec_sof_timing;
  localparam int GAP_END = 4;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       pulse;
  logic       stop = 1'b0;
  logic       tick, start, run;
  logic [3:0] phase;
  int checks = 0, failures = 0;

  rec_sof_timing dut (.clk(clk), .rst_n(rst_n), .pulse(pulse), .stop(stop),
                      .tick(tick), .start(start), .run(run), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  seq[$];
  int  tick_idx = 0;     // ticks since reset
  int  base = 0;         // tick_idx of the first period of the list
  int  start_tick = -1;  // list index of the tick that started the frame
  longint cyc = 0, last_tick_cyc = -1;
  int  tick_gap_bad = 0;

  assign pulse = (tick_idx - base < seq.size()) ? seq[tick_idx - base] : 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tick) begin
      if (last_tick_cyc >= 0 && cyc - last_tick_cyc != 32) tick_gap_bad++;
      last_tick_cyc <= cyc;
      tick_idx <= tick_idx + 1;
    end
    if (start) start_tick <= tick_idx - 1 - base;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void quiet(int n);
    for (int i = 0; i < n; i++) seq.push_back(1'b0);
  endfunction

  // Burst of n periods; `hole` periods starting at `at` carry no pulse.
  function automatic void burst(int n, int at = -1, int hole = 0);
    for (int i = 0; i < n; i++) seq.push_back(!(at >= 0 && i >= at && i < at + hole));
  endfunction

  task automatic run_case(int last, string name);
    while (tick_idx - base < seq.size()) begin
      @(posedge clk);
      // Phase after the start: period last+1 is phase 0.
      if (tick && run && last >= 0 && tick_idx - base > start_tick) begin
        checks++;
        if (int'(phase) != (tick_idx - base - last - 1) % 16) begin
          failures++;
          $display("FAIL: %s phase %0d at tick %0d", name, phase, tick_idx);
        end
      end
    end
    @(posedge clk);
    if (last >= 0)
      check(start_tick == last + GAP_END,
            $sformatf("%s: start at tick %0d, expected %0d", name, start_tick, last + GAP_END));
    else
      check(start_tick == -1 && !run, $sformatf("%s: no start (got %0d)", name, start_tick));
    @(negedge clk);
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    check(!run, {name, ": stop ends the frame"});
  endtask

  task automatic begin_case();
    // The list starts at the next tick.
    @(negedge clk);
    seq.delete();
    base = tick_idx;
    start_tick = -1;
  endtask

  task automatic sof_case(int qlen, int blen, int at, int hole, bit accept, string name);
    begin_case();
    burst(1);       // a lone pulse restarts the quiet-time count
    quiet(qlen);
    burst(blen, at, hole);
    quiet(40);
    run_case(accept ? qlen + blen : -1, name);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Nominal start of frame.
    sof_case(24, 24, -1, 0, 1'b1, "nominal");
    // Length limits.
    sof_case(24, 19, -1, 0, 1'b0, "len19");
    sof_case(24, 20, -1, 0, 1'b1, "len20");
    sof_case(24, 28, -1, 0, 1'b1, "len28");
    sof_case(24, 29, -1, 0, 1'b0, "len29");
    // Missing pulses: a gap of 3 is bridged, one of 4 splits the burst.
    sof_case(24, 24, 10, 3, 1'b1, "gap3");
    sof_case(24, 24, 10, 4, 1'b0, "gap4");
    // Too little quiet before the burst.
    sof_case(11, 24, -1, 0, 1'b0, "quiet11");
    sof_case(12, 24, -1, 0, 1'b1, "quiet12");
    // Enough length but too few pulses: every other period.
    begin_case();
    quiet(24);
    for (int i = 0; i < 23; i++) seq.push_back(i % 2 == 0);
    quiet(40);
    run_case(-1, "sparse");
    check(tick_gap_bad == 0 && last_tick_cyc > 0, "tick every 32 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
