// tb_rec_data_form: bit forming, EOF and error. The testbench plays the
// SOF & timing block and the comparator: it gives a period strobe every 4
// cycles with the slot phase, a `start` strobe, and a comparator level that
// is, for each slot, the content of its first half from phase 1 to phase 8
// and of its second half from phase 9 to the next phase 0 (as the real
// comparator would show it at the two sampling ticks).
// Checked: the bits delivered at the rising edges of bit_clk, the phase of
// those edges (4) and of the falling ones (12), the one-slot hold-back that
// keeps the "0" of an EOF out of the data, the eof strobe and its tick, the
// error flag for an empty slot and for a burst after a "1", the silent drop
// of a frame whose SOF does not close with a "1", and the clearing of error
// by the next start.
module tb_rec_data_form;
  import rec_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       tick = 1'b0;
  logic       start = 1'b0;
  logic [3:0] phase = '0;
  logic       comp = 1'b0;
  logic       data_out, bit_clk, eof, error, stop;
  int checks = 0, failures = 0;

  rec_data_form dut (.clk(clk), .rst_n(rst_n), .tick(tick), .start(start),
                     .phase(phase), .comp(comp), .data_out(data_out),
                     .bit_clk(bit_clk), .eof(eof), .error(error), .stop(stop));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitor.
  bit        rx[$];
  int        n_eof = 0, n_stop = 0, bad_rise = 0, bad_fall = 0;
  logic      bclk_d = 1'b0;
  logic [3:0] last_tick_phase = '0;
  always @(posedge clk) if (rst_n) begin
    bclk_d <= bit_clk;
    if (tick) last_tick_phase <= phase;
    if (bit_clk && !bclk_d) begin
      rx.push_back(data_out);
      if (last_tick_phase != 4'd4) bad_rise++;
    end
    if (!bit_clk && bclk_d && !stop && last_tick_phase != 4'd12) bad_fall++;
    if (eof) n_eof++;
    if (stop) n_stop++;
  end

  // One tick with the given phase and comparator level.
  task automatic do_tick(int p, bit c);
    @(negedge clk);
    phase = 4'(p);
    comp  = c;
    tick  = 1'b1;
    @(negedge clk);
    tick  = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  // Frame: start strobe at phase 4 of the SOF's closing slot (as after an
  // SOF burst), then slots, each a 2-bit code {first half, second half}.
  // The first slot given is the SOF's closing slot. Every slot ends with
  // the phase-0 tick at which it is decided.
  task automatic frame(slot_e slots[$], int extra = 20);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int s = 0; s < slots.size(); s++) begin
      bit a = slots[s][1], b = slots[s][0];
      for (int p = (s == 0) ? 4 : 1; p < 16; p++) do_tick(p, (p <= 8) ? a : b);
      do_tick(0, b);
    end
    for (int i = 0; i < extra; i++) do_tick((i + 1) % 16, 1'b0);
  endtask

  initial begin
    slot_e f[$];
    int e0, s0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Good frame: SOF "1", data 1 0 0 1 1, EOF ("0" then burst).
    f = {SLOT_ONE, SLOT_ONE, SLOT_ZERO, SLOT_ZERO, SLOT_ONE, SLOT_ONE, SLOT_ZERO, SLOT_BOTH};
    rx.delete(); e0 = n_eof;
    frame(f);
    check(rx.size() == 5, $sformatf("good: %0d bits", rx.size()));
    check(rx.size() == 5 && rx[0] == 1 && rx[1] == 0 && rx[2] == 0 && rx[3] == 1 && rx[4] == 1,
          "good: bit values");
    check(n_eof == e0 + 1, "good: one eof");
    check(!error, "good: no error");

    // Empty slot: error, bits before it delivered except the held one.
    f = {SLOT_ONE, SLOT_ONE, SLOT_ZERO, SLOT_NONE, SLOT_ONE};
    rx.delete(); e0 = n_eof;
    frame(f);
    check(error, "empty slot: error");
    check(n_eof == e0, "empty slot: no eof");
    check(rx.size() == 1 && rx[0] == 1, "empty slot: one bit delivered");

    // Error is cleared by the next start; burst after a held "1" is an error.
    f = {SLOT_ONE, SLOT_ONE, SLOT_BOTH};
    rx.delete(); e0 = n_eof;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!error, "start clears error");
    frame(f);
    check(error && n_eof == e0, "burst after 1: error, no eof");

    // SOF not closed by a "1": dropped silently.
    f = {SLOT_ZERO, SLOT_ONE, SLOT_ZERO, SLOT_ONE};
    rx.delete(); e0 = n_eof; s0 = n_stop;
    frame(f);
    check(!error && n_eof == e0 && rx.size() == 0 && n_stop == s0 + 1,
          "bad SOF: silent drop");

    // Longer random frame.
    begin
      bit tx[$];
      f = {SLOT_ONE};
      for (int i = 0; i < 40; i++) begin
        bit b;
        b = $urandom_range(0, 1) == 1;
        tx.push_back(b);
        f.push_back(b ? SLOT_ONE : SLOT_ZERO);
      end
      f.push_back(SLOT_ZERO);
      f.push_back(SLOT_BOTH);
      rx.delete(); e0 = n_eof;
      frame(f);
      check(rx.size() == 40 && n_eof == e0 + 1 && !error, "random: count, eof");
      for (int i = 0; i < 40 && i < rx.size(); i++)
        check(rx[i] == tx[i], $sformatf("random: bit %0d", i));
    end
    check(bad_rise == 0 && bad_fall == 0,
          $sformatf("bit clock phases (bad rises %0d, falls %0d)", bad_rise, bad_fall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
