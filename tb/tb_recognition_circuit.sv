// tb_recognition_circuit: end-to-end test of the recognition circuit at its
// default parameters (32 clock cycles per sub-carrier period, 8 pulses per
// half-bit, 8-stage window).
//
// The testbench plays the part of the card and the analog front end: it
// builds frames period by period (start of frame, data bits, end of frame),
// optionally removes pulses from modulated half-bits and adds pulses to
// unmodulated ones, and drives the result onto data_in, each pulse being 16
// cycles high and 16 low. The pulse grid is offset by a few cycles from the
// circuit's own period divider. The decoded bits are collected at the
// rising edges of bit_clk and compared with the bits sent.
//
// Scenarios: clean frames; noisy frames with up to two missing pulses per
// modulated half-bit and two spurious pulses per quiet half-bit; bursts that
// are too short or too long for a start of frame; a start of frame whose
// closing logic "1" is wrong; a frame broken by an empty bit slot, which
// must raise error; strong random noise after a good start of frame, which
// must also raise error. The test checks the bit clock period (one bit per 16
// sub-carrier periods), the latency of every bit, the EOF timing, and that
// each mechanism (SOF accepted, false SOF rejected, missing and spurious
// pulses absorbed, hysteresis hold, EOF, error, dropped frame) happened at
// least once.
module tb_recognition_circuit;
  import rec_pkg::*;

  localparam int P   = CLK_PER_PULSE;   // cycles per sub-carrier period
  localparam int H   = HALF_PULSES;
  localparam int BIT = 2 * H * P;       // cycles per bit

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       data_in = 1'b0;
  logic       error, data_out, bit_clk, eof, comp_out;
  logic [3:0] comp_in;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  recognition_circuit dut (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .error(error),
    .data_out(data_out), .bit_clk(bit_clk), .eof(eof),
    .comp_in(comp_in), .comp_out(comp_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  bit      periods[$];     // one entry per sub-carrier period: pulse or not
  int      eof_period;     // index in `periods` of the EOF's second slot
  int unsigned lcg = 32'h1234_5678;
  int      n_missing = 0, n_spurious = 0;

  function automatic int unsigned rnd(int unsigned n);
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return (lcg >> 8) % n;
  endfunction

  // A half-bit of H periods, modulated or not, with noise.
  function automatic void push_half(bit mod, int nmiss, int nspur);
    bit h[H];
    for (int i = 0; i < H; i++) h[i] = mod;
    for (int k = 0; k < (mod ? nmiss : nspur); k++) begin
      int p = rnd(H);
      if (h[p] == mod) begin
        h[p] = !mod;
        if (mod) n_missing++; else n_spurious++;
      end
    end
    for (int i = 0; i < H; i++) periods.push_back(h[i]);
  endfunction

  function automatic void push_quiet(int n);
    for (int i = 0; i < n; i++) periods.push_back(1'b0);
  endfunction

  function automatic void push_pulses(int n, int nmiss);
    int base = periods.size();
    for (int i = 0; i < n; i++) periods.push_back(1'b1);
    // Missing pulses inside the burst, never its first or last pulse.
    for (int k = 0; k < nmiss; k++) begin
      int p = 1 + rnd(n - 2);
      if (periods[base + p]) begin
        periods[base + p] = 1'b0;
        n_missing++;
      end
    end
  endfunction

  function automatic void push_bit(bit b, int nmiss, int nspur);
    push_half(!b, nmiss, nspur);
    push_half(b, nmiss, nspur);
  endfunction

  function automatic void push_sof(int nmiss);
    push_quiet(3 * H);
    push_pulses(3 * H, nmiss);
    push_bit(1'b1, 0, 0);
  endfunction

  function automatic void push_eof(int nmiss, int nspur);
    push_bit(1'b0, nmiss, nspur);
    eof_period = periods.size() + 2 * H;
    push_pulses(3 * H, 0);
    push_quiet(3 * H);
  endfunction

  longint period_start[$];  // cycle at which each played period began

  // Play the queued periods onto data_in and empty the queue.
  task automatic play();
    period_start.delete();
    foreach (periods[i]) begin
      period_start.push_back(cycle);
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        data_in = periods[i] && (c < P / 2);
      end
    end
    periods.delete();
  endtask

  // ---------------------------------------------------------------- monitor
  bit      rx[$];
  longint  rx_cyc[$];      // cycle of each bit_clk rising edge
  int      n_eof = 0, n_err_rise = 0, n_start = 0;
  longint  last_bclk = -1, eof_cycle = -1;
  int      n_bclk_gap_bad = 0, n_bclk_gap_ok = 0;
  int      n_hold_hi = 0, n_hold_lo = 0;
  logic    bit_clk_d = 1'b0, error_d = 1'b0;
  bit      in_frame_bits = 1'b0;

  always @(posedge clk) begin
    bit_clk_d <= bit_clk;
    error_d   <= error;
    if (rst_n) begin
      if (bit_clk && !bit_clk_d) begin
        rx.push_back(data_out);
        rx_cyc.push_back(cycle);
        if (last_bclk >= 0 && in_frame_bits) begin
          if (cycle - last_bclk == longint'(BIT)) n_bclk_gap_ok++;
          else n_bclk_gap_bad++;
        end
        last_bclk     <= cycle;
        in_frame_bits <= 1'b1;
      end
      if (eof) begin
        n_eof++;
        eof_cycle <= cycle;
        in_frame_bits <= 1'b0;
      end
      if (error && !error_d) begin
        n_err_rise++;
        in_frame_bits <= 1'b0;
      end
      if (dut.start) n_start++;
      if (dut.tick && comp_in == 4'd4) begin
        if (comp_out) n_hold_hi++; else n_hold_lo++;
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // Send a frame of `nbits` random bits and check its decoding.
  task automatic frame(int nbits, int nmiss, int nspur, string name);
    bit tx[$];
    int eof0, err0, st0, d0;
    eof0 = n_eof; err0 = n_err_rise; st0 = n_start;
    rx.delete();
    rx_cyc.delete();
    last_bclk = -1;
    push_quiet(8);
    push_sof(nmiss);
    d0 = periods.size();       // first period of the first data bit
    for (int i = 0; i < nbits; i++) begin
      bit b = rnd(2) == 1;
      tx.push_back(b);
      push_bit(b, nmiss, nspur);
    end
    push_eof(nmiss, nspur);
    begin
      int ep = eof_period;
      play();
      check(n_start == st0 + 1, {name, ": SOF accepted once"});
      check(n_eof == eof0 + 1, {name, ": one EOF"});
      check(n_err_rise == err0 && !error, {name, ": no error"});
      check(rx.size() == nbits, $sformatf("%s: %0d bits received, %0d sent",
                                          name, rx.size(), nbits));
      for (int i = 0; i < nbits && i < rx.size(); i++)
        check(rx[i] == tx[i], $sformatf("%s: bit %0d", name, i));
      // Latency: bit i (slot starting at period d0+16i) is put out one slot
      // and one period after its slot ends; bit_clk rises 4 periods later,
      // i.e. in period d0 + 16i + 36, within one period.
      for (int i = 0; i < nbits && i < rx_cyc.size(); i++) begin
        longint ref_c = period_start[d0 + 2 * H * i + 4 * H + H / 2];
        check(rx_cyc[i] >= ref_c && rx_cyc[i] < ref_c + P,
              $sformatf("%s: bit %0d bit_clk at %0d, period starts %0d",
                        name, i, rx_cyc[i], ref_c));
      end
      // The EOF is decoded at the end of its second slot: the tick that
      // shifts in the first period after it, plus input synchronization.
      check(eof_cycle >= period_start[ep] &&
            eof_cycle <  period_start[ep] + 2 * P,
            $sformatf("%s: EOF timing (%0d vs period start %0d)", name,
                      eof_cycle, period_start[ep]));
    end
  endtask

  int n_false_sof_rejected = 0, n_dropped = 0, n_strong_err = 0;

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (7) @(posedge clk);   // offset the pulse grid from the divider

    // Clean frames.
    frame(16, 0, 0, "clean16");
    frame(1, 0, 0, "clean1");
    begin
      int m0, s0;
      m0 = n_missing; s0 = n_spurious;
      frame(40, 2, 2, "noisy40");
      frame(64, 2, 2, "noisy64");
      frame(32, 1, 2, "noisy32");
      check(n_missing > m0, "missing pulses were injected");
      check(n_spurious > s0, "spurious pulses were injected");
    end

    // Bursts that are not a start of frame: too short, too long.
    begin
      int st0;
      st0 = n_start;
      push_quiet(3 * H); push_pulses(12, 0); push_quiet(3 * H);
      push_pulses(40, 0); push_quiet(3 * H);
      push_bit(1'b1, 0, 0); push_bit(1'b0, 0, 0);
      push_quiet(3 * H);
      rx.delete();
      play();
      check(n_start == st0, "short and long bursts rejected");
      check(rx.size() == 0, "no data after rejected bursts");
      if (n_start == st0) n_false_sof_rejected++;
    end

    // SOF burst whose closing slot carries no pulses: frame dropped silently.
    begin
      int st0, e0;
      st0 = n_start; e0 = n_err_rise;
      push_quiet(3 * H); push_pulses(3 * H, 0);
      push_quiet(2 * H); push_bit(1'b1, 0, 0); push_bit(1'b1, 0, 0);
      push_quiet(3 * H);
      rx.delete();
      play();
      check(n_start == st0 + 1, "bad SOF: burst accepted");
      check(n_err_rise == e0 && !error, "bad SOF: no error");
      check(rx.size() == 0, "bad SOF: no data");
      check(dut.u_sof_timing.run == 1'b0, "bad SOF: timing stopped");
      if (n_start == st0 + 1 && rx.size() == 0) n_dropped++;
    end

    // Frame broken by a slot without pulses: error, no EOF.
    begin
      int e0, f0;
      e0 = n_err_rise; f0 = n_eof;
      push_sof(0);
      push_bit(1'b1, 0, 0); push_bit(1'b0, 0, 0); push_bit(1'b1, 0, 0);
      push_quiet(2 * H);                 // empty bit slot
      push_bit(1'b0, 0, 0); push_bit(1'b1, 0, 0);
      push_eof(0, 0);
      rx.delete();
      play();
      check(n_err_rise == e0 + 1, "broken frame: error raised");
      check(error == 1'b1, "broken frame: error held");
      check(n_eof == f0, "broken frame: no EOF");
      check(rx.size() == 2 && rx[0] == 1'b1 && rx[1] == 1'b0,
            "broken frame: bits before the fault delivered");
    end

    // The next good frame clears the error.
    frame(8, 1, 1, "after_error");

    // Strong noise after a correct SOF: every period carries a pulse with
    // probability one half, whatever was sent. Decoding must fail with
    // error rather than end in an EOF.
    begin
      int e0, f0;
      e0 = n_err_rise; f0 = n_eof;
      push_quiet(8);
      push_sof(0);
      for (int i = 0; i < 20 * 2 * H; i++) periods.push_back(rnd(2) == 1);
      push_quiet(3 * H);
      play();
      check(n_err_rise == e0 + 1 && error, "strong noise: error raised");
      check(n_eof == f0, "strong noise: no EOF");
      n_strong_err += n_err_rise - e0;
    end
    frame(8, 0, 0, "after_noise");

    // Mechanism coverage.
    check(n_start > 0, "mechanism: SOF accepted");
    check(n_false_sof_rejected > 0, "mechanism: false SOF rejected");
    check(n_dropped > 0, "mechanism: frame with bad SOF dropped");
    check(n_missing > 0, "mechanism: missing pulses absorbed");
    check(n_spurious > 0, "mechanism: spurious pulses absorbed");
    check(n_hold_hi > 0 && n_hold_lo > 0, "mechanism: hysteresis hold at 4");
    check(n_eof > 0, "mechanism: EOF");
    check(n_err_rise > 0, "mechanism: error");
    check(n_strong_err > 0, "mechanism: error under strong noise");
    check(n_bclk_gap_ok > 0 && n_bclk_gap_bad == 0,
          $sformatf("bit clock period %0d cycles (%0d ok, %0d bad)", BIT,
                    n_bclk_gap_ok, n_bclk_gap_bad));
    $display("SOF=%0d rejected=%0d dropped=%0d missing=%0d spurious=%0d hold_hi=%0d hold_lo=%0d eof=%0d err=%0d",
             n_start, n_false_sof_rejected, n_dropped, n_missing, n_spurious,
             n_hold_hi, n_hold_lo, n_eof, n_err_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
