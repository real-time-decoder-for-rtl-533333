// recognition_circuit: real-time decoder for the card-to-reader bit-stream
// of a vicinity smart card, tolerant of missing and spurious sub-carrier
// pulses.
//
// The demodulated sub-carrier from the analog front end enters `data_in`.
// Once per sub-carrier period the shift register records whether a pulse
// arrived; its last WIN flags form a moving window. The decoder counts the
// pulses in the window (`comp_in`, 0..WIN) and the comparator with
// hysteresis turns that moving average into a clean level (`comp_out`):
// high from a count of 5, low from a count of 3. The data form block
// samples this level twice per bit slot and produces the decoded bits
// (`data_out` with `bit_clk`), the end-of-frame strobe `eof` and the
// `error` flag. The SOF & timing block makes the period strobe, recognises
// the start of frame and starts the bit-slot timing; a decoded EOF (or an
// abandoned frame) stops it until the next start of frame.
//
// Block structure and connections follow the block diagram of the
// recognition circuit; `comp_in` and `comp_out` are brought out for
// observation. Latency: `data_out` takes a bit one bit slot plus one
// sub-carrier period (plus 3 clock cycles of input synchronization) after
// the end of the slot that carried it, because the bit is held back until
// the next slot shows that it did not open an EOF; `bit_clk` rises 4
// periods after `data_out` changes. At the default 32 clock cycles per
// period a bit slot is 512 cycles.
module recognition_circuit #(
  parameter int unsigned CLK_PER_PULSE = rec_pkg::CLK_PER_PULSE,
  parameter int unsigned HALF          = rec_pkg::HALF_PULSES,
  parameter int unsigned WIN           = rec_pkg::WIN,
  parameter int unsigned CW            = $clog2(WIN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          data_in,   // demodulated sub-carrier pulses
  output logic          error,     // frame could not be decoded
  output logic          data_out,  // decoded serial data
  output logic          bit_clk,   // bit clock, shifted against data_out
  output logic          eof,       // end of frame decoded (one cycle)
  output logic [CW-1:0] comp_in,   // pulses in the moving window
  output logic          comp_out   // comparator output
);

  localparam int unsigned PW = $clog2(2 * HALF);

  logic          tick, start, run, stop, pulse;
  logic [PW-1:0] phase;
  logic [WIN-1:0] window;

  rec_sof_timing #(
    .CLK_PER_PULSE(CLK_PER_PULSE),
    .HALF         (HALF),
    .SOF_PULSES   (3 * HALF),
    .QUIET_MIN    (HALF + HALF / 2),
    .GAP_END      (HALF / 2),
    .SOF_TOL      (HALF / 2),
    .PCNT_MIN     (2 * HALF)
  ) u_sof_timing (
    .clk  (clk),
    .rst_n(rst_n),
    .pulse(pulse),
    .stop (stop),
    .tick (tick),
    .start(start),
    .run  (run),
    .phase(phase)
  );

  rec_shift_register #(.WIN(WIN)) u_shift_register (
    .clk    (clk),
    .rst_n  (rst_n),
    .data_in(data_in),
    .tick   (tick),
    .pulse  (pulse),
    .window (window)
  );

  rec_decoder #(.WIN(WIN), .CW(CW)) u_decoder (
    .window(window),
    .count (comp_in)
  );

  rec_comparator #(
    .CW(CW),
    .HI(WIN / 2 + 1),
    .LO(WIN / 2 - 1)
  ) u_comparator (
    .clk     (clk),
    .rst_n   (rst_n),
    .count   (comp_in),
    .comp_out(comp_out)
  );

  rec_data_form #(
    .HALF     (HALF),
    .BCLK_RISE(HALF / 2)
  ) u_data_form (
    .clk     (clk),
    .rst_n   (rst_n),
    .tick    (tick),
    .start   (start),
    .phase   (phase),
    .comp    (comp_out),
    .data_out(data_out),
    .bit_clk (bit_clk),
    .eof     (eof),
    .error   (error),
    .stop    (stop)
  );

  // Decoding only happens while the timing runs.
  property p_start_in_quiet;
    @(posedge clk) disable iff (!rst_n) start |-> run;
  endproperty
  assert property (p_start_in_quiet);

endmodule
