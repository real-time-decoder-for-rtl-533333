// rec_sof_timing: sub-carrier timing and start-of-frame recognition.
//
// Timing: a free-running divider makes the one-cycle strobe `tick` once per
// sub-carrier period (CLK_PER_PULSE clock cycles). The shift register shifts
// at every tick; all other timing of the circuit is counted in ticks.
//
// SOF recognition works on the per-period pulse flag `pulse` sampled at each
// tick. The start of frame is a quiet time, a burst of SOF_PULSES pulses and
// a logic "1". The recogniser
//   - waits for at least QUIET_MIN periods without a pulse (SOF_QUIET);
//   - on the next pulse measures the burst (SOF_BURST): it counts the
//     periods from the first pulse and the pulses in them; the burst ends at
//     the first run of GAP_END periods without a pulse, so up to GAP_END-1
//     consecutive missing pulses are bridged;
//   - accepts the burst if its length, first to last pulse, is within
//     SOF_TOL periods of SOF_PULSES and it held at least PCNT_MIN pulses.
// A burst that is accepted fixes the bit-slot grid: the period after its
// last pulse is phase 0 of the slot that carries the SOF's closing logic
// "1". The block then enters SOF_RUN, gives the one-cycle strobe `start` and
// counts `phase` (0..2*HALF-1) at every tick. `phase` is the slot position
// of the period that the next tick shifts into the window. A `stop` pulse
// from the data form block (EOF decoded, or the frame abandoned) returns the
// recogniser to SOF_QUIET, to wait for the next SOF.
//
// The document specifies the SOF waveform and that a correct SOF starts the
// timing and an EOF stops it. The tolerances, the burst-length method and
// the free-running divider are this design's own choices.
module rec_sof_timing #(
  parameter int unsigned CLK_PER_PULSE = rec_pkg::CLK_PER_PULSE,
  parameter int unsigned HALF          = rec_pkg::HALF_PULSES,
  parameter int unsigned SOF_PULSES    = rec_pkg::SOF_PULSES,
  parameter int unsigned QUIET_MIN     = 12,
  parameter int unsigned GAP_END       = 4,
  parameter int unsigned SOF_TOL       = 4,
  parameter int unsigned PCNT_MIN      = 16,
  parameter int unsigned PW            = $clog2(2 * HALF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pulse,   // a pulse started in the period now ending
  input  logic          stop,    // end of frame or frame abandoned
  output logic          tick,    // one-cycle strobe, end of each period
  output logic          start,   // one-cycle strobe after an accepted SOF
  output logic          run,     // a frame is being decoded
  output logic [PW-1:0] phase    // slot position of the next shifted period
);
  import rec_pkg::*;

  localparam int unsigned DW = $clog2(CLK_PER_PULSE);
  localparam int unsigned LW = $clog2(SOF_PULSES + SOF_TOL + GAP_END + 2);
  localparam int unsigned QW = $clog2(QUIET_MIN + 1);

  logic [DW-1:0] div_q;
  sof_state_e    state_q;
  logic [QW-1:0] quiet_q;   // quiet periods seen, saturating at QUIET_MIN
  logic [LW-1:0] blen_q;    // periods since the first pulse of the burst
  logic [LW-1:0] pcnt_q;    // pulses in the burst
  logic [LW-1:0] gap_q;     // periods since the last pulse of the burst

  logic [LW-1:0] blen_n, pcnt_n, gap_n, len_n;

  // Period divider.
  always_ff @(posedge clk) begin
    if (!rst_n) div_q <= '0;
    else if (32'(div_q) == CLK_PER_PULSE - 1) div_q <= '0;
    else div_q <= div_q + 1'b1;
  end
  assign tick = (32'(div_q) == CLK_PER_PULSE - 1);

  // Burst measurement including the period shifted at this tick.
  always_comb begin
    blen_n = blen_q + 1'b1;
    pcnt_n = pcnt_q + LW'(pulse);
    gap_n  = pulse ? '0 : gap_q + 1'b1;
    len_n  = blen_n - LW'(GAP_END);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= SOF_QUIET;
      quiet_q <= '0;
      blen_q  <= '0;
      pcnt_q  <= '0;
      gap_q   <= '0;
      phase   <= '0;
      start   <= 1'b0;
    end else begin
      start <= 1'b0;
      if (stop) begin
        state_q <= SOF_QUIET;
        quiet_q <= '0;
      end else if (tick) begin
        unique case (state_q)
          SOF_QUIET: begin
            if (pulse) begin
              if (32'(quiet_q) >= QUIET_MIN) begin
                state_q <= SOF_BURST;
                blen_q  <= LW'(1);
                pcnt_q  <= LW'(1);
                gap_q   <= '0;
              end
              quiet_q <= '0;
            end else if (32'(quiet_q) < QUIET_MIN) begin
              quiet_q <= quiet_q + 1'b1;
            end
          end
          SOF_BURST: begin
            blen_q <= blen_n;
            pcnt_q <= pcnt_n;
            gap_q  <= gap_n;
            if (!pulse && 32'(gap_n) == GAP_END) begin
              if (32'(len_n) + SOF_TOL >= SOF_PULSES &&
                  32'(len_n) <= SOF_PULSES + SOF_TOL &&
                  32'(pcnt_n) >= PCNT_MIN) begin
                state_q <= SOF_RUN;
                phase   <= PW'(GAP_END);
                start   <= 1'b1;
              end else begin
                state_q <= SOF_QUIET;
                quiet_q <= QW'(GAP_END);
              end
            end else if (pulse && 32'(blen_n) > SOF_PULSES + SOF_TOL) begin
              // Far longer than an SOF burst: unmodulated carrier or noise.
              state_q <= SOF_QUIET;
              quiet_q <= '0;
            end
          end
          SOF_RUN: begin
            phase <= (32'(phase) == 2 * HALF - 1) ? '0 : phase + 1'b1;
          end
          default: state_q <= SOF_QUIET;
        endcase
      end
    end
  end

  assign run = (state_q == SOF_RUN);

  // A frame starts only on a period strobe, and the phase stays in a slot.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> $past(tick));
  assert property (@(posedge clk) disable iff (!rst_n) 32'(phase) < 2 * HALF);

endmodule
