// rec_shift_register: input sampling and moving time window.
//
// The demodulated input data_in is asynchronous to the clock. It passes a
// two-flop synchronizer; a rising edge of the synchronized signal marks a
// sub-carrier pulse. A flag remembers whether a pulse started during the
// current sub-carrier period. At each period strobe `tick` (from the SOF &
// timing block) the flag is shifted into a WIN-stage shift register and
// cleared. The parallel outputs `window` therefore hold, one bit per
// period, which of the last WIN periods carried a pulse: the moving time
// window in which at most WIN pulses are visible at a time.
//
// `pulse` is the flag of the period now ending (including an edge seen in
// this very cycle); it is what `tick` shifts in, and it also feeds the SOF
// recogniser. `window` changes on the clock edge at which `tick` is high;
// window[0] is the newest period.
//
// The 8-stage window follows the document. Counting one flag per
// sub-carrier period by rising-edge detection, and the synchronizer, are
// this design's choices: several edges in one period (noise) count once,
// and a period without an edge counts as a missing pulse.
module rec_shift_register #(
  parameter int unsigned WIN = rec_pkg::WIN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           data_in,   // demodulated sub-carrier, asynchronous
  input  logic           tick,      // one-cycle strobe at the end of each period
  output logic           pulse,     // a pulse started in the period now ending
  output logic [WIN-1:0] window     // last WIN periods, bit 0 newest
);

  logic sync1, sync2, sync3;
  logic seen;
  logic edge_now;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1 <= 1'b0;
      sync2 <= 1'b0;
      sync3 <= 1'b0;
    end else begin
      sync1 <= data_in;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  assign edge_now = sync2 & ~sync3;
  assign pulse    = seen | edge_now;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen   <= 1'b0;
      window <= '0;
    end else if (tick) begin
      seen   <= 1'b0;
      window <= {window[WIN-2:0], pulse};
    end else if (edge_now) begin
      seen   <= 1'b1;
    end
  end

endmodule
