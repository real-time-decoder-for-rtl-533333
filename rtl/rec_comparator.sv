// rec_comparator: comparator with hysteresis.
//
// Turns the pulse count of the moving window into a logic level. The output
// `comp_out` rises when the count reaches HI (from 4 to 5 in the default
// configuration) and falls when it drops to LO (from 4 to 3); for counts
// between the two it keeps its value. A group of pulses with a few missing
// ones therefore still gives a high output, and a few spurious pulses in a
// quiet stretch do not lift it.
//
// The thresholds are the document's. The output is registered (one clock
// cycle after the count changes) and resets low; both are this design's
// choices.
module rec_comparator #(
  parameter int unsigned CW = $clog2(rec_pkg::WIN + 1),
  parameter int unsigned HI = rec_pkg::HYST_HI,
  parameter int unsigned LO = rec_pkg::HYST_LO
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] count,     // pulses in the window
  output logic          comp_out   // high: group of pulses present
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      comp_out <= 1'b0;
    end else if (32'(count) >= HI) begin
      comp_out <= 1'b1;
    end else if (32'(count) <= LO) begin
      comp_out <= 1'b0;
    end
  end

endmodule
