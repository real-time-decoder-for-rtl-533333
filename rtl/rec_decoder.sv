// rec_decoder: counts the pulses in the moving window.
//
// Purely combinational: `count` is the number of ones among the WIN
// parallel outputs of the shift register, as a binary number (0..WIN).
// This is the value the comparator sees ("comp_in"). It follows the
// register without delay; the adder tree is this design's own choice, the
// document only says that the block counts the ones and encodes the number.
module rec_decoder #(
  parameter int unsigned WIN = rec_pkg::WIN,
  parameter int unsigned CW  = $clog2(WIN + 1)
) (
  input  logic [WIN-1:0] window,
  output logic [CW-1:0]  count
);

  always_comb begin
    count = '0;
    for (int i = 0; i < WIN; i++) begin
      count = count + CW'(window[i]);
    end
  end

endmodule
