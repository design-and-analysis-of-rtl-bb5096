// One storage stage of the LFSR: a positive-edge D flip-flop with reset.
//
// On every rising edge of clk, q takes the value of d. While reset is high,
// q is forced to 0 at once (asynchronous, active-high reset), independent of
// the clock. The positive-edge clock and the plain "q follows d" behaviour
// follow the design; the asynchronous style, the polarity and the cleared
// value of the reset are this implementation's choices.
//
// Ports: clk (rising-edge clock), reset (active high), d (data in),
// q (registered data out, valid one clock after d).
module lfsr_dff (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) q <= 1'b0;
    else       q <= d;
  end

endmodule
