// Maximum-length 5-bit parallel-output linear feedback shift register.
//
// The register is built structurally: five lfsr_dff stages in series and one
// lfsr_xnor2 gate. On each rising clock edge every bit moves one stage up,
// from stage 0 (LSB) towards stage 4 (MSB), and stage 0 loads
// XNOR(q[TAP_A], q[TAP_B]). With the default taps 1 and 4 the register
// steps through all 31 states except 5'b11111 before it repeats. All five
// stage outputs are brought out in parallel on q, with q[0] from stage 0.
//
// Timing: reset (active high, asynchronous) clears q to 5'b00000, which lies
// on the 31-state cycle, so no seed value is needed. After reset is released,
// q takes a new state on every rising edge of clk; the period is 31 clocks.
// From the cleared state the sequence runs 00, 01, 03, 06, 0C, 19, ... (hex).
//
// The stage count, the shift direction, the XNOR feedback from stages 1 and
// 4, the common clock and reset, and the parallel output follow the design.
// The taps and width are parameters here so that other tap pairs can be
// tried; the reset value of zero is this implementation's choice.
module lfsr5
  import lfsr_pkg::*;
#(
  parameter int unsigned WIDTH = LFSR_WIDTH,
  parameter int unsigned TAP_A = LFSR_TAP_A,
  parameter int unsigned TAP_B = LFSR_TAP_B
) (
  input  logic             clk,
  input  logic             reset,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d;
  logic             feedback;

  // Feedback path: XNOR of the two tap outputs drives stage 0.
  lfsr_xnor2 u_fb (
    .a(q[TAP_A]),
    .b(q[TAP_B]),
    .c(feedback)
  );

  assign d[0] = feedback;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    if (i > 0) begin : g_shift
      assign d[i] = q[i-1];
    end
    lfsr_dff u_ff (
      .clk  (clk),
      .reset(reset),
      .d    (d[i]),
      .q    (q[i])
    );
  end

  // With XNOR feedback the all-ones word maps onto itself and is never
  // reached from the cleared state (nor during reset, which clears q).
  a_no_lockup : assert property (@(posedge clk) q != '1)
    else $error("LFSR entered the all-ones lock-up state");

endmodule
