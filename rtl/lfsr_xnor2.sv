// Two-input XNOR gate, the feedback element of the LFSR.
//
// c is high when a and b are equal and low when they differ. It is purely
// combinational, with no clock and no state. The port names a, b and c
// follow the design's schematic.
module lfsr_xnor2 (
  input  logic a,
  input  logic b,
  output logic c
);

  always_comb c = ~(a ^ b);

endmodule
