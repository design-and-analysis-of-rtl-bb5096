// Shared constants of the 5-bit maximum-length XNOR LFSR.
//
// The register has five stages, numbered 0 (least significant, nearest the
// feedback input) to 4 (most significant). The feedback is the XNOR of the
// outputs of stages 1 and 4, which gives the maximal period of 2^5 - 1 = 31
// states. With XNOR feedback the all-ones word is the one state outside the
// cycle (it maps onto itself), so the register is cleared to all zeros, which
// lies on the cycle. Width, taps and period follow the design; the reset value
// is this implementation's choice.
package lfsr_pkg;

  localparam int unsigned LFSR_WIDTH = 5;
  localparam int unsigned LFSR_TAP_A = 1;
  localparam int unsigned LFSR_TAP_B = 4;
  localparam int unsigned LFSR_PERIOD = (1 << LFSR_WIDTH) - 1;

endpackage
