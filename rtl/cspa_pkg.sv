// Shared sizes of the carry speculative adder (CSPA).
// CSPA_WIDTH is the full operand width, CSPA_BLOCK the width of one block adder
// and CSPA_PRED the number of most significant bit pairs of a block that its
// carry predictor looks at. The 16-bit block follows the block adder the design
// is described with; the 32-bit total and the 8-bit predictor are this design's
// own choices (with random operands they give a misprediction rate of about 0.2%).
package cspa_pkg;
  localparam int unsigned CSPA_WIDTH = 32;
  localparam int unsigned CSPA_BLOCK = 16;
  localparam int unsigned CSPA_PRED  = 8;
endpackage
