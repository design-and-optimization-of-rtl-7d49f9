// Error recovery: builds the corrected sum Sum_REC from the speculative sum
// Sum* by touching only the blocks flagged by error detection. A flagged
// block's partial sum was computed with the wrong carry in, so it is off by
// exactly one: it is incremented when the actual carry in is 1 and decremented
// when it is 0. Unflagged blocks are passed through. Combinational.
// Correcting only the erroneous blocks follows the design description; the
// increment/decrement form is this design's own. With the carry predictor used
// here a block is only ever incremented.
module error_recovery
  import cspa_pkg::*;
#(
  parameter int unsigned WIDTH = CSPA_WIDTH,
  parameter int unsigned BLOCK = CSPA_BLOCK,
  localparam int unsigned NB   = WIDTH / BLOCK
) (
  input  logic [WIDTH-1:0] sum_spec,
  input  logic [NB-1:0]    c_act,
  input  logic [NB-1:0]    e,
  output logic [WIDTH-1:0] sum_rec
);
  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [BLOCK-1:0] part;
    assign part = sum_spec[k*BLOCK +: BLOCK];

    always_comb begin
      if (!e[k])       sum_rec[k*BLOCK +: BLOCK] = part;
      else if (c_act[k]) sum_rec[k*BLOCK +: BLOCK] = part + BLOCK'(1);
      else             sum_rec[k*BLOCK +: BLOCK] = part - BLOCK'(1);
    end
  end
endmodule
