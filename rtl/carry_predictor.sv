// Carry predictor of one block: guesses the block's carry out from its P most
// significant bit pairs alone, as the carry out of that P-bit group when its
// own carry in is taken to be 0 (the group generate signal). A predicted 1 is
// always right; a predicted 0 is wrong exactly when all P pairs propagate and a
// carry arrives from the lower W-P bits (or from below the block).
// Predicting from the MSBs follows the design description; the "carry in 0"
// rule and P = 8 are this design's choices. Combinational.
module carry_predictor #(
  parameter int unsigned W = 16,
  parameter int unsigned P = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         c_pred
);
  initial assert (P >= 1 && P <= W) else $error("carry_predictor: P must be 1..W");

  always_comb begin
    c_pred = 1'b0;
    for (int i = W - P; i < W; i++)
      c_pred = (a[i] & b[i]) | ((a[i] ^ b[i]) & c_pred);
  end
endmodule
