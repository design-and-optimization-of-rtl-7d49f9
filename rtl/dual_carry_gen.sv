// Dual carry generator of one block: the block's carry out for carry in 0
// (cout0, the block generate G) and for carry in 1 (cout1 = G | Pr, Pr being
// the block propagate), computed from the operands alone and in parallel with
// the block's sum generator. Once the real carry into the block is known, the
// carry out is one select away: cin ? cout1 : cout0.
// Generating both carries follows the design description; the G/P reduction
// inside is this design's own. Combinational.
module dual_carry_gen #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         cout0,
  output logic         cout1
);
  logic g, p;

  always_comb begin
    g = 1'b0;
    p = 1'b1;
    for (int i = 0; i < W; i++) begin
      g = (a[i] & b[i]) | ((a[i] ^ b[i]) & g);
      p = p & (a[i] ^ b[i]);
    end
  end

  assign cout0 = g;
  assign cout1 = g | p;
endmodule
