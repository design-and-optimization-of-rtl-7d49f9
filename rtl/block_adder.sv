// Block adder: the sum generator of one block of the speculative adder.
// A W-bit adder with carry in c, built as a ripple chain of sum_gen and
// carry_gen bit cells; bit 0 is the least significant. In the speculative adder
// c is a predicted carry, so s is a partial sum that may need correction.
// The 16-bit default is the block size the design is described with; the
// ripple structure is this design's own (simplest) choice. Combinational.
module block_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] cy;
  assign cy[0] = c;

  for (genvar i = 0; i < W; i++) begin : g_bit
    sum_gen   u_sum (.ai(a[i]), .bi(b[i]), .ci(cy[i]), .si(s[i]));
    carry_gen u_cy  (.ai(a[i]), .bi(b[i]), .ci(cy[i]), .cout(cy[i+1]));
  end

  assign cout = cy[W];
endmodule
