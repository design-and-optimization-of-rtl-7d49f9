// Two-input multiplexer: y = a when sel is 0, y = b when sel is 1.
// At the adder's output, input 0 carries the speculative sum and input 1 the
// recovered sum, and the error flag drives sel. Combinational; W bits wide
// (1 by default, the adder width where the adder uses it).
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? b : a;
endmodule
