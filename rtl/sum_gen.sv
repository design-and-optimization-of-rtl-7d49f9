// Sum generator bit cell: si = ai ^ bi ^ ci.
// The partial-sum half of a full adder, kept apart from the carry cell so that
// the sum path and the carry path of the adder are separate circuits.
// Purely combinational, no clock.
module sum_gen (
  input  logic ai,
  input  logic bi,
  input  logic ci,
  output logic si
);
  assign si = ai ^ bi ^ ci;
endmodule
