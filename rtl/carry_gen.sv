// Carry generator bit cell: cout is the majority of ai, bi and ci
// (generate ai&bi, or propagate ai^bi with a carry in).
// The carry half of a full adder. Purely combinational, no clock.
module carry_gen (
  input  logic ai,
  input  logic bi,
  input  logic ci,
  output logic cout
);
  assign cout = (ai & bi) | (ci & (ai ^ bi));
endmodule
