// Error detection: compares, for every block, the carry its sum generator used
// (c_spec) with the actual carry (c_act). e[i] is set when they differ, marking
// block i's partial sum as wrong; er (ER) is the OR of all flags and means the
// speculative sum Sum* must not be used. Combinational.
// Comparing speculative with actual carries follows the design description;
// reporting one flag per block (rather than per bit) is this design's choice.
module error_detect #(
  parameter int unsigned NB = cspa_pkg::CSPA_WIDTH / cspa_pkg::CSPA_BLOCK
) (
  input  logic [NB-1:0] c_act,
  input  logic [NB-1:0] c_spec,
  output logic [NB-1:0] e,
  output logic          er
);
  assign e  = c_act ^ c_spec;
  assign er = |e;
endmodule
