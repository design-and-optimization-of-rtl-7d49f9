// Input enable (EN) block: a W-bit register that loads d when en is high at a
// rising clock edge and holds its value otherwise, so operands only enter the
// adder when valid data is offered and the adder can take it.
// Descriptions of such a block allow AND gates or latches; this design uses an
// edge-triggered register with a load enable so that everything runs on one
// clock. Asynchronous active-low reset clears q to zero. q follows d one cycle
// after a cycle with en high.
module en_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
