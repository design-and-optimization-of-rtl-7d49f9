// Variable-latency control of the speculative adder.
// Operands are loaded into the EN registers when in_valid is high and the
// adder is not blocked (load). In the next cycle the speculative result is
// checked: with ER low it is the output (out_valid, sel_rec low), one cycle
// after acceptance. With ER high, ERR_block (err_block) is raised for that
// cycle: the speculative result is withheld, in_ready drops so no new operands
// enter, and the recovered sum is captured; in the following cycle it is the
// output (sel_rec high). A mispredicted addition thus takes 2 cycles and costs
// one bubble. There is no back-pressure from the consumer.
// The VALID/ERR_block roles follow the design description; the exact cycle
// timing is this design's choice. Asynchronous active-low reset.
module cspa_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic er,
  output logic in_ready,
  output logic load,
  output logic err_block,
  output logic op_valid,
  output logic sel_rec,
  output logic out_valid
);
  assign err_block = op_valid & er;
  assign in_ready  = ~err_block;
  assign load      = in_valid & in_ready;
  assign out_valid = (op_valid & ~er) | sel_rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_valid <= 1'b0;
      sel_rec  <= 1'b0;
    end else begin
      op_valid <= load;
      sel_rec  <= err_block;
    end
  end

  // a recovery cycle never overlaps an operation under way
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(sel_rec && op_valid));
  // while blocked, no operands are taken
  a_block_holds: assert property (@(posedge clk) disable iff (!rst_n) err_block |-> !load);
endmodule
