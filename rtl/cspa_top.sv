// Carry speculative adder (CSPA), complete: sum = a + b + cin, WIDTH bits.
// Data path, in order:
//   EN registers (A, B, cin) -> cspa_core (speculative sum Sum*, actual and
//   speculative block carries, exact cout) -> error_detect (per-block flags,
//   ER) -> error_recovery (Sum_REC) -> recovered-sum register -> output MUX
//   (input 0 Sum*, input 1 Sum_REC).
// Timing (cspa_ctrl): a result appears one cycle after the operands are
// accepted when every block's carry was predicted right. When ER is high,
// ERR_block withholds the speculative result and holds the inputs for one
// cycle while Sum_REC is captured; the corrected sum appears two cycles after
// acceptance with out_recovered high. in_ready is low only in that blocked
// cycle. The result is exact in both cases.
// The block structure and the Sum*/Sum_REC selection by ER follow the design
// description; registering the operands and the recovered sum, the handshake
// and the widths WIDTH = 32, PRED = 8 are this design's choices.
module cspa_top
  import cspa_pkg::*;
#(
  parameter int unsigned WIDTH = CSPA_WIDTH,
  parameter int unsigned BLOCK = CSPA_BLOCK,
  parameter int unsigned PRED  = CSPA_PRED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             out_recovered
);
  localparam int unsigned NB = WIDTH / BLOCK;

  logic             load, err_block, op_valid, sel_rec, er;
  logic [WIDTH-1:0] a_q, b_q, sum_spec, sum_rec, rec_sum_q;
  logic             cin_q, cout_act, rec_cout_q;
  logic [NB-1:0]    c_act, c_spec, e;

  // input enable blocks
  en_reg #(.W(WIDTH)) u_en_a   (.clk, .rst_n, .en(load), .d(a),   .q(a_q));
  en_reg #(.W(WIDTH)) u_en_b   (.clk, .rst_n, .en(load), .d(b),   .q(b_q));
  en_reg #(.W(1))     u_en_cin (.clk, .rst_n, .en(load), .d(cin), .q(cin_q));

  cspa_core #(.WIDTH(WIDTH), .BLOCK(BLOCK), .PRED(PRED)) u_core (
    .a(a_q), .b(b_q), .cin(cin_q),
    .sum_spec, .c_act, .c_spec, .cout(cout_act)
  );

  error_detect #(.NB(NB)) u_det (.c_act, .c_spec, .e, .er);

  error_recovery #(.WIDTH(WIDTH), .BLOCK(BLOCK)) u_rec (
    .sum_spec, .c_act, .e, .sum_rec
  );

  cspa_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .er,
    .in_ready, .load, .err_block, .op_valid, .sel_rec, .out_valid
  );

  // recovered result, captured in the ERR_block cycle
  en_reg #(.W(WIDTH + 1)) u_rec_q (
    .clk, .rst_n, .en(err_block),
    .d({cout_act, sum_rec}), .q({rec_cout_q, rec_sum_q})
  );

  mux2 #(.W(WIDTH + 1)) u_mux (
    .a({cout_act, sum_spec}), .b({rec_cout_q, rec_sum_q}),
    .sel(sel_rec), .y({cout, sum})
  );

  assign out_recovered = sel_rec;

  // the predictor only misses carries: a predicted carry is always a real one
  a_pred_safe: assert property (@(posedge clk) disable iff (!rst_n)
                                op_valid |-> ((c_spec & ~c_act) == '0));
endmodule
