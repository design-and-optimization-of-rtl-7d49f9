// Carry speculative adder core: WIDTH-bit a + b + cin split into
// NB = WIDTH/BLOCK block adders.
//  - Block 0 adds with the true cin. Every higher block's sum generator adds
//    with the carry predicted by the carry predictor of the block below it, so
//    all blocks compute their partial sums at once: sum_spec is Sum*.
//  - In parallel, each block's dual carry generator gives its carry out for
//    carry in 0 and 1, and a chain of one select per block turns these into the
//    actual carries.
// Outputs, one bit per block: c_spec[i] is the carry block i's sum generator
// used, c_act[i] the carry it should have used (bit 0 of both is cin). cout is
// the exact carry out of the whole adder. Combinational. The block adders'
// own ripple carry outs are left open on purpose: the exact carries come from
// the dual carry generators. NB must be at least 2.
// Splitting into block adders with MSB predictors and dual carry generators
// follows the design description; WIDTH = 32 and PRED = 8 are this design's
// choices, BLOCK = 16 the block size it is described with.
module cspa_core
  import cspa_pkg::*;
#(
  parameter int unsigned WIDTH = CSPA_WIDTH,
  parameter int unsigned BLOCK = CSPA_BLOCK,
  parameter int unsigned PRED  = CSPA_PRED,
  localparam int unsigned NB   = WIDTH / BLOCK
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum_spec,
  output logic [NB-1:0]    c_act,
  output logic [NB-1:0]    c_spec,
  output logic             cout
);
  initial assert (WIDTH % BLOCK == 0 && NB >= 2)
    else $error("cspa_core: WIDTH must be a multiple of BLOCK, with at least two blocks");

  logic [NB-2:0] pred;       // predicted carry out of each block but the top one
  logic [NB-1:0] g0, g1;     // carry out of each block for carry in 0 / 1
  logic [NB:0]   chain;      // actual carry into each block, chain[NB] = cout

  assign chain[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [BLOCK-1:0] ak, bk;
    assign ak = a[k*BLOCK +: BLOCK];
    assign bk = b[k*BLOCK +: BLOCK];

    // carry this block's sum generator adds with
    if (k == 0) begin : g_first
      assign c_spec[k] = cin;
    end else begin : g_next
      assign c_spec[k] = pred[k-1];
    end

    // the top block's carry out is never speculated on
    if (k < NB - 1) begin : g_pred
      carry_predictor #(.W(BLOCK), .P(PRED)) u_pred (
        .a(ak), .b(bk), .c_pred(pred[k])
      );
    end

    block_adder #(.W(BLOCK)) u_sum (
      .a(ak), .b(bk), .c(c_spec[k]),
      .s(sum_spec[k*BLOCK +: BLOCK]),
      .cout()
    );

    dual_carry_gen #(.W(BLOCK)) u_cgen (
      .a(ak), .b(bk), .cout0(g0[k]), .cout1(g1[k])
    );

    assign chain[k+1] = chain[k] ? g1[k] : g0[k];
  end

  assign c_act = chain[NB-1:0];
  assign cout  = chain[NB];
endmodule
