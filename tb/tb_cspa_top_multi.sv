// End-to-end test of the carry speculative adder at 64 bits with four 16-bit
// blocks and a 4-bit predictor, where several block boundaries can be
// mispredicted in the same addition and recovery must correct more than one
// block at once. Operands are random, with the upper predictor bits of random
// blocks forced to propagate. Every result is compared with a + b + cin and
// its latency checked (1 cycle, or 2 when recovered). Requires plain results,
// recovered results, and recoveries of two or more blocks at once.
module tb_cspa_top_multi;
  localparam int unsigned WIDTH = 64, BLOCK = 16, PRED = 4;

  typedef struct {
    logic [WIDTH-1:0] a, b;
    logic             cin;
    longint           t_acc;
  } op_t;

  logic clk = 0, rst_n = 1, in_valid = 0, cin = 0;
  logic [WIDTH-1:0] a = '0, b = '0, sum;
  logic in_ready, out_valid, cout, out_recovered;

  op_t    q[$];
  longint cyc = 0;
  int checks = 0, failures = 0, n_plain = 0, n_rec = 0, n_multi = 0, sent = 0, n_done = 0;

  cspa_top #(.WIDTH(WIDTH), .BLOCK(BLOCK), .PRED(PRED)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .cin,
    .out_valid, .sum, .cout, .out_recovered);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (dut.err_block && $countones(dut.e) > 1) n_multi++;
    if (out_valid) begin
      op_t op;
      logic [WIDTH:0] expct;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL result with nothing outstanding");
      end else begin
        op    = q.pop_front();
        expct = {1'b0, op.a} + {1'b0, op.b} + (WIDTH+1)'(op.cin);
        if ({cout, sum} !== expct) begin
          failures++;
          $display("FAIL %h + %h + %b = %b_%h, expected %h", op.a, op.b, op.cin, cout, sum, expct);
        end
        checks++;
        if (cyc - op.t_acc != (out_recovered ? 2 : 1)) begin
          failures++;
          $display("FAIL latency %0d, recovered=%b", cyc - op.t_acc, out_recovered);
        end
        if (out_recovered) n_rec++; else n_plain++;
        n_done++;
      end
    end
    if (in_valid && in_ready) q.push_back('{a: a, b: b, cin: cin, t_acc: cyc});
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [WIDTH-1:0] ra, rb;
      ra = {$urandom, $urandom};
      rb = {$urandom, $urandom};
      for (int k = 0; k < WIDTH / BLOCK - 1; k++)
        if ($urandom % 2 == 0)
          for (int i = (k + 1) * BLOCK - PRED; i < (k + 1) * BLOCK; i++) rb[i] = ~ra[i];
      a = ra; b = rb; cin = 1'($urandom); in_valid = 1;
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
      #1 in_valid = 0;
      sent++;
    end
    repeat (3) @(posedge clk);
    checks++;
    if (n_done != sent || q.size() != 0) begin
      failures++;
      $display("FAIL %0d sent, %0d results", sent, n_done);
    end
    checks++;
    if (n_plain == 0 || n_rec == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL coverage plain=%0d recovered=%0d multi-block=%0d", n_plain, n_rec, n_multi);
    end
    $display("events: plain=%0d recovered=%0d multi-block recoveries=%0d", n_plain, n_rec, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
