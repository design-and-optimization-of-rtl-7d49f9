// End-to-end test of the carry speculative adder at its default size
// (32 bits, two 16-bit blocks, 8 predictor bits; no parameter overrides).
// Phase 1 mixes directed operands that make the block-0 carry predictor miss
// with random operands and random gaps in in_valid. Phase 2 streams uniformly
// random operands back to back and measures how often recovery is needed.
// Every result is compared with a + b + cin from a queue of accepted
// operations, and its latency is checked: 1 cycle after acceptance for a
// speculative result, 2 cycles for a recovered one. Required events: plain
// speculative results, recovered results, input stalls (in_valid while
// in_ready is low), idle cycles, results with carry out set.
module tb_cspa_top;
  localparam int unsigned WIDTH = 32;

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
  int checks = 0, failures = 0;
  int n_plain = 0, n_rec = 0, n_stall = 0, n_idle = 0, n_cout = 0, n_done = 0;
  int rnd_ops = 0, rnd_rec = 0;
  bit measuring = 0;

  cspa_top dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .cin,
                .out_valid, .sum, .cout, .out_recovered);

  always #5 clk = ~clk;

  // monitor: acceptances, results and events, sampled at the falling edge,
  // where every signal has settled for the rising edge that follows
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) n_stall++;
    if (!in_valid && !out_valid) n_idle++;
    if (out_valid) begin
      op_t op;
      logic [WIDTH:0] expct;
      longint lat;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL result with nothing outstanding");
      end else begin
        op    = q.pop_front();
        expct = {1'b0, op.a} + {1'b0, op.b} + (WIDTH+1)'(op.cin);
        lat   = cyc - op.t_acc;
        if ({cout, sum} !== expct) begin
          failures++;
          $display("FAIL %h + %h + %b = %b_%h, expected %h (recovered=%b)",
                   op.a, op.b, op.cin, cout, sum, expct, out_recovered);
        end
        checks++;
        if (lat != (out_recovered ? 2 : 1)) begin
          failures++;
          $display("FAIL latency %0d, recovered=%b", lat, out_recovered);
        end
        if (out_recovered) n_rec++; else n_plain++;
        if (cout) n_cout++;
        if (measuring) begin
          rnd_ops++;
          if (out_recovered) rnd_rec++;
        end
        n_done++;
      end
    end
    if (in_valid && in_ready) q.push_back('{a: a, b: b, cin: cin, t_acc: cyc});
  end

  // offer one operation and wait until it is taken
  task automatic offer(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb_, input logic tc);
    a = ta; b = tb_; cin = tc; in_valid = 1;
    // in_ready is settled at the falling edge and holds to the next rising one
    do @(negedge clk); while (!in_ready);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    int sent;
    #1 rst_n = 0;  // a real falling edge, so the asynchronous reset fires
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sent = 0;
    // phase 1: directed misses, random operands, random gaps
    for (int n = 0; n < 2000; n++) begin
      logic [WIDTH-1:0] ra, rb;
      ra = $urandom; rb = $urandom;
      case (n % 4)
        0: begin rb[15:8] = ~ra[15:8]; ra[7] = 1; rb[7] = 1; end  // guaranteed miss
        1: rb[15:8] = ~ra[15:8];                                   // likely miss
        default: ;
      endcase
      offer(ra, rb, 1'($urandom));
      sent++;
      if ($urandom % 3 == 0) repeat ($urandom % 3) begin @(posedge clk); #1; end
    end
    // phase 2: uniform random operands, back to back
    repeat (3) @(posedge clk);
    #1;
    measuring = 1;
    for (int n = 0; n < 100000; n++) begin
      offer($urandom, $urandom, 1'($urandom));
      sent++;
    end
    repeat (3) @(posedge clk);
    #1;
    measuring = 0;
    checks++;
    if (n_done != sent || q.size() != 0) begin
      failures++;
      $display("FAIL %0d sent, %0d results, %0d outstanding", sent, n_done, q.size());
    end
    checks++;
    if (n_plain == 0 || n_rec == 0 || n_stall == 0 || n_idle == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL coverage plain=%0d recovered=%0d stall=%0d idle=%0d cout=%0d",
               n_plain, n_rec, n_stall, n_idle, n_cout);
    end
    // with 8 predictor bits a uniform random addition needs recovery when the
    // upper byte of block 0 propagates (1/256) and a carry reaches it (1/2)
    checks++;
    if (rnd_rec * 1000 < rnd_ops || rnd_rec * 1000 > rnd_ops * 3) begin
      failures++;
      $display("FAIL recovery rate %0d of %0d outside 0.1%%..0.3%%", rnd_rec, rnd_ops);
    end
    $display("events: plain=%0d recovered=%0d stall_cycles=%0d idle_cycles=%0d cout=%0d",
             n_plain, n_rec, n_stall, n_idle, n_cout);
    $display("uniform random: %0d of %0d additions recovered (%0d.%02d%%)", rnd_rec, rnd_ops,
             rnd_rec * 100 / rnd_ops, (rnd_rec * 10000 / rnd_ops) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
