// Test of the speculative adder core at its default size (32 bits, two 16-bit
// blocks, 8 predictor bits) and at 64 bits with four 16-bit blocks and 4
// predictor bits (three speculated block boundaries).
// The reference works on plain integers: the actual carry into block k is bit
// k*BLOCK of a + b + cin computed over the whole width; the speculative carry
// is bit PRED of the sum of the upper PRED bits of block k-1; each block's
// partial sum is its slice of a + b plus its speculative carry, modulo
// 2^BLOCK. Mispredicted and correct cases are both counted and required.
module tb_cspa_core;
  logic [31:0] a0, b0, s0;
  logic        ci0, co0;
  logic [1:0]  ca0, cs0;
  logic [63:0] a1, b1, s1;
  logic        ci1, co1;
  logic [3:0]  ca1, cs1;
  int checks = 0, failures = 0, mispred = 0, correct = 0;

  cspa_core dut0 (.a(a0), .b(b0), .cin(ci0), .sum_spec(s0), .c_act(ca0), .c_spec(cs0), .cout(co0));
  cspa_core #(.WIDTH(64), .BLOCK(16), .PRED(4)) dut1 (
    .a(a1), .b(b1), .cin(ci1), .sum_spec(s1), .c_act(ca1), .c_spec(cs1), .cout(co1));

  // reference model for width w, block size k, predictor size p (w <= 64)
  task automatic model(input logic [63:0] a, input logic [63:0] b, input logic ci,
                       input int w, input int k, input int p,
                       output logic [63:0] sspec, output logic [3:0] cact,
                       output logic [3:0] cspec, output logic co);
    logic [64:0] full;
    logic [16:0] part;
    logic [8:0]  grp;
    full = {1'b0, a} + {1'b0, b} + 65'(ci);
    co = full[w];
    sspec = '0; cact = '0; cspec = '0;
    for (int j = 0; j < w / k; j++) begin
      cact[j] = (j == 0) ? ci : (((a ^ b ^ full[63:0]) >> (j * k)) & 64'd1) != 0;
      if (j == 0) cspec[j] = ci;
      else begin
        grp = 9'((a >> (j * k - p)) & ((64'd1 << p) - 1))
            + 9'((b >> (j * k - p)) & ((64'd1 << p) - 1));
        cspec[j] = grp[p];
      end
      part = 17'((a >> (j * k)) & 64'hFFFF) + 17'((b >> (j * k)) & 64'hFFFF) + 17'(cspec[j]);
      sspec |= (64'(part[15:0]) << (j * k));
    end
  endtask

  task automatic run0(input logic [31:0] a, input logic [31:0] b, input logic ci);
    logic [63:0] es; logic [3:0] ea, ep; logic eco;
    a0 = a; b0 = b; ci0 = ci;
    #1;
    model({32'd0, a}, {32'd0, b}, ci, 32, 16, 8, es, ea, ep, eco);
    checks++;
    if (s0 !== es[31:0] || ca0 !== ea[1:0] || cs0 !== ep[1:0] || co0 !== eco) begin
      failures++;
      $display("FAIL 32b %h+%h+%b: sum*=%h cact=%b cspec=%b cout=%b, expected %h %b %b %b",
               a, b, ci, s0, ca0, cs0, co0, es[31:0], ea[1:0], ep[1:0], eco);
    end
    if (ca0 != cs0) mispred++; else correct++;
    // when no block mispredicts, Sum* is already the exact sum
    if (ca0 == cs0) begin
      checks++;
      if ({co0, s0} !== 33'(a) + 33'(b) + 33'(ci)) begin
        failures++;
        $display("FAIL 32b no-error sum not exact");
      end
    end
  endtask

  task automatic run1(input logic [63:0] a, input logic [63:0] b, input logic ci);
    logic [63:0] es; logic [3:0] ea, ep; logic eco;
    a1 = a; b1 = b; ci1 = ci;
    #1;
    model(a, b, ci, 64, 16, 4, es, ea, ep, eco);
    checks++;
    if (s1 !== es || ca1 !== ea || cs1 !== ep || co1 !== eco) begin
      failures++;
      $display("FAIL 64b %h+%h+%b: sum*=%h cact=%b cspec=%b cout=%b, expected %h %b %b %b",
               a, b, ci, s1, ca1, cs1, co1, es, ea, ep, eco);
    end
    if (ca1 != cs1) mispred++; else correct++;
  endtask

  initial begin
    // block 0 carries into a fully propagating upper byte of block 0: miss
    run0(32'h0000_FF80, 32'h0000_0080, 1'b0);
    run0(32'h0000_FFFF, 32'h0000_0000, 1'b1);
    run0(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    run0(32'h1234_5678, 32'h1111_1111, 1'b0);
    run1(64'h0FFF_0FFF_0FFF_0FFF, 64'h0001_0001_0001_0001, 1'b0);
    run1(64'hFFFF_FFFF_FFFF_FFFF, 64'h0, 1'b1);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] ra, rb;
      ra = $urandom; rb = $urandom;
      if (n % 5 == 0) rb[15:8] = ~ra[15:8];
      run0(ra, rb, 1'($urandom));
      run1({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    checks++;
    if (mispred == 0 || correct == 0) begin
      failures++;
      $display("FAIL coverage mispred=%0d correct=%0d", mispred, correct);
    end
    $display("mispredicted=%0d correct=%0d", mispred, correct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
