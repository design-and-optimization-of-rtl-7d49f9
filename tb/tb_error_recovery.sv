// Test of error recovery at the default size (32 bits, two 16-bit blocks).
// Operands are drawn at random, the speculative sum is built by adding each
// block with a deliberately chosen (possibly wrong) carry in, and the
// recovered sum must equal the exact a + b + cin. Cases: no error, error in
// the upper block with the carry missed (increment, including wrap-around of
// the block) and with a spurious carry (decrement).
module tb_error_recovery;
  logic [31:0] sum_spec, sum_rec;
  logic [1:0]  c_act, e;
  int checks = 0, failures = 0, incs = 0, decs = 0, clean = 0;

  error_recovery dut (.sum_spec, .c_act, .e, .sum_rec);

  task automatic run(input logic [31:0] a, input logic [31:0] b, input logic cin,
                     input logic flip);
    logic [32:0] full;
    logic [15:0] lo, hi;
    logic c16, cs;
    full = 33'(a) + 33'(b) + 33'(cin);
    c16  = (a[16] ^ b[16] ^ full[16]);
    cs   = flip ? ~c16 : c16;
    lo   = a[15:0] + b[15:0] + 16'(cin);
    hi   = a[31:16] + b[31:16] + 16'(cs);
    sum_spec = {hi, lo};
    c_act    = {c16, cin};
    e        = {c16 ^ cs, 1'b0};
    #1;
    checks++;
    if (sum_rec !== full[31:0]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b flip=%b rec=%h expected %h", a, b, cin, flip, sum_rec, full[31:0]);
    end
    if (!flip) clean++; else if (c16) incs++; else decs++;
  endtask

  initial begin
    run(32'hFFFF_8000, 32'h0000_8000, 1'b0, 1'b1);  // upper block wraps on increment
    run(32'h0000_0001, 32'h0000_0001, 1'b0, 1'b1);  // decrement wraps upper block
    for (int n = 0; n < 2000; n++)
      run($urandom, $urandom, 1'($urandom), 1'($urandom));
    checks++;
    if (incs == 0 || decs == 0 || clean == 0) begin
      failures++;
      $display("FAIL coverage inc=%0d dec=%0d clean=%0d", incs, decs, clean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
