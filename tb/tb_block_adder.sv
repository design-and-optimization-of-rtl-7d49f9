// Test of the 16-bit block adder: corner operands and random operands with
// both carry-in values, compared with a + b + c computed as a 17-bit integer.
module tb_block_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, s;
  logic c, cout;
  logic [W:0] expct;
  int checks = 0, failures = 0;

  block_adder dut (.a, .b, .c, .s, .cout);

  task automatic check();
    #1;
    expct = {1'b0, a} + {1'b0, b} + (W+1)'(c);
    checks++;
    if ({cout, s} !== expct) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", a, b, c, cout, s, expct);
    end
  endtask

  initial begin
    a = 16'hFFFF; b = 16'h0000; c = 1; check();
    a = 16'hFFFF; b = 16'hFFFF; c = 1; check();
    a = 16'h8000; b = 16'h8000; c = 0; check();
    a = 16'h0000; b = 16'h0000; c = 0; check();
    a = 16'h5555; b = 16'hAAAA; c = 1; check();
    for (int n = 0; n < 2000; n++) begin
      a = 16'($urandom); b = 16'($urandom); c = 1'($urandom);
      check();
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
