// Test of the dual carry generator (16-bit block): cout0 and cout1 must equal
// the carry out of a + b + 0 and a + b + 1, on corner and random operands.
module tb_dual_carry_gen;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b;
  logic cout0, cout1;
  logic [W:0] s0, s1;
  int checks = 0, failures = 0;

  dual_carry_gen dut (.a, .b, .cout0, .cout1);

  task automatic check();
    #1;
    s0 = {1'b0, a} + {1'b0, b};
    s1 = {1'b0, a} + {1'b0, b} + 1'b1;
    checks++;
    if (cout0 !== s0[W] || cout1 !== s1[W]) begin
      failures++;
      $display("FAIL a=%h b=%h cout0=%b cout1=%b expected %b %b", a, b, cout0, cout1, s0[W], s1[W]);
    end
  endtask

  initial begin
    a = 16'hFFFF; b = 16'h0000; check();
    a = 16'h1234; b = 16'hEDCB; check();
    a = 16'h0001; b = 16'hFFFF; check();
    a = 16'h0000; b = 16'h0000; check();
    for (int n = 0; n < 3000; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (n % 3 == 0) b = ~a ^ 16'(1 << (n % 16));
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
