// Exhaustive test of the carry generator bit cell: all 8 input combinations,
// expected value = 1 when at least two inputs are 1.
module tb_carry_gen;
  logic ai, bi, ci, cout;
  int checks = 0, failures = 0;

  carry_gen dut (.ai, .bi, .ci, .cout);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ai, bi, ci} = 3'(v);
      #1;
      checks++;
      if (cout !== ((v == 3 || v == 5 || v == 6 || v == 7) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL carry_gen in=%03b cout=%b", 3'(v), cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
