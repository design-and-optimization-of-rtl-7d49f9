// Exhaustive test of the sum generator bit cell: all 8 input combinations,
// expected value = parity of the number of ones among the inputs.
module tb_sum_gen;
  logic ai, bi, ci, si;
  int checks = 0, failures = 0;

  sum_gen dut (.ai, .bi, .ci, .si);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ai, bi, ci} = 3'(v);
      #1;
      checks++;
      if (si !== ((v == 1 || v == 2 || v == 4 || v == 7) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL sum_gen in=%03b si=%b", 3'(v), si);
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
