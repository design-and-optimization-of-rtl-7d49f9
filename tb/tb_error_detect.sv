// Test of error detection: exhaustive over all carry pairs for 2 blocks (the
// default) and 4 blocks; each flag must be the mismatch of its pair and ER the
// OR of the flags.
module tb_error_detect;
  logic [1:0] ca2, cs2, e2;
  logic [3:0] ca4, cs4, e4;
  logic er2, er4;
  int checks = 0, failures = 0;

  error_detect dut2 (.c_act(ca2), .c_spec(cs2), .e(e2), .er(er2));
  error_detect #(.NB(4)) dut4 (.c_act(ca4), .c_spec(cs4), .e(e4), .er(er4));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {ca2, cs2} = 4'(v);
      #1;
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (e2[j] !== (ca2[j] != cs2[j])) begin failures++; $display("FAIL e2[%0d] v=%0d", j, v); end
      end
      checks++;
      if (er2 !== (ca2 != cs2)) begin failures++; $display("FAIL er2 v=%0d", v); end
    end
    for (int v = 0; v < 256; v++) begin
      {ca4, cs4} = 8'(v);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (e4[j] !== (ca4[j] != cs4[j])) begin failures++; $display("FAIL e4[%0d] v=%0d", j, v); end
      end
      checks++;
      if (er4 !== (ca4 != cs4)) begin failures++; $display("FAIL er4 v=%0d", v); end
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
