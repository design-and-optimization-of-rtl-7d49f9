// Test of the carry predictor (16-bit block, 8 predictor bits): the prediction
// must equal the carry out of the upper 8 bit pairs added with carry in 0,
// i.e. bit 8 of a[15:8] + b[15:8]. Also checks that a predicted 1 implies the
// real carry out of the block for any carry in, and that mispredictions do
// occur, only when a[15:8] ^ b[15:8] is all ones.
module tb_carry_predictor;
  localparam int unsigned W = 16, P = 8;
  logic [W-1:0] a, b;
  logic c_pred, cin;
  logic [P:0] grp;
  logic [W:0] full;
  int checks = 0, failures = 0, misses = 0;

  carry_predictor dut (.a, .b, .c_pred);

  task automatic check();
    #1;
    grp  = {1'b0, a[W-1:W-P]} + {1'b0, b[W-1:W-P]};
    full = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if (c_pred !== grp[P]) begin
      failures++;
      $display("FAIL pred a=%h b=%h pred=%b expected %b", a, b, c_pred, grp[P]);
    end
    checks++;
    if (c_pred && !full[W]) begin
      failures++;
      $display("FAIL predicted carry that is not real: a=%h b=%h", a, b);
    end
    if (c_pred != full[W]) begin
      misses++;
      checks++;
      if ((a[W-1:W-P] ^ b[W-1:W-P]) != '1) begin
        failures++;
        $display("FAIL miss without full propagate: a=%h b=%h", a, b);
      end
    end
  endtask

  initial begin
    // upper byte propagates, lower byte generates: the one case it misses
    a = 16'hF0FF; b = 16'h0F01; cin = 0; check();
    a = 16'h8000; b = 16'h8000; cin = 0; check();
    a = 16'h00FF; b = 16'h00FF; cin = 1; check();
    for (int n = 0; n < 4000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (n % 4 == 0) b[W-1:W-P] = ~a[W-1:W-P];  // force the propagate case
      check();
    end
    checks++;
    if (misses == 0) begin failures++; $display("FAIL no misprediction seen"); end
    $display("mispredictions: %0d", misses);
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
